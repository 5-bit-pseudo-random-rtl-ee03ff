`timescale 1ns / 1ps
// tb_prbg_clock_rates: the generator in its default configuration at each clock rate of
// the chip's circuit simulations: 10 kHz, 2 MHz, 4 MHz, 8 MHz, 18 MHz and 20 MHz. For
// each rate it resets the register for RESET_CYCLES periods and then checks the state
// and vout once per period for 40 periods against the tabulated sequence, which also
// checks that the register advances exactly one state per clock period. The logic model
// has no analog speed limit, so all six rates must give the correct sequence here (the
// transistor circuit stopped doing so at 20 MHz).
module tb_prbg_clock_rates;
  import prbg_pkg::*;
  import prbg_ref_pkg::*;

  localparam int unsigned N_RATES = 6;
  localparam real HALF_NS [N_RATES] = '{50000.0, 250.0, 125.0, 62.5, 27.5, 25.0};
  localparam int  RATE_KHZ [N_RATES] = '{10, 2000, 4000, 8000, 18000, 20000};

  real  half;
  logic vp, vrst, vout;
  int   checks = 0;
  int   failures = 0;
  int   rates_ok = 0;

  prbg_top dut (.vp(vp), .vrst(vrst), .e_phi1(1'b0), .e_phi2(1'b0), .vout(vout));

  initial begin
    half = HALF_NS[0];
    vp = 0;
    #(half);
    forever begin
      vp = 1;
      #(half) vp = 0;
      #(half);
    end
  end

  // 1 ns before the next falling edge of vp.
  task automatic to_sample_point();
    @(posedge vp);
    #(half - 1.0);
  endtask

  initial begin
    #30ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vrst = 1;
    for (int r = 0; r < N_RATES; r++) begin
      int fails_before;
      fails_before = failures;
      to_sample_point();
      half = HALF_NS[r];       // takes effect from the next clock edge
      vrst = 1;
      repeat (RESET_CYCLES + 1) to_sample_point();
      checks++;
      if (dut.q !== '0) begin
        failures++;
        $display("FAIL %0d kHz: state %b after reset", RATE_KHZ[r], dut.q);
      end
      vrst = 0;
      for (int k = 1; k <= 40; k++) begin
        to_sample_point();
        checks += 2;
        if (dut.q !== SEQ[k % REF_LEN]) begin
          failures++;
          $display("FAIL %0d kHz period %0d: state %b expected %b",
                   RATE_KHZ[r], k, dut.q, SEQ[k % REF_LEN]);
        end
        if (vout !== SEQ[k % REF_LEN][4]) begin
          failures++;
          $display("FAIL %0d kHz period %0d: vout %b expected %b",
                   RATE_KHZ[r], k, vout, SEQ[k % REF_LEN][4]);
        end
      end
      if (failures == fails_before) rates_ok++;
    end
    $display("rates with the correct sequence: %0d of %0d", rates_ok, N_RATES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
