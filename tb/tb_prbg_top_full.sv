`timescale 1ns / 1ps
// tb_prbg_top_full: the generator in its default configuration, run as the chip was
// measured: a 10 kHz square wave on vp (100 us period, 50 % duty), vrst held high for
// the first RESET_CYCLES periods, then the output watched on vout alone for two full
// sequences plus a few bits (70 periods). Every period's vout is compared, 1 us before
// the falling edge of vp, with the tabulated sequence; the state inside is compared
// too, and the test checks that the 31-bit pattern repeats exactly.
module tb_prbg_top_full;
  import prbg_pkg::*;
  import prbg_ref_pkg::*;

  localparam real HALF = 50000.0;   // half period of vp, ns (10 kHz)

  logic vp, vrst, vout;
  logic [69:0] seen;
  int   checks = 0;
  int   failures = 0;

  prbg_top dut (.vp(vp), .vrst(vrst), .e_phi1(1'b0), .e_phi2(1'b0), .vout(vout));

  initial begin
    vp = 0;
    #(HALF);
    forever begin
      vp = 1;
      #(HALF) vp = 0;
      #(HALF);
    end
  end

  task automatic to_sample_point();
    @(posedge vp);
    #(HALF - 1000.0);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vrst = 1;
    to_sample_point();
    repeat (RESET_CYCLES) to_sample_point();
    checks++;
    if (dut.q !== '0 || vout !== 1'b0) begin
      failures++;
      $display("FAIL after reset: state %b vout %b", dut.q, vout);
    end
    vrst = 0;
    for (int k = 1; k <= 70; k++) begin
      to_sample_point();
      seen[k-1] = vout;
      checks += 2;
      if (vout !== SEQ[k % REF_LEN][4]) begin
        failures++;
        $display("FAIL period %0d: vout %b expected %b", k, vout, SEQ[k % REF_LEN][4]);
      end
      if (dut.q !== SEQ[k % REF_LEN]) begin
        failures++;
        $display("FAIL period %0d: state %b expected %b", k, dut.q, SEQ[k % REF_LEN]);
      end
    end
    // The output pattern has period 31 and no shorter one.
    for (int k = 0; k + REF_LEN < 70; k++) begin
      checks++;
      if (seen[k] !== seen[k + REF_LEN]) begin
        failures++;
        $display("FAIL vout bit %0d differs from bit %0d", k, k + REF_LEN);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
