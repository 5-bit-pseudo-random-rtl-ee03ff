`timescale 1ns / 1ps
// tb_prbg_top: end-to-end test of the generator.
//
// Two instances run side by side at an 18 MHz clock (55 ns period, the fastest clock at
// which the chip's own simulation still gave the right sequence):
//   dut     phases from the on-chip clock generator (default configuration),
//   dut_em  phases supplied on the emergency pads e_phi1/e_phi2 by this testbench.
// For each instance the test
//   1. holds vrst for RESET_CYCLES periods from an unknown state, checks 00000,
//   2. releases vrst and checks the state and vout once per period against the
//      tabulated 31-state sequence for 70 periods (more than two full sequences),
//   3. forces the register into 11111, checks it stays there without reset (X-Nor
//      lock-up), then resets it again and checks the sequence restarts.
// Samples are taken 1 ns before each falling edge of vp, where the register has shifted
// once in the period and vout has settled through the output buffer. The mechanisms
// seen are counted: reset clearing, sequence wrap-around after 31 periods, running
// from the emergency pads, and leaving the lock-up state by reset; each must occur.
module tb_prbg_top;
  import prbg_pkg::*;
  import prbg_ref_pkg::*;

  localparam real HALF = 27.5;   // half period of vp, ns (18 MHz)
  localparam real TNOV = 3.0;    // gap between the emergency phases, ns

  logic vp, vrst, e_phi1, e_phi2;
  logic vout, vout_em;
  int   checks = 0;
  int   failures = 0;

  int   n_reset_clear = 0;
  int   n_wrap = 0;
  int   n_emergency_ok = 0;
  int   n_lockup_escape = 0;

  prbg_top dut (
    .vp(vp), .vrst(vrst), .e_phi1(1'b0), .e_phi2(1'b0), .vout(vout)
  );

  prbg_top #(.USE_EMERGENCY_CLOCKS(1'b1)) dut_em (
    .vp(1'b0), .vrst(vrst), .e_phi1(e_phi1), .e_phi2(e_phi2), .vout(vout_em)
  );

  // Clock and hand-made non-overlapping emergency phases, aligned with vp.
  initial begin
    vp = 0; e_phi1 = 0; e_phi2 = 0;
    #(HALF);
    forever begin
      vp = 1;
      e_phi2 = 0;
      #(TNOV) e_phi1 = 1;
      #(HALF - TNOV) vp = 0;
      e_phi1 = 0;
      #(TNOV) e_phi2 = 1;
      #(HALF - TNOV);
    end
  end

  function automatic void check_state(input state_t got, input logic got_vout,
                                      input logic [4:0] exp, input string who, input int k);
    checks += 2;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s period %0d: state %b expected %b", who, k, got, exp);
    end
    if (got_vout !== exp[4]) begin
      failures++;
      $display("FAIL %s period %0d: vout %b expected %b", who, k, got_vout, exp[4]);
    end
  endfunction

  // Wait until 1 ns before the next falling edge of vp. The register shifted just after
  // the previous falling edge and vout has had a full period less 1 ns to follow.
  task automatic to_sample_point();
    @(posedge vp);
    #(HALF - 1.0);
  endtask

  task automatic run_sequence(input int periods);
    for (int k = 1; k <= periods; k++) begin
      to_sample_point();
      check_state(dut.q, vout, SEQ[k % REF_LEN], "gen", k);
      check_state(dut_em.q, vout_em, SEQ[k % REF_LEN], "emergency", k);
      if (k % REF_LEN == 0 && dut.q == SEQ[0]) n_wrap++;
      if (dut_em.q == SEQ[k % REF_LEN] && vout_em == SEQ[k % REF_LEN][4]) n_emergency_ok++;
    end
  endtask

  task automatic do_reset();
    // Called at a sample point: vp is high, so the first stage already takes the 0.
    vrst = 1;
    repeat (RESET_CYCLES) to_sample_point();
    check_state(dut.q, vout, SEQ[0], "gen reset", 0);
    check_state(dut_em.q, vout_em, SEQ[0], "emergency reset", 0);
    if (dut.q == '0 && dut_em.q == '0) n_reset_clear++;
    vrst = 0;   // released while phi1 is still high: the next shift loads the feedback
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vrst = 1;
    to_sample_point();
    do_reset();
    run_sequence(70);

    // Lock-up: load 11111 into the slave nodes (a stored 0 there is a 1 at the output).
    to_sample_point();
    for (int i = 0; i < N_STAGES; i++) begin
      case (i)
        0: begin force dut.g_stage[0].u_ff.s = 1'b0; force dut.g_stage[0].u_ff.m = 1'b1; end
        1: begin force dut.g_stage[1].u_ff.s = 1'b0; force dut.g_stage[1].u_ff.m = 1'b1; end
        2: begin force dut.g_stage[2].u_ff.s = 1'b0; force dut.g_stage[2].u_ff.m = 1'b1; end
        3: begin force dut.g_stage[3].u_ff.s = 1'b0; force dut.g_stage[3].u_ff.m = 1'b1; end
        default: begin force dut.g_stage[4].u_ff.s = 1'b0; force dut.g_stage[4].u_ff.m = 1'b1; end
      endcase
    end
    #0.5;
    release dut.g_stage[0].u_ff.s; release dut.g_stage[0].u_ff.m;
    release dut.g_stage[1].u_ff.s; release dut.g_stage[1].u_ff.m;
    release dut.g_stage[2].u_ff.s; release dut.g_stage[2].u_ff.m;
    release dut.g_stage[3].u_ff.s; release dut.g_stage[3].u_ff.m;
    release dut.g_stage[4].u_ff.s; release dut.g_stage[4].u_ff.m;
    repeat (10) begin
      to_sample_point();
      checks++;
      if (dut.q !== 5'b11111) begin
        failures++;
        $display("FAIL lock-up state left without reset: %b", dut.q);
      end
    end
    do_reset();
    if (dut.q == '0) n_lockup_escape++;
    run_sequence(31);

    checks += 4;
    if (n_reset_clear   == 0) begin failures++; $display("FAIL reset never cleared"); end
    if (n_wrap          == 0) begin failures++; $display("FAIL sequence never wrapped"); end
    if (n_emergency_ok  == 0) begin failures++; $display("FAIL emergency pads never ran"); end
    if (n_lockup_escape == 0) begin failures++; $display("FAIL lock-up never left"); end
    $display("mechanisms: reset_clear=%0d wrap=%0d emergency_periods=%0d lockup_escape=%0d",
             n_reset_clear, n_wrap, n_emergency_ok, n_lockup_escape);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
