`timescale 1ns / 1ps
// tb_clock_gen: drives vp as a square wave and checks the two phases of the model:
// vp1 high with vp, vp2 high while vp is low, never both high, and the edge timing
// (the phase going low T_GATE_NS after a vp edge, the other one rising 2*T_GATE_NS
// after it). Run at the 2 MHz and 18 MHz clock periods used in the chip's simulations.
module tb_clock_gen;

  localparam int unsigned TG = 5;   // model default gate delay, ns

  logic vp, vp1, vp2;
  int   checks = 0;
  int   failures = 0;
  int   overlaps = 0;

  clock_gen dut (.vp(vp), .vp1(vp1), .vp2(vp2));

  always @(vp1 or vp2) if (vp1 && vp2 && $time > 20) overlaps++;

  task automatic expect_phases(input logic e1, input logic e2, input string what);
    checks++;
    if (vp1 !== e1 || vp2 !== e2) begin
      failures++;
      $display("FAIL %s: vp1=%b vp2=%b expected %b%b at %0t", what, vp1, vp2, e1, e2, $time);
    end
  endtask

  // One vp period of length 2*half ns, checking the phases around both edges.
  task automatic period(input real half);
    vp = 1;
    #(TG - 1) expect_phases(1'b0, 1'b1, "vp2 fell early");
    #2        expect_phases(1'b0, 1'b0, "gap after vp rise");
    #(TG)     expect_phases(1'b1, 1'b0, "vp1 not high after vp rise");
    #(half - 2*TG - 1);
    vp = 0;
    #(TG - 1) expect_phases(1'b1, 1'b0, "vp1 fell early");
    #2        expect_phases(1'b0, 1'b0, "gap after vp fall");
    #(TG)     expect_phases(1'b0, 1'b1, "vp2 not high after vp fall");
    #(half - 2*TG - 1);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vp = 0;
    #100;
    expect_phases(1'b0, 1'b1, "idle with vp low");
    for (int i = 0; i < 10; i++) period(250.0);   // 2 MHz
    for (int i = 0; i < 10; i++) period(27.5);    // 18 MHz
    checks++;
    if (overlaps != 0) begin
      failures++;
      $display("FAIL phases overlapped %0d times", overlaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
