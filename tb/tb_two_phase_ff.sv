`timescale 1ns / 1ps
// tb_two_phase_ff: drives the flip-flop with hand-made non-overlapping phases and checks
//  - the output does not change while phi1 is high (master open, slave closed),
//  - the master holds its value after phi1 falls even if data_in changes,
//  - the output takes the value data_in had when phi1 fell, once phi2 is high,
//  - the output does not follow data_in while phi2 is high,
//  - a random bit stream comes out unchanged, one bit per phase cycle.
module tb_two_phase_ff;

  logic d, phi1, phi2, q;
  logic expected;
  int   checks = 0;
  int   failures = 0;

  two_phase_ff dut (.data_in(d), .phi1(phi1), .phi2(phi2), .data_out(q));

  task automatic expect_q(input logic v, input string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, v, $time);
    end
  endtask

  // One clock period: phi1 pulse with data_in = v, then phi2 pulse. Data_in is changed
  // to the inverse of v as soon as phi1 has fallen, to show the master holds.
  task automatic cycle(input logic v);
    logic q_prev;
    q_prev = q;
    d = v;
    #5 phi1 = 1;
    #20 expect_q(q_prev, "output moved while phi1 high");
    phi1 = 0;
    #2 d = ~v;
    #3 phi2 = 1;
    #5 expect_q(v, "output after phi2");
    d = v;
    #5 d = ~v;
    #5 expect_q(v, "output followed data_in while phi2 high");
    phi2 = 0;
    #5;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phi1 = 0; phi2 = 0; d = 0;
    #10;
    cycle(1'b0);
    cycle(1'b1);
    cycle(1'b1);
    cycle(1'b0);
    for (int i = 0; i < 100; i++) begin
      expected = 1'($urandom);
      cycle(expected);
    end
    // With both phases low the output holds indefinitely.
    expected = q;
    d = ~expected;
    #200 expect_q(expected, "output moved with both phases low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
