`timescale 1ns / 1ps
// tb_output_buffer: checks that the buffer does not invert, that a rising edge reaches
// vout 30 ns after vin and a falling edge 20 ns after it (the model defaults), and that
// a pulse shorter than the edge delay is swallowed.
module tb_output_buffer;

  logic vin, vout;
  int   checks = 0;
  int   failures = 0;

  output_buffer dut (.vin(vin), .vout(vout));

  task automatic expect_out(input logic v, input string what);
    checks++;
    if (vout !== v) begin
      failures++;
      $display("FAIL %s: vout=%b expected %b at %0t", what, vout, v, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 0;
    #100 expect_out(1'b0, "settled low");
    for (int i = 0; i < 5; i++) begin
      vin = 1;
      #29 expect_out(1'b0, "rose before 30 ns");
      #2  expect_out(1'b1, "not high 31 ns after rise");
      #100;
      vin = 0;
      #19 expect_out(1'b1, "fell before 20 ns");
      #2  expect_out(1'b0, "not low 21 ns after fall");
      #100;
    end
    // A 10 ns high pulse is shorter than the rise delay.
    vin = 1;
    #10 vin = 0;
    #50 expect_out(1'b0, "short pulse passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
