`timescale 1ns / 1ps
// tb_xnor_gate: exhaustive check of the feedback X-Nor against its truth table.
module tb_xnor_gate;

  logic a, b, y;
  int   checks = 0;
  int   failures = 0;

  // Expected y for {a, b} = 00, 01, 10, 11.
  localparam logic [3:0] TRUTH = 4'b1001;

  xnor_gate dut (.a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 4; i++) begin
        {a, b} = 2'(i);
        #1;
        checks++;
        if (y !== TRUTH[i]) begin
          failures++;
          $display("FAIL a=%b b=%b y=%b expected %b", a, b, y, TRUTH[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
