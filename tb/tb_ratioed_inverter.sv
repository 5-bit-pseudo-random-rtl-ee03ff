`timescale 1ns / 1ps
// tb_ratioed_inverter: checks both inverter variants (12:1 and 24:1 pull-down) against
// the inversion truth table, for both input levels and over a run of random inputs.
module tb_ratioed_inverter;

  logic vin;
  logic vout12, vout24;
  int   checks = 0;
  int   failures = 0;

  ratioed_inverter #(.PD_RATIO(12)) dut12 (.vin(vin), .vout(vout12));
  ratioed_inverter #(.PD_RATIO(24)) dut24 (.vin(vin), .vout(vout24));

  task automatic check(input logic v);
    vin = v;
    #1;
    checks += 2;
    if (vout12 !== !v) begin failures++; $display("FAIL 12:1 vin=%b vout=%b", v, vout12); end
    if (vout24 !== !v) begin failures++; $display("FAIL 24:1 vin=%b vout=%b", v, vout24); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1'b0);
    check(1'b1);
    for (int i = 0; i < 20; i++) check(1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
