`timescale 1ns / 1ps
// Self-checking testbench for sel_lfsr3: after reset the select must run
// 1, 4, 2, 5, 6, 7, 3 and repeat with period 7, never showing 000.
module tb_sel_lfsr3;
  import keygen_pkg::*;
  logic clk = 0, rst = 1;
  method_e sel;
  int checks = 0, failures = 0;
  int expected [7] = '{1, 4, 2, 5, 6, 7, 3};

  sel_lfsr3 dut (.clk, .rst, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 70; i++) begin
      checks++;
      if (3'(sel) !== 3'(expected[i % 7])) begin failures++; $display("step %0d: got %0d exp %0d", i, sel, expected[i % 7]); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
