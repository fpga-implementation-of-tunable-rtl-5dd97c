`timescale 1ns / 1ps
// Self-checking testbench for bram_rng: after reset the output must walk the
// stored table (written out here independently of the memory file) one word
// per clock, starting one clock after reset is released, and wrap after the
// last word.
module tb_bram_rng;
  logic clk = 0, rst = 1;
  logic [7:0] rnd;
  logic [3:0] addr;
  int checks = 0, failures = 0, wraps = 0;
  byte unsigned table_v [16] = '{80, 100, 151, 67, 25, 55, 86, 121, 51, 73, 69, 9, 147, 84, 49, 50};

  bram_rng dut (.clk, .rst, .rnd, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    // reset state: address 0 about to be read, output register cleared
    checks++; if (addr !== 4'd0 || rnd !== 8'd0) begin
      failures++; $display("reset state: addr %0d rnd %0d", addr, rnd);
    end
    // one clock of read latency: word 0 appears after the first edge
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      checks++;
      if (rnd !== 8'(table_v[i % 16])) begin failures++; $display("cycle %0d: got %0d exp %0d", i, rnd, table_v[i % 16]); end
      if (i > 0 && i % 16 == 0) wraps++;
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
