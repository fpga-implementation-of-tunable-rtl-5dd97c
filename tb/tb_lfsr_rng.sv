`timescale 1ns / 1ps
// Self-checking testbench for lfsr_rng: compares every state with a reference
// model written from the tap list {4,5,6,8} (1-based flip-flop numbers), checks
// the seed after reset and that the sequence has the full period of 255.
module tb_lfsr_rng;
  import keygen_pkg::*;
  logic clk = 0, rst = 1;
  key_t rnd;
  int checks = 0, failures = 0;

  lfsr_rng dut (.clk, .rst, .rnd);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_next(logic [7:0] s);
    int taps [4] = '{4, 5, 6, 8};
    logic fb = 0;
    foreach (taps[i]) fb ^= s[taps[i]-1];
    return {s[6:0], fb};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    int period;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    checks++; if (rnd !== 8'd227) begin failures++; $display("seed %0d", rnd); end
    exp = rnd;
    period = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      exp = ref_next(exp);
      checks++;
      if (rnd !== exp) begin failures++; $display("step %0d: got %0d exp %0d", i, rnd, exp); end
      if (period == 0 && rnd == 8'd227) period = i + 1;
    end
    checks++; if (period != 255) begin failures++; $display("period %0d", period); end
    // synchronous reset reloads the seed mid-run
    rst <= 1; @(negedge clk); rst <= 0;
    checks++; if (rnd !== 8'd227) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
