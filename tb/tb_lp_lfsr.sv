`timescale 1ns / 1ps
// Self-checking testbench for lp_lfsr: each state is compared with an
// ungated reference LFSR (feedback flop7 ^ flop8), and clk_en must be 1
// exactly for the flip-flops whose value changes. Cycles in which at least one
// flop is gated off are counted; there must be some.
module tb_lp_lfsr;
  import keygen_pkg::*;
  logic clk = 0, rst = 1;
  key_t rnd;
  logic [7:0] clk_en;
  int checks = 0, failures = 0, gated_cycles = 0, held_bits = 0;

  lp_lfsr dut (.clk, .rst, .rnd, .clk_en);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_next(logic [7:0] s);
    return {s[6:0], s[6] ^ s[7]};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp, nxt;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    exp = 8'hFF;
    for (int i = 0; i < 500; i++) begin
      nxt = ref_next(exp);
      checks++;
      if (rnd !== exp) begin failures++; $display("step %0d: got %0d exp %0d", i, rnd, exp); end
      checks++;
      if (clk_en !== (nxt ^ exp)) begin failures++; $display("step %0d: clk_en %b exp %b", i, clk_en, nxt ^ exp); end
      if (clk_en != 8'hFF) gated_cycles++;
      held_bits += 8 - $countones(clk_en);
      exp = nxt;
      @(negedge clk);
    end
    $display("gated cycles %0d, flop clock edges saved %0d of %0d", gated_cycles, held_bits, 500 * 8);
    checks++; if (gated_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
