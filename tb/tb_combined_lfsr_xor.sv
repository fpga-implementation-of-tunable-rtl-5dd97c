`timescale 1ns / 1ps
// Self-checking testbench for combined_lfsr_xor: the low seven bits follow a
// reference 7-bit LFSR with feedback flop1 ^ flop7 (x^7+x+1, period 127) and
// bit 8 must always be the parity of the low seven bits.
module tb_combined_lfsr_xor;
  logic clk = 0, rst = 1;
  logic [7:0] rnd;
  int checks = 0, failures = 0;

  combined_lfsr_xor dut (.clk, .rst, .rnd);

  always #5 clk = ~clk;

  function automatic logic [6:0] ref_next(logic [6:0] s);
    return {s[5:0], s[0] ^ s[6]};
  endfunction

  function automatic logic parity7(logic [6:0] s);
    int n = 0;
    for (int i = 0; i < 7; i++) n += int'(s[i]);
    return logic'(n % 2);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp;
    int period = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    exp = 7'h7F;
    for (int i = 0; i < 400; i++) begin
      checks++;
      if (rnd[6:0] !== exp) begin failures++; $display("step %0d: got %0d exp %0d", i, rnd[6:0], exp); end
      checks++;
      if (rnd[7] !== parity7(exp)) begin failures++; $display("step %0d: parity bit wrong", i); end
      if (i > 0 && period == 0 && rnd[6:0] == 7'h7F) period = i;
      exp = ref_next(exp);
      @(negedge clk);
    end
    checks++; if (period != 127) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
