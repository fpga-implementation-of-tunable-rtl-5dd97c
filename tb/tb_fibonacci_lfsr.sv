`timescale 1ns / 1ps
// Self-checking testbench for fibonacci_lfsr: every state is compared with a
// reference that computes the feedback as the parity of (state & 0xB8), i.e.
// flip-flops 4, 5, 6 and 8; the seed and the full period of 255 are checked.
module tb_fibonacci_lfsr;
  import keygen_pkg::*;
  logic clk = 0, rst = 1;
  key_t rnd;
  int checks = 0, failures = 0;

  fibonacci_lfsr dut (.clk, .rst, .rnd);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_next(logic [7:0] s);
    return {s[6:0], ^(s & 8'hB8)};
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
    int period = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    checks++; if (rnd !== 8'hFF) begin failures++; $display("seed %0d", rnd); end
    exp = 8'hFF;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      exp = ref_next(exp);
      checks++;
      if (rnd !== exp) begin failures++; $display("step %0d: got %0d exp %0d", i, rnd, exp); end
      if (period == 0 && rnd == 8'hFF) period = i + 1;
    end
    checks++; if (period != 255) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
