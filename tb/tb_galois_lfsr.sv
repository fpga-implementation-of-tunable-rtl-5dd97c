`timescale 1ns / 1ps
// Self-checking testbench for galois_lfsr: the first fifteen states must equal
// the published sequence 255, 143, 111, ..., 139; later states are checked
// against a mask-based Galois model of x^8+x^6+x^5+x^4+1; the period must be 255.
module tb_galois_lfsr;
  import keygen_pkg::*;
  logic clk = 0, rst = 1;
  key_t rnd;
  int checks = 0, failures = 0;
  byte unsigned published [15] = '{255, 143, 111, 222, 205, 235, 167, 63, 126, 252, 137, 99, 198, 253, 139};

  galois_lfsr dut (.clk, .rst, .rnd);

  always #5 clk = ~clk;

  // rotate left; when the bit rotated out is 1, flip bits 4, 5, 6 (mask 0x70)
  function automatic logic [7:0] ref_next(logic [7:0] s);
    logic [7:0] n = {s[6:0], s[7]};
    if (s[7]) n ^= 8'h70;
    return n;
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
    exp = rnd;
    for (int i = 0; i < 15; i++) begin
      checks++;
      if (rnd !== 8'(published[i])) begin failures++; $display("published[%0d]: got %0d exp %0d", i, rnd, published[i]); end
      @(negedge clk);
    end
    exp = 8'(published[14]);
    exp = ref_next(exp);
    for (int i = 15; i < 600; i++) begin
      checks++;
      if (rnd !== exp) begin failures++; $display("step %0d: got %0d exp %0d", i, rnd, exp); end
      if (period == 0 && rnd == 8'hFF) period = i;
      exp = ref_next(exp);
      @(negedge clk);
    end
    checks++; if (period != 255) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
