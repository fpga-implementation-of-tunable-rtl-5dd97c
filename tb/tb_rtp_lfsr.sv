`timescale 1ns / 1ps
// Self-checking testbench for rtp_lfsr: the tap select is held at each code
// for a while and then changed at random every clock; each state is compared
// with a reference that applies the tap pair (1&2, 2&3, 3&4, 4&1) as a
// polynomial step written with 1-based flop numbers.
module tb_rtp_lfsr;
  logic clk = 0, rst = 1;
  logic [1:0] tap_sel = 2'b00;
  logic [3:0] rnd;
  int checks = 0, failures = 0;
  int used [4] = '{0, 0, 0, 0};

  rtp_lfsr dut (.clk, .rst, .tap_sel, .rnd);

  always #5 clk = ~clk;

  // flop numbers 1..4; taps a & b, with b = a + 1 (mod 4); XOR goes into flop b+1
  function automatic logic [3:0] ref_next(logic [3:0] s, logic [1:0] ts);
    logic [4:1] f, n;
    int a, b, c;
    for (int k = 1; k <= 4; k++) f[k] = s[k-1];
    for (int k = 1; k <= 4; k++) n[k] = f[(k == 1) ? 4 : k - 1];
    a = int'(ts) + 1;
    b = (a == 4) ? 1 : a + 1;
    c = (b == 4) ? 1 : b + 1;
    n[c] = f[a] ^ f[b];
    return {n[4], n[3], n[2], n[1]};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    exp = 4'hF;
    for (int i = 0; i < 1200; i++) begin
      checks++;
      if (rnd !== exp) begin failures++; $display("step %0d sel %0d: got %h exp %h", i, tap_sel, rnd, exp); end
      checks++;
      if (rnd == 4'h0) failures++;
      exp = ref_next(exp, tap_sel);
      used[tap_sel]++;
      @(negedge clk);
      tap_sel = (i < 400) ? 2'(i / 100) : 2'($urandom_range(3));
    end
    foreach (used[i]) begin
      checks++;
      if (used[i] == 0) begin failures++; $display("tap select %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
