`timescale 1ns / 1ps
// End-to-end testbench for tunable_key_gen at its default parameters.
//
// The testbench keeps its own models of the select LFSR and of every
// deterministic generator (block-memory table, LFSR, Galois, Fibonacci,
// combined LFSR/XOR, low-power LFSR, run-time-polynomial LFSR) and compares
// them with the design's outputs every clock, together with key, which must
// equal the model of the selected method. The jitter generator cannot be
// predicted; it is checked for activity: its sampling flip-flop must toggle
// and its value must change. The run counts how often each mechanism occurs
// (each reachable method chosen as key, every run-time tap pair used, clock
// gating of the low-power LFSR, block-memory wrap-around, jitter activity) and
// counts a failure for any that never occurs.
module tb_tunable_key_gen;
  import keygen_pkg::*;

  localparam int CYCLES = 3000;

  logic clk = 0, rst = 0, osc_en = 0;
  key_t key;
  method_e sel;
  key_t method_rnd [N_METHODS];
  logic [7:0] lp_clk_en;
  logic jitter_q;

  int checks = 0, failures = 0;
  int chosen [N_METHODS];
  int tap_used [4];
  int lp_gated = 0, bram_wraps = 0, jitter_q_rises = 0, jitter_changes = 0;

  tunable_key_gen dut (.clk, .rst, .osc_en, .key, .sel, .method_rnd, .lp_clk_en, .jitter_q);

  always #5 clk = ~clk;

  // sequences printed for the published key-generation run: the select k and
  // the Galois generator's output over the first fifteen clocks
  byte unsigned pub_k   [15] = '{1, 4, 2, 5, 6, 7, 3, 1, 4, 2, 5, 6, 7, 3, 1};
  byte unsigned pub_gal [15] = '{255, 143, 111, 222, 205, 235, 167, 63, 126, 252, 137, 99, 198, 253, 139};

  byte unsigned table_v [16] = '{80, 100, 151, 67, 25, 55, 86, 121, 51, 73, 69, 9, 147, 84, 49, 50};

  // models, flip-flop k is bit k-1 unless noted
  function automatic logic [7:0] fib_next(logic [7:0] s);   // taps 4,5,6,8 into flop 1
    return {s[6:0], ^(s & 8'hB8)};
  endfunction
  function automatic logic [7:0] gal_next(logic [7:0] s);   // rotate, flip taps when out bit is 1
    logic [7:0] n = {s[6:0], s[7]};
    if (s[7]) n ^= 8'h70;
    return n;
  endfunction
  function automatic logic [6:0] comb_next(logic [6:0] s);
    return {s[5:0], s[0] ^ s[6]};
  endfunction
  function automatic logic [7:0] lp_next(logic [7:0] s);
    return {s[6:0], s[6] ^ s[7]};
  endfunction
  function automatic logic [3:0] rtp_next(logic [3:0] s, logic [1:0] ts);
    logic [3:0] n = {s[2:0], s[3]};
    int a = int'(ts), b = (a + 1) % 4, c = (a + 2) % 4;   // 0-based tap pair and target
    n[c] = s[a] ^ s[b];
    return n;
  endfunction

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge jitter_q) jitter_q_rises++;

  initial begin
    logic [2:0] m_sel;
    logic [7:0] m_lfsr, m_gal, m_fib, m_lp;
    logic [6:0] m_comb;
    logic [3:0] m_rtp;
    int m_addr;
    logic [7:0] m_bram;
    key_t exp [N_METHODS];
    key_t last_jitter;

    #1 rst = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    osc_en <= 1;
    @(negedge clk);
    m_sel = 3'b001; m_lfsr = 8'hE3; m_gal = 8'hFF; m_fib = 8'hFF; m_lp = 8'hFF;
    m_comb = 7'h7F; m_rtp = 4'hF; m_addr = 0; m_bram = 8'h00;
    last_jitter = method_rnd[M_JITTER];

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      exp[M_BRAM]         = m_bram;
      exp[M_LFSR]         = m_lfsr;
      exp[M_GALOIS]       = m_gal;
      exp[M_FIBONACCI]    = m_fib;
      exp[M_COMBINED]     = {^m_comb, m_comb};
      exp[M_LOW_POWER]    = m_lp;
      exp[M_RUNTIME_POLY] = {4'b0, m_rtp};
      exp[M_JITTER]       = method_rnd[M_JITTER];

      checks++;
      if (sel !== method_e'(m_sel)) begin failures++; $display("cyc %0d: sel %0d exp %0d", cyc, sel, m_sel); end
      for (int m = 1; m < int'(N_METHODS); m++) begin
        checks++;
        if (method_rnd[m] !== exp[m]) begin
          failures++; $display("cyc %0d: method %0d got %0d exp %0d", cyc, m, method_rnd[m], exp[m]);
        end
      end
      checks++;
      if (key !== exp[m_sel]) begin failures++; $display("cyc %0d: key %0d exp %0d (sel %0d)", cyc, key, exp[m_sel], m_sel); end
      chosen[m_sel]++;
      if (cyc < 15) begin
        checks += 2;
        if (3'(sel) !== 3'(pub_k[cyc]))             begin failures++; $display("cyc %0d: sel differs from published run", cyc); end
        if (method_rnd[M_GALOIS] !== 8'(pub_gal[cyc])) begin failures++; $display("cyc %0d: GAL differs from published run", cyc); end
      end

      // mechanisms
      checks++;
      if (lp_clk_en !== (lp_next(m_lp) ^ m_lp)) begin failures++; $display("cyc %0d: lp_clk_en %b", cyc, lp_clk_en); end
      if (lp_clk_en != 8'hFF) lp_gated++;
      tap_used[m_lfsr[1:0]]++;
      if (method_rnd[M_JITTER] != last_jitter) jitter_changes++;
      last_jitter = method_rnd[M_JITTER];

      // advance the models by one clock
      m_rtp  = rtp_next(m_rtp, m_lfsr[1:0]);
      m_sel  = {m_sel[1] ^ m_sel[0], m_sel[2], m_sel[1]};
      m_lfsr = fib_next(m_lfsr);
      m_gal  = gal_next(m_gal);
      m_fib  = fib_next(m_fib);
      m_comb = comb_next(m_comb);
      m_lp   = lp_next(m_lp);
      m_bram = 8'(table_v[m_addr]);
      if (m_addr == 15) bram_wraps++;
      m_addr = (m_addr + 1) % 16;
      @(negedge clk);
    end

    for (int m = 1; m < int'(N_METHODS); m++) begin
      $display("method %0d chosen as key %0d times", m, chosen[m]);
      checks++; if (chosen[m] == 0) failures++;
    end
    checks++; if (chosen[M_JITTER] != 0) begin failures++; $display("code 000 appeared on sel"); end
    for (int t = 0; t < 4; t++) begin
      $display("run-time tap pair %0d used %0d times", t, tap_used[t]);
      checks++; if (tap_used[t] == 0) failures++;
    end
    $display("low-power LFSR cycles with gated flops %0d", lp_gated);
    $display("block-memory wrap-arounds %0d", bram_wraps);
    $display("jitter sampler rises %0d, jitter value changes %0d", jitter_q_rises, jitter_changes);
    checks++; if (lp_gated == 0) failures++;
    checks++; if (bram_wraps == 0) failures++;
    checks++; if (jitter_q_rises == 0) failures++;
    checks++; if (jitter_changes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
