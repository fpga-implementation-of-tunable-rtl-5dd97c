`timescale 1ns / 1ps
// Self-checking testbench for jitter_rng. Two oscillator signals with slightly
// different periods (and a small pseudo-random jitter) drive j1 and j2. On
// every rising edge of j2 a reference samples j1 and updates a reference
// counter (cleared when the sampled bit was 1, incremented otherwise); the
// DUT's q and count_osc must match. rnd must equal count_osc as seen
// SYNC_STAGES system clocks earlier while the oscillators are stopped.
module tb_jitter_rng;
  logic clk = 0, rst = 0;
  logic j1 = 0, j2 = 0, run = 0;
  logic q;
  logic [7:0] count_osc, rnd;
  int checks = 0, failures = 0, resets_seen = 0, incs_seen = 0;
  logic ref_q = 0;
  logic [7:0] ref_cnt = 0;

  jitter_rng dut (.clk, .rst, .j1, .j2, .q, .count_osc, .rnd);

  always #5 clk = ~clk;

  // j1 toggles only at even picoseconds and j2 only at odd ones, so the two
  // never change in the same time step and the sampled value is unambiguous
  always begin
    #((1400 + 2 * $urandom_range(15)) * 1ps);
    if (run) j1 = ~j1;
  end
  initial begin
    #1ps;
    forever begin
      #((1510 + 2 * $urandom_range(15)) * 1ps);
      if (run) j2 = ~j2;
    end
  end

  // reference model and comparison, on the j2 rising edge
  always @(posedge j2) begin
    if (!rst) begin
      if (ref_q) begin ref_cnt = 0; resets_seen++; end
      else       begin ref_cnt = ref_cnt + 1; incs_seen++; end
      ref_q = j1;
      #0.1;
      checks++;
      if (q !== ref_q || count_osc !== ref_cnt) begin
        failures++;
        $display("%t: q %b/%b count %0d/%0d", $time, q, ref_q, count_osc, ref_cnt);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1;   // a rising edge, so the asynchronous reset takes effect
    repeat (3) @(posedge clk);
    checks++; if (q !== 0 || count_osc !== 0 || rnd !== 0) failures++;
    rst <= 0;
    run = 1;
    repeat (2000) @(posedge clk);
    run = 0;
    #20;
    // oscillators stopped: after SYNC_STAGES clocks rnd shows count_osc
    @(posedge clk); @(posedge clk); @(negedge clk);
    checks++; if (rnd !== count_osc) begin failures++; $display("rnd %0d count %0d", rnd, count_osc); end
    $display("counter resets %0d, increments %0d", resets_seen, incs_seen);
    checks++; if (resets_seen == 0 || incs_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
