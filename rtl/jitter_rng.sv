`timescale 1ns / 1ps
// jitter_rng -- random numbers from the beat between two ring oscillators.
//
// Oscillator A (j1) is sampled by a D flip-flop clocked by oscillator B (j2).
// Because the two frequencies differ slightly and both jitter, the sampled
// value q is 1 at irregular instants. An 8-bit counter, also clocked by j2,
// counts oscillator-B periods while q is 0 and is cleared when q is 1. The
// counter value at any moment is the random number.
//
// The counter lives in the oscillator-B domain. It is carried into the system
// clock domain through SYNC_STAGES flip-flops per bit; a value caught while
// bits change may mix old and new bits, which is harmless for a random value.
//
// Interface: clk/rst system clock and active-high reset (rst also clears the
// oscillator-domain flops asynchronously), j1/j2 the oscillator outputs,
// q the sampling flip-flop, count_osc the counter in the j2 domain, rnd the
// resynchronised value. The oscillator-domain flops use rst asynchronously
// because their clock j2 may be stopped while rst is applied; the system-clock
// flops use it synchronously, like the rest of the design. Timing: rnd lags count_osc by SYNC_STAGES clk cycles.
// The sampler and counter follow the published architecture; the clock domain
// crossing and the reset scheme are this implementation's.
module jitter_rng
  import keygen_pkg::*;
#(
  parameter int unsigned W           = KEY_W,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         j1,
  input  logic         j2,
  output logic         q,
  output logic [W-1:0] count_osc,
  output logic [W-1:0] rnd
);

  // oscillator-B domain
  always_ff @(posedge j2 or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= j1;
  end

  always_ff @(posedge j2 or posedge rst) begin
    if (rst)    count_osc <= '0;
    else if (q) count_osc <= '0;
    else        count_osc <= count_osc + 1'b1;
  end

  // system-clock domain
  logic [W-1:0] sync [SYNC_STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < SYNC_STAGES; i++) sync[i] <= '0;
    end else begin
      sync[0] <= count_osc;
      for (int i = 1; i < SYNC_STAGES; i++) sync[i] <= sync[i-1];
    end
  end

  assign rnd = sync[SYNC_STAGES-1];

endmodule
