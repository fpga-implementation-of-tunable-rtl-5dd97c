`timescale 1ns / 1ps
// tunable_key_gen -- key generator that hops between eight random-number
// generators under control of a 3-bit LFSR.
//
// Eight generators run side by side, each producing an 8-bit word every
// clock: a ring-oscillator jitter counter, a block-memory table, a plain LFSR,
// a Galois LFSR, a Fibonacci LFSR, a 7-bit LFSR with a parity bit, a
// clock-gated low-power LFSR and a 4-bit LFSR whose taps change at run time.
// A free-running 3-bit LFSR (sel_lfsr3) drives the select lines of an 8:1
// multiplexer, so each clock the key comes from a different method, in the
// order 1, 4, 2, 5, 6, 7, 3 of method codes (see keygen_pkg). A 3-bit LFSR
// never reaches 000, so the jitter generator (code 000) is present and visible
// on method_rnd but never chosen as the key.
//
// The tap select of the run-time-polynomial generator comes from the two low
// bits of the plain LFSR, so its polynomial changes pseudo-randomly.
//
// Interface: clk, synchronous active-high rst (all generators reload their
// seeds), osc_en enables the two ring oscillators. key = method_rnd[sel];
// method_rnd shows every generator; lp_clk_en shows the low-power LFSR's
// per-flop gates; jitter_q the jitter sampler flip-flop.
// Timing: key is combinational from registered generator outputs and changes
// every clock. The oscillator delays are parameters of the two behavioural
// ring-oscillator models (A slightly faster than B), so this top module is
// for simulation; for an FPGA the oscillators are LUT rings.
// The set of generators, their select codes and the 3-bit LFSR select follow
// the published design; the wiring of the run-time tap select, the zero
// extension of the 4-bit generator and the oscillator delays are this
// implementation's.
module tunable_key_gen
  import keygen_pkg::*;
#(
  parameter int unsigned ROSC_A_DELAY_PS = 480,
  parameter int unsigned ROSC_B_DELAY_PS = 500
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       osc_en,
  output key_t       key,
  output method_e    sel,
  output key_t       method_rnd [N_METHODS],
  output logic [7:0] lp_clk_en,
  output logic       jitter_q
);

  // jitter method: two ring oscillators, A slightly faster than B
  logic j1, j2;

  ring_oscillator #(.STAGE_DELAY_PS(ROSC_A_DELAY_PS), .SEED(1)) u_rosc_a (.en(osc_en), .osc(j1));
  ring_oscillator #(.STAGE_DELAY_PS(ROSC_B_DELAY_PS), .SEED(7)) u_rosc_b (.en(osc_en), .osc(j2));

  jitter_rng u_jitter (
    .clk, .rst, .j1, .j2,
    .q         (jitter_q),
    .count_osc (),
    .rnd       (method_rnd[M_JITTER])
  );

  bram_rng u_bram (.clk, .rst, .rnd(method_rnd[M_BRAM]), .addr());

  lfsr_rng          u_lfsr     (.clk, .rst, .rnd(method_rnd[M_LFSR]));
  galois_lfsr       u_galois   (.clk, .rst, .rnd(method_rnd[M_GALOIS]));
  fibonacci_lfsr    u_fib      (.clk, .rst, .rnd(method_rnd[M_FIBONACCI]));
  combined_lfsr_xor u_combined (.clk, .rst, .rnd(method_rnd[M_COMBINED]));
  lp_lfsr           u_lp       (.clk, .rst, .rnd(method_rnd[M_LOW_POWER]), .clk_en(lp_clk_en));

  logic [3:0] rtp_rnd;
  rtp_lfsr u_rtp (.clk, .rst, .tap_sel(method_rnd[M_LFSR][1:0]), .rnd(rtp_rnd));
  assign method_rnd[M_RUNTIME_POLY] = {4'b0, rtp_rnd};

  sel_lfsr3 u_sel (.clk, .rst, .sel);

  key_mux u_mux (.sel, .din(method_rnd), .key);

endmodule
