`timescale 1ns / 1ps
// lfsr_rng -- 8-bit many-to-one (Fibonacci-form) LFSR, the plain "LFSR" key method.
//
// Eight flip-flops form a shift register: flip-flop k (bit k-1 of rnd) passes
// its value to flip-flop k+1 on every clock. The outputs of flip-flops 4, 5, 6
// and 8 are combined in a single XOR whose result enters flip-flop 1. These taps
// realise x^8 + x^6 + x^5 + x^4 + 1, a primitive polynomial, so any non-zero
// seed walks through all 255 non-zero states.
//
// Interface: clk, synchronous active-high rst (loads SEED), rnd = register.
// Timing: one new value per clock, rnd is a flop output.
// The taps and the single-XOR structure are the published ones; the default
// seed 227 is the first value of the published simulation. Reset style is a
// choice of this implementation.
module lfsr_rng
  import keygen_pkg::*;
#(
  parameter logic [7:0] SEED = 8'hE3
) (
  input  logic clk,
  input  logic rst,
  output key_t rnd
);

  logic [7:0] q;   // q[k-1] is flip-flop k
  logic       fb;

  always_comb fb = q[3] ^ q[4] ^ q[5] ^ q[7];

  always_ff @(posedge clk) begin
    if (rst) q <= SEED;
    else     q <= {q[6:0], fb};
  end

  assign rnd = q;

endmodule
