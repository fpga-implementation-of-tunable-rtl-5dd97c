`timescale 1ns / 1ps
// fibonacci_lfsr -- 8-bit Fibonacci LFSR for x^8 + x^6 + x^5 + x^4 + 1 with a
// chain of two-input XORs.
//
// Flip-flop k is bit k-1 of rnd and shifts into flip-flop k+1. The feedback is
// formed sequentially: flop8 ^ flop6, then ^ flop5, then ^ flop4, and the last
// XOR drives flip-flop 1. The next-state function is the same as lfsr_rng's;
// this generator differs in its XOR chain (three 2-input gates, a small LUT
// footprint) and in its seed.
//
// Interface: clk, synchronous active-high rst (loads SEED), rnd = register.
// Timing: one new value per clock. The XOR chain order is the published one;
// the seed and reset style are choices of this implementation.
module fibonacci_lfsr
  import keygen_pkg::*;
#(
  parameter logic [7:0] SEED = 8'hFF
) (
  input  logic clk,
  input  logic rst,
  output key_t rnd
);

  logic [7:0] q;   // q[k-1] is flip-flop k
  logic       x1, x2, x3;

  always_comb begin
    x1 = q[7] ^ q[5];   // flop 8 ^ flop 6
    x2 = x1 ^ q[4];     // ^ flop 5
    x3 = x2 ^ q[3];     // ^ flop 4
  end

  always_ff @(posedge clk) begin
    if (rst) q <= SEED;
    else     q <= {q[6:0], x3};
  end

  assign rnd = q;

endmodule
