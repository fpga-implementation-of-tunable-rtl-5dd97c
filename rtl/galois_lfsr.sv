`timescale 1ns / 1ps
// galois_lfsr -- 8-bit Galois (one-to-many) LFSR for x^8 + x^6 + x^5 + x^4 + 1.
//
// Flip-flop k is bit k-1 of rnd. The output flip-flop 8 is fed back to
// flip-flop 1 and is also XORed into the shift path in front of flip-flops 5,
// 6 and 7: flop5 <= flop4 ^ flop8, flop6 <= flop5 ^ flop8,
// flop7 <= flop6 ^ flop8; all other flops simply take their left neighbour.
// When flop 8 is 0 the register only shifts; when it is 1 the tap bits flip.
//
// Interface: clk, synchronous active-high rst (loads SEED), rnd = register.
// Timing: one new value per clock. With the default seed 255 the sequence is
// 255, 143, 111, 222, 205, 235, 167, 63, ... as published. Reset style is a
// choice of this implementation.
module galois_lfsr
  import keygen_pkg::*;
#(
  parameter logic [7:0] SEED = 8'hFF
) (
  input  logic clk,
  input  logic rst,
  output key_t rnd
);

  logic [7:0] q;   // q[k-1] is flip-flop k
  logic [7:0] d;

  always_comb begin
    d    = {q[6:0], q[7]};
    d[4] = q[3] ^ q[7];
    d[5] = q[4] ^ q[7];
    d[6] = q[5] ^ q[7];
  end

  always_ff @(posedge clk) begin
    if (rst) q <= SEED;
    else     q <= d;
  end

  assign rnd = q;

endmodule
