`timescale 1ns / 1ps
// sel_lfsr3 -- 3-bit LFSR that produces the method select of the key generator.
//
// Flip-flops 1, 2, 3 shift 1 -> 2 -> 3; flip-flop 1 receives flop2 ^ flop3
// (x^3 + x^2 + 1, primitive). sel = {flop1, flop2, flop3}. From the default
// seed 001 it runs 1, 4, 2, 5, 6, 7, 3, 1, ... : all seven non-zero codes with
// period 7. Code 000 is never produced.
//
// Interface: clk, synchronous active-high rst (loads SEED), sel.
// Timing: a new select every clock. Structure and the seed 001 follow the
// published design; the reset style is this implementation's.
module sel_lfsr3
  import keygen_pkg::*;
#(
  parameter logic [2:0] SEED = 3'b001
) (
  input  logic    clk,
  input  logic    rst,
  output method_e sel
);

  logic [2:0] s;   // s[2] = flop 1, s[1] = flop 2, s[0] = flop 3

  always_ff @(posedge clk) begin
    if (rst) s <= SEED;
    else     s <= {s[1] ^ s[0], s[2], s[1]};
  end

  assign sel = method_e'(s);

endmodule
