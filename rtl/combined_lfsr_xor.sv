`timescale 1ns / 1ps
// combined_lfsr_xor -- N-bit random word from an (N-1)-bit LFSR plus an XOR.
//
// A 7-bit shift register (flip-flop k = bit k-1) shifts from flop k to flop
// k+1; flip-flop 1 receives flop1 ^ flop7. The N-th (most significant) output
// bit is the XOR of all seven flip-flops, so one flip-flop is saved compared
// with an N-bit LFSR. Output rnd = {parity, lfsr[6:0]}.
//
// Interface: clk, synchronous active-high rst (loads SEED), rnd.
// Timing: one new value per clock; the parity bit is combinational on the
// register. The taps (flops 1 and 7) and the parity bit are the published
// structure; seed and reset style are choices of this implementation.
module combined_lfsr_xor
  import keygen_pkg::*;
#(
  parameter int unsigned      N    = KEY_W,
  parameter logic [N-2:0]     SEED = '1
) (
  input  logic         clk,
  input  logic         rst,
  output logic [N-1:0] rnd
);

  logic [N-2:0] s;   // s[k-1] is flip-flop k

  always_ff @(posedge clk) begin
    if (rst) s <= SEED;
    else     s <= {s[N-3:0], s[0] ^ s[N-2]};
  end

  assign rnd = {^s, s};

endmodule
