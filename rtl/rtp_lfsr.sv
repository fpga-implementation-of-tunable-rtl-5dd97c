`timescale 1ns / 1ps
// rtp_lfsr -- 4-bit LFSR whose feedback polynomial is changed at run time.
//
// Four flip-flops form a ring 1 -> 2 -> 3 -> 4 -> 1 (flip-flop k is bit k-1
// of rnd). A 2-bit select chooses which pair of flip-flops acts as taps; the
// XOR of the two tap outputs replaces the plain shift into the flip-flop that
// follows the higher tap:
//   tap_sel 00: taps 1&2, flop3 <= flop1 ^ flop2
//   tap_sel 01: taps 2&3, flop4 <= flop2 ^ flop3
//   tap_sel 10: taps 3&4, flop1 <= flop3 ^ flop4
//   tap_sel 11: taps 4&1, flop2 <= flop4 ^ flop1
// Every configuration is an invertible linear map, so a non-zero state never
// reaches zero, whatever sequence of selects is applied.
//
// Interface: clk, synchronous active-high rst (loads SEED), tap_sel (may change
// every clock and acts on the next edge), rnd = register.
// The tap pairs per select code are the published ones; which flip-flop pin
// the XOR reads, the seed and the reset style are this implementation's.
module rtp_lfsr #(
  parameter logic [3:0] SEED = 4'hF
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] tap_sel,
  output logic [3:0] rnd
);

  logic [3:0] q;   // q[k-1] is flip-flop k
  logic [3:0] d;

  always_comb begin
    d = {q[2:0], q[3]};
    unique case (tap_sel)
      2'b00: d[2] = q[0] ^ q[1];
      2'b01: d[3] = q[1] ^ q[2];
      2'b10: d[0] = q[2] ^ q[3];
      2'b11: d[1] = q[3] ^ q[0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) q <= SEED;
    else     q <= d;
  end

  assign rnd = q;

endmodule
