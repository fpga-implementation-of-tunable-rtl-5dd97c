`timescale 1ns / 1ps
// lp_lfsr -- low-power 8-bit LFSR with data-driven clock gating.
//
// Flip-flop k is bit k-1 of rnd; flop k shifts into flop k+1 and flip-flop 1
// receives flop7 ^ flop8. Each flip-flop is clocked only in cycles where its
// next value differs from its present one: its gate condition is D xor Q,
// the condition of the gating cell in front of every flop. A flop whose value
// would not change sees no clock edge and so does not switch.
//
// On an FPGA the gate is realised as the flip-flop's clock enable rather than
// as a gated clock net; the behaviour is identical and the clock tree stays
// clean. clk_en shows which flops are clocked in the current cycle.
//
// Interface: clk, synchronous active-high rst (loads SEED into all flops),
// rnd = register, clk_en = per-flop gate. Timing: one new value per clock.
// The taps and the gate condition are the published ones; the clock-enable
// realisation, the seed and the reset style are this implementation's. Note
// that x^8 + x^7 + 1 is not primitive, so the sequence is shorter than 255.
module lp_lfsr
  import keygen_pkg::*;
#(
  parameter logic [7:0] SEED = 8'hFF
) (
  input  logic       clk,
  input  logic       rst,
  output key_t       rnd,
  output logic [7:0] clk_en
);

  logic [7:0] q;   // q[k-1] is flip-flop k
  logic [7:0] d;

  always_comb begin
    d      = {q[6:0], q[6] ^ q[7]};
    clk_en = d ^ q;
  end

  for (genvar k = 0; k < 8; k++) begin : g_flop
    always_ff @(posedge clk) begin
      if (rst)            q[k] <= SEED[k];
      else if (clk_en[k]) q[k] <= d[k];
    end
  end

  assign rnd = q;

endmodule
