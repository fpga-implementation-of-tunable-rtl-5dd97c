`timescale 1ns / 1ps
// ring_oscillator -- behavioural model of an inverter ring oscillator.
//
// This is a simulation model, not synthesizable logic. In silicon the
// oscillator is an odd number (STAGES) of inverters closed into a loop; its
// frequency is set by the stage delays, which depend on placement, routing
// and temperature, and each edge wanders by a small random amount (jitter).
// The model reproduces that: while en is high the output toggles every
// STAGES * STAGE_DELAY_PS picoseconds plus a pseudo-random 0..JITTER_PS
// picoseconds drawn per half period from a per-instance generator started at
// SEED. While en is low the output rests at 0.
//
// Two instances with slightly different STAGE_DELAY_PS are the entropy source
// of jitter_rng. On an FPGA the ring is built from LUTs kept from
// optimisation; its real frequency comes from place and route. A synthesis
// tool that reads this model reports a combinational loop through the
// inverting toggle: that loop is the oscillator itself and is intended.
module ring_oscillator #(
  parameter int unsigned STAGES         = 3,
  parameter int unsigned STAGE_DELAY_PS = 500,
  parameter int unsigned JITTER_PS      = 20,
  parameter int unsigned SEED           = 1
) (
  input  logic en,
  output logic osc
);

  int unsigned lcg;
  int unsigned half_ps;

  initial begin
    osc = 1'b0;
    lcg = SEED;
  end

  always begin
    if (!en) begin
      osc = 1'b0;
      wait (en);
    end else begin
      lcg     = lcg * 32'd1664525 + 32'd1013904223;
      half_ps = STAGES * STAGE_DELAY_PS + ((JITTER_PS == 0) ? 0 : (lcg >> 8) % (JITTER_PS + 1));
      #(half_ps * 1ps);
      if (en) osc = ~osc;
    end
  end

endmodule
