`timescale 1ns / 1ps
// bram_rng -- pre-stored random numbers read from a block memory.
//
// A DEPTH x W read-only memory holds a table of random values. An address
// counter steps through it once per clock and wraps at the end; the memory
// read is registered, as in a block RAM, so rnd shows mem[a] one clock after
// the counter held a. The table is loaded from INIT_FILE (one hex word per
// line); the default table has 16 words.
//
// Interface: clk, synchronous active-high rst (address and output to 0),
// rnd = memory output register, addr = address being read this cycle.
// Timing: one word per clock, one clock of read latency.
// Reading stored values from block memory is the published method; the
// table size, the counter and the read latency are this implementation's.
module bram_rng
  import keygen_pkg::*;
#(
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned W         = KEY_W,
  parameter string       INIT_FILE = "rtl/bram_rng_init.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [W-1:0]  rnd,
  output logic [AW-1:0] addr
);

  logic [W-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0;
      rnd  <= '0;
    end else begin
      addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
      rnd  <= mem[addr];
    end
  end

endmodule
