`timescale 1ns / 1ps
// Shared types and constants of the key generator.
//
// Eight random-number generators ("methods") feed one 8:1 multiplexer. The
// method code is the multiplexer select value; the assignment of codes to
// methods follows the generators' order on the multiplexer inputs. Every
// generator delivers a KEY_W-bit word; narrower generators are zero-extended.
package keygen_pkg;

  localparam int unsigned KEY_W     = 8;
  localparam int unsigned N_METHODS = 8;
  localparam int unsigned SEL_W     = $clog2(N_METHODS);

  typedef logic [KEY_W-1:0] key_t;

  typedef enum logic [SEL_W-1:0] {
    M_JITTER       = 3'd0,  // ring-oscillator jitter counter
    M_BRAM         = 3'd1,  // pre-stored values in block memory
    M_LFSR         = 3'd2,  // 8-bit LFSR, single 4-input XOR
    M_GALOIS       = 3'd3,  // 8-bit Galois LFSR
    M_FIBONACCI    = 3'd4,  // 8-bit Fibonacci LFSR, chained XORs
    M_COMBINED     = 3'd5,  // 7-bit LFSR plus parity bit
    M_LOW_POWER    = 3'd6,  // 8-bit LFSR with per-flop clock gating
    M_RUNTIME_POLY = 3'd7   // 4-bit LFSR with run-time tap selection
  } method_e;

endpackage
