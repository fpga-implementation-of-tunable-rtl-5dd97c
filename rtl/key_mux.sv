`timescale 1ns / 1ps
// key_mux -- 8:1 multiplexer that passes the selected generator's word as key.
//
// din[m] is the output of the generator with method code m; key = din[sel].
// Purely combinational.
module key_mux
  import keygen_pkg::*;
(
  input  method_e sel,
  input  key_t    din [N_METHODS],
  output key_t    key
);

  always_comb key = din[sel];

endmodule
