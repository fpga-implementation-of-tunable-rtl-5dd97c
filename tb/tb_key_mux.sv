`timescale 1ns / 1ps
// Self-checking testbench for key_mux: random words on all eight inputs, every
// select code, the output must equal the selected input.
module tb_key_mux;
  import keygen_pkg::*;
  method_e sel;
  key_t din [N_METHODS];
  key_t key;
  int checks = 0, failures = 0;

  key_mux dut (.sel, .din, .key);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < int'(N_METHODS); i++) din[i] = 8'($urandom);
      for (int s = 0; s < int'(N_METHODS); s++) begin
        sel = method_e'(s);
        #1;
        checks++;
        if (key !== din[s]) begin failures++; $display("sel %0d: got %0d exp %0d", s, key, din[s]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
