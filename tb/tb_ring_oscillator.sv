`timescale 1ns / 1ps
// Self-checking testbench for the ring_oscillator model: while enabled every
// half period must lie between STAGES*STAGE_DELAY_PS and that plus JITTER_PS;
// while disabled the output must stay at 0.
module tb_ring_oscillator;
  logic en = 0;
  logic osc;
  int checks = 0, failures = 0, edges = 0;
  realtime last = 0, dt;

  ring_oscillator dut (.en, .osc);   // defaults: 3 stages x 500 ps, 0..20 ps jitter

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(osc) begin
    if (en) begin
      dt = $realtime - last;
      if (edges > 0) begin
        checks++;
        if (dt < 1.499 || dt > 1.521) begin failures++; $display("half period %f ns", dt); end
      end
      last = $realtime;
      edges++;
    end
  end

  initial begin
    #50;
    checks++; if (osc !== 0) failures++;
    en = 1;
    last = $realtime;
    #3000;
    checks++; if (edges < 1900) begin failures++; $display("edges %0d", edges); end
    en = 0;
    #20;
    for (int i = 0; i < 10; i++) begin
      #7;
      checks++; if (osc !== 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
