`timescale 1ns/1ps
// tb_clk_gate: self-checking testbench of clk_gate.
// Counts gated clock pulses for enable patterns that change in either clock
// phase: only whole pulses pass, none while disabled, all with test enable.
module tb_clk_gate;
  logic clk = 1'b0, en = 1'b0, te = 1'b0, gclk;
  int checks = 0, failures = 0, pulses = 0, glitches = 0;
  realtime t_rise;
  always #5 clk = ~clk;
  clk_gate dut (.clk_i(clk), .en_i(en), .test_en_i(te), .clk_o(gclk));
  always @(posedge gclk) begin pulses++; t_rise = $realtime; end
  always @(negedge gclk) if ($realtime - t_rise < 4.9) glitches++;
  task automatic chk(string w, int got, int exp);
    checks++; if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", w, got, exp); end
  endtask
  initial begin
    #2000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); pulses = 0;
    repeat (5) @(negedge clk);
    chk("disabled", pulses, 0);
    en = 1; pulses = 0;
    repeat (5) @(negedge clk);
    chk("enabled", pulses, 5);
    // enable dropped in the middle of the high phase: current pulse stays whole
    @(posedge clk); #2 en = 0; pulses = 0;
    repeat (4) @(negedge clk);
    chk("off after high-phase change", pulses, 0);
    // enable raised in the middle of the high phase: no partial pulse
    @(posedge clk); #2 en = 1;
    @(negedge clk); pulses = 0;
    repeat (3) @(negedge clk);
    chk("on again", pulses, 3);
    en = 0; te = 1; pulses = 0;
    repeat (4) @(negedge clk);
    chk("test enable", pulses, 4);
    chk("no glitches", glitches, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
