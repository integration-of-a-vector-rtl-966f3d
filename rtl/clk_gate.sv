// clk_gate: latch-based integrated clock gating cell.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latched enable, so the gated clock never
// glitches and only whole high phases pass. In the tile one cell gates the
// control core (enable driven by the Event Unit while a core waits for an
// event) and one gates Spatz CC (enable from SPATZ_CLK_EN). `test_en_i` forces
// the clock on. The latch is intended.
module clk_gate (
  input  logic clk_i,
  input  logic en_i,
  input  logic test_en_i,
  output logic clk_o
);
  logic en_latched;

  always_latch begin
    if (!clk_i) en_latched = en_i | test_en_i;
  end

  assign clk_o = clk_i & en_latched;
endmodule
