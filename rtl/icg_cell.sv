// icg_cell: integrated clock gating cell (latch + AND).
//
// The enable is captured by a latch that is transparent while clk is low, so
// it is stable for the whole high phase and gclk never glitches:
//   gclk = clk & en_latched.
// A rising edge of gclk coincides with the rising edge of clk in every cycle
// whose enable was high before that edge; otherwise gclk stays low.
// The document names the ICG cell as the building block of its gating schemes;
// the latch-based form is the usual standard-cell structure and is this
// implementation's choice. The latch reported by lint tools is intended: it is
// the cell's storage element.
module icg_cell (
  input  logic clk,   // free-running clock
  input  logic en,    // gate enable, sampled while clk is low
  output logic gclk   // gated clock
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;
endmodule
