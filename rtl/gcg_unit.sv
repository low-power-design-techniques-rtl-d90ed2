// gcg_unit: global clock gating (GCG) of the whole DMA.
//
// One clock gate sits at the root of the DMA clock tree. It is open while
// software has the DMA globally enabled, while the DMA controller is still
// finishing a transfer (so a disable never freezes it holding the bus), while
// a channel is being armed, and during reset (so synchronous resets below it
// take effect):
//   gate enable = rst | dma_en | dmac_busy | wake
// When it is closed no flip-flop in the channels or the controller is clocked.
// Interface: clk free-running, gclk the DMA clock, clk_on the gate enable as
// a status output. Timing: the gate acts from the next clk rising edge.
// The document names GCG as one of the techniques combined with m-FGCG and
// CCG; which conditions open the gate is this implementation's choice.
module gcg_unit (
  input  logic clk,
  input  logic rst,
  input  logic dma_en,     // software global enable
  input  logic dmac_busy,  // controller has a transfer in flight
  input  logic wake,       // a channel is being armed this cycle
  output logic gclk,       // gated DMA clock
  output logic clk_on      // gate enable, for power accounting
);
  assign clk_on = rst | dma_en | dmac_busy | wake;

  icg_cell u_icg (.clk(clk), .en(clk_on), .gclk(gclk));
endmodule
