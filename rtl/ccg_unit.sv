// ccg_unit: channel clock gating (CCG).
//
// Each of the NUM_CH channels gets its own clock gate, opened only while the
// channel is in use: while it is being armed, while it requests service, or
// while the controller is stepping it. The DMA controller (DMAC) gets one
// more gate, opened only while some channel requests service or the
// controller is still busy; when no channel is requested the whole controller
// clock stops. All gates are also opened by reset so synchronous resets work.
//   ch_on[i]  = rst | ch_start[i] | ch_req[i] | ch_step[i]
//   dmac_on   = rst | (|ch_req) | dmac_busy
// Interface: clk is the (globally gated) DMA clock; outputs are one clock per
// channel, the DMAC clock and the gate enables as status. Timing: each gate
// acts from the next clk rising edge.
// Following the document: per-channel gating of unused channels and gating of
// the whole controller when no channel is requested. The exact wake-up terms
// are this implementation's choice.
module ccg_unit
  import dma_pkg::*;
#(
  parameter int unsigned N = NUM_CH
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] ch_start,
  input  logic [N-1:0] ch_req,
  input  logic [N-1:0] ch_step,
  input  logic         dmac_busy,
  output logic [N-1:0] clk_ch,
  output logic         clk_dmac,
  output logic [N-1:0] ch_on,
  output logic         dmac_on
);
  assign ch_on   = {N{rst}} | ch_start | ch_req | ch_step;
  assign dmac_on = rst | (|ch_req) | dmac_busy;

  for (genvar i = 0; i < N; i++) begin : g_ch
    icg_cell u_icg (.clk(clk), .en(ch_on[i]), .gclk(clk_ch[i]));
  end

  icg_cell u_icg_dmac (.clk(clk), .en(dmac_on), .gclk(clk_dmac));
endmodule
