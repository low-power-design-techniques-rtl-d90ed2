// dma_channel: working state of one DMA channel.
//
// When armed (start) the channel copies its programmed source address,
// destination address and word count into working registers. While words
// remain it requests the controller; with hw_req set the request also needs
// the device's dreq line (I/O-paced transfer), otherwise it is a
// software-started memory-to-memory block. Each step from the controller
// advances the addresses (if their increment bits are set) and decrements the
// count; the step that moves the last word raises done for one cycle. Arming
// with a count of zero raises done at once.
// Each working register is an m-FGCG register (its own clock gate, opened by
// its load condition or reset), and the channel itself runs on a clock that
// the channel clock gate stops while the channel is unused.
// Interface: clk is the channel's gated clock, rst synchronous. Addresses are
// word addresses. Timing: req rises the cycle after start; step is sampled on
// clk; done is combinational in the cycle of the final step.
// Following the document: seven channels, one used at a time, reset used as
// a gate enable. This implementation's choice: all register fields and the
// request rule.
module dma_channel
  import dma_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          start,    // arm with cfg (one-cycle pulse)
  input  ch_cfg_t       cfg,
  input  logic          dreq,     // device request, used when hw_req is set
  input  logic          step,     // controller moved one word of this channel
  output logic          req,      // request to the controller
  output logic          busy,     // armed with words left
  output logic          last,     // exactly one word left
  output logic [AW-1:0] cur_src,
  output logic [AW-1:0] cur_dst,
  output logic [CW-1:0] remaining,
  output logic          done      // one-cycle pulse: transfer complete
);
  logic [2:0] mode_q;   // {hw_req, dst_inc, src_inc}
  logic       src_inc, dst_inc, hw_req;
  logic       adv;

  assign {hw_req, dst_inc, src_inc} = mode_q;
  assign adv  = step & busy;
  assign last = (remaining == CW'(1));
  assign done = (start & (cfg.cnt == '0)) | (adv & last);
  assign req  = busy & (~hw_req | dreq);

  mfgcg_reg #(.W(3)) u_mode (
    .clk(clk), .rst(rst), .en(start),
    .d({cfg.hw_req, cfg.dst_inc, cfg.src_inc}), .q(mode_q));

  mfgcg_reg #(.W(AW)) u_src (
    .clk(clk), .rst(rst), .en(start | (adv & src_inc)),
    .d(start ? cfg.src : cur_src + AW'(1)), .q(cur_src));

  mfgcg_reg #(.W(AW)) u_dst (
    .clk(clk), .rst(rst), .en(start | (adv & dst_inc)),
    .d(start ? cfg.dst : cur_dst + AW'(1)), .q(cur_dst));

  mfgcg_reg #(.W(CW)) u_cnt (
    .clk(clk), .rst(rst), .en(start | adv),
    .d(start ? cfg.cnt : remaining - CW'(1)), .q(remaining));

  mfgcg_reg #(.W(1)) u_busy (
    .clk(clk), .rst(rst), .en(start | (adv & last)),
    .d(start & (cfg.cnt != '0)), .q(busy));
endmodule
