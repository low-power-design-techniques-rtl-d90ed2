// dma_regs: the CPU-visible register file of the DMA.
//
// The CPU sets a DMA transfer up here and then leaves the work to the DMA.
// Every register is its own m-FGCG register: its clock gate opens only when
// the CPU writes it, when hardware sets a status bit, or during reset. The
// register file runs on the free-running clock, outside the global and
// channel clock gates, so software can always reach it.
// Map (word addresses, see dma_pkg): GCTRL bit0 global enable; STATUS done
// flags, set by the channels, write 1 to clear; IRQEN; per channel SRC, DST,
// CNT and CTRL. Writing CTRL with bit0 set arms the channel (start pulse in
// the same cycle); CTRL keeps the mode bits, and reads return busy in bit 4.
// irq is high while any enabled done flag is set.
// Interface: single-cycle writes (we, addr, wdata), combinational reads.
// Following the document: the CPU initiates each DMA transaction; reset is
// an extra gate enable. This implementation's choice: the register map.
module dma_regs
  import dma_pkg::*;
#(
  parameter int unsigned N = NUM_CH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [REG_AW-1:0] addr,
  input  logic              we,
  input  logic [DW-1:0]     wdata,
  output logic [DW-1:0]     rdata,
  input  logic [N-1:0]      ch_done,   // one-cycle pulses from the channels
  input  logic [N-1:0]      ch_busy,
  output ch_cfg_t [N-1:0]   cfg,
  output logic [N-1:0]      start,
  output logic              dma_en,
  output logic              irq
);
  logic [N-1:0] status_q, irqen_q;
  logic [N-1:0] wr_src, wr_dst, wr_cnt, wr_ctrl;
  logic         wr_gctrl, wr_status, wr_irqen;
  logic [N-1:0] status_d;
  logic         status_en;

  assign wr_gctrl  = we && (addr == A_GCTRL);
  assign wr_status = we && (addr == A_STATUS);
  assign wr_irqen  = we && (addr == A_IRQEN);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      wr_src[i]  = we && (addr == A_CH0 + REG_AW'(4 * i + 0));
      wr_dst[i]  = we && (addr == A_CH0 + REG_AW'(4 * i + 1));
      wr_cnt[i]  = we && (addr == A_CH0 + REG_AW'(4 * i + 2));
      wr_ctrl[i] = we && (addr == A_CH0 + REG_AW'(4 * i + 3));
      start[i]   = wr_ctrl[i] && wdata[CTRL_START];
    end
  end

  mfgcg_reg #(.W(1)) u_gctrl (
    .clk(clk), .rst(rst), .en(wr_gctrl), .d(wdata[0]), .q(dma_en));

  mfgcg_reg #(.W(N)) u_irqen (
    .clk(clk), .rst(rst), .en(wr_irqen), .d(wdata[N-1:0]), .q(irqen_q));

  // Done flags: set by hardware, cleared by writing 1; a set wins a clear.
  assign status_d  = (status_q & ~(wr_status ? wdata[N-1:0] : '0)) | ch_done;
  assign status_en = wr_status | (|ch_done);

  mfgcg_reg #(.W(N)) u_status (
    .clk(clk), .rst(rst), .en(status_en), .d(status_d), .q(status_q));

  for (genvar i = 0; i < N; i++) begin : g_ch
    logic [2:0] mode_q;

    mfgcg_reg #(.W(AW)) u_src (
      .clk(clk), .rst(rst), .en(wr_src[i]), .d(wdata[AW-1:0]), .q(cfg[i].src));
    mfgcg_reg #(.W(AW)) u_dst (
      .clk(clk), .rst(rst), .en(wr_dst[i]), .d(wdata[AW-1:0]), .q(cfg[i].dst));
    mfgcg_reg #(.W(CW)) u_cnt (
      .clk(clk), .rst(rst), .en(wr_cnt[i]), .d(wdata[CW-1:0]), .q(cfg[i].cnt));
    mfgcg_reg #(.W(3)) u_mode (
      .clk(clk), .rst(rst), .en(wr_ctrl[i]),
      .d(wdata[CTRL_HW_REQ:CTRL_SRC_INC]), .q(mode_q));

    // A channel samples cfg on start, in the cycle CTRL is written, so the
    // mode bits being written are passed straight through in that cycle.
    logic [2:0] mode;
    assign mode = wr_ctrl[i] ? wdata[CTRL_HW_REQ:CTRL_SRC_INC] : mode_q;
    assign cfg[i].src_inc = mode[0];
    assign cfg[i].dst_inc = mode[1];
    assign cfg[i].hw_req  = mode[2];
  end

  always_comb begin
    rdata = '0;
    if (addr == A_GCTRL)       rdata[0]   = dma_en;
    else if (addr == A_STATUS) rdata[N-1:0] = status_q;
    else if (addr == A_IRQEN)  rdata[N-1:0] = irqen_q;
    else begin
      for (int i = 0; i < N; i++) begin
        if (addr == A_CH0 + REG_AW'(4 * i + 0)) rdata = DW'(cfg[i].src);
        if (addr == A_CH0 + REG_AW'(4 * i + 1)) rdata = DW'(cfg[i].dst);
        if (addr == A_CH0 + REG_AW'(4 * i + 2)) rdata = DW'(cfg[i].cnt);
        if (addr == A_CH0 + REG_AW'(4 * i + 3))
          rdata = DW'({ch_busy[i], cfg[i].hw_req, cfg[i].dst_inc, cfg[i].src_inc, 1'b0});
      end
    end
  end

  assign irq = |(status_q & irqen_q);
endmodule
