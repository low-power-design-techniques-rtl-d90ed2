// dma_top: seven-channel DMA with three layers of clock gating.
//
// The DMA copies blocks of words from one memory location to another, or
// between an I/O device and memory, without the CPU. The CPU programs a
// channel through the register port and arms it; the DMA controller then
// takes the shared memory bus from the CPU (the bus switch stalls the CPU
// meanwhile), moves the block and raises a done flag and, if enabled, irq.
// Power is saved by stopping clocks that would otherwise toggle for nothing:
//   * global clock gating (GCG) stops the clock of all channels and the
//     controller while the DMA is disabled and idle;
//   * channel clock gating (CCG) gives each channel a clock that runs only
//     while the channel is used, and stops the controller's clock when no
//     channel requests;
//   * modified fine-grain clock gating (m-FGCG) gives every register its own
//     gate, opened by its load condition or by reset.
// The register file and the bus switch stay on the free-running clock.
// Interface: clk/rst (synchronous, active high); CPU register port; CPU memory
// request with cpu_wait; the memory bus (mem out, mem_rdata in, read data one
// cycle after a read, seen by the CPU on the same shared data bus); dreq per channel from I/O
// devices; irq; controller busy and served channel; and the gate enables as status outputs for power accounting.
// Following the document: the seven channels, one of them used at a time, a
// single address and data bus shared by CPU and DMA, and the three gating
// schemes. The register map, handshakes, widths and state sequence are this
// implementation's own choices.
module dma_top
  import dma_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // CPU register port
  input  logic [REG_AW-1:0] reg_addr,
  input  logic              reg_we,
  input  logic [DW-1:0]     reg_wdata,
  output logic [DW-1:0]     reg_rdata,
  // CPU memory port
  input  mem_req_t          cpu_mem,
  output logic              cpu_wait,
  // shared memory bus
  output mem_req_t          mem,
  input  logic [DW-1:0]     mem_rdata,
  // I/O devices and interrupt
  input  logic [NUM_CH-1:0] dreq,
  output logic              irq,
  output logic              dma_busy,    // controller owns or is taking the bus
  output logic [2:0]        active_ch,   // channel the controller serves
  // clock gate status
  output logic              dma_clk_on,
  output logic              dmac_clk_on,
  output logic [NUM_CH-1:0] ch_clk_on
);
  localparam int unsigned IW = $clog2(NUM_CH);

  ch_cfg_t [NUM_CH-1:0]         cfg;
  logic [NUM_CH-1:0]            start, ch_req, ch_busy, ch_last, ch_done, ch_step;
  logic [NUM_CH-1:0][AW-1:0]    ch_src, ch_dst;
  logic [NUM_CH-1:0]            clk_ch;
  logic                         clk_dma, clk_dmac;
  logic                         dma_en, dmac_busy, hold, hlda;
  logic [IW-1:0]                cur_ch;
  mem_req_t                     dmac_mem;

  dma_regs #(.N(NUM_CH)) u_regs (
    .clk(clk), .rst(rst),
    .addr(reg_addr), .we(reg_we), .wdata(reg_wdata), .rdata(reg_rdata),
    .ch_done(ch_done), .ch_busy(ch_busy),
    .cfg(cfg), .start(start), .dma_en(dma_en), .irq(irq));

  gcg_unit u_gcg (
    .clk(clk), .rst(rst), .dma_en(dma_en), .dmac_busy(dmac_busy),
    .wake(|start), .gclk(clk_dma), .clk_on(dma_clk_on));

  ccg_unit #(.N(NUM_CH)) u_ccg (
    .clk(clk_dma), .rst(rst),
    .ch_start(start), .ch_req(ch_req), .ch_step(ch_step), .dmac_busy(dmac_busy),
    .clk_ch(clk_ch), .clk_dmac(clk_dmac), .ch_on(ch_clk_on), .dmac_on(dmac_clk_on));

  for (genvar i = 0; i < NUM_CH; i++) begin : g_ch
    dma_channel u_ch (
      .clk(clk_ch[i]), .rst(rst),
      .start(start[i]), .cfg(cfg[i]), .dreq(dreq[i]), .step(ch_step[i]),
      .req(ch_req[i]), .busy(ch_busy[i]), .last(ch_last[i]),
      .cur_src(ch_src[i]), .cur_dst(ch_dst[i]), .remaining(),
      .done(ch_done[i]));
  end

  dmac #(.N(NUM_CH), .IW(IW)) u_dmac (
    .clk(clk_dmac), .rst(rst),
    .ch_req(ch_req), .ch_last(ch_last), .ch_src(ch_src), .ch_dst(ch_dst),
    .ch_step(ch_step), .hold(hold), .hlda(hlda),
    .mem(dmac_mem), .mem_rdata(mem_rdata),
    .busy(dmac_busy), .cur_ch(cur_ch));

  bus_switch u_bus (
    .clk(clk), .rst(rst), .cpu(cpu_mem), .dma(dmac_mem),
    .hold(hold), .hlda(hlda), .cpu_wait(cpu_wait), .mem(mem));

  assign dma_busy  = dmac_busy;
  assign active_ch = 3'(cur_ch);
endmodule
