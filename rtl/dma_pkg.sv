// dma_pkg: types and constants shared by the seven-channel low-power DMA.
//
// The channel count (seven) follows the design this RTL describes; the bus
// widths, the count width and the register map are this implementation's
// own choices. Registers are addressed by word (REG_AW-bit word address):
//
//   0x00 GCTRL   bit0 dma_en (global enable, drives the global clock gate)
//   0x01 STATUS  bits[NUM_CH-1:0] done flags, write 1 to clear
//   0x02 IRQEN   bits[NUM_CH-1:0] interrupt enables
//   0x10+4*i     channel i: +0 SRC, +1 DST, +2 CNT, +3 CTRL
//
// CTRL: bit0 start (write 1 to arm), bit1 src_inc, bit2 dst_inc, bit3 hw_req.
// Reading CTRL returns the stored control bits with bit4 = channel busy.
package dma_pkg;

  localparam int unsigned NUM_CH  = 7;
  localparam int unsigned AW      = 32;
  localparam int unsigned DW      = 32;
  localparam int unsigned CW      = 16;
  localparam int unsigned REG_AW  = 8;

  localparam logic [REG_AW-1:0] A_GCTRL  = 8'h00;
  localparam logic [REG_AW-1:0] A_STATUS = 8'h01;
  localparam logic [REG_AW-1:0] A_IRQEN  = 8'h02;
  localparam logic [REG_AW-1:0] A_CH0    = 8'h10;

  localparam int unsigned CTRL_START   = 0;
  localparam int unsigned CTRL_SRC_INC = 1;
  localparam int unsigned CTRL_DST_INC = 2;
  localparam int unsigned CTRL_HW_REQ  = 3;
  localparam int unsigned CTRL_BUSY    = 4;

  // Programmed setup of one channel, held in the register file.
  typedef struct packed {
    logic [AW-1:0] src;
    logic [AW-1:0] dst;
    logic [CW-1:0] cnt;
    logic          src_inc;
    logic          dst_inc;
    logic          hw_req;
  } ch_cfg_t;

  // One request on the shared memory bus (address, read, write, data).
  typedef struct packed {
    logic [AW-1:0] addr;
    logic          re;
    logic          we;
    logic [DW-1:0] wdata;
  } mem_req_t;

  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_HOLD  = 3'd1,
    S_READ  = 3'd2,
    S_WRITE = 3'd3,
    S_DONE  = 3'd4
  } dmac_state_e;

endpackage
