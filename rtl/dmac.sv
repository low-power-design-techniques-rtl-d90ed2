// dmac: DMA controller, the arbiter and the transfer engine.
//
// When any channel requests service the controller latches the arbiter's
// choice, asks the bus switch for the memory bus (hold) and waits for hlda.
// It then moves one word per two clocks: READ puts the channel's source
// address on the bus; in WRITE the word returned by memory is written to the
// channel's destination address and the channel is stepped. It keeps the bus
// and repeats while the channel still requests and has more than the word
// just moved; otherwise it releases the bus in DONE and returns to IDLE, where
// the next request is arbitrated.
//   IDLE -> HOLD -> READ -> WRITE -> (READ | DONE) ; DONE -> IDLE
// The controller runs on the clock of the channel clock gate, which stops it
// whenever no channel requests and it is idle.
// Interface: per-channel req/last/addresses in, step out (one-hot, in WRITE);
// hold/hlda to the bus switch; mem is the controller's bus request; mem_rdata
// is memory read data, valid the cycle after a read. Timing: a block of n
// words takes 2n + 4 cycles from IDLE back to IDLE: one IDLE cycle, two HOLD
// cycles (hlda is registered), 2n transfer cycles and one DONE cycle.
// Following the document: data moved from one location to another without
// the CPU, one channel at a time, one bus owned by CPU or DMA in turn. This
// implementation's choice: the handshake, the state sequence, one-cycle
// memory reads and block mode (bus held for the whole block).
module dmac
  import dma_pkg::*;
#(
  parameter int unsigned N  = NUM_CH,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N-1:0]          ch_req,
  input  logic [N-1:0]          ch_last,
  input  logic [N-1:0][AW-1:0]  ch_src,
  input  logic [N-1:0][AW-1:0]  ch_dst,
  output logic [N-1:0]          ch_step,
  output logic                  hold,
  input  logic                  hlda,
  output mem_req_t              mem,
  input  logic [DW-1:0]         mem_rdata,
  output logic                  busy,
  output logic [IW-1:0]         cur_ch
);
  dmac_state_e     state, state_n;
  logic [IW-1:0]   sel_q;
  logic [IW-1:0]   arb_idx;
  logic            arb_valid;

  dma_arbiter #(.N(N), .IW(IW)) u_arb (
    .req(ch_req), .gnt(), .idx(arb_idx), .valid(arb_valid));

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:  if (arb_valid) state_n = S_HOLD;
      S_HOLD:  if (hlda)      state_n = S_READ;
      S_READ:                 state_n = S_WRITE;
      S_WRITE: state_n = (ch_req[sel_q] && !ch_last[sel_q]) ? S_READ : S_DONE;
      S_DONE:                 state_n = S_IDLE;
      default:                state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      sel_q <= '0;
    end else begin
      state <= state_n;
      if (state == S_IDLE && arb_valid) sel_q <= arb_idx;
    end
  end

  always_comb begin
    mem      = '0;
    ch_step  = '0;
    unique case (state)
      S_READ: begin
        mem.addr = ch_src[sel_q];
        mem.re   = 1'b1;
      end
      S_WRITE: begin
        mem.addr  = ch_dst[sel_q];
        mem.we    = 1'b1;
        mem.wdata = mem_rdata;
        ch_step[sel_q] = 1'b1;
      end
      default: ;
    endcase
  end

  assign hold   = (state == S_HOLD) || (state == S_READ) || (state == S_WRITE);
  assign busy   = (state != S_IDLE);
  assign cur_ch = sel_q;

  // One channel at a time: never more than one step.
  a_one_step: assert property (@(posedge clk) disable iff (rst) $onehot0(ch_step));
  // The bus is only driven while it is owned.
  a_owned: assert property (@(posedge clk) disable iff (rst)
    (state == S_READ || state == S_WRITE) |-> hlda);
endmodule
