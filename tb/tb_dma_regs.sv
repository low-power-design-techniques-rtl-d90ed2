// tb_dma_regs: checks the CPU register file.
// Every channel's SRC, DST and CNT is written with random values and read
// back; CTRL writes must pulse start only when bit 0 is set, pass the mode
// bits written in that cycle to cfg and read back with busy in bit 4; done
// pulses must set STATUS, writing 1 must clear it (a set in the same cycle
// wins); irq must follow STATUS and IRQEN; reset with no write pending must
// clear everything (the register clock gates are opened by reset).
module tb_dma_regs;
  import dma_pkg::*;
  localparam int N = NUM_CH;
  logic clk = 0, rst = 1, we = 0;
  logic [REG_AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [N-1:0] ch_done = '0, ch_busy = '0, start;
  ch_cfg_t [N-1:0] cfg;
  logic dma_en, irq;
  int checks = 0, failures = 0;
  logic [AW-1:0] s_src [N], s_dst [N];
  logic [CW-1:0] s_cnt [N];

  dma_regs #(.N(N)) dut (.clk(clk), .rst(rst), .addr(addr), .we(we), .wdata(wdata),
    .rdata(rdata), .ch_done(ch_done), .ch_busy(ch_busy), .cfg(cfg), .start(start),
    .dma_en(dma_en), .irq(irq));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [DW-1:0] got, input logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [REG_AW-1:0] a, input logic [DW-1:0] d);
    addr = a; wdata = d; we = 1;
    @(negedge clk);
    we = 0;
  endtask

  task automatic rd(input logic [REG_AW-1:0] a, output logic [DW-1:0] d);
    addr = a; we = 0;
    #1 d = rdata;
  endtask

  initial begin
    logic [DW-1:0] v;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      s_src[i] = $urandom; s_dst[i] = $urandom; s_cnt[i] = CW'($urandom);
      wr(A_CH0 + REG_AW'(4*i),     s_src[i]);
      wr(A_CH0 + REG_AW'(4*i + 1), s_dst[i]);
      wr(A_CH0 + REG_AW'(4*i + 2), DW'(s_cnt[i]));
    end
    for (int i = 0; i < N; i++) begin
      rd(A_CH0 + REG_AW'(4*i), v);     check("SRC read", v, s_src[i]);
      rd(A_CH0 + REG_AW'(4*i + 1), v); check("DST read", v, s_dst[i]);
      rd(A_CH0 + REG_AW'(4*i + 2), v); check("CNT read", v, DW'(s_cnt[i]));
      check("cfg src", cfg[i].src, s_src[i]);
      check("cfg cnt", DW'(cfg[i].cnt), DW'(s_cnt[i]));
    end
    // CTRL: start pulse and pass-through of the mode bits
    for (int i = 0; i < N; i++) begin
      addr = A_CH0 + REG_AW'(4*i + 3); wdata = 32'b1011; we = 1;  // hw_req, src_inc, start
      #1;
      check("start pulse", DW'(start), DW'(1 << i));
      check("mode pass-through", DW'({cfg[i].hw_req, cfg[i].dst_inc, cfg[i].src_inc}), 32'b101);
      @(negedge clk);
      wdata = 32'b0100; #1;                                     // dst_inc, no start
      check("no start without bit 0", DW'(start), 0);
      @(negedge clk);
      we = 0;
      ch_busy = N'(1 << i);
      rd(A_CH0 + REG_AW'(4*i + 3), v);
      check("CTRL read", v, 32'b10100);
      ch_busy = '0;
    end
    // global enable
    wr(A_GCTRL, 1);
    check("dma_en", DW'(dma_en), 1);
    // done flags, W1C, irq
    wr(A_IRQEN, 32'h05);
    ch_done = 7'b0000101; @(negedge clk); ch_done = '0;
    rd(A_STATUS, v); check("STATUS after done", v, 32'h05);
    check("irq set", DW'(irq), 1);
    wr(A_STATUS, 32'h01);
    rd(A_STATUS, v); check("STATUS after clear", v, 32'h04);
    check("irq still set", DW'(irq), 1);
    // clear and set of the same bit in one cycle: set wins
    addr = A_STATUS; wdata = 32'h04; we = 1; ch_done = 7'b0000100;
    @(negedge clk); we = 0; ch_done = '0;
    rd(A_STATUS, v); check("set wins over clear", v, 32'h04);
    wr(A_STATUS, 32'h04);
    check("irq cleared", DW'(irq), 0);
    ch_done = 7'b1000000; @(negedge clk); ch_done = '0;
    check("masked done, no irq", DW'(irq), 0);
    // reset with no write: everything back to zero
    rst = 1; @(negedge clk); rst = 0;
    rd(A_STATUS, v); check("STATUS after reset", v, 0);
    rd(A_GCTRL, v);  check("GCTRL after reset", v, 0);
    rd(A_CH0 + REG_AW'(4*3), v); check("SRC after reset", v, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
