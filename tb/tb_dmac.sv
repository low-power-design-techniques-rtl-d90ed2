// tb_dmac: checks the DMA controller with modelled channels and memory.
// The testbench models the seven channels (addresses, counts, request rule),
// the registered hold acknowledge of the bus switch and a memory. Rounds of
// random blocks are set up on random channels, some paced by random device
// requests. Checks: every destination word equals its source word; the
// controller serves the lowest-numbered requesting channel first; a
// software block of n words keeps the controller busy exactly 2n + 3 cycles;
// only the served channel is stepped; the controller goes idle at the end.
module tb_dmac;
  import dma_pkg::*;
  localparam int N = NUM_CH;
  logic clk = 0, rst = 1;
  logic [N-1:0] ch_req, ch_last, ch_step, dreq;
  logic [N-1:0][AW-1:0] ch_src, ch_dst;
  logic hold, hlda, busy;
  logic [2:0] cur_ch;
  mem_req_t mem;
  logic [DW-1:0] mem_rdata;
  // channel models
  logic [N-1:0] m_busy, m_hw;
  logic [CW-1:0] m_rem [N];
  int checks = 0, failures = 0;
  int n_blocks = 0, n_prio = 0, n_timed = 0, n_demand_breaks = 0;

  dmac #(.N(N)) dut (.clk(clk), .rst(rst), .ch_req(ch_req), .ch_last(ch_last),
    .ch_src(ch_src), .ch_dst(ch_dst), .ch_step(ch_step), .hold(hold), .hlda(hlda),
    .mem(mem), .mem_rdata(mem_rdata), .busy(busy), .cur_ch(cur_ch));

  mem_model #(.DEPTH(4096)) u_mem (.clk(clk), .req(mem), .rdata(mem_rdata));

  always #5 clk = ~clk;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ch_req[i]  = m_busy[i] & (~m_hw[i] | dreq[i]);
      ch_last[i] = (m_rem[i] == 1);
    end
  end

  always @(posedge clk) begin
    if (rst) hlda <= 0; else hlda <= hold;
    for (int i = 0; i < N; i++) begin
      if (ch_step[i]) begin
        ch_src[i] <= ch_src[i] + 1;
        ch_dst[i] <= ch_dst[i] + 1;
        m_rem[i]  <= m_rem[i] - 1;
        if (m_rem[i] == 1) m_busy[i] <= 0;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // busy-time measurement for software blocks served alone
  int busy_len = 0;
  logic [2:0] served;
  always @(negedge clk) begin
    if (!rst && busy) begin
      busy_len++;
      if (dut.state == S_HOLD) served = cur_ch;
    end
  end

  // only the served channel is stepped
  always @(negedge clk) begin
    if (!rst && ch_step != '0) begin
      checks++;
      if (ch_step != N'(1 << cur_ch)) begin
        failures++;
        $display("step %b while serving channel %0d", ch_step, cur_ch);
      end
    end
  end

  int src_base [N], dst_base [N], len [N];

  initial begin
    m_busy = '0; m_hw = '0; dreq = '0;
    for (int i = 0; i < N; i++) begin m_rem[i] = 0; ch_src[i] = 0; ch_dst[i] = 0; end
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int round = 0; round < 40; round++) begin
      logic [N-1:0] pick;
      int lowest;
      pick = N'($urandom) | N'(1 << (round % N));
      if (round < 10) pick = N'(1 << (round % N));     // first rounds: one channel alone
      lowest = -1;
      for (int i = N - 1; i >= 0; i--) if (pick[i]) lowest = i;
      for (int i = 0; i < N; i++) begin
        if (pick[i]) begin
          len[i] = 1 + ($urandom % 8);
          src_base[i] = 64 * i + 8 * (round % 4);
          dst_base[i] = 2048 + 64 * i + 8 * (round % 4);
          ch_src[i] = AW'(src_base[i]); ch_dst[i] = AW'(dst_base[i]);
          m_rem[i] = CW'(len[i]);
          m_hw[i] = (round >= 20) && 1'($urandom);
          for (int k = 0; k < len[i]; k++) u_mem.poke(src_base[i] + k, $urandom);
        end
      end
      busy_len = 0;
      m_busy = pick;
      // wait for all picked channels to finish, pacing device requests
      for (int t = 0; t < 2000 && (m_busy != '0 || busy); t++) begin
        dreq = N'($urandom);
        @(negedge clk);
        if (t == 2 && busy && round < 20) begin
          checks++;
          n_prio++;
          if (served !== 3'(lowest)) begin
            failures++;
            $display("round %0d: served channel %0d, lowest requesting %0d", round, served, lowest);
          end
        end
      end
      checks++;
      if (m_busy != '0 || busy) begin
        failures++;
        $display("round %0d: transfers did not finish", round);
      end
      if (round < 10) begin
        checks++;
        n_timed++;
        if (busy_len != 2 * len[lowest] + 3) begin
          failures++;
          $display("round %0d: busy %0d cycles for %0d words, expected %0d",
                   round, busy_len, len[lowest], 2 * len[lowest] + 3);
        end
      end
      for (int i = 0; i < N; i++) begin
        if (pick[i]) begin
          n_blocks++;
          for (int k = 0; k < len[i]; k++) begin
            checks++;
            if (u_mem.peek(dst_base[i] + k) !== u_mem.peek(src_base[i] + k)) begin
              failures++;
              $display("round %0d ch %0d word %0d: %h expected %h", round, i, k,
                       u_mem.peek(dst_base[i] + k), u_mem.peek(src_base[i] + k));
            end
          end
        end
      end
      repeat (3) @(negedge clk);
    end
    $display("blocks %0d, priority checks %0d, timed blocks %0d", n_blocks, n_prio, n_timed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
