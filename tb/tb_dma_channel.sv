// tb_dma_channel: checks one channel's working state on an ungated clock.
// Random configurations (counts 0..9, increment and hardware-request bits)
// are armed and stepped at random. A reference model tracks addresses,
// remaining count and busy; the request must follow busy and dreq, last must
// mark the final word, and done must pulse exactly once per transfer, on the
// final step or at once for a zero count.
module tb_dma_channel;
  import dma_pkg::*;
  logic clk = 0, rst = 1, start = 0, dreq = 0, step = 0;
  ch_cfg_t cfg;
  logic req, busy, last, done;
  logic [AW-1:0] cur_src, cur_dst;
  logic [CW-1:0] remaining;
  // reference model
  logic [AW-1:0] m_src, m_dst;
  logic [CW-1:0] m_rem;
  logic m_busy, m_si, m_di, m_hw;
  int checks = 0, failures = 0, n_done = 0, n_exp_done = 0;

  dma_channel dut (.clk(clk), .rst(rst), .start(start), .cfg(cfg), .dreq(dreq),
    .step(step), .req(req), .busy(busy), .last(last), .cur_src(cur_src),
    .cur_dst(cur_dst), .remaining(remaining), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_done;
    cfg = '0;
    m_busy = 0; m_si = 0; m_di = 0; m_hw = 0; m_src = '0; m_dst = '0; m_rem = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      start = !m_busy ? ($urandom % 4 == 0) : ($urandom % 200 == 0);
      cfg.src = $urandom; cfg.dst = $urandom; cfg.cnt = CW'($urandom % 10);
      cfg.src_inc = 1'($urandom); cfg.dst_inc = 1'($urandom); cfg.hw_req = 1'($urandom);
      dreq = 1'($urandom);
      step = m_busy & 1'($urandom);
      #1;
      exp_done = (start && cfg.cnt == 0) || (!start && step && m_busy && m_rem == 1)
                 || (start && step && m_busy && m_rem == 1);
      checks++;
      if (req !== (m_busy & (~m_hw | dreq)) || busy !== m_busy ||
          (m_busy && (cur_src !== m_src || cur_dst !== m_dst || remaining !== m_rem)) ||
          (m_busy && last !== (m_rem == 1)) || done !== exp_done) begin
        failures++;
        $display("cycle %0d: req=%b busy=%b/%b src=%h/%h dst=%h/%h rem=%0d/%0d done=%b/%b",
                 c, req, busy, m_busy, cur_src, m_src, cur_dst, m_dst, remaining, m_rem,
                 done, exp_done);
      end
      if (done) n_done++;
      if (exp_done) n_exp_done++;
      @(posedge clk);
      if (start) begin
        m_src = cfg.src; m_dst = cfg.dst; m_rem = cfg.cnt; m_busy = (cfg.cnt != 0);
        m_si = cfg.src_inc; m_di = cfg.dst_inc; m_hw = cfg.hw_req;
      end else if (step && m_busy) begin
        if (m_si) m_src++;
        if (m_di) m_dst++;
        m_rem--;
        if (m_rem == 0) m_busy = 0;
      end
      @(negedge clk);
      start = 0;
    end
    checks++;
    if (n_done == 0 || n_done != n_exp_done) begin
      failures++;
      $display("done pulses %0d expected %0d", n_done, n_exp_done);
    end
    $display("transfers completed: %0d", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
