// tb_ccg_unit: checks channel clock gating for the seven channels.
// Random start, request, step and busy patterns are applied. Each channel
// clock must tick exactly in the cycles where that channel was started,
// requesting or stepped (or in reset), and the controller clock exactly in
// the cycles where some channel requested or the controller was busy. Cycles
// with no request and an idle controller must stop the controller clock.
module tb_ccg_unit;
  import dma_pkg::*;
  localparam int N = NUM_CH;
  logic clk = 0, rst = 0, dmac_busy = 0;
  logic [N-1:0] ch_start = '0, ch_req = '0, ch_step = '0;
  logic [N-1:0] clk_ch, ch_on;
  logic clk_dmac, dmac_on;
  int checks = 0, failures = 0;
  int n_ch [N], e_ch [N];
  int n_dmac = 0, e_dmac = 0, n_dmac_off = 0;

  ccg_unit #(.N(N)) dut (.clk(clk), .rst(rst), .ch_start(ch_start), .ch_req(ch_req),
    .ch_step(ch_step), .dmac_busy(dmac_busy), .clk_ch(clk_ch), .clk_dmac(clk_dmac),
    .ch_on(ch_on), .dmac_on(dmac_on));

  always #5 clk = ~clk;
  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge clk_ch[i]) n_ch[i]++;
  end
  always @(posedge clk_dmac) n_dmac++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_ch;
    logic exp_d;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin n_ch[i] = 0; e_ch[i] = 0; end
    n_dmac = 0;
    for (int c = 0; c < 2000; c++) begin
      rst       = ($urandom % 50) == 0;
      ch_start  = N'($urandom) & N'($urandom) & N'($urandom);
      ch_req    = ($urandom % 3 == 0) ? N'(1 << ($urandom % N)) : '0;
      ch_step   = ($urandom % 4 == 0) ? N'(1 << ($urandom % N)) : '0;
      dmac_busy = ($urandom % 3) == 0;
      exp_ch = {N{rst}} | ch_start | ch_req | ch_step;
      exp_d  = rst | (|ch_req) | dmac_busy;
      #1;
      checks++;
      if (ch_on !== exp_ch || dmac_on !== exp_d) begin
        failures++;
        $display("cycle %0d: ch_on=%b/%b dmac_on=%b/%b", c, ch_on, exp_ch, dmac_on, exp_d);
      end
      for (int i = 0; i < N; i++) if (exp_ch[i]) e_ch[i]++;
      if (exp_d) e_dmac++; else n_dmac_off++;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (n_ch[i] != e_ch[i]) begin
        failures++;
        $display("channel %0d clock edges %0d expected %0d", i, n_ch[i], e_ch[i]);
      end
    end
    checks++;
    if (n_dmac != e_dmac) begin
      failures++;
      $display("controller clock edges %0d expected %0d", n_dmac, e_dmac);
    end
    checks++;
    if (n_dmac_off == 0) begin
      failures++;
      $display("controller clock never stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
