// tb_gcg_unit: checks global clock gating.
// All sixteen combinations of reset, global enable, controller busy and wake
// are applied in random order. The gate enable must be their OR, and the DMA
// clock must tick on exactly the cycles where it was open.
module tb_gcg_unit;
  logic clk = 0, rst = 0, dma_en = 0, dmac_busy = 0, wake = 0;
  logic gclk, clk_on;
  int checks = 0, failures = 0;
  int n_gclk = 0, n_exp = 0, n_closed = 0;

  gcg_unit dut (.clk(clk), .rst(rst), .dma_en(dma_en), .dmac_busy(dmac_busy),
                .wake(wake), .gclk(gclk), .clk_on(clk_on));

  always #5 clk = ~clk;
  always @(posedge gclk) n_gclk++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] v;
    logic exp;
    @(negedge clk);
    n_gclk = 0;
    for (int c = 0; c < 1000; c++) begin
      v = (c < 16) ? 4'(c) : 4'($urandom);
      {rst, dma_en, dmac_busy, wake} = v;
      exp = |v;
      #1;
      checks++;
      if (clk_on !== exp) begin
        failures++;
        $display("inputs %b: clk_on=%b expected %b", v, clk_on, exp);
      end
      if (exp) n_exp++; else n_closed++;
      @(negedge clk);
    end
    checks++;
    if (n_gclk != n_exp) begin
      failures++;
      $display("DMA clock edges %0d expected %0d", n_gclk, n_exp);
    end
    checks++;
    if (n_closed == 0) begin
      failures++;
      $display("gate never closed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
