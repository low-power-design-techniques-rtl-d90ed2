// tb_icg_cell: checks the clock gating cell.
// For random enables, every rising clock edge must give a rising gated-clock
// edge exactly when the enable was high during the preceding low phase, and
// toggling the enable while the clock is high must not disturb the gated
// clock (glitch freedom).
module tb_icg_cell;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int n_gclk = 0, n_exp = 0;

  icg_cell dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) n_gclk++;

  initial begin
    repeat (200000) #5;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int c = 0; c < 400; c++) begin
      // low phase: set the enable
      e = 1'($urandom);
      #2 en = e;
      #3 clk = 1;
      #1;
      if (e) n_exp++;
      checks++;
      if (gclk !== e) begin
        failures++;
        $display("cycle %0d: gclk=%b expected %b", c, gclk, e);
      end
      // high phase: toggle the enable, gated clock must hold
      en = ~e;
      #2;
      checks++;
      if (gclk !== e) begin
        failures++;
        $display("cycle %0d: glitch, gclk=%b during high phase", c, gclk);
      end
      #2 clk = 0;
      #1;
      checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("cycle %0d: gclk high while clk low", c);
      end
    end
    checks++;
    if (n_gclk != n_exp) begin
      failures++;
      $display("gated edges %0d expected %0d", n_gclk, n_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
