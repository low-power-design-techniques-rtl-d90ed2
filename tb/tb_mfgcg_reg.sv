// tb_mfgcg_reg: checks the m-FGCG register against a plain enabled register.
// Random load enables, data and resets are applied. The register must match
// the reference model every cycle; its private clock must tick exactly in the
// cycles where the load enable or the reset is high (reset opening the gate
// is the modification); and a reset with the load enable low must still
// reset the register.
module tb_mfgcg_reg;
  localparam int W = 12;
  localparam logic [W-1:0] RV = 12'h5A3;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;
  int n_gclk = 0, n_exp = 0, n_rst_only = 0;

  mfgcg_reg #(.W(W), .RESET_VAL(RV)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge dut.gclk) n_gclk++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = RV;
    @(negedge clk);
    n_gclk = 0;
    for (int c = 0; c < 2000; c++) begin
      rst = ($urandom % 16) == 0;
      en  = ($urandom % 4) == 0;
      d   = W'($urandom);
      if (rst && !en) n_rst_only++;
      if (rst || en) n_exp++;
      @(posedge clk);
      if (rst) model = RV;
      else if (en) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", c, q, model);
      end
    end
    checks++;
    if (n_gclk != n_exp) begin
      failures++;
      $display("gated clock edges %0d expected %0d", n_gclk, n_exp);
    end
    checks++;
    if (n_rst_only == 0) begin
      failures++;
      $display("no reset with load enable low was applied");
    end
    $display("reset-only cycles %0d, gated edges %0d of 2000", n_rst_only, n_gclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
