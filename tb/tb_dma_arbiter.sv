// tb_dma_arbiter: exhaustive check of the fixed-priority channel arbiter.
// For all 128 request patterns the grant must be one-hot, must go to the
// lowest-numbered requesting channel, and valid must equal "any request".
module tb_dma_arbiter;
  import dma_pkg::*;
  localparam int N = NUM_CH;
  logic [N-1:0] req, gnt;
  logic [2:0] idx;
  logic valid;
  int checks = 0, failures = 0;

  dma_arbiter #(.N(N)) dut (.req(req), .gnt(gnt), .idx(idx), .valid(valid));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    for (int r = 0; r < (1 << N); r++) begin
      req = N'(r);
      #1;
      w = -1;
      for (int i = N - 1; i >= 0; i--) if (r[i]) w = i;
      checks++;
      if (valid !== (r != 0)) begin
        failures++;
        $display("req %b: valid=%b", req, valid);
      end
      if (w >= 0) begin
        checks++;
        if (gnt !== N'(1 << w) || idx !== 3'(w)) begin
          failures++;
          $display("req %b: gnt=%b idx=%0d expected channel %0d", req, gnt, idx, w);
        end
      end else begin
        checks++;
        if (gnt !== '0) begin
          failures++;
          $display("no request but gnt=%b", gnt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
