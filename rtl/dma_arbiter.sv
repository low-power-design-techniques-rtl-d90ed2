// dma_arbiter: picks the one channel the controller serves next.
//
// Only one channel moves data at a time. Among the requesting channels the
// lowest-numbered one wins (fixed priority, channel 0 highest). The arbiter
// is combinational; the controller samples its choice when it starts a
// transfer and keeps it until that channel's block ends or its request drops.
// Interface: req one bit per channel; gnt one-hot, idx its binary index,
// valid when any request is present. Timing: combinational.
// Following the document: one channel at a time. This implementation's
// choice: the fixed-priority order.
module dma_arbiter
  import dma_pkg::*;
#(
  parameter int unsigned N  = NUM_CH,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] idx,
  output logic          valid
);
  always_comb begin
    gnt = '0;
    idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        gnt = '0;
        gnt[i] = 1'b1;
        idx = IW'(i);
      end
    end
  end

  assign valid = |req;
endmodule
