// mem_model: behavioural synchronous memory for the testbenches.
//
// One word per address, DEPTH words, addresses taken modulo DEPTH. A read
// request on a rising clock edge returns the word on rdata from that edge on
// (one cycle of latency); a write stores wdata on the edge. The contents
// start at a pattern the testbench can predict: word a holds INIT_BASE + a.
module mem_model
  import dma_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter logic [DW-1:0] INIT_BASE = 32'hA500_0000
) (
  input  logic          clk,
  input  mem_req_t      req,
  output logic [DW-1:0] rdata
);
  localparam int unsigned MW = $clog2(DEPTH);
  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = INIT_BASE + DW'(a);
    rdata = '0;
  end

  always @(posedge clk) begin
    if (req.we) mem[req.addr[MW-1:0]] <= req.wdata;
    if (req.re) rdata <= mem[req.addr[MW-1:0]];
  end

  function automatic logic [DW-1:0] peek(input int unsigned a);
    return mem[a % DEPTH];
  endfunction

  task automatic poke(input int unsigned a, input logic [DW-1:0] v);
    mem[a % DEPTH] = v;
  endtask
endmodule
