// bus_switch: shares the single memory address/data bus between CPU and DMAC.
//
// Memory has one address bus and one data bus, so either the CPU or the DMA
// controller drives it, never both. The controller asks for the bus with
// hold; the switch answers with hlda one clock later and from then on routes
// the controller's request to memory and tells the CPU to wait. When hold
// drops, hlda drops on the next clock and the CPU owns the bus again. Read
// data from memory returns on the shared data bus to both masters.
// Interface: CPU and DMAC requests as mem_req_t, mem the request driven to
// memory, cpu_wait stalls the CPU. Timing: hlda is registered, one cycle
// after hold; the mux itself is combinational on hlda.
// Following the document: one address bus and one data bus shared in turn by
// the CPU and the DMA. This implementation's choice: the hold/hold-acknowledge
// handshake and that the DMA wins whenever it asks.
module bus_switch
  import dma_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  mem_req_t cpu,
  input  mem_req_t dma,
  input  logic     hold,
  output logic     hlda,
  output logic     cpu_wait,
  output mem_req_t mem
);
  always_ff @(posedge clk) begin
    if (rst) hlda <= 1'b0;
    else     hlda <= hold;
  end

  assign mem      = hlda ? dma : cpu;
  assign cpu_wait = hlda & (cpu.re | cpu.we);

  // The DMA may drive the bus only while it owns it.
  a_dma_owns_bus: assert property (@(posedge clk) disable iff (rst)
    (dma.re | dma.we) |-> hlda);
endmodule
