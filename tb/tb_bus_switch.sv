// tb_bus_switch: checks the CPU/DMA bus sharing.
// Random CPU and DMA requests and hold patterns are applied; the DMA only
// drives the bus while it owns it. hlda must follow hold one cycle later, the
// memory must see the DMA request exactly while hlda is high and the CPU
// request otherwise, and the CPU must be told to wait exactly when it
// accesses while the DMA owns the bus.
module tb_bus_switch;
  import dma_pkg::*;
  logic clk = 0, rst = 1, hold = 0, hlda, cpu_wait;
  mem_req_t cpu, dma, mem, exp_mem;
  logic exp_hlda;
  int checks = 0, failures = 0, n_wait = 0, n_dma = 0;

  bus_switch dut (.clk(clk), .rst(rst), .cpu(cpu), .dma(dma), .hold(hold),
                  .hlda(hlda), .cpu_wait(cpu_wait), .mem(mem));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpu = '0; dma = '0;
    exp_hlda = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int c = 0; c < 2000; c++) begin
      cpu.addr = $urandom; cpu.wdata = $urandom;
      cpu.re = 1'($urandom); cpu.we = ~cpu.re & 1'($urandom);
      dma.addr = $urandom; dma.wdata = $urandom;
      dma.re = exp_hlda & 1'($urandom); dma.we = exp_hlda & ~dma.re;
      #1;
      exp_mem = exp_hlda ? dma : cpu;
      checks++;
      if (hlda !== exp_hlda || mem !== exp_mem ||
          cpu_wait !== (exp_hlda & (cpu.re | cpu.we))) begin
        failures++;
        $display("cycle %0d: hlda=%b/%b wait=%b", c, hlda, exp_hlda, cpu_wait);
      end
      if (cpu_wait) n_wait++;
      if (exp_hlda) n_dma++;
      // hold changes in runs, as a controller would drive it
      if ($urandom % 5 == 0) hold = ~hold;
      @(negedge clk);
      exp_hlda = hold;
    end
    checks++;
    if (n_wait == 0 || n_dma == 0) begin
      failures++;
      $display("no CPU stall or no DMA ownership seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
