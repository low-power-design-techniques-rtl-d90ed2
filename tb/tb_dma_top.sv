// tb_dma_top: end-to-end test of the seven-channel low-power DMA.
//
// A CPU model programs the DMA through the register port and uses memory
// through the shared bus; a memory model sits on the bus; device models drive
// dreq. The test walks through:
//   1. reset opens every clock gate though no register is written (m-FGCG);
//   2. CPU memory writes/reads with the DMA disabled and its clock stopped
//      by the global gate (GCG);
//   3. a channel armed while the DMA is disabled makes no progress until the
//      DMA is enabled, then copies its block;
//   4. a timed memory-to-memory block: done flag and irq 2n + 3 clock edges
//      after the CTRL write; the CPU is stalled while the DMA owns the bus;
//   5. three channels pending at once, served one at a time, lowest number
//      first among those waiting;
//   6. a device-paced (dreq) transfer from a fixed source address, during
//      which the controller releases the bus whenever the device pauses;
//   7. a zero-length arm that completes at once;
//   8. a reset in mid-transfer.
// Every mechanism is counted and a failure is counted for any that never
// occurred. Unused channels must never have had their clock running after
// reset (CCG), and the controller clock must have been stopped while idle.
module tb_dma_top;
  import dma_pkg::*;
  localparam int N = NUM_CH;

  logic clk = 0, rst = 1;
  logic [REG_AW-1:0] reg_addr = '0;
  logic reg_we = 0;
  logic [DW-1:0] reg_wdata = '0, reg_rdata;
  mem_req_t cpu_mem, mem;
  logic cpu_wait, irq, dma_busy;
  logic [DW-1:0] mem_rdata;
  logic [N-1:0] dreq = '0, ch_clk_on;
  logic [2:0] active_ch;
  logic dma_clk_on, dmac_clk_on;

  int checks = 0, failures = 0;
  longint cyc = 0;
  // mechanism counters
  int n_gcg_off = 0, n_dmac_off = 0, n_cpu_stall = 0, n_contention = 0;
  int n_demand_release = 0, n_irq = 0, n_zero_len = 0, n_rst_gate = 0, n_ch_off = 0;
  int n_ch_on [N];
  logic track_on = 0;

  dma_top dut (
    .clk(clk), .rst(rst),
    .reg_addr(reg_addr), .reg_we(reg_we), .reg_wdata(reg_wdata), .reg_rdata(reg_rdata),
    .cpu_mem(cpu_mem), .cpu_wait(cpu_wait),
    .mem(mem), .mem_rdata(mem_rdata),
    .dreq(dreq), .irq(irq), .dma_busy(dma_busy), .active_ch(active_ch),
    .dma_clk_on(dma_clk_on), .dmac_clk_on(dmac_clk_on), .ch_clk_on(ch_clk_on));

  mem_model #(.DEPTH(4096)) u_mem (.clk(clk), .req(mem), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors, sampled mid-cycle
  logic prev_hold = 0, prev_irq = 0;
  longint t_start = 0, t_irq = 0;
  always @(negedge clk) begin
    cyc++;
    if (track_on) begin
      if (!dma_clk_on) n_gcg_off++;
      if (!dmac_clk_on) n_dmac_off++;
      if (cpu_wait) n_cpu_stall++;
      for (int i = 0; i < N; i++) if (ch_clk_on[i]) n_ch_on[i]++; else n_ch_off++;
      // controller gave up the bus while its channel still had words left
      if (prev_hold && !dut.hold && dut.ch_busy != '0) n_demand_release++;
    end
    prev_hold = dut.hold;
    if (reg_we && dut.start[2]) t_start = cyc;
    if (irq && !prev_irq) t_irq = cyc;
    prev_irq = irq;
    if (rst && !reg_we && dma_clk_on && dmac_clk_on && (&ch_clk_on)) n_rst_gate++;
  end

  task automatic check(input string what, input logic [DW-1:0] got, input logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [REG_AW-1:0] a, input logic [DW-1:0] d);
    reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic rd(input logic [REG_AW-1:0] a, output logic [DW-1:0] d);
    reg_addr = a; reg_we = 0;
    #1 d = reg_rdata;
  endtask

  task automatic setup(input int ch, input int src, input int dst, input int n);
    wr(A_CH0 + REG_AW'(4*ch),     DW'(src));
    wr(A_CH0 + REG_AW'(4*ch + 1), DW'(dst));
    wr(A_CH0 + REG_AW'(4*ch + 2), DW'(n));
  endtask

  // CPU memory access: hold the request until the bus is the CPU's
  task automatic cpu_access(input logic w, input int a, input logic [DW-1:0] d,
                            output logic [DW-1:0] q);
    cpu_mem.addr = AW'(a); cpu_mem.wdata = d; cpu_mem.we = w; cpu_mem.re = ~w;
    #1;
    while (cpu_wait) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    cpu_mem = '0;
    q = mem_rdata;
  endtask

  task automatic wait_done(input int ch, input int limit, output int edges);
    logic [DW-1:0] s;
    edges = 0;
    do begin
      @(negedge clk);
      edges++;
      rd(A_STATUS, s);
    end while (!s[ch] && edges < limit);
  endtask

  task automatic fill(input int a, input int n);
    for (int k = 0; k < n; k++) u_mem.poke(a + k, $urandom);
  endtask

  task automatic cmp(input string what, input int s, input int d, input int n, input logic s_inc);
    int bad = 0;
    for (int k = 0; k < n; k++)
      if (u_mem.peek(d + k) !== u_mem.peek(s_inc ? s + k : s)) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%s: %0d of %0d words wrong", what, bad, n);
    end
  endtask

  initial begin
    logic [DW-1:0] v;
    int edges;
    int order [$];
    cpu_mem = '0;
    for (int i = 0; i < N; i++) n_ch_on[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    track_on = 1;

    // 2. CPU uses memory, DMA disabled and its clock stopped
    check("DMA clock stopped while disabled", DW'(dma_clk_on), 0);
    cpu_access(1, 300, 32'hCAFE_0001, v);
    cpu_access(0, 300, '0, v);
    check("CPU read back", v, 32'hCAFE_0001);

    // 3. arm channel 0 while disabled: no progress until enabled
    fill(0, 16);
    setup(0, 0, 1000, 16);
    wr(A_IRQEN, 32'h7F);
    wr(A_CH0 + 3, 32'b0111);                    // start, src_inc, dst_inc
    repeat (20) @(negedge clk);
    rd(A_STATUS, v);
    check("no transfer while disabled", v, 0);
    check("channel armed", DW'(dut.ch_busy[0]), 1);
    wr(A_GCTRL, 1);
    wait_done(0, 200, edges);
    cmp("channel 0 block after enable", 0, 1000, 16, 1);
    check("irq raised", DW'(irq), 1);
    if (irq) n_irq++;
    wr(A_STATUS, 32'h01);
    check("irq cleared", DW'(irq), 0);

    // 4. timed block on channel 2, CPU contends for the bus meanwhile
    for (int n = 1; n <= 9; n += 4) begin
      fill(200, n);
      setup(2, 200, 1200 + 16 * n, n);
      reg_addr = A_CH0 + 2*4 + 3; reg_wdata = 32'b0111; reg_we = 1;
      @(negedge clk);
      reg_we = 0;
      // CPU tries memory while the DMA is busy
      @(negedge clk); @(negedge clk); @(negedge clk);
      cpu_access(0, 300, '0, v);
      check("CPU read during DMA", v, 32'hCAFE_0001);
      while (!irq) @(negedge clk);
      // the done flag is set by the (2n+3)th clock edge after the CTRL write
      // edge, so irq is first seen 2n+4 mid-cycle samples after the write
      check($sformatf("done latency for %0d words", n), DW'(t_irq - t_start), DW'(2 * n + 4));
      n_irq++;
      cmp($sformatf("channel 2 block of %0d", n), 200, 1200 + 16 * n, n, 1);
      wr(A_STATUS, 32'h04);
    end

    // 5. contention: channels 3, 1 and 5 pending together
    fill(400, 12); fill(500, 6); fill(600, 6);
    setup(3, 400, 1400, 12);
    setup(1, 500, 1500, 6);
    setup(5, 600, 1600, 6);
    wr(A_CH0 + 3*4 + 3, 32'b0111);
    wr(A_CH0 + 1*4 + 3, 32'b0111);
    wr(A_CH0 + 5*4 + 3, 32'b0111);
    begin
      logic [2:0] last_ch = 3'h7;
      logic was_busy = 0;
      for (int t = 0; t < 200; t++) begin
        if (dma_busy && (!was_busy || active_ch != last_ch)) begin
          order.push_back(int'(active_ch));
          last_ch = active_ch;
          if ((dut.ch_req & ~(N'(1) << active_ch)) != '0) n_contention++;
        end
        was_busy = dma_busy;
        @(negedge clk);
      end
    end
    check("three channels served", DW'(order.size()), 3);
    if (order.size() == 3) begin
      check("first served", DW'(order[0]), 3);
      check("second served (lowest waiting)", DW'(order[1]), 1);
      check("third served", DW'(order[2]), 5);
    end
    rd(A_STATUS, v);
    check("done flags 1, 3, 5", v & 32'h2A, 32'h2A);
    cmp("channel 3", 400, 1400, 12, 1);
    cmp("channel 1", 500, 1500, 6, 1);
    cmp("channel 5", 600, 1600, 6, 1);
    wr(A_STATUS, 32'h7F);

    // 6. device-paced transfer, fixed source (device data register) on channel 6
    u_mem.poke(700, 32'h1234_5678);
    setup(6, 700, 1700, 20);
    wr(A_CH0 + 6*4 + 3, 32'b1101);              // start, dst_inc, hw_req
    for (int t = 0; t < 600; t++) begin
      dreq[6] = ($urandom % 3) != 0;
      @(negedge clk);
      rd(A_STATUS, v);
      if (v[6]) break;
    end
    dreq = '0;
    check("device-paced transfer done", DW'(v[6]), 1);
    cmp("channel 6 from fixed source", 700, 1700, 20, 0);
    wr(A_STATUS, 32'h7F);

    // 7. zero-length arm completes at once
    setup(4, 0, 0, 0);
    wr(A_CH0 + 4*4 + 3, 32'b0111);
    rd(A_STATUS, v);
    check("zero-length done", DW'(v[4]), 1);
    if (v[4]) n_zero_len++;
    check("zero-length channel idle", DW'(dut.ch_busy[4]), 0);
    wr(A_STATUS, 32'h7F);

    // idle period: controller clock and channel clocks stop
    repeat (30) @(negedge clk);

    // 8. reset in mid-transfer
    fill(800, 30);
    setup(0, 800, 1800, 30);
    wr(A_CH0 + 3, 32'b0111);
    repeat (10) @(negedge clk);
    rst = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    @(negedge clk);
    check("controller idle after reset", DW'(dma_busy), 0);
    check("channels idle after reset", DW'(dut.ch_busy), 0);
    rd(A_GCTRL, v); check("GCTRL after reset", v, 0);
    rd(A_CH0, v);   check("SRC after reset", v, 0);
    check("bus back to CPU", DW'(dut.hlda), 0);
    repeat (5) @(negedge clk);

    // CCG: channel clocks must have been stopped while their channels were unused
    checks++;
    if (n_ch_off == 0) begin failures++; $display("channel clocks never stopped"); end

    // mechanism coverage
    $display("GCG off cycles %0d, DMAC clock off cycles %0d, channel-clock off cycles %0d",
             n_gcg_off, n_dmac_off, n_ch_off);
    $display("CPU stall cycles %0d, contention %0d, demand releases %0d, irq %0d",
             n_cpu_stall, n_contention, n_demand_release, n_irq);
    $display("zero-length %0d, reset-opened gates %0d", n_zero_len, n_rst_gate);
    for (int i = 0; i < N; i++) $display("channel %0d clock on %0d cycles", i, n_ch_on[i]);
    checks++; if (n_gcg_off == 0)        begin failures++; $display("GCG never gated"); end
    checks++; if (n_dmac_off == 0)       begin failures++; $display("DMAC clock never gated"); end
    checks++; if (n_cpu_stall == 0)      begin failures++; $display("CPU never stalled"); end
    checks++; if (n_contention == 0)     begin failures++; $display("no contention seen"); end
    checks++; if (n_demand_release == 0) begin failures++; $display("no demand release"); end
    checks++; if (n_irq == 0)            begin failures++; $display("no irq"); end
    checks++; if (n_zero_len == 0)       begin failures++; $display("no zero-length arm"); end
    checks++; if (n_rst_gate == 0)       begin failures++; $display("reset never opened gates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
