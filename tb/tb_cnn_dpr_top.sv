// tb_cnn_dpr_top: end-to-end test of the accelerator at its default sizes.
//
// The testbench plays the processing system (AXI4-Lite accesses to the
// static registers and to the module registers inside the partitions),
// the DMA with its DDR4 memory (MM2S source stream, S2MM sink stream with
// random backpressure) and the static group of common operators (a stream
// loopback).  It runs a LeNet-style MNIST classifier, 28x28x1 input,
// layer by layer with partial reconfiguration between the steps:
//   1. RP_func0 <- conv, RP_func1 <- pool; DMA -> RP0 (conv1 1->8, 5x5, ReLU)
//      -> RP1 (pool 2x2) -> DMA                           : 8x12x12
//   2. RP_func1 <- conv, RP_func0 <- pool; DMA -> RP1 (conv2 8->16, 5x5,
//      ReLU) -> RP0 (pool) -> DMA                          : 16x4x4
//   3. RP_func0 <- fc, RP_func1 <- fc; DMA -> RP0 (fc1 256->64, ReLU) -> DMA
//      then DMA -> RP1 (fc2 64->10) -> DMA                 : 10 scores
// Each result is compared with the reference model, the class (arg max)
// too.  Mechanisms counted, each must happen at least once: module reload,
// skipped reload of an already-loaded module, clocks with a partition in
// shutdown, clocks with a partition decoupled, clocks with a host access to
// a partition held by its shutdown manager, partition-to-partition chaining,
// a route change held back by an open packet, S2MM backpressure, and the
// static-group path.  After each load the host reads the partition's ID
// register straight away; that read waits until the new module is in.  After
// a real reload (not a skipped one) the module's registers must read zero.
module tb_cnn_dpr_top;
  import cnn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [6:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready, irq;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  data_t s_axis_mm2s_tdata, m_axis_s2mm_tdata, m_axis_sf_tdata, s_axis_sf_tdata;
  logic  s_axis_mm2s_tvalid, s_axis_mm2s_tlast, s_axis_mm2s_tready;
  logic  m_axis_s2mm_tvalid, m_axis_s2mm_tlast, m_axis_s2mm_tready;
  logic  m_axis_sf_tvalid, m_axis_sf_tlast, m_axis_sf_tready;
  logic  s_axis_sf_tvalid, s_axis_sf_tlast, s_axis_sf_tready;

  cnn_dpr_top dut (.*);

  // Static group stand-in: a one-entry register that passes its input back.
  assign m_axis_sf_tready = !s_axis_sf_tvalid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axis_sf_tvalid <= 1'b0;
      s_axis_sf_tdata  <= '0;
      s_axis_sf_tlast  <= 1'b0;
    end else if (s_axis_sf_tvalid) begin
      if (s_axis_sf_tready) s_axis_sf_tvalid <= 1'b0;
    end else if (m_axis_sf_tvalid) begin
      s_axis_sf_tvalid <= 1'b1;
      s_axis_sf_tdata  <= m_axis_sf_tdata;
      s_axis_sf_tlast  <= m_axis_sf_tlast;
    end
  end

  int checks = 0, failures = 0;
  int n_shutdown = 0, n_decoupled = 0, n_backpressure = 0, n_chained = 0, n_pending = 0, n_static = 0;
  int n_axil_held = 0;

  // static registers, then the module registers in the partition windows
  localparam logic [6:0] A_IRQACK = 7'h00, A_STATUS = 7'h04, A_ROUTE = 7'h08,
                         A_RCFG0 = 7'h0C, A_RCFG1 = 7'h10,
                         A_RELOADS = 7'h24, A_SKIPS = 7'h28;
  localparam logic [6:0] P_BASE0 = 7'h40, P_BASE1 = 7'h60;
  localparam logic [6:0] M_CTRL = 7'h00, M_ID = 7'h04, M_CFG0 = 7'h08, M_CFG1 = 7'h0C;

  function automatic logic [6:0] pa(int p, logic [6:0] off);
    return (p == 0 ? P_BASE0 : P_BASE1) | off;
  endfunction

  always @(posedge clk) begin
    if (dut.g_rp[0].in_sd || dut.g_rp[1].in_sd) n_shutdown++;
    if (dut.g_rp[0].decouple || dut.g_rp[1].decouple) n_decoupled++;
    if (m_axis_s2mm_tvalid && !m_axis_s2mm_tready) n_backpressure++;
    if ((dut.g_rp[0].sd_req && dut.dec_req[1].arvalid) ||
        (dut.g_rp[1].sd_req && dut.dec_req[2].arvalid)) n_axil_held++;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------ AXI4-Lite master (PS)
  semaphore bus = new(1);

  task automatic axil_write(logic [6:0] a, logic [31:0] d);
    bus.get();
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1;
    s_axil_wdata = d; s_axil_wvalid = 1;
    @(posedge clk);
    while (!(s_axil_awready && s_axil_wready)) @(posedge clk);
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk);
    bus.put();
  endtask

  task automatic axil_read(logic [6:0] a, output logic [31:0] d);
    bus.get();
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1;
    @(posedge clk);
    while (!s_axil_arready) @(posedge clk);
    @(negedge clk);
    s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(negedge clk);
    bus.put();
  endtask

  // load a module and wait until the partition is ready
  task automatic load(int p, rm_e m);
    logic [31:0] st, n0, n1, c0;
    axil_read(A_RELOADS, n0);
    axil_write(p == 0 ? A_RCFG0 : A_RCFG1, 32'(m));
    axil_read(pa(p, M_ID), st);
    check(st == 32'(m), $sformatf("partition %0d ID register reads %0d", p, m));
    do axil_read(A_STATUS, st); while (st[4 + p]);
    axil_read(A_RELOADS, n1);
    if (n1 != n0) begin
      axil_read(pa(p, M_CFG0), c0);
      check(c0 == 0, $sformatf("partition %0d registers reset by the load", p));
    end
    check(st[8 + 2 * p +: 2] == m, $sformatf("partition %0d holds module %0d", p, m));
  endtask

  task automatic set_cfg(int p, int n_in, int n_out, int h, int w, int k, int s, bit relu);
    axil_write(pa(p, M_CFG0), {16'(n_out), 16'(n_in)});
    axil_write(pa(p, M_CFG1), {7'd0, relu, 2'd0, 2'(s), 4'(k), 8'(w), 8'(h)});
  endtask

  // clear the done flags of the partitions in mask, then start their
  // modules, downstream partition first
  task automatic start(logic [1:0] mask);
    axil_write(A_IRQACK, 32'(mask));
    if (mask[1]) axil_write(pa(1, M_CTRL), 32'd1);
    if (mask[0]) axil_write(pa(0, M_CTRL), 32'd1);
  endtask

  // route: sink m <- source src[m] when en[m]
  function automatic logic [31:0] route_word(int s0, int s1, int s2, int s3, logic [3:0] en);
    return {16'd0, en[3], 1'b0, 2'(s3), en[2], 1'b0, 2'(s2), en[1], 1'b0, 2'(s1), en[0], 1'b0, 2'(s0)};
  endfunction

  task automatic wait_route();
    logic [31:0] st;
    do axil_read(A_STATUS, st); while (st[6]);
  endtask

  // ------------------------------------------------------- DMA and memory
  task automatic mm2s_send(q_t q);
    foreach (q[i]) begin
      if ($urandom_range(7) == 0) begin
        s_axis_mm2s_tvalid = 0;
        @(negedge clk);
      end
      s_axis_mm2s_tvalid = 1;
      s_axis_mm2s_tdata  = data_t'(q[i]);
      s_axis_mm2s_tlast  = (i == q.size() - 1);
      @(posedge clk);
      while (!s_axis_mm2s_tready) @(posedge clk);
      @(negedge clk);
    end
    s_axis_mm2s_tvalid = 0;
    s_axis_mm2s_tlast  = 0;
  endtask

  task automatic s2mm_recv(output q_t q);
    bit last_seen = 0;
    q = {};
    while (!last_seen) begin
      @(negedge clk);
      m_axis_s2mm_tready = ($urandom_range(3) != 0);
      @(posedge clk);
      if (m_axis_s2mm_tvalid && m_axis_s2mm_tready) begin
        q.push_back(int'(m_axis_s2mm_tdata));
        last_seen = m_axis_s2mm_tlast;
      end
    end
    @(negedge clk);
    m_axis_s2mm_tready = 0;
  endtask

  task automatic wait_done(logic [1:0] mask);
    logic [31:0] st;
    do axil_read(A_STATUS, st);
    while ((mask[0] && !st[1]) || (mask[1] && !st[3]));
  endtask

  task automatic compare(q_t got, q_t exp_o, string what);
    int bad = 0;
    checks++;
    if (got.size() != exp_o.size()) begin
      failures++;
      $display("FAIL: %s: %0d values, expected %0d", what, got.size(), exp_o.size());
      return;
    end
    foreach (exp_o[i]) if (got[i] != exp_o[i]) bad++;
    if (bad != 0) begin
      failures++;
      $display("FAIL: %s: %0d of %0d values differ", what, bad, exp_o.size());
    end else begin
      $display("%s: %0d values match", what, exp_o.size());
    end
  endtask

  // ------------------------------------------------------------- the run
  initial begin
    q_t img, w1, b1, w2, b2, w3, b3, w4, b4;
    q_t e1, e2, e3, e4, got, sf_in;
    logic [31:0] r;
    int cls_hw, cls_ref;

    s_axil_awaddr = '0; s_axil_araddr = '0; s_axil_awvalid = 0; s_axil_wvalid = 0;
    s_axil_arvalid = 0; s_axil_wdata = '0; s_axil_wstrb = '1; s_axil_bready = 1; s_axil_rready = 1;
    s_axis_mm2s_tdata = '0; s_axis_mm2s_tvalid = 0; s_axis_mm2s_tlast = 0; m_axis_s2mm_tready = 0;

    // image: a bright ring on a dark background plus noise, values 0..1.0
    for (int y = 0; y < 28; y++)
      for (int x = 0; x < 28; x++) begin
        int d2;
        d2 = (y - 14) * (y - 14) + (x - 14) * (x - 14);
        img.push_back((d2 > 25 && d2 < 64) ? 200 + $urandom_range(56) : $urandom_range(30));
      end
    for (int i = 0; i < 8 * 1 * 25; i++) w1.push_back(rnd(64));
    for (int i = 0; i < 8; i++) b1.push_back(rnd(32));
    for (int i = 0; i < 16 * 8 * 25; i++) w2.push_back(rnd(24));
    for (int i = 0; i < 16; i++) b2.push_back(rnd(32));
    for (int i = 0; i < 64 * 256; i++) w3.push_back(rnd(24));
    for (int i = 0; i < 64; i++) b3.push_back(rnd(32));
    for (int i = 0; i < 10 * 64; i++) w4.push_back(rnd(48));
    for (int i = 0; i < 10; i++) b4.push_back(rnd(32));

    e1 = pool_ref(conv_ref(w1, b1, img, 1, 8, 28, 28, 5, 1, 1'b1), 8, 24, 24);
    e2 = pool_ref(conv_ref(w2, b2, e1, 8, 16, 12, 12, 5, 1, 1'b1), 16, 8, 8);
    e3 = fc_ref(w3, b3, e2, 256, 64, 1'b1);
    e4 = fc_ref(w4, b4, e3, 64, 10, 1'b0);

    repeat (3) @(negedge clk);
    rst_n = 1;
    n_shutdown = 0; n_decoupled = 0; n_backpressure = 0; n_axil_held = 0;
    @(negedge clk);

    // --- static group path: DMA -> static group -> DMA
    axil_write(A_ROUTE, route_word(3, 0, 0, 0, 4'b1001));
    wait_route();
    for (int i = 0; i < 16; i++) sf_in.push_back(rnd(1000));
    fork
      mm2s_send(sf_in);
      s2mm_recv(got);
    join
    compare(got, sf_in, "static group loopback");
    if (got == sf_in) n_static++;

    // --- step 1: conv1 in RP_func0, pool in RP_func1, chained
    load(0, RM_CONV);
    load(1, RM_POOL);
    load(0, RM_CONV);                     // already loaded: must be skipped
    set_cfg(0, 1, 8, 28, 28, 5, 1, 1'b1);
    set_cfg(1, 8, 0, 24, 24, 0, 0, 1'b0);
    axil_write(A_ROUTE, route_word(2, 0, 1, 0, 4'b0111));
    wait_route();
    start(2'b11);
    fork
      mm2s_send({w1, b1, img});
      s2mm_recv(got);
    join
    wait_done(3);
    n_chained++;
    compare(got, e1, "conv1 + pool1");
    check(irq, "irq raised by done");

    // --- step 2: conv2 in RP_func1, pool in RP_func0, chained the other way
    load(1, RM_CONV);
    load(0, RM_POOL);
    set_cfg(1, 8, 16, 12, 12, 5, 1, 1'b1);
    set_cfg(0, 16, 0, 8, 8, 0, 0, 1'b0);
    axil_write(A_ROUTE, route_word(1, 2, 0, 0, 4'b0111));
    wait_route();
    start(2'b11);
    fork
      mm2s_send({w2, b2, got});
      s2mm_recv(got);
    join
    wait_done(3);
    n_chained++;
    compare(got, e2, "conv2 + pool2");

    // --- step 3: both fully connected layers
    load(0, RM_FC);
    load(1, RM_FC);
    set_cfg(0, 256, 64, 0, 0, 0, 0, 1'b1);
    set_cfg(1, 64, 10, 0, 0, 0, 0, 1'b0);
    axil_write(A_ROUTE, route_word(1, 0, 0, 0, 4'b0011));
    wait_route();
    start(2'b01);
    begin
      q_t fc1_in, fc2_in, got3;
      fc1_in = got;
      for (int o = 0; o < 64; o++) begin
        fc1_in.push_back(b3[o]);
        for (int i = 0; i < 256; i++) fc1_in.push_back(w3[o * 256 + i]);
      end
      fork
        mm2s_send(fc1_in);
        s2mm_recv(got3);
        begin
          // commit the next route while fc1's output packet is open
          repeat (2000) @(negedge clk);
          axil_write(A_ROUTE, route_word(2, 0, 0, 0, 4'b0101));
          axil_read(A_STATUS, r);
          if (r[6]) n_pending++;
        end
      join
      wait_done(1);
      wait_route();
      compare(got3, e3, "fc1");
      start(2'b10);
      fc2_in = got3;
      for (int o = 0; o < 10; o++) begin
        fc2_in.push_back(b4[o]);
        for (int i = 0; i < 64; i++) fc2_in.push_back(w4[o * 64 + i]);
      end
      fork
        mm2s_send(fc2_in);
        s2mm_recv(got);
      join
      wait_done(2);
      compare(got, e4, "fc2");
    end

    cls_hw = 0; cls_ref = 0;
    foreach (got[i]) if (got[i] > got[cls_hw]) cls_hw = i;
    foreach (e4[i]) if (e4[i] > e4[cls_ref]) cls_ref = i;
    check(cls_hw == cls_ref, "class");
    $display("class %0d (reference %0d)", cls_hw, cls_ref);

    axil_read(A_RELOADS, r);
    check(r[15:0] == 3 && r[31:16] == 3, $sformatf("reloads %0d / %0d, expected 3 / 3", r[15:0], r[31:16]));
    axil_read(A_SKIPS, r);
    check(r[15:0] == 1 && r[31:16] == 0, "one skipped reload");
    $display("mechanisms: reload-skips %0d, shutdown clocks %0d, decoupled clocks %0d, held host-access clocks %0d, chained runs %0d, held route changes %0d, backpressure clocks %0d, static-group runs %0d",
             r[15:0], n_shutdown, n_decoupled, n_axil_held, n_chained, n_pending, n_backpressure, n_static);
    check(r[15:0] > 0, "skipped reload happened");
    check(n_shutdown > 0, "shutdown handshake happened");
    check(n_decoupled > 0, "decoupling happened");
    check(n_axil_held > 0, "host access held during shutdown happened");
    check(n_chained > 0, "partition chaining happened");
    check(n_pending > 0, "route change held by open packet happened");
    check(n_backpressure > 0, "backpressure happened");
    check(n_static > 0, "static group path used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
