// tb_rp_func: self-checking test of one reconfigurable partition.  Selects
// each of the three modules in turn and runs a small layer through the
// partition's single stream interface (convolution, then pooling, then fully
// connected, then convolution again), comparing outputs with the reference
// model.  Layer sizes and the start command are written over the
// partition's AXI4-Lite link; the ID register must name the selected module,
// the done flag must be set after each layer, and a partition reset must
// clear the registers.  Also checks that with no module selected the
// partition accepts no data and produces none, and that a start while a
// different module is selected does not start the convolution.
module tb_rp_func;
  import cnn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rm_rst_n, busy, done;
  rm_e rm_sel;
  axil_req_t axil_req;
  axil_rsp_t axil_rsp;
  data_t s_tdata, m_tdata;
  logic s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;

  rp_func #(.CONV_N_MAX(2), .CONV_M_MAX(3), .CONV_H_MAX(6), .CONV_W_MAX(6), .CONV_K_MAX(3),
            .TN(2), .POOL_W_MAX(8), .FC_IN_MAX(16)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
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

  task automatic axil_write(logic [6:0] a, logic [31:0] d);
    @(negedge clk);
    axil_req.awaddr = a; axil_req.wdata = d; axil_req.awvalid = 1; axil_req.wvalid = 1;
    @(posedge clk);
    while (!(axil_rsp.awready && axil_rsp.wready)) @(posedge clk);
    @(negedge clk);
    axil_req.awvalid = 0; axil_req.wvalid = 0;
    while (!axil_rsp.bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axil_read(logic [6:0] a, output logic [31:0] d);
    @(negedge clk);
    axil_req.araddr = a; axil_req.arvalid = 1;
    @(posedge clk);
    while (!axil_rsp.arready) @(posedge clk);
    @(negedge clk);
    axil_req.arvalid = 0;
    while (!axil_rsp.rvalid) @(negedge clk);
    d = axil_rsp.rdata;
    @(negedge clk);
  endtask

  task automatic set_cfg(layer_cfg_t c);
    logic [31:0] r;
    axil_write(7'h08, {c.n_out, c.n_in});
    axil_write(7'h0C, {7'd0, c.relu, 2'd0, c.stride, c.k, c.in_w, c.in_h});
    axil_read(7'h04, r);
    check(r == 32'(rm_sel), "ID names the selected module");
  endtask

  task automatic run(q_t in_q, q_t exp_o, string what);
    q_t got;
    bit last_seen;
    logic [31:0] r;
    axil_write(7'h00, 32'd1);
    fork
      begin
        foreach (in_q[i]) begin
          s_tvalid = 1;
          s_tdata  = data_t'(in_q[i]);
          @(posedge clk);
          while (!s_tready) @(posedge clk);
          @(negedge clk);
        end
        s_tvalid = 0;
      end
      begin
        last_seen = 0;
        while (!last_seen) begin
          @(posedge clk);
          if (m_tvalid && m_tready) begin
            got.push_back(int'(m_tdata));
            last_seen = m_tlast;
          end
        end
        while (!done) @(posedge clk);
      end
    join
    check(got == exp_o, {what, " outputs"});
    @(negedge clk);
    axil_read(7'h00, r);
    check(r[1:0] == 2'b10, {what, " done flag set, not busy"});
  endtask

  initial begin
    q_t wt, b, x, in_q;
    rm_rst_n = 1; rm_sel = RM_NONE;
    axil_req = '0; axil_req.bready = 1; axil_req.rready = 1;
    s_tvalid = 0; s_tlast = 0; s_tdata = '0; m_tready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // nothing selected
    s_tvalid = 1;
    axil_write(7'h00, 32'd1);
    repeat (5) begin
      check(!s_tready && !m_tvalid && !busy, "idle partition with no module");
      @(negedge clk);
    end
    s_tvalid = 0;

    // convolution: 2 -> 3 channels, 6x6, 3x3
    rm_sel = RM_CONV;
    @(negedge clk);
    for (int i = 0; i < 3 * 2 * 9; i++) wt.push_back(rnd(100));
    for (int i = 0; i < 3; i++) b.push_back(rnd(100));
    for (int i = 0; i < 2 * 36; i++) x.push_back(rnd(256));
    set_cfg('{n_out: 16'd3, n_in: 16'd2, in_w: 8'd6, in_h: 8'd6, k: 4'd3, stride: 2'd1,
              relu: 1'b1});
    in_q = {wt, b, x};
    run(in_q, conv_ref(wt, b, x, 2, 3, 6, 6, 3, 1, 1'b1), "conv");

    // pooling: 3 channels of 4x8
    rm_sel = RM_POOL;
    x = {};
    for (int i = 0; i < 3 * 4 * 8; i++) x.push_back(rnd(1000));
    set_cfg('{n_out: 16'd0, n_in: 16'd3, in_w: 8'd8, in_h: 8'd4, k: 4'd0, stride: 2'd0,
              relu: 1'b0});
    run(x, pool_ref(x, 3, 4, 8), "pool");
    check(!dut.u_conv.busy, "convolution held idle while pooling selected");

    // fully connected: 16 -> 5, ReLU
    rm_sel = RM_FC;
    x = {}; b = {}; wt = {};
    for (int i = 0; i < 16; i++) x.push_back(rnd(256));
    for (int o = 0; o < 5; o++) b.push_back(rnd(256));
    for (int i = 0; i < 80; i++) wt.push_back(rnd(256));
    in_q = x;
    for (int o = 0; o < 5; o++) begin
      in_q.push_back(b[o]);
      for (int i = 0; i < 16; i++) in_q.push_back(wt[o * 16 + i]);
    end
    set_cfg('{n_out: 16'd5, n_in: 16'd16, in_w: 8'd0, in_h: 8'd0, k: 4'd0, stride: 2'd0,
              relu: 1'b1});
    run(in_q, fc_ref(wt, b, x, 16, 5, 1'b1), "fc");

    // back to convolution, stride 2 without ReLU, after a partition reset
    rm_rst_n = 0;
    @(negedge clk);
    rm_rst_n = 1;
    rm_sel = RM_CONV;
    begin
      logic [31:0] r;
      axil_read(7'h08, r);
      check(r == 0, "partition reset clears the module registers");
    end
    x = {}; b = {}; wt = {};
    for (int i = 0; i < 2 * 1 * 4; i++) wt.push_back(rnd(100));
    for (int i = 0; i < 2; i++) b.push_back(rnd(100));
    for (int i = 0; i < 36; i++) x.push_back(rnd(256));
    set_cfg('{n_out: 16'd2, n_in: 16'd1, in_w: 8'd6, in_h: 8'd6, k: 4'd2, stride: 2'd2,
              relu: 1'b0});
    in_q = {wt, b, x};
    run(in_q, conv_ref(wt, b, x, 1, 2, 6, 6, 2, 2, 1'b0), "conv again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
