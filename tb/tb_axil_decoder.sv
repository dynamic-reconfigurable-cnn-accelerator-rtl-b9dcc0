// tb_axil_decoder: self-checking test of the AXI4-Lite decoder.  Three
// register-file slaves (a write stores WDATA at the written address, a read
// returns it, each with its own random ready and response delays) sit behind
// the decoder.  The master writes a distinct value to every word of the
// 128-byte space, in random order, with AW and W offered in either order or
// together, then reads every word back.  Every read must return what was
// written there, every access must have reached the slave its address
// decodes to, and a slave must see a write's AW and W only while it is the
// one addressed.
module tb_axil_decoder;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t       m_req;
  axil_rsp_t       m_rsp;
  axil_req_t [2:0] s_req;
  axil_rsp_t [2:0] s_rsp;

  axil_decoder dut (.*);

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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int slot_of(logic [6:0] a);
    return a < 7'h40 ? 0 : (a < 7'h60 ? 1 : 2);
  endfunction

  // slave models: a register file per slave; AW and W taken independently
  logic [31:0] mem [3][32];
  int wrong_slave = 0;
  for (genvar i = 0; i < 3; i++) begin : g_slv
    logic aw_have, w_have, awready, wready, arready, bvalid, rvalid;
    logic [6:0] aw_q;
    logic [31:0] w_q, rdata;
    assign s_rsp[i] = '{awready: awready, wready: wready, bresp: 2'(i), bvalid: bvalid,
                        arready: arready, rdata: rdata, rresp: 2'(i), rvalid: rvalid};
    always @(negedge clk) begin
      awready <= !aw_have && ($urandom_range(3) != 0);
      wready  <= !w_have && ($urandom_range(3) != 0);
      arready <= !rvalid && ($urandom_range(3) != 0);
    end
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        aw_have <= 0; w_have <= 0; aw_q <= '0; w_q <= '0;
        bvalid <= 0; rvalid <= 0; rdata <= '0;
      end else begin
        if (s_req[i].awvalid && awready) begin
          aw_have <= 1; aw_q <= s_req[i].awaddr;
          if (slot_of(s_req[i].awaddr) != i) wrong_slave++;
        end
        if (s_req[i].wvalid && wready) begin
          w_have <= 1; w_q <= s_req[i].wdata;
        end
        if (aw_have && w_have && !bvalid) begin
          mem[i][aw_q[6:2]] <= w_q;
          bvalid <= 1;
        end
        if (bvalid && s_req[i].bready) begin
          bvalid <= 0; aw_have <= 0; w_have <= 0;
        end
        if (s_req[i].arvalid && arready) begin
          rvalid <= 1;
          rdata <= mem[i][s_req[i].araddr[6:2]];
          if (slot_of(s_req[i].araddr) != i) wrong_slave++;
        end
        if (rvalid && s_req[i].rready) rvalid <= 0;
      end
    end
    initial begin
      awready = 0; wready = 0; arready = 0;
    end
  end

  task automatic m_write(logic [6:0] a, logic [31:0] d);
    int order = $urandom_range(2);   // 0 together, 1 AW first, 2 W first
    bit aw_ok = 0, w_ok = 0;
    @(negedge clk);
    m_req.awaddr = a; m_req.wdata = d;
    if (order != 2) m_req.awvalid = 1;
    if (order != 1) m_req.wvalid = 1;
    while (!(aw_ok && w_ok)) begin
      @(posedge clk);
      if (m_req.awvalid && m_rsp.awready) aw_ok = 1;
      if (m_req.wvalid && m_rsp.wready) w_ok = 1;
      @(negedge clk);
      if (aw_ok) m_req.awvalid = 0;
      if (w_ok) m_req.wvalid = 0;
      if (!aw_ok) m_req.awvalid = 1;
      if (!w_ok && (aw_ok || order == 0 || order == 2)) m_req.wvalid = 1;
    end
    m_req.bready = ($urandom_range(1) == 1);
    while (!(m_rsp.bvalid && m_req.bready)) begin
      @(negedge clk);
      m_req.bready = ($urandom_range(1) == 1);
    end
    check(m_rsp.bresp == 2'(slot_of(a)), $sformatf("write %h answered by slave %0d", a, m_rsp.bresp));
    @(negedge clk);
    m_req.bready = 0;
  endtask

  task automatic m_read(logic [6:0] a, output logic [31:0] d);
    @(negedge clk);
    m_req.araddr = a; m_req.arvalid = 1;
    @(posedge clk);
    while (!m_rsp.arready) @(posedge clk);
    @(negedge clk);
    m_req.arvalid = 0;
    m_req.rready = ($urandom_range(1) == 1);
    while (!(m_rsp.rvalid && m_req.rready)) begin
      @(negedge clk);
      m_req.rready = ($urandom_range(1) == 1);
    end
    d = m_rsp.rdata;
    check(m_rsp.rresp == 2'(slot_of(a)), $sformatf("read %h answered by slave %0d", a, m_rsp.rresp));
    @(negedge clk);
    m_req.rready = 0;
  endtask

  initial begin
    int order[32];
    logic [31:0] r;
    m_req = '0; m_req.wstrb = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) m_write(7'(order[i] * 4), 32'hC0DE_0000 + 32'(order[i]));
    order.shuffle();
    foreach (order[i]) begin
      m_read(7'(order[i] * 4), r);
      check(r == 32'hC0DE_0000 + 32'(order[i]), $sformatf("word %0d reads %h", order[i], r));
    end
    check(wrong_slave == 0, "every access reached the slave its address decodes to");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
