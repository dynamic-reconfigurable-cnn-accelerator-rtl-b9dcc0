// tb_rm_ctrl_regs: self-checking test of a partition's module registers.
// Writes and reads back both configuration words and checks the decoded
// layer fields, checks that a CTRL write gives exactly one start pulse, that
// the done flag is sticky until the next start, that busy and the module ID
// read back, that responses wait for BREADY / RREADY, and that a reset clears
// the registers.  Each access must complete in the handshake's fixed number
// of clocks: the request is taken in the clock it is offered, the response
// is valid in the next.
module tb_rm_ctrl_regs;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  req;
  axil_rsp_t  rsp;
  rm_e        rm_id;
  logic       start, busy, done;
  layer_cfg_t cfg;

  rm_ctrl_regs dut (.*);

  int checks = 0, failures = 0, n_start = 0;
  always @(posedge clk) n_start += start;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  task automatic wr(logic [6:0] a, logic [31:0] d);
    @(negedge clk);
    req.awaddr = a; req.wdata = d; req.awvalid = 1; req.wvalid = 1; #1;
    check(rsp.awready && rsp.wready, "write taken in the clock it is offered");
    @(negedge clk);
    req.awvalid = 0; req.wvalid = 0;
    check(rsp.bvalid && rsp.bresp == 2'b00, "write response one clock later");
    @(negedge clk);
  endtask

  task automatic rd(logic [6:0] a, output logic [31:0] d);
    @(negedge clk);
    req.araddr = a; req.arvalid = 1; #1;
    check(rsp.arready, "read taken in the clock it is offered");
    @(negedge clk);
    req.arvalid = 0;
    check(rsp.rvalid && rsp.rresp == 2'b00, "read data one clock later");
    d = rsp.rdata;
    @(negedge clk);
  endtask

  logic [31:0] r;

  initial begin
    req = '0; req.bready = 1; req.rready = 1; req.wstrb = '1;
    rm_id = RM_POOL; busy = 0; done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_start = 0;

    wr(7'h48, 32'h0010_0008);
    wr(7'h4C, 32'h0125_0C0B);
    rd(7'h48, r); check(r == 32'h0010_0008, "CFG0 readback");
    rd(7'h4C, r); check(r == 32'h0125_0C0B, "CFG1 readback");
    check(cfg.n_in == 8 && cfg.n_out == 16 && cfg.in_h == 11 && cfg.in_w == 12 &&
          cfg.k == 5 && cfg.stride == 2 && cfg.relu == 1, "cfg fields");
    rd(7'h44, r); check(r == 32'(RM_POOL), "ID");
    rd(7'h50, r); check(r == 0, "unmapped offset reads 0");

    check(n_start == 0, "no start before CTRL write");
    wr(7'h40, 32'd1);
    check(n_start == 1, "one start pulse");
    wr(7'h40, 32'd0);
    check(n_start == 1, "CTRL write of 0 does not start");
    busy = 1;
    rd(7'h40, r); check(r == 32'b01, "busy, not done");
    busy = 0;
    @(negedge clk) done = 1;
    @(negedge clk) done = 0;
    rd(7'h40, r); check(r == 32'b10, "done sticky");
    rd(7'h40, r); check(r == 32'b10, "done still set");
    wr(7'h40, 32'd1);
    rd(7'h40, r); check(r == 32'b00, "done cleared by start");

    // responses wait for the ready
    req.bready = 0;
    @(negedge clk);
    req.awaddr = 7'h48; req.wdata = 32'h1; req.awvalid = 1; req.wvalid = 1;
    @(negedge clk);
    req.awvalid = 0; req.wvalid = 0;
    repeat (3) @(negedge clk);
    check(rsp.bvalid, "BVALID held until BREADY");
    req.awvalid = 1; req.wvalid = 1; #1;
    check(!rsp.awready, "no new write while a response is pending");
    req.awvalid = 0; req.wvalid = 0;
    req.bready = 1;
    @(negedge clk);
    check(!rsp.bvalid, "BVALID dropped after BREADY");

    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    rd(7'h48, r); check(r == 0, "reset clears CFG0");
    check(cfg == '0, "reset clears cfg");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
