// tb_dfx_shutdown_mgr: self-checking test of the shutdown manager.  Checks
// that streams pass while no shutdown is requested, that a request made in
// the middle of a packet lets that packet finish (on each direction) before
// blocking, that `in_shutdown` rises only when both directions are blocked,
// that nothing passes while blocked, and that dropping the request releases
// both directions.  On the AXI4-Lite link it checks that a write or read
// already under way (including a write whose AW was taken but not yet its W)
// completes and delays `in_shutdown` until its response, that new AW, W and
// AR are held while shut down, and that they pass on release.
module tb_dfx_shutdown_mgr;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic shutdown_req, in_shutdown;
  data_t us_tdata, ds_tdata, rp_tdata, st_tdata;
  logic us_tvalid, us_tlast, us_tready, ds_tvalid, ds_tlast, ds_tready;
  logic rp_tvalid, rp_tlast, rp_tready, st_tvalid, st_tlast, st_tready;
  axil_req_t st_axil_req, rp_axil_req;
  axil_rsp_t st_axil_rsp, rp_axil_rsp;

  dfx_shutdown_mgr dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
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

  initial begin
    shutdown_req = 0;
    us_tdata = 16'h0011; us_tvalid = 0; us_tlast = 0; ds_tready = 1;
    rp_tdata = 16'h0022; rp_tvalid = 0; rp_tlast = 0; st_tready = 1;
    st_axil_req = '0; st_axil_req.bready = 1; st_axil_req.rready = 1;
    rp_axil_rsp = '0; rp_axil_rsp.awready = 1; rp_axil_rsp.wready = 1; rp_axil_rsp.arready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    us_tvalid = 1; rp_tvalid = 1; #1;
    check(ds_tvalid && us_tready && ds_tdata == 16'h0011 && st_tvalid && rp_tready &&
          st_tdata == 16'h0022, "pass-through when not requested");
    // Open a packet on both directions.
    @(negedge clk);
    // Request shutdown mid-packet: beats keep flowing.
    shutdown_req = 1;
    @(negedge clk);
    check(ds_tvalid && st_tvalid && !in_shutdown, "packets continue after request");
    // Close the input packet.
    us_tlast = 1;
    @(negedge clk);
    us_tlast = 0;
    #1;
    check(!ds_tvalid && !us_tready, "input blocked after its tlast");
    check(st_tvalid && rp_tready, "output still open");
    check(!in_shutdown, "not in shutdown with output open");
    // Close the output packet, with backpressure for a clock first.
    st_tready = 0; rp_tlast = 1;
    @(negedge clk);
    check(!in_shutdown, "waits while closing beat is stalled");
    st_tready = 1;
    @(negedge clk);
    rp_tlast = 0; #1;
    check(in_shutdown, "in shutdown after both packets closed");
    check(!st_tvalid && !rp_tready && !ds_tvalid && !us_tready, "both directions blocked");
    repeat (3) @(negedge clk);
    check(in_shutdown && !ds_tvalid, "stays blocked");
    shutdown_req = 0;
    @(negedge clk);
    #1;
    check(!in_shutdown && ds_tvalid && st_tvalid && us_tready && rp_tready, "released");
    // Request while idle: immediate.
    us_tvalid = 0; rp_tvalid = 0;
    @(negedge clk);
    @(negedge clk);
    shutdown_req = 1;
    @(negedge clk);
    check(in_shutdown, "idle interfaces shut down in one clock");

    // AXI4-Lite: a write whose AW was taken before the request completes.
    shutdown_req = 0;
    @(negedge clk);
    st_axil_req.awaddr = 7'h48; st_axil_req.awvalid = 1; #1;
    check(rp_axil_req.awvalid && st_axil_rsp.awready && rp_axil_req.awaddr == 7'h48,
          "AW passes when not requested");
    @(negedge clk);
    st_axil_req.awvalid = 0;
    shutdown_req = 1;
    st_axil_req.wvalid = 1; #1;
    check(rp_axil_req.wvalid && st_axil_rsp.wready, "W of an open write passes after request");
    @(negedge clk);
    st_axil_req.wvalid = 0; #1;
    check(!in_shutdown, "waits for the write response");
    rp_axil_rsp.bvalid = 1;
    @(negedge clk);
    rp_axil_rsp.bvalid = 0; #1;
    check(in_shutdown, "in shutdown after the write response");
    // New accesses are held while shut down.
    st_axil_req.awvalid = 1; st_axil_req.wvalid = 1; st_axil_req.arvalid = 1; #1;
    check(!rp_axil_req.awvalid && !rp_axil_req.wvalid && !rp_axil_req.arvalid &&
          !st_axil_rsp.awready && !st_axil_rsp.wready && !st_axil_rsp.arready,
          "new AXI4-Lite accesses held");
    repeat (2) @(negedge clk);
    check(in_shutdown, "stays in shutdown with accesses waiting");
    shutdown_req = 0; #1;
    check(rp_axil_req.awvalid && rp_axil_req.wvalid && rp_axil_req.arvalid,
          "held accesses pass on release");
    @(negedge clk);
    st_axil_req.awvalid = 0; st_axil_req.wvalid = 0; st_axil_req.arvalid = 0;
    shutdown_req = 1;
    @(negedge clk);
    check(!in_shutdown, "waits for open write and read");
    rp_axil_rsp.bvalid = 1;
    @(negedge clk);
    rp_axil_rsp.bvalid = 0; #1;
    check(!in_shutdown, "read still open");
    rp_axil_rsp.rvalid = 1;
    @(negedge clk);
    rp_axil_rsp.rvalid = 0; #1;
    check(in_shutdown, "in shutdown once the read response is taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
