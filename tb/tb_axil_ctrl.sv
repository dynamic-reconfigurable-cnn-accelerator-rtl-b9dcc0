// tb_axil_ctrl: self-checking test of the AXI4-Lite control registers.
// Writes and reads back the route register, checks that the route outputs
// decode its fields and that a write commits once, that RCFG writes produce
// one-clock load-request pulses with the right module, that a done flag is
// sticky until IRQACK clears it and raises irq meanwhile, and that STATUS,
// RELOADS and SKIPS report their inputs.  Address and data
// are offered in different clocks to exercise the handshake.
module tb_axil_ctrl;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [1:0] busy, done, load_req, load_busy;
  rm_e [1:0] load_rm, rm_loaded;
  logic [1:0][15:0] reloads, skips;
  logic [3:0] route_en;
  logic [3:0][1:0] route_src;
  logic route_commit, route_pending, irq;

  axil_ctrl dut (.*);

  int checks = 0, failures = 0;
  int n_load0, n_load1, n_commit;
  always @(posedge clk) begin
    n_load0  += load_req[0];
    n_load1  += load_req[1];
    n_commit += route_commit;
  end

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

  task automatic axil_write(logic [5:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1;
    @(negedge clk);
    wdata = d; wvalid = 1;
    @(posedge clk);
    while (!(awready && wready)) @(posedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    bready = 0;
    @(negedge clk);
    check(bvalid && bresp == 2'b00, "write response held until bready");
    bready = 1;
    @(negedge clk);
    check(!bvalid, "write response taken");
  endtask

  task automatic axil_read(logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    @(posedge clk);
    while (!arready) @(posedge clk);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
  endtask

  logic [31:0] r;

  initial begin
    {awaddr, araddr, awvalid, wvalid, arvalid, wdata} = '0;
    wstrb = '1; bready = 1; rready = 1;
    busy = '0; done = '0; load_busy = '0; rm_loaded = {RM_NONE, RM_NONE};
    reloads = '0; skips = '0; route_pending = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_load0 = 0; n_load1 = 0; n_commit = 0;

    // route table
    axil_write(6'h08, 32'h0000_BA9C);
    check(n_commit == 1, "route write commits once");
    check(route_en == 4'b1111 && route_src[0] == 0 && route_src[1] == 1 &&
          route_src[2] == 2 && route_src[3] == 3, "route fields");
    axil_read(6'h08, r); check(r == 32'h0000_BA9C, "ROUTE readback");

    // reconfiguration requests
    axil_write(6'h0C, 32'd1);
    check(n_load0 == 1 && n_load1 == 0 && load_rm[0] == RM_POOL, "RCFG0 request pulse");
    axil_write(6'h10, 32'd2);
    check(n_load1 == 1 && load_rm[1] == RM_FC, "RCFG1 request pulse");

    // done / irq / acknowledge
    check(!irq, "no irq before done");
    @(negedge clk) done = 2'b01;
    @(negedge clk) done = 2'b00;
    check(irq, "irq after done");
    busy = 2'b10; load_busy = 2'b01; rm_loaded = {RM_FC, RM_CONV}; route_pending = 1;
    axil_read(6'h04, r);
    check(r == {20'd0, 2'd2, 2'd0, 1'b0, 1'b1, 2'b01, 1'b0, 1'b1, 1'b1, 1'b0},
          $sformatf("STATUS = %h", r));
    axil_write(6'h00, 32'd2);
    check(irq, "acknowledging partition 1 leaves partition 0 pending");
    @(negedge clk) done = 2'b10;
    @(negedge clk) done = 2'b00;
    axil_read(6'h04, r);
    check(r[1] && r[3], "both done flags set");
    axil_write(6'h00, 32'd3);
    check(!irq, "done flags cleared by IRQACK");
    axil_read(6'h14, r); check(r == 0, "unused register reads 0");

    reloads = {16'd7, 16'd3}; skips = {16'd1, 16'd9};
    axil_read(6'h24, r); check(r == 32'h0007_0003, "RELOADS");
    axil_read(6'h28, r); check(r == 32'h0001_0009, "SKIPS");
    axil_read(6'h3C, r); check(r == 0, "unmapped read");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
