// tb_rp_reconfig_ctrl: self-checking test of the reconfiguration sequencer.
// A behavioural shutdown manager acknowledges a few clocks after the request.
// Checks: a load of a new module goes shutdown -> decouple -> reset for
// LOAD_CYCLES clocks -> new rm_sel -> release, with decouple never raised
// before the acknowledge; a request for the module already loaded is skipped
// in one clock without shutdown or decoupling; the reload and skip counters.
module tb_rp_reconfig_ctrl;
  import cnn_pkg::*;

  localparam int unsigned LOAD = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load_req, load_busy, load_done, shutdown_req, in_shutdown, decouple, rm_rst_n;
  rm_e load_rm, rm_sel;
  logic [15:0] reloads, skips;

  rp_reconfig_ctrl #(.LOAD_CYCLES(LOAD)) dut (.*);

  // behavioural shutdown manager: acknowledges 3 clocks after the request
  int sd_cnt;
  always_ff @(posedge clk) begin
    if (!shutdown_req) begin
      sd_cnt <= 0;
      in_shutdown <= 1'b0;
    end else begin
      sd_cnt <= sd_cnt + 1;
      if (sd_cnt == 2) in_shutdown <= 1'b1;
    end
  end

  int checks = 0, failures = 0;
  int n_dec, n_rst, n_cyc;
  bit bad_order;

  // monitor: count decoupled and reset clocks of the current request
  always @(posedge clk) begin
    if (decouple) n_dec++;
    if (!rm_rst_n) n_rst++;
    if (load_busy) n_cyc++;
    if (decouple && !in_shutdown) bad_order = 1;
    if (!rm_rst_n && !decouple) bad_order = 1;
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

  task automatic request(rm_e m, bit expect_reload);
    n_dec = 0; n_rst = 0; n_cyc = 0; bad_order = 0;
    @(negedge clk);
    load_rm = m; load_req = 1;
    @(negedge clk);
    load_req = 0;
    while (!load_done) @(negedge clk);
    check(rm_sel == m, $sformatf("module %0d selected", m));
    check(!decouple && !shutdown_req && rm_rst_n, "released after load");
    check(!bad_order, "decouple only after shutdown acknowledge, reset only while decoupled");
    if (expect_reload) begin
      check(n_rst == LOAD, $sformatf("partition reset for %0d clocks, expected %0d", n_rst, LOAD));
      check(n_dec == LOAD + 1, $sformatf("decoupled for %0d clocks", n_dec));
    end else begin
      check(n_dec == 0 && n_rst == 0 && n_cyc == 0, "skipped request does not reload");
    end
  endtask

  initial begin
    load_req = 0; load_rm = RM_NONE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(rm_sel == RM_NONE, "nothing loaded after reset");
    request(RM_CONV, 1);
    request(RM_CONV, 0);
    request(RM_POOL, 1);
    request(RM_FC, 1);
    request(RM_FC, 0);
    request(RM_CONV, 1);
    check(reloads == 4 && skips == 2, $sformatf("counters %0d reloads %0d skips", reloads, skips));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
