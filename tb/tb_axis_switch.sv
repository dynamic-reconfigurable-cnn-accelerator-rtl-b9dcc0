// tb_axis_switch: self-checking test of the AXI4-Stream switch.  Checks that
// nothing passes before a route is committed, that each sink receives the
// data, valid and tlast of the source routed to it and each source the ready
// of its sink, that an unrouted source sees tready low, and that a route
// change committed in the middle of a packet waits for its tlast.
module tb_axis_switch;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] route_en;
  logic [3:0][1:0] route_src;
  logic commit, pending;
  data_t [3:0] s_tdata, m_tdata;
  logic [3:0] s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;

  axis_switch #(.NS(4), .NM(4)) dut (.*);

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

  // route: sink m <- source perm[m] for every m
  task automatic set_route(int p0, int p1, int p2, int p3, logic [3:0] en);
    route_src = {2'(p3), 2'(p2), 2'(p1), 2'(p0)};
    route_en  = en;
    @(negedge clk) commit = 1;
    @(negedge clk) commit = 0;
  endtask

  task automatic check_paths(int p0, int p1, int p2, int p3, logic [3:0] en);
    int perm[4];
    perm = '{p0, p1, p2, p3};
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < 4; i++) begin
        s_tdata[i]  = data_t'($urandom);
        s_tvalid[i] = 1'($urandom_range(1));
        s_tlast[i]  = 1'($urandom_range(1));
        m_tready[i] = 1'($urandom_range(1));
      end
      #1;
      for (int m = 0; m < 4; m++) begin
        if (en[m]) begin
          check(m_tdata[m] == s_tdata[perm[m]] && m_tvalid[m] == s_tvalid[perm[m]] &&
                m_tlast[m] == s_tlast[perm[m]], $sformatf("sink %0d path", m));
          check(s_tready[perm[m]] == m_tready[m], $sformatf("ready of source %0d", perm[m]));
        end else begin
          check(!m_tvalid[m], $sformatf("disabled sink %0d valid", m));
        end
      end
      for (int s = 0; s < 4; s++) begin
        bit used = 0;
        for (int m = 0; m < 4; m++) if (en[m] && perm[m] == s) used = 1;
        if (!used) check(!s_tready[s], $sformatf("unrouted source %0d ready", s));
      end
    end
    // close any packet the random beats left open
    @(negedge clk);
    s_tvalid = '1; s_tlast = '1; m_tready = '1;
    @(negedge clk);
    s_tvalid = '0; s_tlast = '0;
    @(negedge clk);
  endtask

  initial begin
    route_en = '0; route_src = '0; commit = 0;
    s_tdata = '0; s_tvalid = '0; s_tlast = '0; m_tready = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    s_tvalid = '1; m_tready = '1; #1;
    check(m_tvalid == '0 && s_tready == '0, "nothing routed after reset");
    s_tvalid = '0;
    @(negedge clk);

    set_route(0, 1, 2, 3, 4'b1111);
    @(negedge clk);
    check_paths(0, 1, 2, 3, 4'b1111);
    set_route(1, 2, 0, 3, 4'b0111);
    @(negedge clk);
    check_paths(1, 2, 0, 3, 4'b0111);

    // Mid-packet: source 1 -> sink 0 carries a beat without tlast.
    s_tvalid = 4'b0010; s_tlast = '0; m_tready = 4'b0001; s_tdata[1] = 16'h1234;
    @(negedge clk);                    // beat accepted, packet open
    s_tvalid = '0;
    set_route(3, 0, 1, 2, 4'b1111);    // commit while packet open
    @(negedge clk);
    check(pending, "route change pending inside a packet");
    s_tvalid = 4'b0010; s_tdata[1] = 16'h5678; #1;
    check(m_tvalid[0] && m_tdata[0] == 16'h5678, "old route kept until tlast");
    s_tlast = 4'b0010;
    @(negedge clk);                    // closing beat accepted
    s_tvalid = '0; s_tlast = '0;
    @(negedge clk);
    check(!pending, "route change applied after tlast");
    check_paths(3, 0, 1, 2, 4'b1111);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
