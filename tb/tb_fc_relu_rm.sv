// tb_fc_relu_rm: self-checking test of the fully connected module.  Runs a
// 20 -> 7 layer with ReLU at full rate (checking one weight per clock), a
// 9 -> 3 layer without ReLU with random input gaps and output backpressure,
// and a layer with large values that must saturate, comparing every output
// and tlast with the reference model.
module tb_fc_relu_rm;
  import cnn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  layer_cfg_t cfg;
  data_t s_tdata, m_tdata;
  logic s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;

  fc_relu_rm #(.IN_MAX(32)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(int n_in, int n_out, bit relu, bit gaps, int lim);
    q_t wt, b, x, exp_o, got, all;
    int t_first, t_last_in, n_last;
    bit last_seen;
    for (int i = 0; i < n_in; i++) x.push_back(rnd(lim));
    for (int o = 0; o < n_out; o++) b.push_back(rnd(256));
    for (int i = 0; i < n_in * n_out; i++) wt.push_back(rnd(lim));
    exp_o = fc_ref(wt, b, x, n_in, n_out, relu);
    all = x;
    for (int o = 0; o < n_out; o++) begin
      all.push_back(b[o]);
      for (int i = 0; i < n_in; i++) all.push_back(wt[o * n_in + i]);
    end
    cfg = '0;
    cfg.n_in = 16'(n_in); cfg.n_out = 16'(n_out); cfg.relu = relu;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    n_last = 0;
    fork
      begin
        foreach (all[i]) begin
          while (gaps && $urandom_range(3) == 0) begin
            s_tvalid = 0;
            @(negedge clk);
          end
          s_tvalid = 1;
          s_tdata  = data_t'(all[i]);
          @(posedge clk);
          while (!s_tready) @(posedge clk);
          if (i == 0) t_first = cyc;
          t_last_in = cyc;
          @(negedge clk);
        end
        s_tvalid = 0;
      end
      begin
        last_seen = 0;
        while (!last_seen) begin
          @(negedge clk);
          m_tready = gaps ? ($urandom_range(2) != 0) : 1'b1;
          @(posedge clk);
          if (m_tvalid && m_tready) begin
            got.push_back(int'(m_tdata));
            last_seen = m_tlast;
            if (m_tlast) n_last++;
          end
        end
        @(negedge clk);
        m_tready = 1;
        while (!done) @(posedge clk);
      end
    join
    checks++;
    if (got.size() != exp_o.size() || n_last != 1) begin
      failures++;
      $display("FAIL: %0d outputs (%0d tlast), expected %0d", got.size(), n_last, exp_o.size());
    end
    foreach (exp_o[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp_o[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: out[%0d] = %0d, expected %0d", i,
                                    (i < got.size()) ? got[i] : -99999, exp_o[i]);
      end
    end
    if (!gaps) begin
      // n_in + n_out*(n_in+1) beats, plus one clock per output handshake
      checks++;
      if (t_last_in - t_first + 1 != n_in + n_out * (n_in + 1) + (n_out - 1)) begin
        failures++;
        $display("FAIL: input took %0d clocks, expected %0d", t_last_in - t_first + 1,
                 n_in + n_out * (n_in + 1) + (n_out - 1));
      end
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    start = 0; s_tvalid = 0; s_tlast = 0; s_tdata = '0; m_tready = 1; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_layer(20, 7, 1'b1, 1'b0, 256);
    run_layer(9, 3, 1'b0, 1'b1, 256);
    run_layer(32, 4, 1'b0, 1'b0, 32000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
