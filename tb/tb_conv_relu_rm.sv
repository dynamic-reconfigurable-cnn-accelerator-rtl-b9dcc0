// tb_conv_relu_rm: self-checking test of the convolution + ReLU module.
// Runs three layers with sizes that are not multiples of the channel tile
// (5 -> 6 channels, 3x3, stride 1, ReLU; 3 -> 2 channels, 2x2, stride 2, no
// ReLU; a full-size 4 -> 4 tile), compares every output and its tlast with
// the reference model, and checks that the compute phase takes exactly
// ceil(n_in/TN)*k*k*R*C clocks per output-channel tile (II = 1) plus the
// drain and output clocks.  The second layer runs with random gaps on the
// input and random backpressure on the output.
module tb_conv_relu_rm;
  import cnn_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned TN = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  layer_cfg_t cfg;
  data_t s_tdata, m_tdata;
  logic s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;

  conv_relu_rm #(.N_MAX(5), .M_MAX(6), .H_MAX(7), .W_MAX(7), .K_MAX(3), .TN(TN)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(int n_in, int n_out, int h, int w, int k, int s, bit relu,
                           bit gaps, bit check_time);
    q_t wt, b, x, exp_o, got;
    int r_out, c_out, t_last_in, t_done, expect_cyc, nt, mt;
    bit last_seen;
    for (int i = 0; i < n_out * n_in * k * k; i++) wt.push_back(rnd(96));
    for (int i = 0; i < n_out; i++) b.push_back(rnd(128));
    for (int i = 0; i < n_in * h * w; i++) x.push_back(rnd(256));
    exp_o = conv_ref(wt, b, x, n_in, n_out, h, w, k, s, relu);
    r_out = (h - k) / s + 1;
    c_out = (w - k) / s + 1;

    cfg = '{n_out: 16'(n_out), n_in: 16'(n_in), in_w: 8'(w), in_h: 8'(h),
            k: 4'(k), stride: 2'(s), relu: relu};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      begin : feed
        q_t all;
        all = {wt, b, x};
        foreach (all[i]) begin
          while (gaps && $urandom_range(3) == 0) begin
            s_tvalid = 0;
            @(negedge clk);
          end
          s_tvalid = 1;
          s_tdata  = data_t'(all[i]);
          s_tlast  = (i == all.size() - 1);
          @(posedge clk);
          while (!s_tready) @(posedge clk);
          t_last_in = cyc;
          @(negedge clk);
        end
        s_tvalid = 0;
        s_tlast  = 0;
      end
      begin : drain
        last_seen = 0;
        while (!last_seen) begin
          @(negedge clk);
          m_tready = gaps ? ($urandom_range(2) != 0) : 1'b1;
          @(posedge clk);
          if (m_tvalid && m_tready) begin
            got.push_back(int'(m_tdata));
            last_seen = m_tlast;
          end
        end
        @(negedge clk);
        m_tready = 1;
        while (!done) @(posedge clk);
        t_done = cyc;
      end
    join

    checks++;
    if (got.size() != exp_o.size()) begin
      failures++;
      $display("FAIL: %0d outputs, expected %0d", got.size(), exp_o.size());
    end
    foreach (exp_o[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp_o[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: out[%0d] = %0d, expected %0d", i,
                                    (i < got.size()) ? got[i] : -99999, exp_o[i]);
      end
    end
    if (check_time) begin
      nt = (n_in + TN - 1) / TN;
      mt = (n_out + TN - 1) / TN;
      expect_cyc = 2;  // DONE state, then the registered done pulse
      for (int t = 0; t < mt; t++) begin
        int chans;
        chans = (n_out - t * TN < TN) ? n_out - t * TN : TN;
        expect_cyc += nt * k * k * r_out * c_out + 2 + chans * r_out * c_out;
      end
      checks++;
      if (t_done - t_last_in != expect_cyc) begin
        failures++;
        $display("FAIL: last input to done took %0d clocks, expected %0d",
                 t_done - t_last_in, expect_cyc);
      end
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    start = 0; s_tvalid = 0; s_tlast = 0; s_tdata = '0; m_tready = 1; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_layer(5, 6, 7, 7, 3, 1, 1'b1, 1'b0, 1'b1);
    run_layer(3, 2, 7, 6, 2, 2, 1'b0, 1'b1, 1'b0);
    run_layer(4, 4, 5, 5, 3, 1, 1'b1, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
