// tb_maxpool_rm: self-checking test of the 2x2 max-pooling module.  Pools a
// 3-channel 6x8 map at full rate (checking the one-input-per-clock rate and
// the time to `done`), then a 2-channel 7x5 map (odd sizes: the last row and
// column are dropped) with random input gaps and output backpressure, and
// compares every output and tlast with the reference model.
module tb_maxpool_rm;
  import cnn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  layer_cfg_t cfg;
  data_t s_tdata, m_tdata;
  logic s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;

  maxpool_rm #(.W_MAX(8)) dut (.*);

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

  task automatic run_layer(int ch, int h, int w, bit gaps);
    q_t x, exp_o, got;
    int t_first, t_last_in, n_last;
    bit last_seen;
    for (int i = 0; i < ch * h * w; i++) x.push_back(rnd(2000));
    exp_o = pool_ref(x, ch, h, w);
    cfg = '0;
    cfg.n_in = 16'(ch); cfg.in_h = 8'(h); cfg.in_w = 8'(w);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    n_last = 0;
    fork
      begin
        foreach (x[i]) begin
          while (gaps && $urandom_range(3) == 0) begin
            s_tvalid = 0;
            @(negedge clk);
          end
          s_tvalid = 1;
          s_tdata  = data_t'(x[i]);
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
      checks++;
      if (t_last_in - t_first != ch * h * w - 1) begin
        failures++;
        $display("FAIL: %0d inputs took %0d clocks", ch * h * w, t_last_in - t_first + 1);
      end
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    start = 0; s_tvalid = 0; s_tlast = 0; s_tdata = '0; m_tready = 1; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_layer(3, 6, 8, 1'b0);
    run_layer(2, 7, 5, 1'b1);
    run_layer(1, 2, 2, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
