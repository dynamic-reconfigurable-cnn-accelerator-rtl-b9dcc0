// conv_relu_rm: convolution + ReLU ("convolutional activation") module, one of
// the three modules a reconfigurable partition can hold.
//
// The loop nest follows the parallel-operation scheme of the design: the
// kernel loops (i, j) are outermost, the output-pixel loops (row, column)
// are pipelined with one new pixel per clock (II = 1), and the output-channel
// and input-channel loops inside a tile are fully unrolled into a TN x TN
// array of multipliers.  Per clock the array reads TN input pixels (one per
// input-channel bank) and TN x TN weights (one per weight bank), forms TN
// sums of TN products, and adds each into the accumulator of its output
// channel.  Output-channel tiles (TN channels) and input-channel tiles are
// walked sequentially; the whole feature map is one row/column tile, which
// is this design's choice for MNIST-sized maps.
//
// Interface: after a one-cycle `start` (which captures `cfg`), the module
// reads from its AXI4-Stream slave, one 16-bit Q8.8 value per beat,
//   weights  [n_out][n_in][k][k], then bias [n_out], then input map
//   [n_in][in_h][in_w],
// and writes the output map [n_out][R][C] on its AXI4-Stream master with
// R = (in_h-k)/stride+1, C = (in_w-k)/stride+1 (no padding), tlast on the
// last value, then pulses `done`.  The input tlast is not used: lengths come
// from `cfg`.  The stream order, the padding-free geometry and the
// arithmetic (40-bit accumulation, shift by 8, saturation, then ReLU when
// cfg.relu is set) are this design's choices.
//
// Timing: one stream beat per clock while loading; for each output-channel
// tile, ceil(n_in/TN)*k*k*R*C compute clocks, two clocks of pipeline drain,
// then one output per clock while m_tready is high; `done` one clock after
// the last output.
module conv_relu_rm
  import cnn_pkg::*;
#(
  parameter int unsigned N_MAX = 8,   // largest input channel count
  parameter int unsigned M_MAX = 16,  // largest output channel count
  parameter int unsigned H_MAX = 12,  // largest input height
  parameter int unsigned W_MAX = 12,  // largest input width
  parameter int unsigned K_MAX = 5,   // largest kernel size
  parameter int unsigned TN    = 4    // channels unrolled per tile (Tn)
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  layer_cfg_t cfg,
  output logic       busy,
  output logic       done,
  input  data_t      s_tdata,
  input  logic       s_tvalid,
  input  logic       s_tlast,
  output logic       s_tready,
  output data_t      m_tdata,
  output logic       m_tvalid,
  output logic       m_tlast,
  input  logic       m_tready
);
  localparam int unsigned NT_MAX = (N_MAX + TN - 1) / TN;
  localparam int unsigned MT_MAX = (M_MAX + TN - 1) / TN;
  localparam int unsigned WD     = MT_MAX * NT_MAX * K_MAX * K_MAX;
  localparam int unsigned ID     = NT_MAX * H_MAX * W_MAX;
  localparam int unsigned OD     = H_MAX * W_MAX;
  localparam int unsigned WA     = (WD > 1) ? $clog2(WD) : 1;
  localparam int unsigned IA     = (ID > 1) ? $clog2(ID) : 1;
  localparam int unsigned OA     = (OD > 1) ? $clog2(OD) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD_W, S_LOAD_B, S_LOAD_I, S_COMP, S_DRAIN, S_OUT, S_DONE} state_e;
  state_e state;

  // Captured layer configuration and derived sizes.
  logic [15:0] n_in, n_out, nt, mt;
  logic [7:0]  h, w, r_out, c_out;
  logic [3:0]  k;
  logic [1:0]  s;
  logic        relu;
  logic [15:0] npix;

  // Load counters.
  logic [15:0] lm, ln, ly, lx;
  logic [3:0]  li, lj;
  // Compute counters.
  logic [15:0] to, ti;
  logic [3:0]  ki, kj;
  logic [7:0]  tr, tc;
  logic [15:0] p;
  // Output counters.
  logic [15:0] oo, op;

  logic s_hs, m_hs;
  assign s_hs = s_tvalid && s_tready;
  assign m_hs = m_tvalid && m_tready;

  assign s_tready = (state == S_LOAD_W) || (state == S_LOAD_B) || (state == S_LOAD_I);
  assign busy     = (state != S_IDLE);

  // ------------------------------------------------------------ buffer banks
  // Weight bank (o, i) holds the weights of output channels o, o+TN, ... and
  // input channels i, i+TN, ...; input bank i holds input channels i, i+TN,
  // ...; accumulator bank o holds output channel o of the current tile.  Each
  // bank is a plain one-dimensional memory with one write port.
  localparam int unsigned BS = (TN > 1) ? $clog2(TN) : 1;
  localparam int unsigned MA = (M_MAX > 1) ? $clog2(M_MAX) : 1;

  logic [WA-1:0] w_wa, waddr;
  logic [IA-1:0] i_wa, iaddr;
  logic [15:0]   w_bo, w_bi, i_b;
  data_t         wrd [TN][TN];
  data_t         ird [TN];
  acc_t          ord [TN];
  acc_t          sum [TN];

  // Pipeline register between the multiplier array and the accumulators.
  logic          s1_valid, s1_first;
  logic [OA-1:0] s1_p;
  logic [15:0]   s1_to;
  acc_t          s1_sum [TN];

  always_comb begin
    // loader: bank and address of the current stream beat
    w_bo  = 16'(32'(lm) % TN);
    w_bi  = 16'(32'(ln) % TN);
    w_wa  = WA'((((32'(lm) / TN) * 32'(nt) + (32'(ln) / TN)) * 32'(k) + 32'(li)) * 32'(k) + 32'(lj));
    i_b   = 16'(32'(ln) % TN);
    i_wa  = IA'(((32'(ln) / TN) * 32'(h) + 32'(ly)) * 32'(w) + 32'(lx));
    // compute: weight of tap (ki, kj) for tile (to, ti), input pixel it meets
    waddr = WA'((((32'(to) * 32'(nt) + 32'(ti)) * 32'(k) + 32'(ki)) * 32'(k)) + 32'(kj));
    iaddr = IA'(((32'(ti) * 32'(h)) + (32'(s) * 32'(tr)) + 32'(ki)) * 32'(w) + (32'(s) * 32'(tc)) + 32'(kj));
  end

  for (genvar gi = 0; gi < TN; gi++) begin : g_ibank
    data_t mem [ID];
    always_ff @(posedge clk)
      if (s_hs && state == S_LOAD_I && i_b == gi) mem[i_wa] <= s_tdata;
    assign ird[gi] = mem[iaddr];
  end

  for (genvar go = 0; go < TN; go++) begin : g_wrow
    for (genvar gi = 0; gi < TN; gi++) begin : g_wbank
      data_t mem [WD];
      always_ff @(posedge clk)
        if (s_hs && state == S_LOAD_W && w_bo == go && w_bi == gi) mem[w_wa] <= s_tdata;
      assign wrd[go][gi] = mem[waddr];
    end
  end

  data_t bbuf [M_MAX];
  always_ff @(posedge clk)
    if (s_hs && state == S_LOAD_B) bbuf[MA'(lm)] <= s_tdata;

  // ---------------------------------------------------------------- MAC array
  // TN x TN products per clock, summed per output channel.
  always_comb begin
    for (int unsigned oi = 0; oi < TN; oi++) begin
      sum[oi] = '0;
      for (int unsigned ii = 0; ii < TN; ii++) begin
        if (32'(ti) * TN + ii < 32'(n_in))
          sum[oi] = sum[oi] + acc_t'(wrd[oi][ii] * ird[ii]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_p     <= '0;
      s1_to    <= '0;
      for (int unsigned oi = 0; oi < TN; oi++) s1_sum[oi] <= '0;
    end else begin
      s1_valid <= (state == S_COMP);
      s1_first <= (ti == 0) && (ki == 0) && (kj == 0);
      s1_p     <= OA'(p);
      s1_to    <= to;
      for (int unsigned oi = 0; oi < TN; oi++) s1_sum[oi] <= sum[oi];
    end
  end

  // Accumulators; the first contribution to a pixel starts from the bias.
  for (genvar go = 0; go < TN; go++) begin : g_obank
    acc_t mem [OD];
    acc_t base;
    always_comb begin
      if (!s1_first)
        base = mem[s1_p];
      else if (32'(s1_to) * TN + go < M_MAX)
        base = acc_t'(bbuf[MA'(32'(s1_to) * TN + go)]) <<< FRAC_W;
      else
        base = '0;
    end
    always_ff @(posedge clk)
      if (s1_valid) mem[s1_p] <= base + s1_sum[go];
    assign ord[go] = mem[OA'(op)];
  end

  // ------------------------------------------------------------------- output
  assign m_tvalid = (state == S_OUT);
  assign m_tdata  = requant(ord[BS'(oo)], relu);
  assign m_tlast  = (state == S_OUT) && (op == npix - 1) &&
                    (32'(to) * TN + 32'(oo) == 32'(n_out) - 1);

  // Output size of the requested layer (stride 0 is taken as 1).
  logic [1:0] cfg_s;
  logic [7:0] cfg_r, cfg_c;
  always_comb begin
    cfg_s = (cfg.stride == 0) ? 2'd1 : cfg.stride;
    cfg_r = 8'((32'(cfg.in_h) - 32'(cfg.k)) / 32'(cfg_s) + 1);
    cfg_c = 8'((32'(cfg.in_w) - 32'(cfg.k)) / 32'(cfg_s) + 1);
  end

  // ---------------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      {n_in, n_out, nt, mt, npix} <= '0;
      {h, w, r_out, c_out, k, s, relu} <= '0;
      {lm, ln, ly, lx, li, lj} <= '0;
      {to, ti, ki, kj, tr, tc, p, oo, op} <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_in  <= cfg.n_in;
          n_out <= cfg.n_out;
          nt    <= 16'((32'(cfg.n_in) + TN - 1) / TN);
          mt    <= 16'((32'(cfg.n_out) + TN - 1) / TN);
          h     <= cfg.in_h;
          w     <= cfg.in_w;
          k     <= cfg.k;
          s     <= cfg_s;
          relu  <= cfg.relu;
          r_out <= cfg_r;
          c_out <= cfg_c;
          npix  <= 16'(cfg_r) * 16'(cfg_c);
          {lm, ln, ly, lx, li, lj} <= '0;
          state <= S_LOAD_W;
        end
        S_LOAD_W: if (s_hs) begin
          if (lj != k - 1) lj <= lj + 1;
          else begin
            lj <= '0;
            if (li != k - 1) li <= li + 1;
            else begin
              li <= '0;
              if (ln != n_in - 1) ln <= ln + 1;
              else begin
                ln <= '0;
                if (lm != n_out - 1) lm <= lm + 1;
                else begin
                  lm    <= '0;
                  state <= S_LOAD_B;
                end
              end
            end
          end
        end
        S_LOAD_B: if (s_hs) begin
          if (lm != n_out - 1) lm <= lm + 1;
          else begin
            lm    <= '0;
            state <= S_LOAD_I;
          end
        end
        S_LOAD_I: if (s_hs) begin
          if (lx != 16'(w) - 1) lx <= lx + 1;
          else begin
            lx <= '0;
            if (ly != 16'(h) - 1) ly <= ly + 1;
            else begin
              ly <= '0;
              if (ln != n_in - 1) ln <= ln + 1;
              else begin
                ln <= '0;
                {to, ti, ki, kj, tr, tc, p} <= '0;
                state <= S_COMP;
              end
            end
          end
        end
        S_COMP: begin
          // innermost: column, row (pipelined); then kernel j, i; then input tile
          if (tc != c_out - 1) begin
            tc <= tc + 1;
            p  <= p + 1;
          end else begin
            tc <= '0;
            if (tr != r_out - 1) begin
              tr <= tr + 1;
              p  <= p + 1;
            end else begin
              tr <= '0;
              p  <= '0;
              if (kj != k - 1) kj <= kj + 1;
              else begin
                kj <= '0;
                if (ki != k - 1) ki <= ki + 1;
                else begin
                  ki <= '0;
                  if (ti != nt - 1) ti <= ti + 1;
                  else begin
                    ti    <= '0;
                    state <= S_DRAIN;
                  end
                end
              end
            end
          end
        end
        S_DRAIN: if (!s1_valid) begin
          oo    <= '0;
          op    <= '0;
          state <= S_OUT;
        end
        S_OUT: if (m_hs) begin
          if (op != npix - 1) op <= op + 1;
          else begin
            op <= '0;
            if ((32'(oo) != TN - 1) && (32'(to) * TN + 32'(oo) != 32'(n_out) - 1)) oo <= oo + 1;
            else begin
              oo <= '0;
              if (to != mt - 1) begin
                to    <= to + 1;
                state <= S_COMP;
              end else begin
                to    <= '0;
                state <= S_DONE;
              end
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
