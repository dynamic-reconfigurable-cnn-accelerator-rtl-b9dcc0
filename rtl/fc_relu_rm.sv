// fc_relu_rm: fully connected module with optional ReLU ("fully connected
// activation" module), one of the three modules a reconfigurable partition
// can hold.
//
// The input vector is first stored in an on-chip buffer.  The weights then
// stream through one per clock, neuron after neuron, and a single
// multiply-accumulate unit combines each weight with the buffered input it
// belongs to, so no weight storage is needed and the stream rate sets the
// speed.  This streaming organisation is this design's choice.
//
// Interface: `start` captures `cfg` (n_in inputs, n_out outputs, relu).  The
// AXI4-Stream slave then carries x[n_in] followed, for every output neuron
// o, by bias[o] and w[o][0..n_in-1]; every value is 16-bit Q8.8.  Each
// result y[o] = act(bias[o] + sum w[o][i]*x[i]) leaves on the master once its
// row is complete (tlast on y[n_out-1]); `done` pulses one clock after the
// last output.  Requantisation and saturation as in cnn_pkg::requant.
//
// Timing: n_in + n_out*(n_in+1) input beats at one per clock, plus one clock
// per output handshake.
module fc_relu_rm
  import cnn_pkg::*;
#(
  parameter int unsigned IN_MAX = 256  // largest input vector length
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
  localparam int unsigned XA = (IN_MAX > 1) ? $clog2(IN_MAX) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD_X, S_BIAS, S_MAC, S_OUT, S_DONE} state_e;
  state_e state;

  data_t       xbuf [IN_MAX];
  logic [15:0] n_in, n_out, idx, o;
  logic        relu;
  acc_t        acc;

  logic s_hs, m_hs;
  assign s_tready = (state == S_LOAD_X) || (state == S_BIAS) || (state == S_MAC);
  assign s_hs     = s_tvalid && s_tready;
  assign m_hs     = m_tvalid && m_tready;
  assign busy     = (state != S_IDLE);

  assign m_tvalid = (state == S_OUT);
  assign m_tdata  = requant(acc, relu);
  assign m_tlast  = (state == S_OUT) && (o == n_out - 1);

  always_ff @(posedge clk) begin
    if (s_hs && state == S_LOAD_X) xbuf[XA'(idx)] <= s_tdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      acc   <= '0;
      relu  <= 1'b0;
      {n_in, n_out, idx, o} <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_in  <= cfg.n_in;
          n_out <= cfg.n_out;
          relu  <= cfg.relu;
          idx   <= '0;
          o     <= '0;
          state <= S_LOAD_X;
        end
        S_LOAD_X: if (s_hs) begin
          if (idx != n_in - 1) idx <= idx + 1;
          else begin
            idx   <= '0;
            state <= S_BIAS;
          end
        end
        S_BIAS: if (s_hs) begin
          acc   <= acc_t'(s_tdata) <<< FRAC_W;
          state <= S_MAC;
        end
        S_MAC: if (s_hs) begin
          acc <= acc + acc_t'(s_tdata * xbuf[XA'(idx)]);
          if (idx != n_in - 1) idx <= idx + 1;
          else begin
            idx   <= '0;
            state <= S_OUT;
          end
        end
        S_OUT: if (m_hs) begin
          if (o != n_out - 1) begin
            o     <= o + 1;
            state <= S_BIAS;
          end else begin
            o     <= '0;
            state <= S_DONE;
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
