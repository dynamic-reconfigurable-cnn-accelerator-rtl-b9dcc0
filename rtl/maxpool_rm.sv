// maxpool_rm: 2x2 / stride-2 max-pooling module, one of the three modules a
// reconfigurable partition can hold.
//
// The pooling window is the design's max-pooling layer; its size (2x2,
// stride 2, odd trailing row/column dropped) is this design's choice.  It
// works on the stream without buffering the map: an even column value is
// held, the following odd column forms the horizontal pair maximum; on even
// rows that maximum is parked in a half-width line buffer, on odd rows it is
// compared with the parked value and the window maximum is emitted.
//
// Interface: `start` captures `cfg` (n_in channels of in_h x in_w); the
// input map [n_in][in_h][in_w] arrives one 16-bit value per beat on the
// AXI4-Stream slave, the pooled map [n_in][in_h/2][in_w/2] leaves on the
// master with tlast on its last value, and `done` pulses one clock after the
// last output.
//
// Timing: one input per clock; a window result leaves on the clock after its
// last input, held in a single output register.  A beat that closes a
// window is stalled while that register is still full, so s_tready never
// depends on m_tready combinationally.
module maxpool_rm
  import cnn_pkg::*;
#(
  parameter int unsigned W_MAX = 28   // largest input width
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
  localparam int unsigned LB = (W_MAX / 2 > 0) ? W_MAX / 2 : 1;
  localparam int unsigned LA = (LB > 1) ? $clog2(LB) : 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DONE} state_e;
  state_e state;

  logic [15:0] n_ch, ch;
  logic [7:0]  h, w, y, x;
  data_t       hold;
  data_t       line [LB];

  logic  s_hs, m_hs, last_in;
  data_t pair_max, win_max;

  // Stall only a beat that would close a window while the previous result is
  // still held; tready does not depend on m_tready.
  assign s_tready = (state == S_RUN) && !(m_tvalid && x[0] && y[0]);
  assign s_hs     = s_tvalid && s_tready;
  assign m_hs     = m_tvalid && m_tready;
  assign busy     = (state != S_IDLE);

  assign pair_max = ($signed(s_tdata) > $signed(hold)) ? s_tdata : hold;
  assign win_max  = ($signed(pair_max) > $signed(line[LA'(x[7:1])])) ? pair_max : line[LA'(x[7:1])];
  assign last_in  = (ch == n_ch - 1) && (y == h - 1) && (x == w - 1);

  always_ff @(posedge clk) begin
    if (s_hs) begin
      if (!x[0]) hold <= s_tdata;
      else if (!y[0]) line[LA'(x[7:1])] <= pair_max;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
      m_tdata  <= '0;
      {n_ch, ch, h, w, y, x} <= '0;
    end else begin
      done <= 1'b0;
      if (m_hs) m_tvalid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_ch  <= cfg.n_in;
          h     <= cfg.in_h;
          w     <= cfg.in_w;
          {ch, y, x} <= '0;
          state <= S_RUN;
        end
        S_RUN: if (s_hs) begin
          // An odd column on an odd row, inside the even-sized part, closes a window.
          if (x[0] && y[0]) begin
            m_tdata  <= win_max;
            m_tvalid <= 1'b1;
            m_tlast  <= (ch == n_ch - 1) && (y[7:1] == h[7:1] - 1) && (x[7:1] == w[7:1] - 1);
          end
          if (x != w - 1) x <= x + 1;
          else begin
            x <= '0;
            if (y != h - 1) y <= y + 1;
            else begin
              y <= '0;
              ch <= ch + 1;
            end
          end
          if (last_in) state <= S_FLUSH;
        end
        S_FLUSH: if (!m_tvalid || m_hs) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
