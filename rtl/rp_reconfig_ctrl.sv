// rp_reconfig_ctrl: sequences the loading of a module into one
// reconfigurable partition.
//
// A load request names the module wanted (convolution, pooling or fully
// connected).  If that module is already loaded the request completes at
// once and nothing is reloaded: a loaded module stays loaded until another
// one is requested, and reloading costs time, so repeated requests for the
// same module are skipped.  Otherwise the controller
//   1. asks the shutdown manager to stop the partition's streams and waits
//      for its acknowledge,
//   2. raises `decouple` to isolate the partition,
//   3. holds the partition in reset for LOAD_CYCLES clocks while the new
//      configuration is loaded, then switches `rm_sel` to the new module,
//   4. drops `decouple` and the shutdown request and pulses `load_done`.
// The configuration port itself (bitstream transfer) is outside this RTL:
// LOAD_CYCLES stands for its duration.  The counters `reloads` and `skips`
// report how often each case happened.
//
// Timing: a skipped request finishes one clock after `load_req`; a reload
// takes the shutdown wait plus LOAD_CYCLES plus three clocks.
module rp_reconfig_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned LOAD_CYCLES = 256  // clocks a module load takes
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_req,
  input  rm_e         load_rm,
  output logic        load_busy,
  output logic        load_done,
  output logic        shutdown_req,
  input  logic        in_shutdown,
  output logic        decouple,
  output logic        rm_rst_n,
  output rm_e         rm_sel,
  output logic [15:0] reloads,
  output logic [15:0] skips
);
  localparam int unsigned CW = $clog2(LOAD_CYCLES + 1);

  typedef enum logic [2:0] {S_IDLE, S_SHUTDOWN, S_DECOUPLE, S_LOAD, S_RELEASE} state_e;
  state_e state;
  rm_e    want;
  logic [CW-1:0] cnt;

  assign load_busy    = (state != S_IDLE);
  assign shutdown_req = (state != S_IDLE);
  assign decouple     = (state == S_DECOUPLE) || (state == S_LOAD);
  assign rm_rst_n     = (state != S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      want      <= RM_NONE;
      rm_sel    <= RM_NONE;
      cnt       <= '0;
      load_done <= 1'b0;
      reloads   <= '0;
      skips     <= '0;
    end else begin
      load_done <= 1'b0;
      unique case (state)
        S_IDLE: if (load_req) begin
          if (load_rm == rm_sel) begin
            skips     <= skips + 1;
            load_done <= 1'b1;
          end else begin
            want  <= load_rm;
            state <= S_SHUTDOWN;
          end
        end
        S_SHUTDOWN: if (in_shutdown) state <= S_DECOUPLE;
        S_DECOUPLE: begin
          cnt   <= CW'(LOAD_CYCLES);
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (cnt > 1) cnt <= cnt - 1;
          else begin
            rm_sel  <= want;
            reloads <= reloads + 1;
            state   <= S_RELEASE;
          end
        end
        S_RELEASE: begin
          load_done <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
