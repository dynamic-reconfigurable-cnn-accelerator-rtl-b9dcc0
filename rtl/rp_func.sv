// rp_func: one reconfigurable partition (RP_func0 or RP_func1) with the
// group of three modules it can hold: convolution + ReLU, max pooling and
// fully connected + ReLU.  All three share one interface (an AXI4-Lite
// control slave, busy/done lines, one AXI4-Stream input, one output) so any
// of them can occupy the partition.  The AXI4-Lite slave (rm_ctrl_regs)
// holds the layer sizes and the start command; it answers in the partition's
// 32-byte window and reports which module is loaded.
//
// On the device only the module named by `rm_sel` exists in the partition at
// a time.  This RTL holds all three and lets `rm_sel` choose: the selected
// one gets the start pulse, the input stream and the output tready and drives the
// partition outputs; the others are held in reset.  With rm_sel = RM_NONE
// the partition takes no stream data and produces none; its registers still
// answer, with ID 3.  `rm_rst_n` (from the
// reconfiguration controller) resets the whole partition, as a freshly
// loaded module starts from reset.
//
// The module sizes are parameters so that the two partitions can hold
// modules of the same kind but different sizes.
module rp_func
  import cnn_pkg::*;
#(
  parameter int unsigned CONV_N_MAX = 1,
  parameter int unsigned CONV_M_MAX = 8,
  parameter int unsigned CONV_H_MAX = 28,
  parameter int unsigned CONV_W_MAX = 28,
  parameter int unsigned CONV_K_MAX = 5,
  parameter int unsigned TN         = 4,
  parameter int unsigned POOL_W_MAX = 28,
  parameter int unsigned FC_IN_MAX  = 256
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rm_rst_n,
  input  rm_e        rm_sel,
  input  axil_req_t  axil_req,
  output axil_rsp_t  axil_rsp,
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
  logic [2:0] sel, rst_each;
  logic [2:0] busy_v, done_v, s_tready_v, m_tvalid_v, m_tlast_v;
  data_t      m_tdata_v [3];
  logic       start;
  layer_cfg_t cfg;

  rm_ctrl_regs u_regs (
    .clk, .rst_n(rst_n && rm_rst_n), .req(axil_req), .rsp(axil_rsp), .rm_id(rm_sel),
    .start, .cfg, .busy, .done
  );

  always_comb begin
    sel = '0;
    if (rm_sel != RM_NONE) sel[rm_sel] = 1'b1;
    for (int i = 0; i < 3; i++) rst_each[i] = rst_n && rm_rst_n && sel[i];
  end

  conv_relu_rm #(
    .N_MAX(CONV_N_MAX), .M_MAX(CONV_M_MAX), .H_MAX(CONV_H_MAX),
    .W_MAX(CONV_W_MAX), .K_MAX(CONV_K_MAX), .TN(TN)
  ) u_conv (
    .clk, .rst_n(rst_each[RM_CONV]), .start(start && sel[RM_CONV]), .cfg,
    .busy(busy_v[RM_CONV]), .done(done_v[RM_CONV]),
    .s_tdata, .s_tvalid(s_tvalid && sel[RM_CONV]), .s_tlast, .s_tready(s_tready_v[RM_CONV]),
    .m_tdata(m_tdata_v[RM_CONV]), .m_tvalid(m_tvalid_v[RM_CONV]), .m_tlast(m_tlast_v[RM_CONV]),
    .m_tready(m_tready && sel[RM_CONV])
  );

  maxpool_rm #(.W_MAX(POOL_W_MAX)) u_pool (
    .clk, .rst_n(rst_each[RM_POOL]), .start(start && sel[RM_POOL]), .cfg,
    .busy(busy_v[RM_POOL]), .done(done_v[RM_POOL]),
    .s_tdata, .s_tvalid(s_tvalid && sel[RM_POOL]), .s_tlast, .s_tready(s_tready_v[RM_POOL]),
    .m_tdata(m_tdata_v[RM_POOL]), .m_tvalid(m_tvalid_v[RM_POOL]), .m_tlast(m_tlast_v[RM_POOL]),
    .m_tready(m_tready && sel[RM_POOL])
  );

  fc_relu_rm #(.IN_MAX(FC_IN_MAX)) u_fc (
    .clk, .rst_n(rst_each[RM_FC]), .start(start && sel[RM_FC]), .cfg,
    .busy(busy_v[RM_FC]), .done(done_v[RM_FC]),
    .s_tdata, .s_tvalid(s_tvalid && sel[RM_FC]), .s_tlast, .s_tready(s_tready_v[RM_FC]),
    .m_tdata(m_tdata_v[RM_FC]), .m_tvalid(m_tvalid_v[RM_FC]), .m_tlast(m_tlast_v[RM_FC]),
    .m_tready(m_tready && sel[RM_FC])
  );

  always_comb begin
    busy = 1'b0; done = 1'b0; s_tready = 1'b0;
    m_tvalid = 1'b0; m_tlast = 1'b0; m_tdata = '0;
    for (int i = 0; i < 3; i++) begin
      if (sel[i]) begin
        busy     = busy_v[i];
        done     = done_v[i];
        s_tready = s_tready_v[i];
        m_tvalid = m_tvalid_v[i];
        m_tlast  = m_tlast_v[i];
        m_tdata  = m_tdata_v[i];
      end
    end
  end

endmodule
