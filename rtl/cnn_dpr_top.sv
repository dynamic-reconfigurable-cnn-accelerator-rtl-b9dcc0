// cnn_dpr_top: programmable-logic side of the dynamically reconfigurable CNN
// accelerator.
//
// Two reconfigurable partitions, RP_func0 and RP_func1, each hold one of
// three compute modules at a time (convolution + ReLU, max pooling, fully
// connected + ReLU).  The processing system drives everything over
// AXI4-Lite, through a decoder (axil_decoder) that splits the address space
// between the static control registers (axil_ctrl, 0x00-0x3F) and the module
// registers inside the partitions (0x40-0x5F and 0x60-0x7F): it asks for a
// module to be loaded into a partition, writes the layer sizes into the
// module, sets the route of the AXI4-Stream switch and starts the modules,
// layer after layer.  Data move as
// AXI4-Stream packets: the DMA read channel (MM2S, from DDR4) feeds the
// switch, the switch feeds the partitions, and partition outputs go either
// back through the switch to the DMA write channel (S2MM, to DDR4) or
// straight into the other partition, so two layers can run back to back
// without a trip to memory.  Each partition's streams and AXI4-Lite link pass
// through a shutdown manager and a decoupler, which its reconfiguration
// controller uses to stop and isolate it while a module is loaded.
//
// Switch ports: sources 0 DMA MM2S, 1 RP_func0 out, 2 RP_func1 out,
// 3 static group out; sinks 0 DMA S2MM, 1 RP_func0 in, 2 RP_func1 in,
// 3 static group in.  The DMA, the static group of common operators, the
// processor and the configuration port are outside this RTL: their streams
// and the AXI4-Lite slave are top-level ports.
//
// Default sizes: RP_func0 holds modules sized for the first layer of each
// kind (28x28x1 -> 8 channels, 5x5 kernels; FC 256 inputs), RP_func1 for the
// second (12x12x8 -> 16 channels; FC 64 inputs).  The network and its sizes
// are this design's reading of a LeNet-style MNIST classifier.
module cnn_dpr_top
  import cnn_pkg::*;
#(
  parameter int unsigned TN          = 4,
  parameter int unsigned LOAD_CYCLES = 256,
  parameter int unsigned RP0_CONV_N  = 1,
  parameter int unsigned RP0_CONV_M  = 8,
  parameter int unsigned RP0_CONV_HW = 28,
  parameter int unsigned RP0_FC_IN   = 256,
  parameter int unsigned RP1_CONV_N  = 8,
  parameter int unsigned RP1_CONV_M  = 16,
  parameter int unsigned RP1_CONV_HW = 12,
  parameter int unsigned RP1_FC_IN   = 64,
  parameter int unsigned CONV_K      = 5,
  parameter int unsigned POOL_W      = 28
)(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite control slave (from the processing system)
  input  logic [6:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [6:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  output logic        irq,
  // DMA read channel (memory to stream)
  input  data_t       s_axis_mm2s_tdata,
  input  logic        s_axis_mm2s_tvalid,
  input  logic        s_axis_mm2s_tlast,
  output logic        s_axis_mm2s_tready,
  // DMA write channel (stream to memory)
  output data_t       m_axis_s2mm_tdata,
  output logic        m_axis_s2mm_tvalid,
  output logic        m_axis_s2mm_tlast,
  input  logic        m_axis_s2mm_tready,
  // static group of common operators
  output data_t       m_axis_sf_tdata,
  output logic        m_axis_sf_tvalid,
  output logic        m_axis_sf_tlast,
  input  logic        m_axis_sf_tready,
  input  data_t       s_axis_sf_tdata,
  input  logic        s_axis_sf_tvalid,
  input  logic        s_axis_sf_tlast,
  output logic        s_axis_sf_tready
);
  // ------------------------------------------------------------- control
  logic [1:0]        busy, done, load_req, load_busy, load_done;
  rm_e [1:0]         load_rm, rm_sel;
  logic [1:0][15:0]  reloads, skips;
  logic [3:0]        route_en;
  logic [3:0][1:0]   route_src;
  logic              route_commit, route_pending;
  axil_req_t         host_req;
  axil_rsp_t         host_rsp;
  axil_req_t [2:0]   dec_req;
  axil_rsp_t [2:0]   dec_rsp;

  assign host_req.awaddr  = s_axil_awaddr;
  assign host_req.awvalid = s_axil_awvalid;
  assign host_req.wdata   = s_axil_wdata;
  assign host_req.wstrb   = s_axil_wstrb;
  assign host_req.wvalid  = s_axil_wvalid;
  assign host_req.bready  = s_axil_bready;
  assign host_req.araddr  = s_axil_araddr;
  assign host_req.arvalid = s_axil_arvalid;
  assign host_req.rready  = s_axil_rready;
  assign s_axil_awready   = host_rsp.awready;
  assign s_axil_wready    = host_rsp.wready;
  assign s_axil_bresp     = host_rsp.bresp;
  assign s_axil_bvalid    = host_rsp.bvalid;
  assign s_axil_arready   = host_rsp.arready;
  assign s_axil_rdata     = host_rsp.rdata;
  assign s_axil_rresp     = host_rsp.rresp;
  assign s_axil_rvalid    = host_rsp.rvalid;

  axil_decoder u_axil_dec (
    .clk, .rst_n, .m_req(host_req), .m_rsp(host_rsp), .s_req(dec_req), .s_rsp(dec_rsp)
  );

  axil_ctrl u_ctrl (
    .clk, .rst_n,
    .awaddr(dec_req[0].awaddr[5:0]), .awvalid(dec_req[0].awvalid), .awready(dec_rsp[0].awready),
    .wdata(dec_req[0].wdata), .wstrb(dec_req[0].wstrb), .wvalid(dec_req[0].wvalid),
    .wready(dec_rsp[0].wready),
    .bresp(dec_rsp[0].bresp), .bvalid(dec_rsp[0].bvalid), .bready(dec_req[0].bready),
    .araddr(dec_req[0].araddr[5:0]), .arvalid(dec_req[0].arvalid), .arready(dec_rsp[0].arready),
    .rdata(dec_rsp[0].rdata), .rresp(dec_rsp[0].rresp), .rvalid(dec_rsp[0].rvalid),
    .rready(dec_req[0].rready),
    .busy, .done, .load_req, .load_rm, .load_busy, .rm_loaded(rm_sel),
    .reloads, .skips, .route_en, .route_src, .route_commit, .route_pending, .irq
  );

  // -------------------------------------------------------------- switch
  data_t [3:0] sw_s_tdata, sw_m_tdata;
  logic  [3:0] sw_s_tvalid, sw_s_tlast, sw_s_tready;
  logic  [3:0] sw_m_tvalid, sw_m_tlast, sw_m_tready;

  axis_switch #(.NS(4), .NM(4)) u_switch (
    .clk, .rst_n, .route_en, .route_src, .commit(route_commit), .pending(route_pending),
    .s_tdata(sw_s_tdata), .s_tvalid(sw_s_tvalid), .s_tlast(sw_s_tlast), .s_tready(sw_s_tready),
    .m_tdata(sw_m_tdata), .m_tvalid(sw_m_tvalid), .m_tlast(sw_m_tlast), .m_tready(sw_m_tready)
  );

  // source 0 / sink 0: DMA
  assign sw_s_tdata[0]      = s_axis_mm2s_tdata;
  assign sw_s_tvalid[0]     = s_axis_mm2s_tvalid;
  assign sw_s_tlast[0]      = s_axis_mm2s_tlast;
  assign s_axis_mm2s_tready = sw_s_tready[0];
  assign m_axis_s2mm_tdata  = sw_m_tdata[0];
  assign m_axis_s2mm_tvalid = sw_m_tvalid[0];
  assign m_axis_s2mm_tlast  = sw_m_tlast[0];
  assign sw_m_tready[0]     = m_axis_s2mm_tready;
  // source 3 / sink 3: static group
  assign sw_s_tdata[3]      = s_axis_sf_tdata;
  assign sw_s_tvalid[3]     = s_axis_sf_tvalid;
  assign sw_s_tlast[3]      = s_axis_sf_tlast;
  assign s_axis_sf_tready   = sw_s_tready[3];
  assign m_axis_sf_tdata    = sw_m_tdata[3];
  assign m_axis_sf_tvalid   = sw_m_tvalid[3];
  assign m_axis_sf_tlast    = sw_m_tlast[3];
  assign sw_m_tready[3]     = m_axis_sf_tready;

  // ------------------------------------------------- the two partitions
  for (genvar p = 0; p < 2; p++) begin : g_rp
    localparam int unsigned CN  = (p == 0) ? RP0_CONV_N  : RP1_CONV_N;
    localparam int unsigned CM  = (p == 0) ? RP0_CONV_M  : RP1_CONV_M;
    localparam int unsigned CHW = (p == 0) ? RP0_CONV_HW : RP1_CONV_HW;
    localparam int unsigned FI  = (p == 0) ? RP0_FC_IN   : RP1_FC_IN;

    logic  sd_req, in_sd, decouple, dec_status, rm_rst_n;
    // shutdown manager <-> decoupler
    data_t sd_in_tdata, sd_out_tdata;
    logic  sd_in_tvalid, sd_in_tlast, sd_in_tready;
    logic  sd_out_tvalid, sd_out_tlast, sd_out_tready;
    // decoupler <-> partition
    data_t rp_in_tdata, rp_out_tdata;
    logic  rp_in_tvalid, rp_in_tlast, rp_in_tready;
    logic  rp_out_tvalid, rp_out_tlast, rp_out_tready;
    logic  rp_busy, rp_done;
    axil_req_t sd_axil_req, rp_axil_req;
    axil_rsp_t sd_axil_rsp, rp_axil_rsp;

    rp_reconfig_ctrl #(.LOAD_CYCLES(LOAD_CYCLES)) u_rcfg (
      .clk, .rst_n, .load_req(load_req[p]), .load_rm(load_rm[p]),
      .load_busy(load_busy[p]), .load_done(load_done[p]),
      .shutdown_req(sd_req), .in_shutdown(in_sd), .decouple, .rm_rst_n,
      .rm_sel(rm_sel[p]), .reloads(reloads[p]), .skips(skips[p])
    );

    dfx_shutdown_mgr u_sd (
      .clk, .rst_n, .shutdown_req(sd_req), .in_shutdown(in_sd),
      .us_tdata(sw_m_tdata[p+1]), .us_tvalid(sw_m_tvalid[p+1]), .us_tlast(sw_m_tlast[p+1]),
      .us_tready(sw_m_tready[p+1]),
      .ds_tdata(sd_in_tdata), .ds_tvalid(sd_in_tvalid), .ds_tlast(sd_in_tlast), .ds_tready(sd_in_tready),
      .rp_tdata(sd_out_tdata), .rp_tvalid(sd_out_tvalid), .rp_tlast(sd_out_tlast), .rp_tready(sd_out_tready),
      .st_tdata(sw_s_tdata[p+1]), .st_tvalid(sw_s_tvalid[p+1]), .st_tlast(sw_s_tlast[p+1]),
      .st_tready(sw_s_tready[p+1]),
      .st_axil_req(dec_req[p+1]), .st_axil_rsp(dec_rsp[p+1]),
      .rp_axil_req(sd_axil_req), .rp_axil_rsp(sd_axil_rsp)
    );

    dfx_decoupler u_dec (
      .decouple, .decouple_status(dec_status),
      .st_axil_req(sd_axil_req), .st_axil_rsp(sd_axil_rsp),
      .st_busy(busy[p]), .st_done(done[p]),
      .st_in_tdata(sd_in_tdata), .st_in_tvalid(sd_in_tvalid), .st_in_tlast(sd_in_tlast),
      .st_in_tready(sd_in_tready),
      .st_out_tdata(sd_out_tdata), .st_out_tvalid(sd_out_tvalid), .st_out_tlast(sd_out_tlast),
      .st_out_tready(sd_out_tready),
      .rp_axil_req, .rp_axil_rsp, .rp_busy, .rp_done,
      .rp_in_tdata, .rp_in_tvalid, .rp_in_tlast, .rp_in_tready,
      .rp_out_tdata, .rp_out_tvalid, .rp_out_tlast, .rp_out_tready
    );

    rp_func #(
      .CONV_N_MAX(CN), .CONV_M_MAX(CM), .CONV_H_MAX(CHW), .CONV_W_MAX(CHW),
      .CONV_K_MAX(CONV_K), .TN(TN), .POOL_W_MAX(POOL_W), .FC_IN_MAX(FI)
    ) u_rp (
      .clk, .rst_n, .rm_rst_n, .rm_sel(rm_sel[p]),
      .axil_req(rp_axil_req), .axil_rsp(rp_axil_rsp),
      .busy(rp_busy), .done(rp_done),
      .s_tdata(rp_in_tdata), .s_tvalid(rp_in_tvalid), .s_tlast(rp_in_tlast), .s_tready(rp_in_tready),
      .m_tdata(rp_out_tdata), .m_tvalid(rp_out_tvalid), .m_tlast(rp_out_tlast), .m_tready(rp_out_tready)
    );
  end

endmodule
