// dfx_shutdown_mgr: brings the interfaces of a reconfigurable partition (its
// two AXI4-Stream links and its AXI4-Lite control link) to a safe stop before
// the partition is decoupled and reloaded.
//
// On `shutdown_req` each stream direction (static-to-partition input,
// partition-to-static output) is allowed to finish the packet it is in, i.e.
// transfers continue until a beat with tlast has been accepted; from then on
// that direction is blocked: tvalid and tready are held low on both sides.  A
// direction that is between packets is blocked at once.  On the AXI4-Lite
// link no new transaction may start: AW and AR are held, and W passes only
// for a write whose AW was already taken (and AW only for a write whose W was
// taken), so a write or read already under way completes with its response.
// When both streams are blocked and no AXI4-Lite transaction is open,
// `in_shutdown` goes high; dropping `shutdown_req` unblocks everything.
// A host access to the partition made while it is shut down waits until the
// partition is released.  The manager tracks one open write and one open
// read, as issued by the AXI4-Lite decoder in front of it.
// Stopping at packet and transaction boundaries is this design's reading of
// "managing the AXI4-Lite and AXI4 bus interfaces for safe operation".
// Combinational pass-through otherwise.
module dfx_shutdown_mgr
  import cnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shutdown_req,
  output logic  in_shutdown,
  // input stream: static (upstream) -> partition (downstream)
  input  data_t us_tdata,
  input  logic  us_tvalid,
  input  logic  us_tlast,
  output logic  us_tready,
  output data_t ds_tdata,
  output logic  ds_tvalid,
  output logic  ds_tlast,
  input  logic  ds_tready,
  // output stream: partition -> static
  input  data_t rp_tdata,
  input  logic  rp_tvalid,
  input  logic  rp_tlast,
  output logic  rp_tready,
  output data_t st_tdata,
  output logic  st_tvalid,
  output logic  st_tlast,
  input  logic  st_tready,
  // AXI4-Lite control link: static (master side) -> partition (slave)
  input  axil_req_t st_axil_req,
  output axil_rsp_t st_axil_rsp,
  output axil_req_t rp_axil_req,
  input  axil_rsp_t rp_axil_rsp
);
  logic in_pkt_i, in_pkt_o, blk_i, blk_o;

  assign ds_tdata  = us_tdata;
  assign ds_tlast  = us_tlast;
  assign ds_tvalid = us_tvalid && !blk_i;
  assign us_tready = ds_tready && !blk_i;

  assign st_tdata  = rp_tdata;
  assign st_tlast  = rp_tlast;
  assign st_tvalid = rp_tvalid && !blk_o;
  assign rp_tready = st_tready && !blk_o;

  // AXI4-Lite: open-transaction tracking and start gating
  logic aw_done, w_done, ar_done, axil_idle;
  assign axil_idle = !aw_done && !w_done && !ar_done;

  always_comb begin
    rp_axil_req         = st_axil_req;
    rp_axil_req.awvalid = st_axil_req.awvalid && (!shutdown_req || w_done);
    rp_axil_req.wvalid  = st_axil_req.wvalid  && (!shutdown_req || aw_done);
    rp_axil_req.arvalid = st_axil_req.arvalid && !shutdown_req;
    st_axil_rsp         = rp_axil_rsp;
    st_axil_rsp.awready = rp_axil_rsp.awready && (!shutdown_req || w_done);
    st_axil_rsp.wready  = rp_axil_rsp.wready  && (!shutdown_req || aw_done);
    st_axil_rsp.arready = rp_axil_rsp.arready && !shutdown_req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      ar_done <= 1'b0;
    end else begin
      if (rp_axil_req.awvalid && rp_axil_rsp.awready) aw_done <= 1'b1;
      if (rp_axil_req.wvalid && rp_axil_rsp.wready)   w_done  <= 1'b1;
      if (rp_axil_rsp.bvalid && rp_axil_req.bready) begin
        aw_done <= 1'b0;
        w_done  <= 1'b0;
      end
      if (rp_axil_req.arvalid && rp_axil_rsp.arready) ar_done <= 1'b1;
      if (rp_axil_rsp.rvalid && rp_axil_req.rready)   ar_done <= 1'b0;
    end
  end

  assign in_shutdown = blk_i && blk_o && axil_idle && shutdown_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt_i <= 1'b0;
      in_pkt_o <= 1'b0;
      blk_i    <= 1'b0;
      blk_o    <= 1'b0;
    end else begin
      if (ds_tvalid && ds_tready) in_pkt_i <= !ds_tlast;
      if (st_tvalid && st_tready) in_pkt_o <= !st_tlast;
      if (!shutdown_req) begin
        blk_i <= 1'b0;
        blk_o <= 1'b0;
      end else begin
        // block at a boundary: idle between packets with no packet starting
        // now, or the closing beat of a packet passes now
        if ((!in_pkt_i && !(ds_tvalid && ds_tready)) || (ds_tvalid && ds_tready && ds_tlast))
          blk_i <= 1'b1;
        if ((!in_pkt_o && !(st_tvalid && st_tready)) || (st_tvalid && st_tready && st_tlast))
          blk_o <= 1'b1;
      end
    end
  end

endmodule
