// dfx_decoupler: isolates a reconfigurable partition from the static logic
// while a new module is being loaded into it.
//
// Every signal crossing the partition boundary passes through here: the two
// AXI4-Stream links, the AXI4-Lite control link and the busy/done status
// lines.  While `decouple` is high, the signals leaving the partition (stream
// valid, tlast and data, input tready, AXI4-Lite ready/valid/data, busy,
// done) are forced to zero so that whatever the partition drives during
// loading cannot reach the static side, and the signals entering it (stream
// valid, output tready, AXI4-Lite requests) are forced to zero so it receives
// no work.  `decouple_status` reports the state.  Purely combinational;
// forcing to zero is this design's choice of safe value.
module dfx_decoupler
  import cnn_pkg::*;
(
  input  logic       decouple,
  output logic       decouple_status,
  // static side
  input  axil_req_t  st_axil_req,
  output axil_rsp_t  st_axil_rsp,
  output logic       st_busy,
  output logic       st_done,
  input  data_t      st_in_tdata,
  input  logic       st_in_tvalid,
  input  logic       st_in_tlast,
  output logic       st_in_tready,
  output data_t      st_out_tdata,
  output logic       st_out_tvalid,
  output logic       st_out_tlast,
  input  logic       st_out_tready,
  // partition side
  output axil_req_t  rp_axil_req,
  input  axil_rsp_t  rp_axil_rsp,
  input  logic       rp_busy,
  input  logic       rp_done,
  output data_t      rp_in_tdata,
  output logic       rp_in_tvalid,
  output logic       rp_in_tlast,
  input  logic       rp_in_tready,
  input  data_t      rp_out_tdata,
  input  logic       rp_out_tvalid,
  input  logic       rp_out_tlast,
  output logic       rp_out_tready
);
  assign decouple_status = decouple;
  // into the partition
  assign rp_axil_req   = decouple ? '0 : st_axil_req;
  assign rp_in_tdata   = decouple ? '0 : st_in_tdata;
  assign rp_in_tvalid  = !decouple && st_in_tvalid;
  assign rp_in_tlast   = !decouple && st_in_tlast;
  assign rp_out_tready = !decouple && st_out_tready;
  // out of the partition
  assign st_axil_rsp   = decouple ? '0 : rp_axil_rsp;
  assign st_busy       = !decouple && rp_busy;
  assign st_done       = !decouple && rp_done;
  assign st_in_tready  = !decouple && rp_in_tready;
  assign st_out_tdata  = decouple ? '0 : rp_out_tdata;
  assign st_out_tvalid = !decouple && rp_out_tvalid;
  assign st_out_tlast  = !decouple && rp_out_tlast;
endmodule
