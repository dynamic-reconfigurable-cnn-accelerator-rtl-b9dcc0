// cnn_pkg: types and constants shared by the reconfigurable CNN accelerator.
//
// Every value carried on the AXI4-Stream data paths is one 16-bit signed
// fixed-point number (the network is quantised to 16-bit fixed point).  The
// split into integer and fraction bits is a choice of this design: Q8.8
// (FRAC_W = 8).  Products are 32 bits and are accumulated in ACC_W bits, then
// shifted back by FRAC_W and saturated to 16 bits.
//
// layer_cfg_t is the per-partition layer description the host writes through
// the AXI4-Lite registers before it starts a module.  rm_e names the three
// reconfigurable modules a partition can hold.  axil_req_t / axil_rsp_t
// bundle the master-driven and slave-driven signals of one AXI4-Lite link
// (32-bit data, AXIL_AW-bit byte address) as it is passed inside the design.
package cnn_pkg;

  parameter int unsigned DATA_W = 16;
  parameter int unsigned FRAC_W = 8;
  parameter int unsigned ACC_W  = 40;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Module held by a reconfigurable partition.
  typedef enum logic [1:0] {
    RM_CONV = 2'd0,   // convolution + ReLU
    RM_POOL = 2'd1,   // 2x2 max pooling
    RM_FC   = 2'd2,   // fully connected (+ optional ReLU)
    RM_NONE = 2'd3    // nothing loaded (after reset)
  } rm_e;

  // Layer description.  For a convolution n_in/n_out are channel counts,
  // for pooling n_in is the channel count, for a fully connected layer
  // n_in/n_out are the vector lengths.
  typedef struct packed {
    logic [15:0] n_out;
    logic [15:0] n_in;
    logic [7:0]  in_w;
    logic [7:0]  in_h;
    logic [3:0]  k;
    logic [1:0]  stride;
    logic        relu;
  } layer_cfg_t;

  // AXI4-Lite, 32-bit data.  Address map of the accelerator (byte
  // addresses): 0x00-0x3F static control, 0x40-0x5F RP_func0 module
  // registers, 0x60-0x7F RP_func1 module registers.
  parameter int unsigned AXIL_AW = 7;

  typedef struct packed {
    logic [AXIL_AW-1:0] awaddr;
    logic               awvalid;
    logic [31:0]        wdata;
    logic [3:0]         wstrb;
    logic               wvalid;
    logic               bready;
    logic [AXIL_AW-1:0] araddr;
    logic               arvalid;
    logic               rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  // Requantise an accumulator (FRAC_W*2 fraction bits) to a Q8.8 value,
  // saturating, with optional ReLU.
  function automatic data_t requant(input acc_t acc, input logic relu);
    acc_t sh;
    data_t r;
    sh = acc >>> FRAC_W;
    if (sh > acc_t'(32767))       r = 16'sh7fff;
    else if (sh < -acc_t'(32768)) r = 16'sh8000;
    else                          r = data_t'(sh);
    if (relu && r[DATA_W-1]) r = '0;
    return r;
  endfunction

endpackage
