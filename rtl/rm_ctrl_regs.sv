// rm_ctrl_regs: AXI4-Lite control registers of the module loaded in a
// reconfigurable partition.  The processing system sends its per-layer
// commands (layer sizes, start) to the compute module over AXI4-Lite; these
// registers sit inside the partition, so they are reset together with the
// module whenever a new module is loaded, and must be written again after a
// load.
//
// Register map (offsets inside the partition's 32-byte window; the map is this
// design's):
//   0x00 CTRL  W  bit0: start the module (one-clock pulse on `start`)
//              R  bit0: busy, bit1: done (sticky, cleared by the next start)
//   0x04 ID    R  bits1:0: module loaded (0 conv, 1 pool, 2 fc, 3 none)
//   0x08 CFG0  RW bits15:0 n_in, bits31:16 n_out
//   0x0C CFG1  RW bits7:0 in_h, 15:8 in_w, 19:16 k, 21:20 stride, 24 relu
// Write strobes are ignored (whole-register writes); other offsets read 0.
//
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// response is pending, BVALID follows one clock later; a read is taken when
// ARVALID is high and no read data is pending, RVALID follows one clock later.
// Responses are always OKAY.
module rm_ctrl_regs
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  req,
  output axil_rsp_t  rsp,
  input  rm_e        rm_id,
  output logic       start,
  output layer_cfg_t cfg,
  input  logic       busy,
  input  logic       done
);
  logic        wr, rd, done_sticky, bvalid, rvalid;
  logic [31:0] cfg0, cfg1, rdata;

  assign wr          = req.awvalid && req.wvalid && !bvalid;
  assign rd          = req.arvalid && !rvalid;
  assign rsp.bvalid  = bvalid;
  assign rsp.rvalid  = rvalid;
  assign rsp.rdata   = rdata;
  assign rsp.awready = wr;
  assign rsp.wready  = wr;
  assign rsp.arready = rd;
  assign rsp.bresp   = 2'b00;
  assign rsp.rresp   = 2'b00;

  assign cfg.n_in   = cfg0[15:0];
  assign cfg.n_out  = cfg0[31:16];
  assign cfg.in_h   = cfg1[7:0];
  assign cfg.in_w   = cfg1[15:8];
  assign cfg.k      = cfg1[19:16];
  assign cfg.stride = cfg1[21:20];
  assign cfg.relu   = cfg1[24];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid      <= 1'b0;
      rvalid      <= 1'b0;
      rdata       <= '0;
      start       <= 1'b0;
      cfg0        <= '0;
      cfg1        <= '0;
      done_sticky <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done) done_sticky <= 1'b1;

      if (bvalid && req.bready) bvalid <= 1'b0;
      if (wr) begin
        bvalid <= 1'b1;
        unique case (req.awaddr[4:2])
          3'd0: if (req.wdata[0]) begin start <= 1'b1; done_sticky <= 1'b0; end
          3'd2: cfg0 <= req.wdata;
          3'd3: cfg1 <= req.wdata;
          default: ;
        endcase
      end

      if (rvalid && req.rready) rvalid <= 1'b0;
      if (rd) begin
        rvalid <= 1'b1;
        unique case (req.araddr[4:2])
          3'd0: rdata <= {30'd0, done_sticky, busy};
          3'd1: rdata <= {30'd0, rm_id};
          3'd2: rdata <= cfg0;
          3'd3: rdata <= cfg1;
          default: rdata <= '0;
        endcase
      end
    end
  end

endmodule
