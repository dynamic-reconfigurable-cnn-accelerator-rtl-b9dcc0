// axil_ctrl: AXI4-Lite slave holding the static control registers through
// which the processing system switches the accelerator layer by layer: it
// loads modules into the partitions, sets the stream routes and collects the
// partitions' completion interrupts.  Layer sizes and the start command go to
// the module registers inside each partition (rm_ctrl_regs), not here.
//
// Register map (32-bit registers, byte addresses; the map is this design's):
//   0x00 IRQACK  W   bit0 / bit1: clear the done flag of partition 0 / 1
//   0x04 STATUS  R   bit0/2: partition 0/1 busy, bit1/3: partition 0/1 done
//                    (sticky until IRQACK), bit4/5: partition 0/1
//                    reconfiguration busy, bit6: switch route change pending,
//                    bits 9:8 / 11:10: module loaded in partition 0 / 1
//   0x08 ROUTE   RW  per switch master port m (4 bits at 4m): bit3 enable,
//                    bits1:0 source port; a write commits the table
//   0x0C RCFG0   W   bits1:0 module to load into partition 0 (0 conv, 1 pool,
//                    2 fc); the write requests the load
//   0x10 RCFG1   W   same for partition 1
//   0x24 RELOADS R   bits15:0 / 31:16: module loads done in partition 0 / 1
//   0x28 SKIPS   R   bits15:0 / 31:16: load requests skipped (already loaded)
// `irq` is high while either done flag is set.
// Write strobes are ignored (whole-register writes).  Unmapped reads return 0.
//
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// response is pending; BVALID follows one clock later (OKAY).  A read is
// taken when ARVALID is high and no read data is pending; RVALID follows one
// clock later.
module axil_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned AW = 6
)(
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0]      awaddr,
  input  logic               awvalid,
  output logic               awready,
  input  logic [31:0]        wdata,
  input  logic [3:0]         wstrb,
  input  logic               wvalid,
  output logic               wready,
  output logic [1:0]         bresp,
  output logic               bvalid,
  input  logic               bready,
  input  logic [AW-1:0]      araddr,
  input  logic               arvalid,
  output logic               arready,
  output logic [31:0]        rdata,
  output logic [1:0]         rresp,
  output logic               rvalid,
  input  logic               rready,
  // to / from the accelerator
  input  logic [1:0]         busy,
  input  logic [1:0]         done,
  output logic [1:0]         load_req,
  output rm_e  [1:0]         load_rm,
  input  logic [1:0]         load_busy,
  input  rm_e  [1:0]         rm_loaded,
  input  logic [1:0][15:0]   reloads,
  input  logic [1:0][15:0]   skips,
  output logic [3:0]         route_en,
  output logic [3:0][1:0]    route_src,
  output logic               route_commit,
  input  logic               route_pending,
  output logic               irq
);
  logic        wr, rd;
  logic [1:0]  done_sticky;
  logic [31:0] route_reg;

  assign wr      = awvalid && wvalid && !bvalid;
  assign rd      = arvalid && !rvalid;
  assign awready = wr;
  assign wready  = wr;
  assign arready = rd;
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;
  assign irq     = |done_sticky;

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      route_en[m]  = route_reg[4*m+3];
      route_src[m] = route_reg[4*m +: 2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid       <= 1'b0;
      rvalid       <= 1'b0;
      rdata        <= '0;
      load_req     <= '0;
      load_rm      <= {RM_NONE, RM_NONE};
      route_commit <= 1'b0;
      route_reg    <= '0;
      done_sticky  <= '0;
    end else begin
      load_req     <= '0;
      route_commit <= 1'b0;
      for (int p = 0; p < 2; p++) if (done[p]) done_sticky[p] <= 1'b1;

      if (bvalid && bready) bvalid <= 1'b0;
      if (wr) begin
        bvalid <= 1'b1;
        unique case (awaddr[AW-1:2])
          4'h0: for (int p = 0; p < 2; p++) if (wdata[p]) done_sticky[p] <= 1'b0;
          4'h2: begin route_reg <= wdata; route_commit <= 1'b1; end
          4'h3: begin load_req[0] <= 1'b1; load_rm[0] <= rm_e'(wdata[1:0]); end
          4'h4: begin load_req[1] <= 1'b1; load_rm[1] <= rm_e'(wdata[1:0]); end
          default: ;
        endcase
      end

      if (rvalid && rready) rvalid <= 1'b0;
      if (rd) begin
        rvalid <= 1'b1;
        unique case (araddr[AW-1:2])
          4'h1: rdata <= {20'd0, rm_loaded[1], rm_loaded[0], 1'b0, route_pending,
                          load_busy[1], load_busy[0], done_sticky[1], busy[1],
                          done_sticky[0], busy[0]};
          4'h2: rdata <= route_reg;
          4'h9: rdata <= {reloads[1], reloads[0]};
          4'hA: rdata <= {skips[1], skips[0]};
          default: rdata <= '0;
        endcase
      end
    end
  end

  // AXI4-Lite rule: a response, once valid, stays until accepted.
  logic bvalid_q, rvalid_q, bready_q, rready_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {bvalid_q, rvalid_q, bready_q, rready_q} <= '0;
    else {bvalid_q, rvalid_q, bready_q, rready_q} <= {bvalid, rvalid, bready, rready};
  end
  always_comb begin
    if (rst_n) begin
      assert (!(bvalid_q && !bready_q) || bvalid) else $error("axil_ctrl: BVALID dropped");
      assert (!(rvalid_q && !rready_q) || rvalid) else $error("axil_ctrl: RVALID dropped");
    end
  end

endmodule
