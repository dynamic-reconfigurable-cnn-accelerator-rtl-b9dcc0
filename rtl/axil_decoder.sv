// axil_decoder: AXI4-Lite interconnect between the processing system (one
// master) and the three AXI4-Lite slaves of the accelerator: the static
// control registers and the module registers of the two reconfigurable
// partitions.  It plays the part of the AXI4 interconnect through which the
// host sends its control commands; the address decode and the one-at-a-time
// transaction handling are this design's choices.
//
// Decode on byte address bits 6:5: 0x00-0x3F slave 0, 0x40-0x5F slave 1,
// 0x60-0x7F slave 2.  One write and one read may be in flight at a time.  A
// write transaction opens at the first of its AW or W handshakes; the slave
// is then held (from AWADDR) until the B handshake closes it.  W is passed on
// only while AWVALID is high or its AW has been taken, so the slave is always
// known.  A read opens at its AR handshake and closes at the R handshake.
// Purely combinational paths from master to slave and back, plus a few state
// bits per direction.
module axil_decoder
  import cnn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  axil_req_t       m_req,
  output axil_rsp_t       m_rsp,
  output axil_req_t [2:0] s_req,
  input  axil_rsp_t [2:0] s_rsp
);
  function automatic logic [1:0] slot(input logic [AXIL_AW-1:0] a);
    return a[6] ? (a[5] ? 2'd2 : 2'd1) : 2'd0;
  endfunction

  logic       aw_done, w_done, ar_done;
  logic [1:0] wsel_q, rsel_q, wsel, rsel;
  logic       w_open, aw_hs, w_hs, b_hs, ar_hs, r_hs;

  assign w_open = aw_done || w_done;
  assign wsel   = w_open  ? wsel_q : slot(m_req.awaddr);
  assign rsel   = ar_done ? rsel_q : slot(m_req.araddr);

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      s_req[i]         = m_req;
      s_req[i].awvalid = m_req.awvalid && !aw_done && (wsel == 2'(i));
      s_req[i].wvalid  = m_req.wvalid && !w_done && (m_req.awvalid || aw_done) && (wsel == 2'(i));
      s_req[i].bready  = m_req.bready && aw_done && w_done && (wsel == 2'(i));
      s_req[i].arvalid = m_req.arvalid && !ar_done && (rsel == 2'(i));
      s_req[i].rready  = m_req.rready && ar_done && (rsel == 2'(i));
    end
    m_rsp         = '0;
    m_rsp.awready = !aw_done && s_rsp[wsel].awready;
    m_rsp.wready  = !w_done && (m_req.awvalid || aw_done) && s_rsp[wsel].wready;
    m_rsp.bvalid  = aw_done && w_done && s_rsp[wsel].bvalid;
    m_rsp.bresp   = s_rsp[wsel].bresp;
    m_rsp.arready = !ar_done && s_rsp[rsel].arready;
    m_rsp.rvalid  = ar_done && s_rsp[rsel].rvalid;
    m_rsp.rdata   = s_rsp[rsel].rdata;
    m_rsp.rresp   = s_rsp[rsel].rresp;
  end

  assign aw_hs = m_req.awvalid && m_rsp.awready;
  assign w_hs  = m_req.wvalid  && m_rsp.wready;
  assign b_hs  = m_rsp.bvalid  && m_req.bready;
  assign ar_hs = m_req.arvalid && m_rsp.arready;
  assign r_hs  = m_rsp.rvalid  && m_req.rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      ar_done <= 1'b0;
      wsel_q  <= '0;
      rsel_q  <= '0;
    end else begin
      if (aw_hs || w_hs) wsel_q <= wsel;
      if (aw_hs) aw_done <= 1'b1;
      if (w_hs)  w_done  <= 1'b1;
      if (b_hs) begin
        aw_done <= 1'b0;
        w_done  <= 1'b0;
      end
      if (ar_hs) begin
        ar_done <= 1'b1;
        rsel_q  <= rsel;
      end
      if (r_hs) ar_done <= 1'b0;
    end
  end

  // A slave is never addressed by two open transactions of one direction.
  always_comb begin
    if (rst_n) begin
      assert (!(b_hs && (aw_hs || w_hs))) else $error("axil_decoder: B with new write");
      assert (!(r_hs && ar_hs)) else $error("axil_decoder: R with new read");
    end
  end

endmodule
