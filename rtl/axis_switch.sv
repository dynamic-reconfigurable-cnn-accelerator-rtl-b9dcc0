// axis_switch: AXI4-Stream switch that connects the stream sources of the
// accelerator (DMA read channel, partition outputs, static group output) to
// its stream sinks (DMA write channel, partition inputs, static group input).
//
// Each master (sink side) port has a route entry: an enable bit and the
// index of the slave (source side) port it takes its data from.  The host
// writes a new route table and pulses `commit`; the switch adopts it once no
// routed stream is in the middle of a packet (between a first beat and its
// tlast), so a packet is never split between two destinations.  A source
// must be routed to at most one sink; a source that is routed nowhere sees
// tready low.  Data is switched combinationally: no added latency.
//
// The routing-by-register scheme and the packet-boundary commit are this
// design's choices; the document names the switch and its role only.
module axis_switch
  import cnn_pkg::*;
#(
  parameter int unsigned NS = 4,   // slave (source) ports
  parameter int unsigned NM = 4    // master (sink) ports
)(
  input  logic                  clk,
  input  logic                  rst_n,
  // route table: per master, {enable, source index}
  input  logic [NM-1:0]         route_en,
  input  logic [NM-1:0][1:0]    route_src,
  input  logic                  commit,
  output logic                  pending,       // a committed table waits for a packet boundary
  // slave ports
  input  data_t [NS-1:0]        s_tdata,
  input  logic  [NS-1:0]        s_tvalid,
  input  logic  [NS-1:0]        s_tlast,
  output logic  [NS-1:0]        s_tready,
  // master ports
  output data_t [NM-1:0]        m_tdata,
  output logic  [NM-1:0]        m_tvalid,
  output logic  [NM-1:0]        m_tlast,
  input  logic  [NM-1:0]        m_tready
);
  logic [NM-1:0]      cur_en, new_en, in_pkt;
  logic [NM-1:0][1:0] cur_src, new_src;

  always_comb begin
    s_tready = '0;
    for (int unsigned mi = 0; mi < NM; mi++) begin
      m_tdata[mi]  = s_tdata[cur_src[mi]];
      m_tvalid[mi] = cur_en[mi] && s_tvalid[cur_src[mi]];
      m_tlast[mi]  = s_tlast[cur_src[mi]];
      if (cur_en[mi] && m_tready[mi]) s_tready[cur_src[mi]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_en  <= '0;
      cur_src <= '0;
      new_en  <= '0;
      new_src <= '0;
      pending <= 1'b0;
      in_pkt  <= '0;
    end else begin
      for (int unsigned mi = 0; mi < NM; mi++)
        if (m_tvalid[mi] && m_tready[mi]) in_pkt[mi] <= !m_tlast[mi];
      if (commit) begin
        new_en  <= route_en;
        new_src <= route_src;
        pending <= 1'b1;
      end else if (pending && in_pkt == '0) begin
        cur_en  <= new_en;
        cur_src <= new_src;
        pending <= 1'b0;
        in_pkt  <= '0;
      end
    end
  end

  // Two enabled sinks must not share a source.
  always_comb begin
    for (int unsigned a = 0; a < NM; a++)
      for (int unsigned b = a + 1; b < NM; b++)
        assert (!(rst_n && cur_en[a] && cur_en[b] && cur_src[a] == cur_src[b]))
          else $error("axis_switch: source %0d routed to two sinks", cur_src[a]);
  end

endmodule
