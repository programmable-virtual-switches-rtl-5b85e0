// vs_placeholder -- one slot of the vS Array: the wrapper that gives a
// virtual switch its private resources.
//
// A placeholder owns an input queue fed by the IvSI, the vS pipeline itself,
// an output queue drained by the OvSI, and a private control slice that only
// reaches this vS's tables. On the way out the wrapper writes its fixed
// identity VS_ID into tuser.device_id of every packet, so a vS cannot claim
// to be another switch and borrow the physical ports assigned to it.
//
// Interface: s_* in from the IvSI with s_free (free beats in the input
// queue, used by the IvSI to drop rather than block); m_* out to the OvSI;
// cfg_req/cfg_rdata is this slot's control slice (read data one cycle after
// the request). Timing: two queue stages plus the vS pipeline; at least
// three cycles from input to output.
//
// Separate input/output queues per vS, the three channels per placeholder
// and the fixed vS_id of the wrapper are the document's. The queue depth and
// re-stamping the id after the vS are this design's choices. The slot holds
// the example layer-2 switch pipeline.
module vs_placeholder
  import pvs_pkg::*;
#(
  parameter logic [7:0]  VS_ID  = 8'd0,
  parameter int unsigned QDEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_valid,
  input  axis_beat_t                 s_beat,
  output logic                       s_ready,
  output logic [$clog2(QDEPTH):0]    s_free,
  output logic                       m_valid,
  output axis_beat_t                 m_beat,
  input  logic                       m_ready,
  output logic [$clog2(QDEPTH):0]    m_free,
  input  ctrl_req_t                  cfg_req,
  output logic [31:0]                cfg_rdata
);
  logic       iq_valid, iq_ready, sw_valid, sw_ready, oq_ready;
  axis_beat_t iq_beat, sw_beat, oq_beat;
  logic       out_first;

  axis_pkt_fifo #(.DEPTH(QDEPTH)) u_inq (
    .clk, .rst_n,
    .s_valid, .s_beat, .s_ready,
    .m_valid(iq_valid), .m_beat(iq_beat), .m_ready(iq_ready),
    .free_words(s_free));

  vs_l2_switch u_vs (
    .clk, .rst_n,
    .s_valid(iq_valid), .s_beat(iq_beat), .s_ready(iq_ready),
    .m_valid(sw_valid), .m_beat(sw_beat), .m_ready(sw_ready),
    .cfg_req, .cfg_rdata);

  // Identity enforcement on the first beat of every packet.
  always_comb begin
    oq_beat = sw_beat;
    if (out_first) oq_beat.tuser.device_id = VS_ID;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_first <= 1'b1;
    else if (sw_valid && sw_ready) out_first <= sw_beat.tlast;
  end

  assign sw_ready = oq_ready;

  axis_pkt_fifo #(.DEPTH(QDEPTH)) u_outq (
    .clk, .rst_n,
    .s_valid(sw_valid), .s_beat(oq_beat), .s_ready(oq_ready),
    .m_valid, .m_beat, .m_ready,
    .free_words(m_free));

endmodule
