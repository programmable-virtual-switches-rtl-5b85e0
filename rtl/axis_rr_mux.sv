// axis_rr_mux -- packet-granular round-robin multiplexer of AXI Streams.
//
// Serialises N packet streams onto one. When idle it grants the first input
// with a valid beat, searching from the input after the one served last, and
// keeps that grant until the beat with tlast has been accepted, so packets are
// never interleaved. The search is combinational: a new packet may start in
// the cycle right after the previous tlast.
//
// Interface: N input streams (s_valid/s_beat/s_ready), one output stream,
// and grant_idx/grant_vld naming the input whose beat is on the output. The
// output is combinational from the inputs; registering is left to the user.
// skip lets the user pass over the input offered before its packet starts
// (for instance because that packet's destination has no room): the input
// keeps its packet and the search moves on to the next input the following
// cycle. skip is ignored once a packet is under way and must not be raised
// in a cycle where the offered beat is accepted.
//
// Round-robin service of the input ports and of the vS output buffers is the
// document's; the search order and the per-packet lock are this design's.
module axis_rr_mux
  import pvs_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic       [N-1:0]           s_valid,
  input  axis_beat_t [N-1:0]           s_beat,
  output logic       [N-1:0]           s_ready,
  output logic                         m_valid,
  output axis_beat_t                   m_beat,
  input  logic                         m_ready,
  input  logic                         skip,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx,
  output logic                         grant_vld
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic          locked;
  logic [IW-1:0] lock_idx, last_idx;
  logic [IW-1:0] pick_idx;
  logic          pick_vld;

  // First requesting input after last_idx, wrapping around.
  always_comb begin
    pick_vld = 1'b0;
    pick_idx = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last_idx) + k) % N;
      if (!pick_vld && s_valid[c]) begin
        pick_vld = 1'b1;
        pick_idx = IW'(c);
      end
    end
  end

  assign grant_vld = locked || pick_vld;
  assign grant_idx = locked ? lock_idx : pick_idx;
  assign m_valid   = grant_vld && s_valid[grant_idx];
  assign m_beat    = s_beat[grant_idx];

  always_comb begin
    s_ready = '0;
    if (grant_vld) s_ready[grant_idx] = m_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_idx <= '0;
      last_idx <= IW'(N - 1);
    end else if (m_valid && m_ready) begin
      if (m_beat.tlast) begin
        locked   <= 1'b0;
        last_idx <= grant_idx;
      end else begin
        locked   <= 1'b1;
        lock_idx <= grant_idx;
      end
    end else if (!locked && pick_vld && skip) begin
      last_idx <= pick_idx;
    end
  end

  a_skip: assert property (@(posedge clk) disable iff (!rst_n) !(skip && m_valid && m_ready));

endmodule
