// vs_l2_switch -- example virtual switch pipeline: a layer-2 forwarding
// switch that fits a vS placeholder.
//
// On the first beat of each packet the destination MAC address (bytes 0-5)
// is looked up in a private exact-match table. A hit writes the entry's
// one-hot port vector into tuser.dst_port; this is a port of the vS's own
// virtual port space, which the Egress table of the OvSI later maps to a
// physical port. A miss drops the whole packet. The table lives in this
// vS's private memory and is reachable only through its own control slice.
//
// Interface: AXI Stream in (s_*) and out (m_*); cfg_req/cfg_rdata is the
// control slice, read data one cycle after the request. Entry e at byte
// offset 8*e: word 0 = mac[31:0], word 1 = {valid[31], port[23:16],
// mac[47:32]}. Timing: one register stage, full throughput (one beat per
// cycle). Reset clears the table.
//
// The document deploys layer-2 switches compiled from P4 into the
// placeholders and does not give their insides; this one-table switch is
// this design's own minimal stand-in with the same interfaces.
module vs_l2_switch
  import pvs_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_valid,
  input  axis_beat_t s_beat,
  output logic       s_ready,
  output logic       m_valid,
  output axis_beat_t m_beat,
  input  logic       m_ready,
  input  ctrl_req_t  cfg_req,
  output logic [31:0] cfg_rdata
);
  localparam int unsigned TW = $clog2(N_ENTRIES);

  typedef struct packed {
    logic        valid;
    port_vec_t   port;
    logic [47:0] mac;
  } l2_entry_t;

  l2_entry_t tbl [N_ENTRIES];

  // ---------------- lookup ----------------
  logic      hit;
  port_vec_t hit_port;
  always_comb begin
    hit      = 1'b0;
    hit_port = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].mac == get_dst_mac(s_beat.tdata)) begin
        hit      = 1'b1;
        hit_port = tbl[i].port;
      end
    end
  end

  // ---------------- pipeline register ----------------
  logic first;      // next accepted beat starts a packet
  logic dropping;   // current packet is being discarded
  logic drop_now;

  assign s_ready  = !m_valid || m_ready;
  assign drop_now = first ? !hit : dropping;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid  <= 1'b0;
      m_beat   <= '0;
      first    <= 1'b1;
      dropping <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (s_valid && s_ready) begin
        first <= s_beat.tlast;
        if (first) dropping <= !hit;
        if (!drop_now) begin
          m_valid <= 1'b1;
          m_beat  <= s_beat;
          if (first) m_beat.tuser.dst_port <= hit_port;
        end
      end
    end
  end

  // ---------------- control slice ----------------
  logic [TW-1:0] idx;
  assign idx = cfg_req.addr[3 +: TW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) tbl[i] <= '0;
      cfg_rdata <= '0;
    end else if (cfg_req.en) begin
      if (cfg_req.we) begin
        if (!cfg_req.addr[2]) tbl[idx].mac[31:0] <= cfg_req.wdata;
        else begin
          tbl[idx].valid      <= cfg_req.wdata[31];
          tbl[idx].port       <= cfg_req.wdata[23:16];
          tbl[idx].mac[47:32] <= cfg_req.wdata[15:0];
        end
      end else begin
        if (!cfg_req.addr[2]) cfg_rdata <= tbl[idx].mac[31:0];
        else cfg_rdata <= {tbl[idx].valid, 7'd0, tbl[idx].port, tbl[idx].mac[47:32]};
      end
    end
  end

endmodule
