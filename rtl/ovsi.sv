// ovsi -- Output vS Interface: takes packets out of the virtual switches and
// hands them to the TX ports.
//
// A round-robin multiplexer visits the output queues of all vS placeholders
// and the controller path (last input), one whole packet at a time. On the
// first beat the destination is decided and held for the packet:
//   * controller path: sent to the DMA TX stream with dst_port = bit 7;
//   * dst_port = bit 7 (1000_0000) from a vS: packet-out to the controller,
//     sent to the DMA TX stream without a table lookup;
//   * otherwise the Egress table is searched with (dst_port, device_id,
//     VLAN id). A hit with the forward action rewrites dst_port with the
//     physical port vector; a miss, a drop action or an untagged frame drops
//     the packet.
// Each TX stream (10G ports 0-3 and the DMA stream, which carries every odd
// port bit) has its own output buffer. A packet whose port vector has several
// bits set is copied into every selected buffer in lock step. A packet
// starts only when every buffer it goes to has room for all of it (judged
// from tuser.pkt_len); if one has not, the multiplexer passes over that vS
// and serves the next, so a busy TX port holds up only the packets bound
// for it, and packets are forwarded as soon as their TX port is available.
//
// A packet counter counts the packets forwarded. Every COUNT_CYCLES cycles
// (one second at 200 MHz by default) the count is stored in a readable
// register and restarted, which gives packets per second.
//
// Interface: in_* are the N_IN input streams; tx_* the five TX streams;
// cfg_req/cfg_rdata the control slice, read data one cycle later:
//   0x000 packets in the last full window   0x004 packets in this window
//   0x008 packets dropped                   0x100 + 8*e + 4*w Egress entry e
// Timing: one beat per cycle; a beat enters its TX buffer in the cycle it is
// accepted and can leave the next cycle.
//
// The round-robin visit of the vS output buffers, the Egress table, the
// reserved controller port and the one-second counter are the document's;
// the per-TX buffers, the whole-packet room check, lock-step multicast and
// the register map are this design's.
module ovsi
  import pvs_pkg::*;
#(
  parameter int unsigned N_IN         = 5,
  parameter int unsigned N_EGR        = 16,
  parameter int unsigned TXQ_DEPTH    = 64,
  parameter int unsigned COUNT_CYCLES = 200_000_000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic       [N_IN-1:0]   in_valid,
  input  axis_beat_t [N_IN-1:0]   in_beat,
  output logic       [N_IN-1:0]   in_ready,
  output logic       [4:0]        tx_valid,
  output axis_beat_t [4:0]        tx_beat,
  input  logic       [4:0]        tx_ready,
  input  ctrl_req_t               cfg_req,
  output logic [31:0]             cfg_rdata
);
  localparam int unsigned IW = $clog2(N_IN > 1 ? N_IN : 2);
  localparam int unsigned TW = $clog2(N_EGR);

  logic       h_valid, h_ready, h_gnt, h_skip;
  axis_beat_t h_beat;
  logic [IW-1:0] h_idx;

  axis_rr_mux #(.N(N_IN)) u_mux (
    .clk, .rst_n,
    .s_valid(in_valid), .s_beat(in_beat), .s_ready(in_ready),
    .m_valid(h_valid), .m_beat(h_beat), .m_ready(h_ready), .skip(h_skip),
    .grant_idx(h_idx), .grant_vld(h_gnt));

  // ---------------- Egress table ----------------
  logic      e_hit, e_drop, e_sel;
  port_vec_t e_port;
  logic [31:0] e_rdata;

  assign e_sel = cfg_req.addr[CTRL_AW-1:8] == 8'h01;

  egress_table #(.N_ENTRIES(N_EGR)) u_egr (
    .clk, .rst_n,
    .lk_dst_port(h_beat.tuser.dst_port), .lk_device_id(h_beat.tuser.device_id),
    .lk_vlan(get_vlan(h_beat.tdata)),
    .lk_hit(e_hit), .lk_drop(e_drop), .lk_out_port(e_port),
    .cfg_we(cfg_req.en && cfg_req.we && e_sel),
    .cfg_idx(cfg_req.addr[3 +: TW]), .cfg_word(cfg_req.addr[2]),
    .cfg_wdata(cfg_req.wdata), .cfg_rdata(e_rdata));

  // ---------------- first-beat decision ----------------
  function automatic logic [4:0] tx_of(port_vec_t p);
    return {|{p[7], p[5], p[3], p[1]}, p[6], p[4], p[2], p[0]};
  endfunction

  logic       in_pkt;
  logic [4:0] cur_sel, new_sel, sel;
  port_vec_t  new_dst;

  always_comb begin
    new_dst = h_beat.tuser.dst_port;
    new_sel = '0;
    if (h_idx == IW'(N_IN - 1)) begin
      new_dst = PORT_CPU;
      new_sel = 5'b10000;
    end else if (h_beat.tuser.dst_port == PORT_CPU) begin
      new_sel = 5'b10000;
    end else if (has_vlan(h_beat.tdata) && e_hit && !e_drop) begin
      new_dst = e_port;
      new_sel = tx_of(e_port);
    end
  end

  assign sel = in_pkt ? cur_sel : new_sel;

  // ---------------- TX buffers ----------------
  localparam int unsigned FW = $clog2(TXQ_DEPTH) + 1;

  logic [4:0] q_ready, room;
  logic       all_ready;
  axis_beat_t q_beat;
  logic [FW-1:0] q_free [5];

  // A packet starts only when every TX buffer it goes to can take all of it
  // (or is empty, for a packet longer than the buffer); otherwise the
  // multiplexer passes over its vS and serves the next one.
  for (genvar t = 0; t < 5; t++) begin : g_room
    assign room[t] = 32'(q_free[t]) >= 32'(beats_of(h_beat.tuser.pkt_len)) ||
                     32'(q_free[t]) == 32'(TXQ_DEPTH);
  end

  assign h_skip    = h_valid && !in_pkt && (new_sel & ~room) != '0;
  assign all_ready = &(q_ready | ~sel);
  assign h_ready   = all_ready && !h_skip;   // sel == 0 swallows (drop)

  always_comb begin
    q_beat = h_beat;
    if (!in_pkt) q_beat.tuser.dst_port = new_dst;
  end

  for (genvar t = 0; t < 5; t++) begin : g_txq
    axis_pkt_fifo #(.DEPTH(TXQ_DEPTH)) u_txq (
      .clk, .rst_n,
      .s_valid(h_valid && h_ready && sel[t]), .s_beat(q_beat), .s_ready(q_ready[t]),
      .m_valid(tx_valid[t]), .m_beat(tx_beat[t]), .m_ready(tx_ready[t]),
      .free_words(q_free[t]));
  end

  // ---------------- packet bookkeeping ----------------
  logic [31:0] win_cnt, cnt_result, cnt_drop, cyc;
  logic        pkt_done, wrap;

  assign pkt_done = h_valid && h_ready && h_beat.tlast && sel != '0;
  assign wrap     = cyc == 32'(COUNT_CYCLES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt     <= 1'b0;
      cur_sel    <= '0;
      cyc        <= '0;
      win_cnt    <= '0;
      cnt_result <= '0;
      cnt_drop   <= '0;
    end else begin
      if (h_valid && h_ready) begin
        if (!in_pkt) begin
          cur_sel <= new_sel;
          if (new_sel == '0) cnt_drop <= cnt_drop + 1;
        end
        in_pkt <= !h_beat.tlast;
      end
      if (wrap) begin
        cyc        <= '0;
        cnt_result <= win_cnt + 32'(pkt_done);
        win_cnt    <= '0;
      end else begin
        cyc     <= cyc + 1;
        win_cnt <= win_cnt + 32'(pkt_done);
      end
    end
  end

  // ---------------- control slice ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_rdata <= '0;
    else if (cfg_req.en && !cfg_req.we) begin
      if (e_sel) cfg_rdata <= e_rdata;
      else begin
        case (cfg_req.addr)
          16'h0000: cfg_rdata <= cnt_result;
          16'h0004: cfg_rdata <= win_cnt;
          16'h0008: cfg_rdata <= cnt_drop;
          default:  cfg_rdata <= 32'hDEAD_BEEF;
        endcase
      end
    end
  end

endmodule
