// ivsi -- Input vS Interface: steers every incoming packet to the virtual
// switch (vS) it belongs to.
//
// Each RX stream (four 10G ports and the DMA stream that carries the
// virtual ports) first enters its own packet buffer. A round-robin
// multiplexer serialises the buffers one whole packet at a time into the
// parser. On the first beat of a packet the parser reads the 802.1Q tag
// (TPID 0x8100 at bytes 12-13) and looks the pair (VLAN id, src_port) up in
// the Ingress table. The outcome, held for the rest of the packet, is one of:
//   * forward to vS device_id: tuser.device_id is set and tuser.src_port is
//     replaced by the virtual source port from the table;
//   * to the controller: the table names a vS that is not deployed (its bit
//     in the deployed mask is clear, or the id is beyond the array);
//   * drop: untagged frame, table miss, drop action, or the destination
//     queue has no room for the whole packet (judged from tuser.pkt_len), so
//     a full vS queue never blocks traffic bound for the others;
//   * packet-in: a packet arriving from the controller port (src_port bit 7)
//     while the packet-in register is armed goes straight to the vS that
//     register names, with the virtual port it names as src_port.
//
// Interface: rx_* are the RX streams; vs_valid/vs_beat/vs_ready feed the vS
// input queues (vs_beat is shared, vs_valid selects one) and vs_free reports
// their free space in beats; cpu_* is the controller path. cfg_req/
// cfg_rdata is this block's control slice; read data returns one cycle after
// the request. Register map (byte offsets):
//   0x000 deployed mask (RW)    0x004 packet-in {armed[16], device_id[15:8], vport[7:0]} (RW)
//   0x008 forwarded packets     0x00C dropped packets
//   0x010 packets to controller 0x014 packets dropped for lack of queue room
//   0x100 + 8*e + 4*w  Ingress table entry e, word w
// Timing: the decision path is combinational; a packet leaves one cycle
// after it is written into its RX buffer at the earliest.
//
// The parser, the Ingress table with its forward/drop actions, the virtual
// source port, the controller path for undeployed switches and the
// round-robin input are the document's. Dropping on a full queue, where the
// packet-in register sits, and the register map are this design's choices.
module ivsi
  import pvs_pkg::*;
#(
  parameter int unsigned N_RX     = 5,
  parameter int unsigned N_VS     = 4,
  parameter int unsigned N_ING    = 16,
  parameter int unsigned IN_DEPTH = 64,
  parameter int unsigned QW       = 7,           // width of the free-space reports
  parameter logic [7:0]  DEPLOYED_INIT = 8'hFF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic       [N_RX-1:0]         rx_valid,
  input  axis_beat_t [N_RX-1:0]         rx_beat,
  output logic       [N_RX-1:0]         rx_ready,
  output logic       [N_VS-1:0]         vs_valid,
  output axis_beat_t                    vs_beat,
  input  logic       [N_VS-1:0]         vs_ready,
  input  logic       [N_VS-1:0][QW-1:0] vs_free,
  output logic                          cpu_valid,
  output axis_beat_t                    cpu_beat,
  input  logic                          cpu_ready,
  input  logic       [QW-1:0]           cpu_free,
  input  ctrl_req_t                     cfg_req,
  output logic [31:0]                   cfg_rdata
);
  localparam int unsigned FW = $clog2(IN_DEPTH) + 1;
  localparam int unsigned RW = $clog2(N_VS > 1 ? N_VS : 2);
  localparam int unsigned TW = $clog2(N_ING);

  typedef enum logic [1:0] {R_DROP, R_VS, R_CPU} route_e;

  // ---------------- RX buffers and round-robin serialiser ----------------
  logic       [N_RX-1:0] b_valid, b_ready;
  axis_beat_t [N_RX-1:0] b_beat;
  logic       [N_RX-1:0][FW-1:0] b_free;

  for (genvar p = 0; p < N_RX; p++) begin : g_rxbuf
    axis_pkt_fifo #(.DEPTH(IN_DEPTH)) u_buf (
      .clk, .rst_n,
      .s_valid(rx_valid[p]), .s_beat(rx_beat[p]), .s_ready(rx_ready[p]),
      .m_valid(b_valid[p]),  .m_beat(b_beat[p]),  .m_ready(b_ready[p]),
      .free_words(b_free[p]));
  end

  logic       h_valid, h_ready;
  axis_beat_t h_beat;
  logic [$clog2(N_RX > 1 ? N_RX : 2)-1:0] h_idx;
  logic       h_gnt;

  axis_rr_mux #(.N(N_RX)) u_mux (
    .clk, .rst_n,
    .s_valid(b_valid), .s_beat(b_beat), .s_ready(b_ready),
    .m_valid(h_valid), .m_beat(h_beat), .m_ready(h_ready), .skip(1'b0),
    .grant_idx(h_idx), .grant_vld(h_gnt));

  // ---------------- registers ----------------
  logic [N_VS-1:0] deployed;
  logic            pin_armed;
  dev_id_t         pin_dev;
  port_vec_t       pin_vport;
  logic [31:0]     cnt_fwd, cnt_drop, cnt_cpu, cnt_ovf;

  // ---------------- Ingress table ----------------
  logic      t_hit, t_drop;
  dev_id_t   t_dev;
  port_vec_t t_vport;
  logic [31:0] t_rdata;
  logic      t_sel;

  assign t_sel = cfg_req.addr[CTRL_AW-1:8] == 8'h01;

  ingress_table #(.N_ENTRIES(N_ING)) u_ing (
    .clk, .rst_n,
    .lk_vlan(get_vlan(h_beat.tdata)), .lk_src_port(h_beat.tuser.src_port),
    .lk_hit(t_hit), .lk_drop(t_drop), .lk_device_id(t_dev), .lk_vport(t_vport),
    .cfg_we(cfg_req.en && cfg_req.we && t_sel),
    .cfg_idx(cfg_req.addr[3 +: TW]), .cfg_word(cfg_req.addr[2]),
    .cfg_wdata(cfg_req.wdata), .cfg_rdata(t_rdata));

  // ---------------- parse and decide on the first beat ----------------
  logic       in_pkt;          // inside a packet whose route is held below
  route_e     cur_route, new_route;
  logic [RW-1:0] cur_vs, new_vs;
  logic       new_ovf;
  sume_meta_t new_meta;

  always_comb begin
    new_route = R_DROP;
    new_vs    = '0;
    new_meta  = h_beat.tuser;
    new_ovf   = 1'b0;
    if (h_beat.tuser.src_port == PORT_CPU && pin_armed) begin
      if (pin_dev < dev_id_t'(N_VS)) begin
        new_route          = R_VS;
        new_vs             = RW'(pin_dev);
        new_meta.device_id = pin_dev;
        new_meta.src_port  = pin_vport;
      end
    end else if (has_vlan(h_beat.tdata) && t_hit && !t_drop) begin
      new_meta.device_id = t_dev;
      if (t_dev < dev_id_t'(N_VS) && deployed[RW'(t_dev)]) begin
        new_route         = R_VS;
        new_vs            = RW'(t_dev);
        new_meta.src_port = t_vport;
      end else begin
        new_route = R_CPU;
      end
    end
    // Room for the whole packet in the chosen queue?
    if (new_route == R_VS &&
        12'(vs_free[new_vs]) < beats_of(h_beat.tuser.pkt_len)) begin
      new_route = R_DROP;
      new_ovf   = 1'b1;
    end else if (new_route == R_CPU &&
        12'(cpu_free) < beats_of(h_beat.tuser.pkt_len)) begin
      new_route = R_DROP;
      new_ovf   = 1'b1;
    end
  end

  route_e        route;
  logic [RW-1:0] rvs;
  assign route = in_pkt ? cur_route : new_route;
  assign rvs   = in_pkt ? cur_vs    : new_vs;

  always_comb begin
    vs_beat = h_beat;
    if (!in_pkt) vs_beat.tuser = new_meta;
  end
  assign cpu_beat = vs_beat;

  always_comb begin
    vs_valid = '0;
    if (h_valid && route == R_VS) vs_valid[rvs] = 1'b1;
  end
  assign cpu_valid = h_valid && route == R_CPU;

  always_comb begin
    unique case (route)
      R_VS:    h_ready = vs_ready[rvs];
      R_CPU:   h_ready = cpu_ready;
      default: h_ready = 1'b1;        // drop: swallow the packet
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      cur_route <= R_DROP;
      cur_vs    <= '0;
      cnt_fwd   <= '0;
      cnt_drop  <= '0;
      cnt_cpu   <= '0;
      cnt_ovf   <= '0;
    end else if (h_valid && h_ready) begin
      if (!in_pkt) begin
        cur_route <= new_route;
        cur_vs    <= new_vs;
        unique case (new_route)
          R_VS:    cnt_fwd  <= cnt_fwd + 1;
          R_CPU:   cnt_cpu  <= cnt_cpu + 1;
          default: cnt_drop <= cnt_drop + 1;
        endcase
        if (new_ovf) cnt_ovf <= cnt_ovf + 1;
      end
      in_pkt <= !h_beat.tlast;
    end
  end

  // ---------------- control slice ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      deployed  <= DEPLOYED_INIT[N_VS-1:0];
      pin_armed <= 1'b0;
      pin_dev   <= '0;
      pin_vport <= '0;
      cfg_rdata <= '0;
    end else if (cfg_req.en) begin
      if (cfg_req.we) begin
        case (cfg_req.addr)
          16'h0000: deployed <= cfg_req.wdata[N_VS-1:0];
          16'h0004: {pin_armed, pin_dev, pin_vport} <= cfg_req.wdata[16:0];
          default: ;
        endcase
      end else begin
        if (t_sel) cfg_rdata <= t_rdata;
        else begin
          case (cfg_req.addr)
            16'h0000: cfg_rdata <= 32'(deployed);
            16'h0004: cfg_rdata <= {15'd0, pin_armed, pin_dev, pin_vport};
            16'h0008: cfg_rdata <= cnt_fwd;
            16'h000C: cfg_rdata <= cnt_drop;
            16'h0010: cfg_rdata <= cnt_cpu;
            16'h0014: cfg_rdata <= cnt_ovf;
            default:  cfg_rdata <= 32'hDEAD_BEEF;
          endcase
        end
      end
    end
  end

endmodule
