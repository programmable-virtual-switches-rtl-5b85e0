// pvs_top -- PvS forwarding engine: several independent virtual switches
// (vS) running side by side on one switch data path.
//
// Packets from the four 10G RX ports and from the DMA stream (which carries
// the virtual ports used for vS-to-vS networking and for the controller)
// enter the Input vS Interface. It serialises them, reads each packet's VLAN
// tag and, through the Ingress table, picks the vS it belongs to, rewriting
// the source port into that vS's virtual port space and tagging the packet
// with the vS's device_id. Every vS sits in its own placeholder with private
// input and output queues and a private table memory. The Output vS
// Interface collects the vS outputs round robin, checks every packet against
// the Egress table (virtual port, device_id, VLAN) and maps it to a physical
// TX port or drops it. Packets for an undeployed vS go to the controller
// through a small queue and the DMA TX stream. The Control vS Interface is
// the single AXI4-Lite entry point through which tables and registers are
// reached, each slice over its own bus.
//
// Interface: rx_* / tx_* are five AXI Stream ports each, index 0-3 the 10G
// ports and index 4 the DMA stream (256-bit data, tuser metadata on the first
// beat, see pvs_pkg). s_axil_* is the control port. Address map: 0x0000_0000
// IvSI, 0x0001_0000 OvSI, 0x0002_0000 + i*0x1_0000 vS i (slice maps in the
// modules' headers). One clock (200 MHz on the reference board), active-low
// asynchronous reset.
//
// The block structure, the tables and the isolation rules follow the
// document; every vS slot holds the example layer-2 switch, where the
// document deploys switches compiled from P4. Queue depths and table sizes
// are this design's choices.
module pvs_top
  import pvs_pkg::*;
#(
  parameter int unsigned N_VS         = 4,
  parameter int unsigned N_ING        = 16,
  parameter int unsigned N_EGR        = 16,
  parameter int unsigned QDEPTH       = 64,
  parameter int unsigned COUNT_CYCLES = 200_000_000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic       [4:0]     rx_valid,
  input  axis_beat_t [4:0]     rx_beat,
  output logic       [4:0]     rx_ready,
  output logic       [4:0]     tx_valid,
  output axis_beat_t [4:0]     tx_beat,
  input  logic       [4:0]     tx_ready,
  input  logic [31:0]          s_axil_awaddr,
  input  logic                 s_axil_awvalid,
  output logic                 s_axil_awready,
  input  logic [31:0]          s_axil_wdata,
  input  logic [3:0]           s_axil_wstrb,
  input  logic                 s_axil_wvalid,
  output logic                 s_axil_wready,
  output logic [1:0]           s_axil_bresp,
  output logic                 s_axil_bvalid,
  input  logic                 s_axil_bready,
  input  logic [31:0]          s_axil_araddr,
  input  logic                 s_axil_arvalid,
  output logic                 s_axil_arready,
  output logic [31:0]          s_axil_rdata,
  output logic [1:0]           s_axil_rresp,
  output logic                 s_axil_rvalid,
  input  logic                 s_axil_rready
);
  localparam int unsigned N_TGT = N_VS + 2;
  localparam int unsigned QW    = $clog2(QDEPTH) + 1;

  // The deployed mask and the one-hot virtual ports are 8 bits wide.
  if (N_VS < 1 || N_VS > 8) begin : g_bad_n_vs
    $error("pvs_top: N_VS must be between 1 and 8");
  end

  // ---------------- control ----------------
  ctrl_req_t [N_TGT-1:0]        req;
  logic      [N_TGT-1:0][31:0]  rdata;

  cvsi #(.N_TGT(N_TGT), .SLICE_BITS(16)) u_cvsi (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .req, .rdata);

  // ---------------- IvSI ----------------
  logic       [N_VS-1:0]         vin_valid, vin_ready;
  axis_beat_t                    vin_beat;
  logic       [N_VS-1:0][QW-1:0] vin_free;
  logic                          cin_valid, cin_ready;
  axis_beat_t                    cin_beat;
  logic       [QW-1:0]           cin_free;

  ivsi #(.N_RX(5), .N_VS(N_VS), .N_ING(N_ING), .IN_DEPTH(QDEPTH), .QW(QW)) u_ivsi (
    .clk, .rst_n,
    .rx_valid, .rx_beat, .rx_ready,
    .vs_valid(vin_valid), .vs_beat(vin_beat), .vs_ready(vin_ready), .vs_free(vin_free),
    .cpu_valid(cin_valid), .cpu_beat(cin_beat), .cpu_ready(cin_ready), .cpu_free(cin_free),
    .cfg_req(req[0]), .cfg_rdata(rdata[0]));

  // ---------------- vS Array ----------------
  logic       [N_VS:0] o_valid, o_ready;
  axis_beat_t [N_VS:0] o_beat;

  for (genvar i = 0; i < N_VS; i++) begin : g_vs
    logic [QW-1:0] unused_mfree;
    vs_placeholder #(.VS_ID(8'(i)), .QDEPTH(QDEPTH)) u_slot (
      .clk, .rst_n,
      .s_valid(vin_valid[i]), .s_beat(vin_beat), .s_ready(vin_ready[i]), .s_free(vin_free[i]),
      .m_valid(o_valid[i]), .m_beat(o_beat[i]), .m_ready(o_ready[i]), .m_free(unused_mfree),
      .cfg_req(req[2+i]), .cfg_rdata(rdata[2+i]));
  end

  // Controller path: packets for undeployed switches.
  axis_pkt_fifo #(.DEPTH(QDEPTH)) u_cpuq (
    .clk, .rst_n,
    .s_valid(cin_valid), .s_beat(cin_beat), .s_ready(cin_ready),
    .m_valid(o_valid[N_VS]), .m_beat(o_beat[N_VS]), .m_ready(o_ready[N_VS]),
    .free_words(cin_free));

  // ---------------- OvSI ----------------
  ovsi #(.N_IN(N_VS + 1), .N_EGR(N_EGR), .TXQ_DEPTH(QDEPTH), .COUNT_CYCLES(COUNT_CYCLES)) u_ovsi (
    .clk, .rst_n,
    .in_valid(o_valid), .in_beat(o_beat), .in_ready(o_ready),
    .tx_valid, .tx_beat, .tx_ready,
    .cfg_req(req[1]), .cfg_rdata(rdata[1]));

endmodule
