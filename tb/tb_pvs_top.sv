// tb_pvs_top -- end-to-end test of the PvS forwarding engine.
//
// Four tenants, one vS each, are configured entirely through the AXI4-Lite
// port: Ingress entries (VLAN 100+i on physical port i -> vS i), one
// layer-2 table per vS and Egress entries per vS. The DMA stream is modelled
// by a loopback: a packet sent to a virtual port comes back on the DMA RX
// stream from that virtual port, and packets for the controller port are
// captured and checked. Every packet carries a unique id; its expected TX
// port and metadata are worked out by the testbench from the configuration.
//
// Mechanisms made to happen and counted: forwarding to every physical port,
// layer-2 miss drop, Ingress drop (untagged, unknown VLAN), controller path
// for a vS id beyond the array, hot swap (vS undeployed -> controller
// path), Egress drop (no entry for a vS port), vS-to-vS virtual link through
// the DMA loop, packet-out, packet-in, queue overflow drop in the IvSI and a
// closed packet-counter window. A mechanism that never happened is a failure.
//
// Queue depth 16 and a 20000-cycle counting window keep the run short; the
// rest of the design is at its defaults.
module tb_pvs_top;
  import pvs_pkg::*;
  import tb_util_pkg::*;
  localparam int QD = 16, WIN = 20000, TRAFFIC = 30;
  localparam bit CHECK_WINDOW = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] rx_valid, rx_ready, tx_valid, tx_ready;
  axis_beat_t [4:0] rx_beat, tx_beat;
  logic [31:0] s_axil_awaddr, s_axil_wdata, s_axil_araddr, s_axil_rdata;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  int checks = 0, failures = 0;

  pvs_top #(.QDEPTH(QD), .COUNT_CYCLES(WIN)) dut (.*);


  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1; s_axil_wdata = d; s_axil_wvalid = 1; s_axil_bready = 1;
    @(posedge clk); while (!s_axil_awready) @(posedge clk);
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    @(posedge clk); while (!s_axil_bvalid) @(posedge clk);
    check(s_axil_bresp == 2'b00, "write OKAY");
    @(negedge clk); s_axil_bready = 0;
  endtask
  task automatic axi_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1; s_axil_rready = 1;
    @(posedge clk); while (!s_axil_arready) @(posedge clk);
    @(negedge clk); s_axil_arvalid = 0;
    @(posedge clk); while (!s_axil_rvalid) @(posedge clk);
    d = s_axil_rdata;
    @(negedge clk); s_axil_rready = 0;
  endtask

  localparam logic [31:0] IVSI = 32'h0000_0000, OVSI = 32'h0001_0000;
  function automatic logic [31:0] vs_base(int i); return 32'h0002_0000 + 32'(i) * 32'h1_0000; endfunction
  function automatic logic [47:0] mac(int m); return 48'h0200_0000_0000 | 48'(m); endfunction

  // ---------------- expected packets ----------------
  localparam int MAXID = 4096;
  int          e_tx [MAXID];      // -1 none, -2 may or may not arrive (overflow phase)
  sume_meta_t  e_meta [MAXID];
  int          e_len [MAXID], e_m [MAXID], e_vlan [MAXID], e_tag [MAXID];
  port_vec_t   e_src [MAXID];
  int          n_pending = 0, n_maybe_arrived = 0, n_unexpected = 0, n_ovsi_fwd = 0;
  int          m_fwd [4], m_l2drop = 0, m_ingdrop = 0, m_ctrl = 0, m_swap = 0, m_egrdrop = 0,
               m_vlink = 0, m_pktout = 0, m_pktin = 0, m_ovf = 0, m_window = 0;

  // ---------------- TX sinks and DMA model ----------------
  axis_beat_t loop_q[$];
  logic       loop_busy = 0, inj_busy = 0;
  int cur_id [5], cur_k [5];
  logic [4:0] rand_ready = '1, hold_tx = '0;
  assign tx_ready = rand_ready & ~hold_tx;

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < 5; t++) if (tx_valid[t] && tx_ready[t]) begin
      axis_beat_t b;
      b = tx_beat[t];
      if (cur_k[t] == 0) begin
        cur_id[t] = {b.tdata[8*16 +: 8], b.tdata[8*17 +: 8]};
        n_ovsi_fwd++;
      end
      if (t == 4 && cur_k[t] == 0 && b.tuser.dst_port != PORT_CPU) m_vlink++;
      if (t == 4 && (cur_k[t] > 0 ? loop_busy : b.tuser.dst_port != PORT_CPU)) begin
        // virtual port: loop back into the DMA RX stream from that port
        axis_beat_t lb;
        lb = b;
        if (cur_k[t] == 0) begin lb.tuser.src_port = b.tuser.dst_port; lb.tuser.dst_port = 0; end
        loop_q.push_back(lb);
        loop_busy = !b.tlast;
      end else begin
        int id;
        id = cur_id[t];
        if (cur_k[t] == 0) begin
          if (e_tx[id] == -2) n_maybe_arrived++;
          else if (e_tx[id] != t) begin
            n_unexpected++;
            check(0, $sformatf("packet %0d at TX %0d, expected %0d", id, t, e_tx[id]));
          end else begin
            check(b.tuser == e_meta[id], $sformatf("metadata of packet %0d", id));
            n_pending--;
          end
          if (e_tx[id] != -2) e_tx[id] = -1;
        end
        begin
          axis_beat_t g;
          g = mk_beat(id, cur_k[t], e_len[id], mac(e_m[id]), e_tag[id][0], 12'(e_vlan[id]), e_src[id]);
          g.tdata[8*16 +: 8] = 8'(id >> 8); g.tdata[8*17 +: 8] = 8'(id);
          check(b.tdata == g.tdata && b.tkeep == g.tkeep && b.tlast == g.tlast,
                $sformatf("payload of packet %0d", id));
        end
      end
      cur_k[t] = b.tlast ? 0 : cur_k[t] + 1;
    end
  end

  // ---------------- RX drivers ----------------
  int next_id = 1;
  logic gaps = 1;
  task automatic drive(int p, axis_beat_t b);
    @(negedge clk);
    while (gaps && $urandom % 5 == 0) begin rx_valid[p] = 0; @(negedge clk); end
    rx_valid[p] = 1; rx_beat[p] = b;
    @(posedge clk);
    while (!rx_ready[p]) @(posedge clk);
    @(negedge clk); rx_valid[p] = 0;
  endtask

  // Send one packet on RX p; exp_tx / meta are the expected outcome.
  task automatic send(int p, port_vec_t src, int m, int vlan, logic tag_on, int len,
                      int exp_tx, sume_meta_t meta);
    int id;
    id = next_id++;
    e_tx[id] = exp_tx; e_len[id] = len; e_m[id] = m; e_vlan[id] = vlan; e_tag[id] = tag_on;
    e_src[id] = src;
    meta.pkt_len = 16'(len);
    e_meta[id] = meta;
    if (exp_tx >= 0) n_pending++;
    for (int k = 0; k < n_beats(len); k++) begin
      axis_beat_t b;
      b = mk_beat(id, k, len, mac(m), tag_on, 12'(vlan), src);
      b.tdata[8*16 +: 8] = 8'(id >> 8); b.tdata[8*17 +: 8] = 8'(id);
      drive(p, b);
    end
  endtask

  function automatic sume_meta_t md(port_vec_t src, port_vec_t dst, int dev);
    sume_meta_t x;
    x = '0; x.src_port = src; x.dst_port = dst; x.device_id = 8'(dev);
    return x;
  endfunction

  // DMA RX: loopback traffic
  always @(negedge clk) if (rst_n && !inj_busy) begin
    if (rx_valid[4] && rx_ready_q) void'(loop_q.pop_front());
    rx_valid[4] = loop_q.size() > 0;
    if (loop_q.size() > 0) rx_beat[4] = loop_q[0];
  end
  logic rx_ready_q;
  always @(posedge clk) rx_ready_q <= rx_ready[4] && rx_valid[4];

  // Random traffic from physical port p (one tenant); mechanisms chosen at random.
  logic [3:0] deployed = 4'hF;
  task automatic tenant(int p, int npk);
    for (int i = 0; i < npk; i++) begin
      int c, len;
      port_vec_t sp;
      sp = 8'(1 << (2 * p));
      c = $urandom % 8;
      len = 60 + $urandom % 160;
      if (!deployed[p] && c < 6) begin
        send(p, sp, 1, 100 + p, 1, len, 4, md(sp, PORT_CPU, p)); m_swap++;
      end else case (c)
        0, 1: begin send(p, sp, 1, 100 + p, 1, len, p, md(8'h01, 8'(1 << (2 * p)), p)); m_fwd[p]++; end
        2: if (p == 0) send(p, sp, 2, 100, 1, len, 2, md(8'h04, 8'h10, 2));          // vS0 -> vS2 link
           else if (p == 2) begin send(p, sp, 2, 102, 1, len, 2, md(8'h01, 8'h10, 2)); m_fwd[2]++; end
           else begin send(p, sp, 2, 100 + p, 1, len, -1, '0); m_egrdrop++; end   // no Egress entry
        3: begin send(p, sp, 3, 100 + p, 1, len, 4, md(8'h01, PORT_CPU, p)); m_pktout++; end
        4: begin send(p, sp, 4, 100 + p, 1, len, -1, '0); m_egrdrop++; end
        5: begin send(p, sp, 255, 100 + p, 1, len, -1, '0); m_l2drop++; end
        6: begin send(p, sp, 1, 100 + p, 0, len, -1, '0); m_ingdrop++; end           // untagged
        default: if (p == 0) begin send(p, sp, 1, 104, 1, len, 4, md(sp, PORT_CPU, 6)); m_ctrl++; end
                 else begin send(p, sp, 1, 300, 1, len, -1, '0); m_ingdrop++; end  // unknown VLAN
      endcase
    end
  endtask

  task automatic wait_idle();
    int guard;
    guard = 0;
    while ((n_pending != 0 || loop_q.size() != 0) && guard < 20000) begin @(posedge clk); guard++; end
    repeat (50) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    int ing_drop, egr_drop, ovf, sent_ovf;
    rx_valid[3:0] = '0; rx_beat = '0;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_wdata = 0; s_axil_araddr = 0; s_axil_wstrb = 4'hF;
    for (int t = 0; t < 5; t++) begin cur_k[t] = 0; cur_id[t] = 0; end
    for (int i = 0; i < 4; i++) m_fwd[i] = 0;
    for (int i = 0; i < MAXID; i++) e_tx[i] = -1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // ---- configuration through the control port ----
    for (int i = 0; i < 4; i++) begin
      axi_write(IVSI + 'h100 + 8 * i, {2'b10, 2'b00, 12'(100 + i), 8'h00, 8'(1 << (2 * i))});
      axi_write(IVSI + 'h104 + 8 * i, {16'h0, 8'(i), 8'h01});
      // layer-2 table of vS i: MAC 1 -> 0x01, 2 -> 0x04, 3 -> controller, 4 -> 0x10
      axi_write(vs_base(i) + 0,  32'h0000_0001); axi_write(vs_base(i) + 4,  {1'b1, 7'd0, 8'h01, 16'h0200});
      axi_write(vs_base(i) + 8,  32'h0000_0002); axi_write(vs_base(i) + 12, {1'b1, 7'd0, 8'h04, 16'h0200});
      axi_write(vs_base(i) + 16, 32'h0000_0003); axi_write(vs_base(i) + 20, {1'b1, 7'd0, 8'h80, 16'h0200});
      axi_write(vs_base(i) + 24, 32'h0000_0004); axi_write(vs_base(i) + 28, {1'b1, 7'd0, 8'h10, 16'h0200});
      // Egress: vS i port 0x01 on its VLAN -> physical TX i
      axi_write(OVSI + 'h100 + 8 * i, {2'b10, 2'b00, 12'(100 + i), 8'(i), 8'h01});
      axi_write(OVSI + 'h104 + 8 * i, 32'(1 << (2 * i)));
    end
    // virtual link: vS0 port 0x04 -> virtual port 0 -> vS2 port 0x04 -> TX2
    axi_write(OVSI + 'h100 + 8 * 4, {2'b10, 2'b00, 12'd100, 8'd0, 8'h04});
    axi_write(OVSI + 'h104 + 8 * 4, 32'h02);
    axi_write(IVSI + 'h100 + 8 * 4, {2'b10, 2'b00, 12'd100, 8'h00, 8'h02});
    axi_write(IVSI + 'h104 + 8 * 4, {16'h0, 8'd2, 8'h04});
    axi_write(OVSI + 'h100 + 8 * 5, {2'b10, 2'b00, 12'd100, 8'd2, 8'h04});
    axi_write(OVSI + 'h104 + 8 * 5, 32'h10);
    axi_write(OVSI + 'h100 + 8 * 6, {2'b10, 2'b00, 12'd102, 8'd2, 8'h04});
    axi_write(OVSI + 'h104 + 8 * 6, 32'h10);
    // VLAN 104 on port 0 names vS 6, which does not exist
    axi_write(IVSI + 'h100 + 8 * 5, {2'b10, 2'b00, 12'd104, 8'h00, 8'h01});
    axi_write(IVSI + 'h104 + 8 * 5, {16'h0, 8'd6, 8'h01});
    axi_read(vs_base(3) + 20, d);
    check(d == {1'b1, 7'd0, 8'h80, 16'h0200}, "vS private table readback");

    // ---- phase 1: all tenants at once ----
    fork
      tenant(0, TRAFFIC); tenant(1, TRAFFIC); tenant(2, TRAFFIC); tenant(3, TRAFFIC);
      repeat (TRAFFIC * 60) begin @(negedge clk); rand_ready = 5'($urandom) | 5'b10000; end
    join
    rand_ready = '1;
    wait_idle();

    // ---- phase 2: hot swap, vS 1 undeployed while the others run ----
    axi_write(IVSI + 'h000, 32'hD); deployed = 4'hD;
    fork tenant(1, TRAFFIC / 2); tenant(0, TRAFFIC / 2); join
    wait_idle();
    axi_write(IVSI + 'h000, 32'hF); deployed = 4'hF;

    // ---- phase 3: packet-in from the controller into vS 3 on virtual port 0x02 ----
    axi_write(IVSI + 'h004, {15'd0, 1'b1, 8'd3, 8'h02});
    inj_busy = 1;
    for (int i = 0; i < 3; i++) begin
      send(4, PORT_CPU, 1, 103, 1, 100, 3, md(8'h02, 8'h40, 3)); m_pktin++;
    end
    inj_busy = 0;
    wait_idle();
    axi_write(IVSI + 'h004, 32'h0);

    // ---- phase 4: TX0 stalled, tenant 0 floods: its queues fill, IvSI drops ----
    hold_tx[0] = 1;
    gaps = 0;
    sent_ovf = 0;
    for (int i = 0; i < (4 * QD) / 4 + 12; i++) begin
      send(0, 8'h01, 1, 100, 1, 128, -2, '0); sent_ovf++;
    end
    repeat (50) @(posedge clk);
    hold_tx[0] = 0;
    gaps = 1;
    repeat (2000) @(posedge clk);
    wait_idle();

    // ---- counters ----
    axi_read(IVSI + 'h014, d); ovf = int'(d); m_ovf = ovf;
    check(ovf + n_maybe_arrived == sent_ovf,
          $sformatf("overflow drops %0d + delivered %0d == sent %0d", ovf, n_maybe_arrived, sent_ovf));
    axi_read(IVSI + 'h00C, d); ing_drop = int'(d);
    check(ing_drop == m_ingdrop + ovf, $sformatf("IvSI drop count %0d", ing_drop));
    axi_read(OVSI + 'h008, d); egr_drop = int'(d);
    check(egr_drop == m_egrdrop, $sformatf("OvSI drop count %0d/%0d", egr_drop, m_egrdrop));
    axi_read(OVSI + 'h004, d);
    if (CHECK_WINDOW) begin
      // wait for the window to close and compare the stored result
      check(d == 32'(n_ovsi_fwd), $sformatf("running packet count %0d/%0d", d, n_ovsi_fwd));
      while (dut.u_ovsi.cyc != 0) @(posedge clk);
      @(posedge clk);
      axi_read(OVSI + 'h000, d);
      check(d == 32'(n_ovsi_fwd), $sformatf("window packet count %0d/%0d", d, n_ovsi_fwd));
      if (d != 0) m_window++;
    end else begin
      check(d == 32'(n_ovsi_fwd), $sformatf("running packet count %0d/%0d", d, n_ovsi_fwd));
      if (d != 0) m_window++;
    end
    check(n_pending == 0, $sformatf("%0d expected packets never arrived", n_pending));
    check(n_unexpected == 0, "no unexpected packets");

    $display("mechanisms: fwd %0d/%0d/%0d/%0d l2drop %0d ingdrop %0d ctrl %0d swap %0d egrdrop %0d vlink %0d pktout %0d pktin %0d ovf %0d window %0d",
             m_fwd[0], m_fwd[1], m_fwd[2], m_fwd[3], m_l2drop, m_ingdrop, m_ctrl, m_swap,
             m_egrdrop, m_vlink, m_pktout, m_pktin, m_ovf, m_window);
    for (int i = 0; i < 4; i++) check(m_fwd[i] > 0, $sformatf("forwarding to TX %0d happened", i));
    check(m_l2drop > 0, "layer-2 miss happened");
    check(m_ingdrop > 0, "Ingress drop happened");
    check(m_ctrl > 0, "controller path for unknown vS happened");
    check(m_swap > 0, "undeployed-vS steering happened");
    check(m_egrdrop > 0, "Egress drop happened");
    check(m_vlink > 0, "virtual link happened");
    check(m_pktout > 0, "packet-out happened");
    check(m_pktin > 0, "packet-in happened");
    check(m_ovf > 0, "queue overflow drop happened");
    check(m_window > 0, "packet counter counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
