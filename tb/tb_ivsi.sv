// tb_ivsi -- self-checking test of the Input vS Interface.
// Five RX sources send tagged and untagged packets. The Ingress table is
// programmed so that every outcome occurs: forward to each vS with the
// virtual source port rewritten, two vS sharing a VLAN on different ports,
// drop action, table miss, untagged frame, a vS id beyond the array and an
// undeployed vS (both to the controller path), a full vS queue (drop for
// overflow) and a packet-in from the controller port. Each sink checks
// every beat against the expected packet from the same source, and the
// block's counters are read back through the control slice.
module tb_ivsi;
  import pvs_pkg::*;
  import tb_util_pkg::*;
  localparam int NRX = 5, NVS = 4, Q = 16, QW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NRX-1:0] rx_valid, rx_ready;
  axis_beat_t [NRX-1:0] rx_beat;
  logic [NVS-1:0] vs_valid, vs_ready;
  axis_beat_t vs_beat, cpu_beat;
  logic [NVS-1:0][QW-1:0] vs_free;
  logic cpu_valid, cpu_ready;
  logic [QW-1:0] cpu_free;
  ctrl_req_t cfg_req;
  logic [31:0] cfg_rdata;
  int checks = 0, failures = 0;

  ivsi #(.N_RX(NRX), .N_VS(NVS), .N_ING(8), .IN_DEPTH(Q), .QW(QW)) dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sinks: the vS input queues and the controller queue ----
  logic [4:0] k_valid, k_ready;
  axis_beat_t [4:0] k_beat;
  logic [4:0] drain;
  for (genvar d = 0; d < 5; d++) begin : g_sink
    logic in_v, in_r;
    axis_beat_t in_b;
    logic [QW-1:0] fr;
    assign in_v = d < NVS ? vs_valid[d] : cpu_valid;
    assign in_b = d < NVS ? vs_beat : cpu_beat;
    if (d < NVS) begin : g_v
      assign vs_ready[d] = in_r; assign vs_free[d] = fr;
    end else begin : g_c
      assign cpu_ready = in_r; assign cpu_free = fr;
    end
    axis_pkt_fifo #(.DEPTH(Q)) u_q (.clk, .rst_n, .s_valid(in_v), .s_beat(in_b), .s_ready(in_r),
      .m_valid(k_valid[d]), .m_beat(k_beat[d]), .m_ready(k_ready[d]), .free_words(fr));
    assign k_ready[d] = drain[d];
  end

  // expected beats per (destination, source)
  axis_beat_t exp_q [5][NRX][$];
  int cur_src [5];
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 5; d++) if (k_valid[d] && k_ready[d]) begin
      if (cur_src[d] < 0) cur_src[d] = k_beat[d].tdata[8*16 +: 8];
      if (cur_src[d] >= NRX || exp_q[d][cur_src[d]].size() == 0) begin
        check(0, $sformatf("unexpected packet at sink %0d", d));
      end else begin
        check(k_beat[d] == exp_q[d][cur_src[d]][0], $sformatf("beat at sink %0d", d));
        void'(exp_q[d][cur_src[d]].pop_front());
      end
      if (k_beat[d].tlast) cur_src[d] = -1;
    end
  end

  // ---------------- control ----------------
  task automatic cfg(logic we, int addr, logic [31:0] d);
    @(negedge clk); cfg_req = '{en: 1'b1, we: we, addr: 16'(addr), wdata: d};
    @(negedge clk); cfg_req = '0;
  endtask
  task automatic ing(int e, logic drop, int vlan, int sp, int dev, int vp);
    cfg(1, 'h100 + 8 * e, {1'b1, drop, 2'b00, 12'(vlan), 8'h00, 8'(sp)});
    cfg(1, 'h104 + 8 * e, {16'h0, 8'(dev), 8'(vp)});
  endtask

  // ---------------- sources ----------------
  localparam port_vec_t SRC [NRX] = '{8'h01, 8'h04, 8'h10, 8'h40, 8'h02};
  logic [NVS-1:0] deployed_m = 4'hF;
  int n_fwd = 0, n_drop = 0, n_cpu = 0, n_ovf = 0;
  int seqn [NRX];

  // Expected outcome of a packet, given the table programmed below.
  // kind: 0 table hit, 1 untagged, 2 unknown VLAN
  task automatic send(int p, int vlan, logic tag_on, int len, logic gaps,
                      input int dest, input dev_id_t dev, input port_vec_t vport);
    axis_beat_t b;
    for (int k = 0; k < n_beats(len); k++) begin
      b = mk_beat(seqn[p] + 7 * p, k, len, 48'h0200_0000_0001, tag_on, 12'(vlan), SRC[p]);
      if (k == 0) begin
        b.tdata[8*16 +: 8] = 8'(p);
        b.tdata[8*17 +: 8] = 8'(seqn[p]);
      end
      if (dest >= 0) begin
        axis_beat_t e;
        e = b;
        if (k == 0) begin
          e.tuser.device_id = dev;
          if (dest < NVS) e.tuser.src_port = vport;
        end
        exp_q[dest][p].push_back(e);
      end
      @(negedge clk);
      while (gaps && $urandom % 4 == 0) begin rx_valid[p] = 0; @(negedge clk); end
      rx_valid[p] = 1; rx_beat[p] = b;
      @(posedge clk);
      while (!rx_ready[p]) @(posedge clk);
    end
    @(negedge clk); rx_valid[p] = 0;
    seqn[p]++;
  endtask

  // Random traffic from port p using the rules programmed below.
  task automatic random_traffic(int p, int npk);
    for (int i = 0; i < npk; i++) begin
      int c, len;
      c = $urandom % 4;
      len = 40 + $urandom % 100;
      if (c == 1) begin send(p, 10, 1'b0, len, 1'b1, -1, 0, 0); n_drop++; end       // untagged
      else if (c == 2) begin send(p, 77, 1'b1, len, 1'b1, -1, 0, 0); n_drop++; end  // miss
      else begin
        case (p)
          0: begin send(p, 10, 1'b1, len, 1'b1, 0, 8'd0, 8'h01); n_fwd++; end
          1: begin send(p, 10, 1'b1, len, 1'b1, 1, 8'd1, 8'h02); n_fwd++; end
          2: begin send(p, 20, 1'b1, len, 1'b1, 2, 8'd2, 8'h01); n_fwd++; end
          3: if (deployed_m[3]) begin send(p, 30, 1'b1, len, 1'b1, 3, 8'd3, 8'h04); n_fwd++; end
             else begin send(p, 30, 1'b1, len, 1'b1, 4, 8'd3, 8'h00); n_cpu++; end
          default: begin send(p, 20, 1'b1, len, 1'b1, 2, 8'd2, 8'h02); n_fwd++; end
        endcase
      end
    end
  endtask

  task automatic wait_empty();
    int busy;
    do begin
      repeat (20) @(posedge clk);
      busy = 0;
      for (int d = 0; d < 5; d++) for (int s = 0; s < NRX; s++) busy += exp_q[d][s].size();
    end while (busy != 0);
  endtask

  initial begin
    rx_valid = 0; rx_beat = '0; cfg_req = '0; drain = '1;
    for (int d = 0; d < 5; d++) cur_src[d] = -1;
    for (int p = 0; p < NRX; p++) seqn[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ing(0, 0, 10, 8'h01, 0, 8'h01);
    ing(1, 0, 10, 8'h04, 1, 8'h02);   // same VLAN, other port, other vS
    ing(2, 0, 20, 8'h10, 2, 8'h01);
    ing(3, 0, 30, 8'h40, 3, 8'h04);
    ing(4, 1, 40, 8'h01, 0, 8'h01);   // drop action
    ing(5, 0, 50, 8'h04, 5, 8'h01);   // vS 5 does not exist
    ing(6, 0, 20, 8'h02, 2, 8'h02);   // virtual port 0 -> vS 2
    cfg(0, 'h130, 0);
    check(cfg_rdata == {1'b1, 1'b0, 2'b00, 12'd20, 8'h00, 8'h02}, "ingress entry readback");

    // Phase 1: all ports at once, all vS deployed.
    fork
      random_traffic(0, 12); random_traffic(1, 12); random_traffic(2, 12);
      random_traffic(3, 12); random_traffic(4, 12);
    join
    // directed: drop action, nonexistent vS
    send(0, 40, 1'b1, 64, 1'b0, -1, 0, 0); n_drop++;
    send(1, 50, 1'b1, 64, 1'b0, 4, 8'd5, 0); n_cpu++;
    wait_empty();

    // Phase 2: vS 3 undeployed (hot swap in progress) -> controller path.
    cfg(1, 'h000, 32'h7); deployed_m = 4'h7;
    cfg(0, 'h000, 0);
    check(cfg_rdata == 32'h7, "deployed mask readback");
    fork random_traffic(3, 10); random_traffic(2, 6); join
    wait_empty();
    cfg(1, 'h000, 32'hF); deployed_m = 4'hF;

    // Phase 3: vS 0 queue full -> later packets dropped, others unaffected.
    drain[0] = 0;
    for (int i = 0; i < 4; i++) begin send(0, 10, 1'b1, 128, 1'b0, 0, 8'd0, 8'h01); n_fwd++; end
    for (int i = 0; i < 3; i++) begin send(0, 10, 1'b1, 128, 1'b0, -1, 0, 0); n_drop++; n_ovf++; end
    send(2, 20, 1'b1, 128, 1'b0, 2, 8'd2, 8'h01); n_fwd++;
    repeat (20) @(posedge clk);
    check(exp_q[2][2].size() == 0, "other vS not blocked by a full queue");
    drain[0] = 1;
    wait_empty();

    // Phase 4: packet-in from the controller port to vS 1, virtual port 0x08.
    cfg(1, 'h004, {15'd0, 1'b1, 8'd1, 8'h08});
    begin
      axis_beat_t b; int len;
      len = 96;
      for (int k = 0; k < n_beats(len); k++) begin
        axis_beat_t e;
        b = mk_beat(3, k, len, 48'h0200_0000_0009, 1'b0, 0, PORT_CPU);
        if (k == 0) b.tdata[8*16 +: 8] = 8'd4;
        e = b;
        if (k == 0) begin e.tuser.device_id = 8'd1; e.tuser.src_port = 8'h08; end
        exp_q[1][4].push_back(e);
        @(negedge clk); rx_valid[4] = 1; rx_beat[4] = b;
        @(posedge clk); while (!rx_ready[4]) @(posedge clk);
      end
      @(negedge clk); rx_valid[4] = 0; n_fwd++;
    end
    wait_empty();
    cfg(1, 'h004, 0);

    repeat (10) @(posedge clk);
    cfg(0, 'h008, 0); check(cfg_rdata == 32'(n_fwd), $sformatf("forward count %0d/%0d", cfg_rdata, n_fwd));
    cfg(0, 'h00C, 0); check(cfg_rdata == 32'(n_drop), $sformatf("drop count %0d/%0d", cfg_rdata, n_drop));
    cfg(0, 'h010, 0); check(cfg_rdata == 32'(n_cpu), $sformatf("cpu count %0d/%0d", cfg_rdata, n_cpu));
    cfg(0, 'h014, 0); check(cfg_rdata == 32'(n_ovf), $sformatf("overflow count %0d/%0d", cfg_rdata, n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
