// tb_workload_loopback -- saturation test of the whole engine with its four
// 10G ports looped in pairs (TX0->RX1, TX1->RX0, TX2->RX3, TX3->RX2), the
// top at its default parameters.
// All traffic is steered into vS 0: the Ingress table maps VLAN 100 on
// every port to vS 0, the layer-2 table sends destination MAC f to port f
// and the Egress table lets vS 0 use the four physical ports, so four
// packet flows circulate for ever (flow f leaves on TX f and comes back on
// the paired RX). The loop model stands in for the wire: it writes the
// receiving port into tuser.src_port on each returning packet, as the RX
// port logic would. The testbench injects one more 256-byte packet per
// flow at a time, from one to ten per flow, and after each step measures
// throughput from the OvSI's running packet counter over a fixed interval
// (packets x 2048 bits / time at 200 MHz). The wire model has no delay, so
// four packets in flight already keep the shared path busy and throughput is
// flat from the first step on. It checks that every flow keeps circulating,
// that every step reaches at least the 34.1 Gbit/s the reference build
// reached on the board and never more than one beat per cycle (51.2 Gbit/s,
// give or take the one packet a counter reading can be off by), and that no
// packet is lost while the vS input queue can hold all packets in flight.
module tb_workload_loopback;
  import pvs_pkg::*;
  import tb_util_pkg::*;
  localparam int LEN = 256, NLEVEL = 10, MEAS = 4000;
  localparam int PAIR [4] = '{1, 0, 3, 2};
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

  pvs_top dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1; s_axil_wdata = d; s_axil_wvalid = 1; s_axil_bready = 1;
    @(posedge clk); while (!s_axil_awready) @(posedge clk);
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    @(posedge clk); while (!s_axil_bvalid) @(posedge clk);
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

  function automatic logic [47:0] mac(int f); return 48'h0200_0000_0010 | 48'(f); endfunction

  // ---------------- loop wires with an injection point ----------------
  // inj[p] is set by the injector at a packet boundary of the wire into
  // RX p; while it is set the injector owns RX p and the TX feeding it waits.
  logic [3:0]  inj, wire_mid;
  logic        inj_valid [4];
  axis_beat_t  inj_beat [4];
  int          cyc = 0, tx_pkts [4];

  always_comb begin
    rx_valid[4] = 1'b0; rx_beat[4] = '0; tx_ready[4] = 1'b1;
    for (int f = 0; f < 4; f++) begin
      int p;
      p = PAIR[f];
      if (inj[p]) begin
        rx_valid[p] = inj_valid[p];
        rx_beat[p]  = inj_beat[p];
        tx_ready[f] = 1'b0;
      end else begin
        rx_valid[p] = tx_valid[f];
        rx_beat[p]  = tx_beat[f];
        if (!wire_mid[p]) rx_beat[p].tuser.src_port = port_vec_t'(1 << (2 * p));
        tx_ready[f] = rx_ready[p];
      end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) for (int f = 0; f < 4; f++) begin
      int p;
      p = PAIR[f];
      if (!inj[p] && tx_valid[f] && tx_ready[f]) begin
        wire_mid[p] <= !tx_beat[f].tlast;
        if (tx_beat[f].tlast) tx_pkts[f]++;
      end
    end
  end

  task automatic inject(int f, int seed);
    int p;
    p = PAIR[f];
    @(negedge clk);
    while (wire_mid[p] || (tx_valid[f] && !rx_ready[p])) @(negedge clk);
    inj[p] = 1'b1;
    for (int k = 0; k < n_beats(LEN); k++) begin
      inj_valid[p] = 1'b1;
      inj_beat[p]  = mk_beat(seed, k, LEN, mac(f), 1'b1, 12'd100, port_vec_t'(1 << (2 * p)));
      @(posedge clk);
      while (!rx_ready[p]) @(posedge clk);
      @(negedge clk);
    end
    inj_valid[p] = 1'b0;
    inj[p] = 1'b0;
  endtask

  initial begin
    logic [31:0] c0, c1, drops;
    int t0, t1, tp0 [4];
    real gbps [NLEVEL], best;
    int  best_lvl;
    inj = '0; wire_mid = '0;
    for (int p = 0; p < 4; p++) begin inj_valid[p] = 0; inj_beat[p] = '0; tx_pkts[p] = 0; end
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_wdata = 0; s_axil_araddr = 0; s_axil_wstrb = 4'hF;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      // Ingress: VLAN 100 on port p -> vS 0, virtual port = physical port.
      axi_write(32'h0000_0100 + 32'(8 * p), {2'b10, 2'b00, 12'd100, 8'h00, 8'(1 << (2 * p))});
      axi_write(32'h0000_0104 + 32'(8 * p), {16'h0, 8'd0, 8'(1 << (2 * p))});
      // Egress: vS 0 may use physical port p.
      axi_write(32'h0001_0100 + 32'(8 * p), {2'b10, 2'b00, 12'd100, 8'd0, 8'(1 << (2 * p))});
      axi_write(32'h0001_0104 + 32'(8 * p), {24'h0, 8'(1 << (2 * p))});
      // Layer-2 table of vS 0: MAC f -> port f.
      axi_write(32'h0002_0000 + 32'(8 * p), mac(p)[31:0]);
      axi_write(32'h0002_0004 + 32'(8 * p), {1'b1, 7'd0, 8'(1 << (2 * p)), mac(p)[47:32]});
    end

    best = 0.0; best_lvl = 0;
    for (int lvl = 1; lvl <= NLEVEL; lvl++) begin
      fork
        inject(0, 4 * lvl); inject(1, 4 * lvl + 1); inject(2, 4 * lvl + 2); inject(3, 4 * lvl + 3);
      join
      repeat (500) @(posedge clk);
      for (int f = 0; f < 4; f++) tp0[f] = tx_pkts[f];
      axi_read(32'h0001_0004, c0); t0 = cyc;
      repeat (MEAS) @(posedge clk);
      axi_read(32'h0001_0004, c1); t1 = cyc;
      gbps[lvl - 1] = real'(c1 - c0) * real'(LEN * 8) / (real'(t1 - t0) * 5.0);
      for (int f = 0; f < 4; f++)
        check(tx_pkts[f] > tp0[f], $sformatf("flow %0d circulating with %0d packets per flow", f, lvl));
      axi_read(32'h0000_0014, drops);
      $display("%0d packet(s) per flow: %0d packets in %0d cycles, %0.1f Gbit/s, %0d dropped for lack of queue room",
               lvl, c1 - c0, t1 - t0, gbps[lvl - 1], drops);
      // vS 0's input queue holds 64 beats, eight 256-byte packets: up to
      // that many packets in flight nothing may be lost.
      if (4 * lvl <= 8) check(drops == 0, $sformatf("no loss with %0d packets in flight", 4 * lvl));
      if (gbps[lvl - 1] > best) begin best = gbps[lvl - 1]; best_lvl = lvl; end
      check(gbps[lvl - 1] >= 34.1, "at or above the 34.1 Gbit/s of the reference build");
      check(int'(c1 - c0) <= (t1 - t0) / n_beats(LEN) + 1, "never more than one beat per cycle");
    end
    $display("saturation: %0.1f Gbit/s at %0d packet(s) per flow", best, best_lvl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
