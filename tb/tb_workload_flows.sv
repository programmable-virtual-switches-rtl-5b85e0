// tb_workload_flows -- the two simulated flows used to rate the engine:
// a datagram flow of 512 packets of 256 bytes (throughput) and an ICMP-like
// exchange of two 64-byte packets (latency), both through one tenant's vS
// from RX port 0 to TX port 0 with the top at its default parameters.
// Throughput is the number of cycles from the first beat accepted to the
// last beat delivered; the bus moves 32 bytes per cycle, so the 4096 beats
// of the flow must take no more than 4096 cycles plus the pipeline depth.
// Latency is counted from a packet's first beat accepted at RX to its first
// beat leaving TX, and for the pair as a whole from the first beat in to the
// last beat out, as the document measures it. Every packet is also checked for order and metadata.
module tb_workload_flows;
  import pvs_pkg::*;
  import tb_util_pkg::*;
  localparam int NPKT = 512, LEN = 256, MAXLAT = 10;
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
    repeat (30000) @(posedge clk);
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

  int cyc = 0, first_in = -1, last_out = -1, in_start [$], lat_max = 0, n_out = 0, k_out = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid[0] && rx_ready[0] && rx_beat[0].tuser.pkt_len != 0) begin
      if (first_in < 0) first_in = cyc;
      in_start.push_back(cyc);
    end
    if (tx_valid[0] && tx_ready[0]) begin
      if (k_out == 0) begin
        int lat;
        lat = cyc - in_start.pop_front();
        if (lat > lat_max) lat_max = lat;
        check(tx_beat[0].tuser.dst_port == 8'h01 && tx_beat[0].tuser.device_id == 8'd0,
              "metadata at TX 0");
        check(tx_beat[0].tdata[8*16 +: 16] == 16'(n_out), "packet order");
      end
      k_out = tx_beat[0].tlast ? 0 : k_out + 1;
      if (tx_beat[0].tlast) n_out++;
      last_out = cyc;
    end
  end

  task automatic flow(int npk, int len, int base);
    for (int p = 0; p < npk; p++)
      for (int k = 0; k < n_beats(len); k++) begin
        axis_beat_t b;
        b = mk_beat(p, k, len, 48'h0200_0000_0001, 1'b1, 12'd100, 8'h01);
        b.tdata[8*16 +: 16] = 16'(base + p);
        @(negedge clk); rx_valid[0] = 1; rx_beat[0] = b;
        @(posedge clk); while (!rx_ready[0]) @(posedge clk);
      end
    @(negedge clk); rx_valid[0] = 0;
  endtask

  initial begin
    int cycles;
    real gbps;
    rx_valid = '0; rx_beat = '0; tx_ready = '1;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_wdata = 0; s_axil_araddr = 0; s_axil_wstrb = 4'hF;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    axi_write(32'h0000_0100, {2'b10, 2'b00, 12'd100, 8'h00, 8'h01});
    axi_write(32'h0000_0104, {16'h0, 8'd0, 8'h01});
    axi_write(32'h0002_0000, 32'h0000_0001);
    axi_write(32'h0002_0004, {1'b1, 7'd0, 8'h01, 16'h0200});
    axi_write(32'h0001_0100, {2'b10, 2'b00, 12'd100, 8'd0, 8'h01});
    axi_write(32'h0001_0104, 32'h01);

    // Latency: two 64-byte packets.
    flow(2, 64, 0);
    repeat (30) @(posedge clk);
    check(n_out == 2, "both ICMP-sized packets delivered");
    cycles = last_out - first_in + 1;
    $display("latency of a 64-byte packet: %0d cycles; both packets: %0d cycles", lat_max, cycles);
    check(cycles <= 4 + MAXLAT, "two 64-byte packets through within the pipeline depth");
    check(lat_max <= MAXLAT, $sformatf("latency %0d cycles within %0d", lat_max, MAXLAT));

    // Throughput: 512 packets of 256 bytes, back to back.
    first_in = -1;
    flow(NPKT, LEN, 2);
    while (n_out < NPKT + 2 && cyc < 20000) @(posedge clk);
    check(n_out == NPKT + 2, "whole datagram flow delivered");
    cycles = last_out - first_in + 1;
    gbps = real'(NPKT * LEN * 8) / (real'(cycles) * 5.0);
    $display("datagram flow: %0d cycles, %0.1f Gbit/s at 200 MHz", cycles, gbps);
    check(cycles <= NPKT * LEN / 32 + MAXLAT, "one beat per cycle through the engine");
    check(gbps >= 37.0, "at least the 37 Gbit/s reported for the reference build at 200 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
