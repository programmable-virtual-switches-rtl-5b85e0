// tb_ovsi -- self-checking test of the Output vS Interface.
// Four vS outputs and the controller path send packets whose (dst_port,
// device_id, VLAN) hit Egress entries for every TX port, a multicast entry,
// a drop entry, no entry at all (wrong VLAN: a vS trying to leave its
// network), and the reserved controller port (packet-out). TX sinks stall
// at random. Every TX beat is compared with the expected packet from the
// same input. With a 50-cycle counting window, the packet counter result of
// each window is read back and compared with a count of forwarded packets
// kept by the testbench; the drop counter is checked at the end.
// Finally TX 0 is held busy while vS 0 sends to it and vS 3 to TX 3: vS 3's
// packets must get through while TX 0 is blocked, and TX 0's once released.
module tb_ovsi;
  import pvs_pkg::*;
  import tb_util_pkg::*;
  localparam int NIN = 5, Q = 16, WIN = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NIN-1:0] in_valid, in_ready;
  axis_beat_t [NIN-1:0] in_beat;
  logic [4:0] tx_valid, tx_ready;
  axis_beat_t [4:0] tx_beat;
  ctrl_req_t cfg_req;
  logic [31:0] cfg_rdata;
  int checks = 0, failures = 0;

  ovsi #(.N_IN(NIN), .N_EGR(8), .TXQ_DEPTH(Q), .COUNT_CYCLES(WIN)) dut (.*);

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

  // ---------------- TX sinks ----------------
  axis_beat_t exp_q [5][NIN][$];
  int cur_src [5];
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < 5; t++) if (tx_valid[t] && tx_ready[t]) begin
      if (cur_src[t] < 0) cur_src[t] = tx_beat[t].tdata[8*16 +: 8];
      if (cur_src[t] >= NIN || exp_q[t][cur_src[t]].size() == 0) begin
        check(0, $sformatf("unexpected packet at TX %0d from %0d at %0t", t, cur_src[t], $time));
      end else begin
        check(tx_beat[t] == exp_q[t][cur_src[t]][0], $sformatf("beat at TX %0d", t));
        void'(exp_q[t][cur_src[t]].pop_front());
      end
      if (tx_beat[t].tlast) cur_src[t] = -1;
    end
  end

  // ---------------- reference packet counter ----------------
  int n = 0, fwd_win [64], n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NIN; i++)
      if (in_valid[i] && in_ready[i] && in_beat[i].tlast && in_beat[i].tdata[8*18 +: 8] == 8'd1)
        fwd_win[n / WIN]++;
    n++;
  end

  task automatic cfg(logic we, int addr, logic [31:0] d);
    @(negedge clk); cfg_req = '{en: 1'b1, we: we, addr: 16'(addr), wdata: d};
    @(negedge clk); cfg_req = '0;
  endtask
  task automatic egr(int e, logic drop, int vlan, int dev, int dp, int outp);
    cfg(1, 'h100 + 8 * e, {1'b1, drop, 2'b00, 12'(vlan), 8'(dev), 8'(dp)});
    cfg(1, 'h104 + 8 * e, {24'h0, 8'(outp)});
  endtask

  // ---------------- sources ----------------
  int seqn [NIN];
  function automatic logic [4:0] tx_of(port_vec_t p);
    return {|{p[7], p[5], p[3], p[1]}, p[6], p[4], p[2], p[0]};
  endfunction

  // dest_port: expected dst_port at TX; 0 = dropped
  task automatic send(int i, int vlan, port_vec_t dp, int len, port_vec_t dest_port);
    axis_beat_t b;
    for (int k = 0; k < n_beats(len); k++) begin
      b = mk_beat(seqn[i] * 5 + i, k, len, 48'h0200_0000_0001, 1'b1, 12'(vlan), 8'h01);
      b.tdata[8*16 +: 8] = 8'(i);
      b.tdata[8*18 +: 8] = dest_port != 0 ? 8'd1 : 8'd0;
      if (k == 0) begin b.tuser.dst_port = dp; b.tuser.device_id = 8'(i); end
      for (int t = 0; t < 5; t++) if (tx_of(dest_port)[t]) begin
        axis_beat_t e;
        e = b;
        if (k == 0) e.tuser.dst_port = dest_port;
        exp_q[t][i].push_back(e);
      end
      @(negedge clk);
      while ($urandom % 4 == 0) begin in_valid[i] = 0; @(negedge clk); end
      in_valid[i] = 1; in_beat[i] = b;
      @(posedge clk);
      while (!in_ready[i]) @(posedge clk);
    end
    @(negedge clk); in_valid[i] = 0;
    if (dest_port == 0) n_drop++;
    seqn[i]++;
  endtask

  task automatic traffic(int i, int npk);
    for (int p = 0; p < npk; p++) begin
      int c, len;
      c = $urandom % 5;
      len = 40 + $urandom % 120;
      if (i == 4) send(i, 0, 8'h00, len, PORT_CPU);                  // controller path
      else if (c == 0) send(i, 99, 8'h01, len, 8'h00);                // wrong VLAN: dropped
      else if (c == 1) send(i, 0, PORT_CPU, len, PORT_CPU);           // packet-out
      else case (i)
        0: if (c == 2) send(i, 10, 8'h08, len, 8'h02);                // to virtual TX
           else send(i, 10, 8'h01, len, 8'h01);
        1: if (c == 2) send(i, 10, 8'h10, len, 8'h05);                // multicast TX0+TX1
           else send(i, 10, 8'h02, len, 8'h04);
        2: if (c == 2) send(i, 20, 8'h02, len, 8'h00);                // drop action
           else send(i, 20, 8'h01, len, 8'h10);
        default: send(i, 30, 8'h04, len, 8'h40);
      endcase
    end
  endtask

  int rd_done = 0;
  logic vs0_done = 0;
  initial begin
    in_valid = 0; in_beat = '0; cfg_req = '0; tx_ready = '1;
    for (int t = 0; t < 5; t++) cur_src[t] = -1;
    for (int i = 0; i < NIN; i++) seqn[i] = 0;
    for (int w = 0; w < 64; w++) fwd_win[w] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    egr(0, 0, 10, 0, 8'h01, 8'h01);
    egr(1, 0, 10, 1, 8'h02, 8'h04);
    egr(2, 0, 20, 2, 8'h01, 8'h10);
    egr(3, 0, 30, 3, 8'h04, 8'h40);
    egr(4, 0, 10, 0, 8'h08, 8'h02);
    egr(5, 0, 10, 1, 8'h10, 8'h05);
    egr(6, 1, 20, 2, 8'h02, 8'h00);
    cfg(0, 'h128, 0);
    check(cfg_rdata == {1'b1, 1'b0, 2'b00, 12'd10, 8'd1, 8'h10}, "egress entry readback");
    fork
      traffic(0, 25); traffic(1, 25); traffic(2, 25); traffic(3, 25); traffic(4, 10);
      repeat (6000) begin @(negedge clk); tx_ready = 5'($urandom); end
      // counter windows: read each result in the middle of the next window
      for (int w = 1; w < 40; w++) begin
        while (n < WIN * (w + 1) + 20) @(posedge clk);
        cfg(0, 'h000, 0);
        check(cfg_rdata == 32'(fwd_win[w]), $sformatf("window %0d count %0d/%0d", w, cfg_rdata, fwd_win[w]));
        if (fwd_win[w] > 0) rd_done++;
      end
    join
    tx_ready = '1;
    repeat (200) @(posedge clk);
    for (int t = 0; t < 5; t++) for (int i = 0; i < NIN; i++)
      check(exp_q[t][i].size() == 0, $sformatf("all packets to TX %0d from input %0d", t, i));
    check(rd_done > 3, "counter saw traffic in several windows");
    cfg(0, 'h008, 0); check(cfg_rdata == 32'(n_drop), $sformatf("drop count %0d/%0d", cfg_rdata, n_drop));
    // A TX port that stays busy holds up only its own packets: vS 0 fills
    // TX 0, which is not drained, while vS 3 keeps sending to TX 3.
    tx_ready = 5'b11110;
    fork
      begin
        for (int p = 0; p < 8; p++) send(0, 10, 8'h01, 100, 8'h01);
        vs0_done = 1;
      end
    join_none
    for (int p = 0; p < 8; p++) send(3, 30, 8'h04, 100, 8'h40);
    repeat (50) @(posedge clk);
    check(exp_q[3][3].size() == 0, "vS 3 not held up by a busy TX 0");
    check(exp_q[0][0].size() > 0, "TX 0 held its packets back");
    @(negedge clk); tx_ready = '1;
    wait (vs0_done);
    repeat (100) @(posedge clk);
    check(exp_q[0][0].size() == 0, "TX 0 packets delivered once drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
