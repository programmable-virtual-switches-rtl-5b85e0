// tb_vs_l2_switch -- self-checking test of the example layer-2 vS.
// Four MAC entries are written through the control slice and read back.
// Phase 1 sends back-to-back known-MAC packets with the output always ready
// and checks one beat per cycle and a one-cycle pipeline latency. Phase 2
// sends random packets (known and unknown MACs) with random stalls: known
// ones must come out unchanged except dst_port, unknown ones must vanish.
module tb_vs_l2_switch;
  import pvs_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid, s_ready, m_valid, m_ready;
  axis_beat_t s_beat, m_beat;
  ctrl_req_t cfg_req;
  logic [31:0] cfg_rdata;
  int checks = 0, failures = 0;

  vs_l2_switch #(.N_ENTRIES(8)) dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [47:0] macs [4] = '{48'h02_00_00_00_00_0A, 48'h02_00_00_00_00_0B,
                            48'h02_00_00_00_00_0C, 48'h02_00_00_00_00_0D};
  port_vec_t ports [4] = '{8'h01, 8'h04, 8'h02, 8'h10};

  task automatic cfg(logic we, int addr, logic [31:0] d);
    @(negedge clk); cfg_req = '{en: 1'b1, we: we, addr: 16'(addr), wdata: d};
    @(negedge clk); cfg_req = '0;
  endtask

  axis_beat_t exp_q[$];
  int n_out = 0, first_in_cyc = -1, first_out_cyc = -1, last_out_cyc = -1, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    if (first_out_cyc < 0) first_out_cyc = cyc;
    last_out_cyc = cyc;
    check(exp_q.size() > 0, "unexpected output beat");
    if (exp_q.size() > 0) begin
      check(m_beat == exp_q[0], "output beat");
      void'(exp_q.pop_front());
    end
    n_out++;
  end

  task automatic send(int seed, int len, logic [47:0] dmac, int hit_idx, logic gaps);
    for (int k = 0; k < n_beats(len); k++) begin
      axis_beat_t b;
      b = mk_beat(seed, k, len, dmac, 1'b1, 12'd7, 8'h01);
      if (hit_idx >= 0) begin
        axis_beat_t e;
        e = b;
        if (k == 0) e.tuser.dst_port = ports[hit_idx];
        exp_q.push_back(e);
      end
      @(negedge clk);
      while (gaps && $urandom % 4 == 0) begin s_valid = 0; @(negedge clk); end
      s_valid = 1; s_beat = b;
      if (first_in_cyc < 0) first_in_cyc = cyc;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    @(negedge clk); s_valid = 0;
  endtask

  initial begin
    s_valid = 0; s_beat = '0; m_ready = 1; cfg_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 4; e++) begin
      cfg(1, 8 * e, macs[e][31:0]);
      cfg(1, 8 * e + 4, {1'b1, 7'd0, ports[e], macs[e][47:32]});
    end
    for (int e = 0; e < 4; e++) begin
      cfg(0, 8 * e + 4, 0);
      check(cfg_rdata == {1'b1, 7'd0, ports[e], macs[e][47:32]}, "table readback");
    end
    // Phase 1: 8 back-to-back 64-byte packets, 16 beats, no stalls.
    fork
      for (int p = 0; p < 8; p++) begin
        axis_beat_t b;
        for (int k = 0; k < 2; k++) begin
          b = mk_beat(p, k, 64, macs[p % 4], 1'b1, 12'd7, 8'h01);
          exp_q.push_back(k == 0 ? '{tdata: b.tdata, tkeep: b.tkeep,
                                      tuser: '{dst_port: ports[p % 4], src_port: 8'h01,
                                               pkt_len: 16'd64, default: '0},
                                      tlast: b.tlast} : b);
          @(negedge clk); s_valid = 1; s_beat = b;
          if (first_in_cyc < 0) first_in_cyc = cyc;
        end
      end
    join
    @(negedge clk); s_valid = 0;
    repeat (4) @(posedge clk);
    check(n_out == 16, "phase 1 beat count");
    check(first_out_cyc - first_in_cyc == 1, "one register stage");
    check(last_out_cyc - first_out_cyc == 15, "one beat per cycle");
    // Phase 2: random traffic with stalls.
    fork
      begin
        for (int p = 0; p < 60; p++) begin
          int sel; logic [47:0] mac;
          sel = $urandom % 6;
          mac = sel < 4 ? macs[sel] : 48'h02_00_00_00_00_F0 + 48'(sel);
          send(100 + p, 20 + $urandom % 200, mac, sel < 4 ? sel : -1, 1'b1);
        end
      end
      begin
        repeat (3000) begin @(negedge clk); m_ready = ($urandom % 3) != 0; end
        m_ready = 1;
      end
    join
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all expected beats seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
