// tb_vs_placeholder -- self-checking test of one vS Array slot.
// The slot (VS_ID = 3, 16-beat queues) gets two MAC entries through its
// control slice. Packets arrive carrying a forged device_id; every packet
// that leaves must carry device_id 3 and the dst_port of its MAC entry, and
// unknown MACs must be dropped. With the output held back, the input queue
// must fill up (s_free reaches 0, s_ready falls) and lose nothing.
module tb_vs_placeholder;
  import pvs_pkg::*;
  import tb_util_pkg::*;
  localparam int Q = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid, s_ready, m_valid, m_ready;
  axis_beat_t s_beat, m_beat;
  logic [$clog2(Q):0] s_free, m_free;
  ctrl_req_t cfg_req;
  logic [31:0] cfg_rdata;
  int checks = 0, failures = 0;

  vs_placeholder #(.VS_ID(8'd3), .QDEPTH(Q)) dut (.*);

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

  task automatic cfg(logic we, int addr, logic [31:0] d);
    @(negedge clk); cfg_req = '{en: 1'b1, we: we, addr: 16'(addr), wdata: d};
    @(negedge clk); cfg_req = '0;
  endtask

  axis_beat_t exp_q[$];
  int min_free = Q;
  always @(posedge clk) if (rst_n) begin
    if (s_free < min_free) min_free = s_free;
    if (m_valid && m_ready) begin
      check(exp_q.size() > 0, "unexpected output beat");
      if (exp_q.size() > 0) begin
        check(m_beat == exp_q[0], "output beat (device_id, dst_port, data)");
        void'(exp_q.pop_front());
      end
    end
  end

  task automatic send(int seed, int len, logic [47:0] dmac, logic hit, port_vec_t port);
    for (int k = 0; k < n_beats(len); k++) begin
      axis_beat_t b;
      b = mk_beat(seed, k, len, dmac, 1'b1, 12'd9, 8'h04);
      if (k == 0) b.tuser.device_id = 8'(seed);       // forged identity
      if (hit) begin
        axis_beat_t e;
        e = b;
        if (k == 0) begin e.tuser.device_id = 8'd3; e.tuser.dst_port = port; end
        exp_q.push_back(e);
      end
      @(negedge clk); s_valid = 1; s_beat = b;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    @(negedge clk); s_valid = 0;
  endtask

  initial begin
    s_valid = 0; s_beat = '0; m_ready = 0; cfg_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg(1, 0, 32'h0000_0011); cfg(1, 4, {1'b1, 7'd0, 8'h02, 16'h0200});
    cfg(1, 8, 32'h0000_0022); cfg(1, 12, {1'b1, 7'd0, 8'h08, 16'h0200});
    cfg(0, 12, 0);
    check(cfg_rdata == {1'b1, 7'd0, 8'h08, 16'h0200}, "private table readback");
    check(s_free == Q, "empty queue reports full room");
    // Output blocked: 33 beats of known traffic must back up without loss.
    // 33 beats: 16 in the output queue, 1 in the vS, 16 in the input queue.
    for (int p = 0; p < 8; p++) send(p + 1, 128, 48'h0200_0000_0011, 1'b1, 8'h02);
    send(9, 20, 48'h0200_0000_0011, 1'b1, 8'h02);
    repeat (2) @(posedge clk);
    check(min_free == 0 && !s_ready, "input queue filled up");
    check(exp_q.size() == 33, "nothing delivered while blocked");
    fork
      for (int p = 0; p < 40; p++) begin
        int sel;
        sel = $urandom % 3;
        send(50 + p, 30 + $urandom % 150,
             sel == 0 ? 48'h0200_0000_0011 : sel == 1 ? 48'h0200_0000_0022 : 48'h0200_0000_0033,
             sel != 2, sel == 0 ? 8'h02 : 8'h08);
      end
      repeat (2500) begin @(negedge clk); m_ready = ($urandom % 3) != 0; end
    join
    m_ready = 1;
    repeat (60) @(posedge clk);
    check(exp_q.size() == 0, "all expected packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
