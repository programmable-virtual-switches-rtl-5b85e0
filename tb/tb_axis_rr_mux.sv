// tb_axis_rr_mux -- self-checking test of the round-robin packet multiplexer.
// Three sources send numbered packets. Phase A keeps every source busy and
// checks that packets are granted strictly in rotation 0,1,2,0,...; phase B
// adds random gaps and output stalls; phase C keeps source 0 blocked with
// skip (as a user does when that packet's destination is full) and checks
// that the other two sources alternate without waiting for it, then that
// source 0's packets follow once it is released. Throughout, the checker
// requires that packets are never interleaved, arrive in order per source
// and all arrive.
module tb_axis_rr_mux;
  import pvs_pkg::*;
  localparam int N = 3, NPKT = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] s_valid, s_ready;
  axis_beat_t [N-1:0] s_beat;
  logic m_valid, m_ready, skip, m_go;
  axis_beat_t m_beat;
  logic [1:0] grant_idx;
  logic grant_vld;
  int checks = 0, failures = 0;

  axis_rr_mux #(.N(N)) dut (.*, .m_ready(m_go));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int len [3][N][NPKT];
  int phase = 0;
  logic gaps = 0, block0 = 0;
  int   n_skip = 0;

  // Sources
  for (genvar s = 0; s < N; s++) begin : g_src
    initial begin
      s_valid[s] = 0; s_beat[s] = '0;
      wait (rst_n);
      for (int ph = 0; ph < 3; ph++) begin
        wait (phase == ph);
        for (int p = 0; p < NPKT; p++)
          for (int b = 0; b < len[ph][s][p]; b++) begin
            @(negedge clk);
            while (gaps && ($urandom % 3 == 0)) begin s_valid[s] = 0; @(negedge clk); end
            s_valid[s] = 1;
            s_beat[s] = '0;
            s_beat[s].tdata[7:0]   = 8'(s);
            s_beat[s].tdata[15:8]  = 8'(ph * NPKT + p);
            s_beat[s].tdata[23:16] = 8'(b);
            s_beat[s].tlast = (b == len[ph][s][p] - 1);
            @(posedge clk);
            while (!s_ready[s]) @(posedge clk);
          end
        @(negedge clk); s_valid[s] = 0;
      end
    end
  end

  // Monitor
  int cur_src = -1, cur_beat = 0, next_pkt [N], got = 0, last_src = N - 1, rot_bad = 0;
  assign skip = block0 && cur_src < 0 && grant_vld && grant_idx == 2'd0;
  assign m_go = m_ready && !skip;
  always @(posedge clk) if (rst_n && skip) n_skip++;
  always @(posedge clk) if (rst_n && m_valid && m_go) begin
    int s, p, b;
    s = m_beat.tdata[7:0]; p = m_beat.tdata[15:8]; b = m_beat.tdata[23:16];
    if (cur_src < 0) begin
      check(p == next_pkt[s], "packet order per source");
      if (phase == 0) begin
        check(s == (last_src + 1) % N, "strict rotation while all sources busy");
      end
      if (phase == 2 && block0) begin
        check(s != 0, "blocked input passed over");
        if (last_src != 0) check(s != last_src, "free inputs alternate past the blocked one");
      end
      last_src = s;
      cur_src = s; cur_beat = 0;
    end
    check(s == cur_src, "no interleaving");
    check(b == cur_beat, "beat order");
    check(grant_idx == 2'(s) && grant_vld, "grant index");
    cur_beat++;
    if (m_beat.tlast) begin
      check(cur_beat == len[p / NPKT][s][p % NPKT], "packet length");
      next_pkt[s]++; cur_src = -1; got++;
    end
  end

  initial begin
    m_ready = 1;
    for (int ph = 0; ph < 3; ph++)
      for (int s = 0; s < N; s++)
        for (int p = 0; p < NPKT; p++) len[ph][s][p] = 1 + $urandom % 4;
    for (int s = 0; s < N; s++) next_pkt[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == N * NPKT);
    phase = 1; gaps = 1;
    while (got < 2 * N * NPKT) begin
      @(negedge clk); m_ready = ($urandom % 4) != 0;
    end
    check(got == 2 * N * NPKT, "all packets delivered");
    @(negedge clk); m_ready = 1; gaps = 0; block0 = 1; phase = 2;
    wait (got == 2 * N * NPKT + 2 * NPKT);
    check(next_pkt[0] == 2 * NPKT, "no packet of the blocked input went out");
    check(n_skip > 0, "the blocked input was offered and passed over");
    @(negedge clk); block0 = 0;
    wait (got == 3 * N * NPKT);
    check(next_pkt[0] == 3 * NPKT, "blocked input drained after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
