// tb_axis_pkt_fifo -- self-checking test of the packet queue.
// Random beats are pushed and popped with random stalls on both sides; every
// beat read is compared with a reference queue, free_words is compared with
// the reference occupancy, and the queue must refuse a write when full.
module tb_axis_pkt_fifo;
  import pvs_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid, s_ready, m_valid, m_ready;
  axis_beat_t s_beat, m_beat;
  logic [$clog2(DEPTH):0] free_words;
  int checks = 0, failures = 0;
  axis_beat_t model[$];

  axis_pkt_fifo #(.DEPTH(DEPTH)) dut (.*);

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

  int n_full = 0;
  initial begin
    s_valid = 0; m_ready = 0; s_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // phase 1 (first 400 cycles): fill more than drain
      s_valid = ($urandom % 4) != 0;
      m_ready = cyc < 400 ? (($urandom % 4) == 0) : (($urandom % 3) != 0);
      s_beat  = '0;
      s_beat.tdata = {8{$urandom()}};
      s_beat.tkeep = $urandom();
      s_beat.tuser.pkt_len = 16'($urandom());
      s_beat.tlast = $urandom() % 2;
      check(free_words == (DEPTH - model.size()), "free_words");
      check(s_ready == (model.size() < DEPTH), "s_ready vs occupancy");
      check(m_valid == (model.size() > 0), "m_valid vs occupancy");
      if (model.size() == DEPTH) n_full++;
      @(posedge clk);
      if (m_valid && m_ready) begin
        check(m_beat == model[0], "read data");
        void'(model.pop_front());
      end
      if (s_valid && s_ready) model.push_back(s_beat);
    end
    check(n_full > 0, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
