// tb_ingress_table -- self-checking test of the Ingress match-action table.
// Entries are written through the word port and read back; then random keys
// (many chosen from the programmed entries) are looked up and compared with
// a reference search that applies lowest-index priority.
module tb_ingress_table;
  import pvs_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  vlan_id_t lk_vlan; port_vec_t lk_src_port, lk_vport; dev_id_t lk_device_id;
  logic lk_hit, lk_drop, cfg_we, cfg_word;
  logic [2:0] cfg_idx;
  logic [31:0] cfg_wdata, cfg_rdata;
  int checks = 0, failures = 0;

  ingress_table #(.N_ENTRIES(N)) dut (.*);

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

  logic [31:0] w0 [N], w1 [N];
  task automatic wr(int idx, logic word, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_idx = 3'(idx); cfg_word = word; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    cfg_we = 0; cfg_idx = 0; cfg_word = 0; cfg_wdata = 0; lk_vlan = 0; lk_src_port = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Nothing matches after reset
    @(negedge clk); lk_vlan = 12'd0; lk_src_port = 8'd0; #1;
    check(!lk_hit, "empty table misses");
    for (int e = 0; e < N; e++) begin
      logic [11:0] v; logic [7:0] sp;
      v  = 12'(100 + (e % 5));            // entries 5..7 duplicate keys of 0..2 ...
      sp = 8'(1 << (2 * (e % 4)));        // ... with different ports unless e%20
      w0[e] = {(e != 6), (e == 3), 2'b00, v, 8'h00, sp};
      w1[e] = {16'h0, 8'(e + 1), 8'(1 << (e % 8))};
      wr(e, 0, w0[e]); wr(e, 1, w1[e]);
    end
    for (int e = 0; e < N; e++) begin
      @(negedge clk); cfg_idx = 3'(e); cfg_word = 0; #1;
      check(cfg_rdata == w0[e], "readback word 0");
      cfg_word = 1; #1;
      check(cfg_rdata == w1[e], "readback word 1");
    end
    for (int t = 0; t < 400; t++) begin
      int hit_e;
      @(negedge clk);
      if ($urandom % 2) begin
        int e; e = $urandom % N;
        lk_vlan = w0[e][27:16]; lk_src_port = w0[e][7:0];
      end else begin
        lk_vlan = 12'(100 + $urandom % 8); lk_src_port = 8'(1 << ($urandom % 8));
      end
      #1;
      hit_e = -1;
      for (int e = N - 1; e >= 0; e--)
        if (w0[e][31] && w0[e][27:16] == lk_vlan && w0[e][7:0] == lk_src_port) hit_e = e;
      check(lk_hit == (hit_e >= 0), "hit");
      if (hit_e >= 0) begin
        check(lk_drop == w0[hit_e][30], "drop action");
        check(lk_device_id == w1[hit_e][15:8], "device_id");
        check(lk_vport == w1[hit_e][7:0], "virtual src port");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
