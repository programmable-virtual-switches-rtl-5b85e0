// tb_egress_table -- self-checking test of the Egress match-action table.
// Entries are written and read back; random keys (dst_port, device_id,
// VLAN) are then looked up and compared with a reference search.
module tb_egress_table;
  import pvs_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  port_vec_t lk_dst_port, lk_out_port; dev_id_t lk_device_id; vlan_id_t lk_vlan;
  logic lk_hit, lk_drop, cfg_we, cfg_word;
  logic [2:0] cfg_idx;
  logic [31:0] cfg_wdata, cfg_rdata;
  int checks = 0, failures = 0;

  egress_table #(.N_ENTRIES(N)) dut (.*);

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
    cfg_we = 0; cfg_idx = 0; cfg_word = 0; cfg_wdata = 0;
    lk_vlan = 0; lk_dst_port = 0; lk_device_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); #1;
    check(!lk_hit, "empty table misses");
    for (int e = 0; e < N; e++) begin
      w0[e] = {(e != 5), (e == 2), 2'b00, 12'(200 + e % 3), 8'(e % 4), 8'(1 << (e % 3))};
      w1[e] = {24'h0, 8'(1 << (2 * (e % 4)))};
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
        lk_vlan = w0[e][27:16]; lk_device_id = w0[e][15:8]; lk_dst_port = w0[e][7:0];
        if ($urandom % 4 == 0) lk_vlan = lk_vlan + 12'd1;  // wrong VLAN for this vS
      end else begin
        lk_vlan = 12'(200 + $urandom % 4); lk_device_id = 8'($urandom % 4);
        lk_dst_port = 8'(1 << ($urandom % 3));
      end
      #1;
      hit_e = -1;
      for (int e = N - 1; e >= 0; e--)
        if (w0[e][31] && w0[e][27:16] == lk_vlan && w0[e][15:8] == lk_device_id &&
            w0[e][7:0] == lk_dst_port) hit_e = e;
      check(lk_hit == (hit_e >= 0), "hit");
      if (hit_e >= 0) begin
        check(lk_drop == w0[hit_e][30], "drop action");
        check(lk_out_port == w1[hit_e][7:0], "physical out port");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
