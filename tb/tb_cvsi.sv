// tb_cvsi -- self-checking test of the Control vS Interface.
// Six slices are modelled by small register files answering one cycle after
// the strobe. Random AXI4-Lite writes and reads (address and data sometimes
// offered in different cycles, responses taken late) go to every slice and
// to addresses beyond the last one. Checks: read data equals what was last
// written, out-of-range accesses get DECERR and reach no slice, every access
// appears on exactly the addressed slice's bus, and a read takes the
// documented three cycles from acceptance to a valid response.
module tb_cvsi;
  import pvs_pkg::*;
  localparam int NT = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] s_axil_awaddr, s_axil_wdata, s_axil_araddr, s_axil_rdata;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  ctrl_req_t [NT-1:0] req;
  logic [NT-1:0][31:0] rdata;
  int checks = 0, failures = 0;

  cvsi #(.N_TGT(NT), .SLICE_BITS(16)) dut (.*);

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

  // slice models
  logic [31:0] regs [NT][16];
  int bus_hits [NT];
  int exp_tgt = -1;
  for (genvar t = 0; t < NT; t++) begin : g_slice
    always_ff @(posedge clk) begin
      if (req[t].en) begin
        if (req[t].we) regs[t][req[t].addr[5:2]] <= req[t].wdata;
        else rdata[t] <= regs[t][req[t].addr[5:2]];
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    int n_en;
    n_en = 0;
    for (int t = 0; t < NT; t++) begin
      if (req[t].en) begin n_en++; bus_hits[t]++; check(t == exp_tgt, "access on the addressed slice only"); end
      else check(req[t] == '0, "idle bus stays zero");
    end
    check(n_en <= 1, "one slice at a time");
  end

  logic [31:0] model [NT][16];

  task automatic axi_write(logic [31:0] a, logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1;
    if ($urandom % 2) begin s_axil_wvalid = 0; @(negedge clk); end
    s_axil_wdata = d; s_axil_wvalid = 1;
    @(posedge clk); while (!(s_axil_awready && s_axil_wready)) @(posedge clk);
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    repeat ($urandom % 3) @(negedge clk);
    s_axil_bready = 1;
    @(posedge clk); while (!s_axil_bvalid) @(posedge clk);
    resp = s_axil_bresp;
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic axi_read(logic [31:0] a, output logic [31:0] d, output logic [1:0] resp,
                          output int lat);
    int c;
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1;
    @(posedge clk); while (!s_axil_arready) @(posedge clk);
    c = 0;
    @(negedge clk); s_axil_arvalid = 0;
    while (!s_axil_rvalid) begin @(negedge clk); c++; end
    lat = c + 1;
    repeat ($urandom % 3) @(negedge clk);
    check(s_axil_rvalid, "read response held until taken");
    s_axil_rready = 1;
    @(posedge clk);
    d = s_axil_rdata; resp = s_axil_rresp;
    @(negedge clk); s_axil_rready = 0;
  endtask

  initial begin
    logic [1:0] resp; logic [31:0] d; int lat;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_wdata = 0; s_axil_araddr = 0; s_axil_wstrb = 4'hF;
    for (int t = 0; t < NT; t++) begin
      bus_hits[t] = 0;
      for (int r = 0; r < 16; r++) begin regs[t][r] = 0; model[t][r] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int t, r; logic [31:0] a, v; logic oob;
      t = $urandom % (NT + 2);
      r = $urandom % 16;
      oob = t >= NT;
      a = {16'(t), 10'd0, 4'(r), 2'b00};
      if (oob && $urandom % 2) a = 32'hF000_0000 | a;
      exp_tgt = oob ? -1 : t;
      if ($urandom % 2) begin
        v = $urandom;
        axi_write(a, v, resp);
        check(resp == (oob ? 2'b11 : 2'b00), "write response");
        if (!oob) model[t][r] = v;
      end else begin
        axi_read(a, d, resp, lat);
        check(resp == (oob ? 2'b11 : 2'b00), "read response");
        if (!oob) check(d == model[t][r], "read data");
        check(lat == 3, $sformatf("read latency %0d", lat));
      end
    end
    for (int t = 0; t < NT; t++) check(bus_hits[t] > 0, "every slice reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
