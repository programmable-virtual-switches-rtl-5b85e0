// cvsi -- Control vS Interface: delivers register accesses from the control
// path to exactly one slice of the forwarding engine.
//
// The control masters (PCIe host, soft processor) reach the engine through
// one AXI4-Lite slave port with 32-bit addresses and data. The address space
// is cut into equal slices of 2**SLICE_BITS bytes: slice 0 is the IvSI
// (Ingress table and its registers), slice 1 the OvSI (Egress table and
// packet counter), slice 2+i the private memory of vS placeholder i. Each
// slice has its own request bus; a request is driven only onto the bus of the
// slice its address falls in, and every other bus stays all zero, so no
// placeholder ever sees another's traffic. An address outside every slice
// reaches nothing and is answered with DECERR. Credentials are not checked
// here; that is the control software's job.
//
// Interface: s_axil_* is a standard AXI4-Lite slave (write strobes are
// ignored: every write is a full 32-bit word). req[t] is slice t's request
// bus (ctrl_req_t: one-cycle strobe, write flag, 16-bit byte offset, data);
// rdata[t] is the slice's read data, sampled one cycle after the strobe.
// Timing: one transaction at a time. A write is accepted when address and
// data are both valid, reaches the slice in the next cycle and its response
// follows one cycle later; a read returns three cycles after acceptance.
//
// Address-based steering over dedicated buses follows the document; the
// slice size, slice order and DECERR answer are this design's choices.
module cvsi
  import pvs_pkg::*;
#(
  parameter int unsigned N_TGT      = 6,
  parameter int unsigned SLICE_BITS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [31:0]             s_axil_awaddr,
  input  logic                    s_axil_awvalid,
  output logic                    s_axil_awready,
  input  logic [31:0]             s_axil_wdata,
  input  logic [3:0]              s_axil_wstrb,
  input  logic                    s_axil_wvalid,
  output logic                    s_axil_wready,
  output logic [1:0]              s_axil_bresp,
  output logic                    s_axil_bvalid,
  input  logic                    s_axil_bready,
  input  logic [31:0]             s_axil_araddr,
  input  logic                    s_axil_arvalid,
  output logic                    s_axil_arready,
  output logic [31:0]             s_axil_rdata,
  output logic [1:0]              s_axil_rresp,
  output logic                    s_axil_rvalid,
  input  logic                    s_axil_rready,
  output ctrl_req_t [N_TGT-1:0]   req,
  input  logic [N_TGT-1:0][31:0]  rdata
);
  localparam int unsigned TIW = $clog2(N_TGT > 1 ? N_TGT : 2);
  localparam logic [1:0] RESP_OKAY = 2'b00, RESP_DECERR = 2'b11;

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_BRESP, S_RWAIT, S_RDATA} state_e;
  state_e state;

  logic [31:0]    a_addr, a_wdata;
  logic           a_we, a_ok;
  logic [TIW-1:0] a_tgt;

  function automatic logic in_range(logic [31:0] addr);
    return (addr >> SLICE_BITS) < 32'(N_TGT);
  endfunction

  logic [3:0] unused_wstrb;
  assign unused_wstrb = s_axil_wstrb;

  assign s_axil_awready = state == S_IDLE && s_axil_awvalid && s_axil_wvalid;
  assign s_axil_wready  = s_axil_awready;
  assign s_axil_arready = state == S_IDLE && !(s_axil_awvalid && s_axil_wvalid);

  // Dedicated request buses: only the addressed slice sees anything.
  always_comb begin
    req = '0;
    if (state == S_ISSUE && a_ok) begin
      req[a_tgt].en    = 1'b1;
      req[a_tgt].we    = a_we;
      req[a_tgt].addr  = a_addr[CTRL_AW-1:0];
      req[a_tgt].wdata = a_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      a_addr        <= '0;
      a_wdata       <= '0;
      a_we          <= 1'b0;
      a_ok          <= 1'b0;
      a_tgt         <= '0;
      s_axil_bvalid <= 1'b0;
      s_axil_bresp  <= RESP_OKAY;
      s_axil_rvalid <= 1'b0;
      s_axil_rresp  <= RESP_OKAY;
      s_axil_rdata  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (s_axil_awvalid && s_axil_wvalid) begin
            a_addr  <= s_axil_awaddr;
            a_wdata <= s_axil_wdata;
            a_we    <= 1'b1;
            a_ok    <= in_range(s_axil_awaddr);
            a_tgt   <= TIW'(s_axil_awaddr >> SLICE_BITS);
            state   <= S_ISSUE;
          end else if (s_axil_arvalid) begin
            a_addr  <= s_axil_araddr;
            a_wdata <= '0;
            a_we    <= 1'b0;
            a_ok    <= in_range(s_axil_araddr);
            a_tgt   <= TIW'(s_axil_araddr >> SLICE_BITS);
            state   <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (a_we) begin
            s_axil_bvalid <= 1'b1;
            s_axil_bresp  <= a_ok ? RESP_OKAY : RESP_DECERR;
            state         <= S_BRESP;
          end else begin
            state <= S_RWAIT;
          end
        end
        S_BRESP: begin
          if (s_axil_bready) begin
            s_axil_bvalid <= 1'b0;
            state         <= S_IDLE;
          end
        end
        S_RWAIT: begin
          s_axil_rvalid <= 1'b1;
          s_axil_rresp  <= a_ok ? RESP_OKAY : RESP_DECERR;
          s_axil_rdata  <= a_ok ? rdata[a_tgt] : 32'h0;
          state         <= S_RDATA;
        end
        S_RDATA: begin
          if (s_axil_rready) begin
            s_axil_rvalid <= 1'b0;
            state         <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI4-Lite: a response, once offered, stays until taken.
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axil_bvalid && !s_axil_bready) |=> s_axil_bvalid);
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axil_rvalid && !s_axil_rready) |=> (s_axil_rvalid && $stable(s_axil_rdata)));

endmodule
