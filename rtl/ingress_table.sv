// ingress_table -- the IvSI's Ingress match-action table.
//
// Key: the packet's 12-bit VLAN id and the one-hot physical port it arrived
// on. Actions: forward, which names the destination virtual switch
// (device_id) and the virtual source port that replaces src_port, or drop.
// The entries are a register array searched in parallel like a small CAM;
// the lowest-numbered valid matching entry wins. A miss reports lk_hit = 0.
//
// Interface: the lookup is combinational (lk_* in, result out in the same
// cycle). Entries are written and read through a word port from the control
// interface: entry e, word w (two 32-bit words per entry):
//   word 0 = {valid[31], drop[30], vlan[27:16], src_port[7:0]}
//   word 1 = {device_id[15:8], vport[7:0]}
// cfg_rdata is combinational from cfg_idx/cfg_word. Reset clears all entries.
//
// The key, the two actions and the virtual source port come from the
// document; table size, word layout and priority are this design's choice.
module ingress_table
  import pvs_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  vlan_id_t                      lk_vlan,
  input  port_vec_t                     lk_src_port,
  output logic                          lk_hit,
  output logic                          lk_drop,
  output dev_id_t                       lk_device_id,
  output port_vec_t                     lk_vport,
  input  logic                          cfg_we,
  input  logic [$clog2(N_ENTRIES)-1:0]  cfg_idx,
  input  logic                          cfg_word,
  input  logic [31:0]                   cfg_wdata,
  output logic [31:0]                   cfg_rdata
);
  typedef struct packed {
    logic      valid;
    logic      drop;
    vlan_id_t  vlan;
    port_vec_t src_port;
    dev_id_t   device_id;
    port_vec_t vport;
  } ing_entry_t;

  ing_entry_t tbl [N_ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) tbl[i] <= '0;
    end else if (cfg_we) begin
      if (!cfg_word) begin
        tbl[cfg_idx].valid    <= cfg_wdata[31];
        tbl[cfg_idx].drop     <= cfg_wdata[30];
        tbl[cfg_idx].vlan     <= cfg_wdata[27:16];
        tbl[cfg_idx].src_port <= cfg_wdata[7:0];
      end else begin
        tbl[cfg_idx].device_id <= cfg_wdata[15:8];
        tbl[cfg_idx].vport     <= cfg_wdata[7:0];
      end
    end
  end

  always_comb begin
    if (!cfg_word)
      cfg_rdata = {tbl[cfg_idx].valid, tbl[cfg_idx].drop, 2'b00, tbl[cfg_idx].vlan,
                   8'h00, tbl[cfg_idx].src_port};
    else
      cfg_rdata = {16'h0000, tbl[cfg_idx].device_id, tbl[cfg_idx].vport};
  end

  always_comb begin
    lk_hit       = 1'b0;
    lk_drop      = 1'b0;
    lk_device_id = '0;
    lk_vport     = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].vlan == lk_vlan && tbl[i].src_port == lk_src_port) begin
        lk_hit       = 1'b1;
        lk_drop      = tbl[i].drop;
        lk_device_id = tbl[i].device_id;
        lk_vport     = tbl[i].vport;
      end
    end
  end

endmodule
