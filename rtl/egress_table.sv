// egress_table -- the OvSI's Egress match-action table.
//
// Key: the virtual destination port a vS chose (one-hot dst_port), the
// device_id of the vS the packet left, and the packet's VLAN id. Actions:
// forward, which gives the physical one-hot port vector written back to
// dst_port, or drop. A packet that leaves a vS on a VLAN not configured for
// it misses and is dropped by the OvSI, which is how a vS is kept from
// steering traffic into another tenant's network. Register array searched in
// parallel; the lowest-numbered valid matching entry wins.
//
// Interface: combinational lookup. Word port for the control interface,
// two 32-bit words per entry:
//   word 0 = {valid[31], drop[30], vlan[27:16], device_id[15:8], dst_port[7:0]}
//   word 1 = {out_port[7:0]}
// cfg_rdata is combinational. Reset clears all entries.
//
// Key and actions follow the document; size, layout and priority are this
// design's choice.
module egress_table
  import pvs_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  port_vec_t                     lk_dst_port,
  input  dev_id_t                       lk_device_id,
  input  vlan_id_t                      lk_vlan,
  output logic                          lk_hit,
  output logic                          lk_drop,
  output port_vec_t                     lk_out_port,
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
    dev_id_t   device_id;
    port_vec_t dst_port;
    port_vec_t out_port;
  } egr_entry_t;

  egr_entry_t tbl [N_ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) tbl[i] <= '0;
    end else if (cfg_we) begin
      if (!cfg_word) begin
        tbl[cfg_idx].valid     <= cfg_wdata[31];
        tbl[cfg_idx].drop      <= cfg_wdata[30];
        tbl[cfg_idx].vlan      <= cfg_wdata[27:16];
        tbl[cfg_idx].device_id <= cfg_wdata[15:8];
        tbl[cfg_idx].dst_port  <= cfg_wdata[7:0];
      end else begin
        tbl[cfg_idx].out_port  <= cfg_wdata[7:0];
      end
    end
  end

  always_comb begin
    if (!cfg_word)
      cfg_rdata = {tbl[cfg_idx].valid, tbl[cfg_idx].drop, 2'b00, tbl[cfg_idx].vlan,
                   tbl[cfg_idx].device_id, tbl[cfg_idx].dst_port};
    else
      cfg_rdata = {24'h000000, tbl[cfg_idx].out_port};
  end

  always_comb begin
    lk_hit      = 1'b0;
    lk_drop     = 1'b0;
    lk_out_port = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].dst_port == lk_dst_port &&
          tbl[i].device_id == lk_device_id && tbl[i].vlan == lk_vlan) begin
        lk_hit      = 1'b1;
        lk_drop     = tbl[i].drop;
        lk_out_port = tbl[i].out_port;
      end
    end
  end

endmodule
