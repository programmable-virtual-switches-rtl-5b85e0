// pvs_pkg -- types and constants shared by the PvS forwarding engine.
//
// The data path is a 256-bit AXI Stream with the packet metadata carried in
// tuser on the first beat of every packet. A beat is handled as one packed
// struct (data, byte enables, metadata, last) so that arrays of streams can be
// declared and registered in one piece; tvalid/tready travel beside it.
//
// The metadata fields and their widths are those of the NetFPGA SUME
// reference switch (packet length, one-hot source and destination ports,
// digest flag). device_id is the field this design adds to tell the later
// stages which virtual switch (vS) a packet belongs to. The bit placement of
// device_id and the reserved upper bits are this design's choice.
//
// Port vectors are one-hot over 8 bits: bit 2*i is physical 10G port i, bit
// 2*i+1 is the virtual (DMA) port paired with it. Bit 7, the virtual port of
// port 3, is reserved for traffic to and from the controller.
package pvs_pkg;

  localparam int unsigned DATA_W  = 256;
  localparam int unsigned KEEP_W  = DATA_W / 8;
  localparam int unsigned TUSER_W = 128;
  localparam int unsigned CTRL_AW = 16;   // byte offset inside one control slice
  localparam int unsigned CTRL_DW = 32;

  typedef logic [7:0]  port_vec_t;
  typedef logic [7:0]  dev_id_t;
  typedef logic [11:0] vlan_id_t;

  localparam port_vec_t PORT_CPU = 8'b1000_0000;   // nf3_dma, controller port

  typedef struct packed {
    logic [79:0] reserved;
    dev_id_t     device_id;
    logic [7:0]  send_dig_to_cpu;
    port_vec_t   dst_port;
    port_vec_t   src_port;
    logic [15:0] pkt_len;
  } sume_meta_t;

  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic [KEEP_W-1:0] tkeep;
    sume_meta_t        tuser;
    logic              tlast;
  } axis_beat_t;

  // One register access travelling from the control interface to a slice.
  typedef struct packed {
    logic               en;     // access strobe, one cycle
    logic               we;     // 1 = write, 0 = read
    logic [CTRL_AW-1:0] addr;   // byte offset, 32-bit aligned
    logic [CTRL_DW-1:0] wdata;
  } ctrl_req_t;

  // Byte b of the packet sits in tdata[8*b +: 8].
  function automatic logic [7:0] pkt_byte(logic [DATA_W-1:0] d, int unsigned b);
    return d[8*b +: 8];
  endfunction

  // 802.1Q tag check on the first beat: TPID 0x8100 at bytes 12-13.
  function automatic logic has_vlan(logic [DATA_W-1:0] d);
    return {pkt_byte(d, 12), pkt_byte(d, 13)} == 16'h8100;
  endfunction

  function automatic vlan_id_t get_vlan(logic [DATA_W-1:0] d);
    return {pkt_byte(d, 14)[3:0], pkt_byte(d, 15)};
  endfunction

  function automatic logic [47:0] get_dst_mac(logic [DATA_W-1:0] d);
    return {pkt_byte(d, 0), pkt_byte(d, 1), pkt_byte(d, 2),
            pkt_byte(d, 3), pkt_byte(d, 4), pkt_byte(d, 5)};
  endfunction

  // Number of 32-byte beats a packet of len bytes occupies.
  function automatic logic [11:0] beats_of(logic [15:0] len);
    return 12'((len + 16'(KEEP_W - 1)) / 16'(KEEP_W));
  endfunction

endpackage
