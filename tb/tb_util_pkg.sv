// tb_util_pkg -- packet builders shared by the testbenches.
//
// A test packet is len bytes long. Byte b of the packet is a function of a
// seed and b, except for the header fields the tests need: destination MAC
// (bytes 0-5), an optional 802.1Q tag (0x8100 at bytes 12-13, VLAN id in the
// low 12 bits of bytes 14-15). Beat k carries bytes 32k..32k+31 with byte 0
// in tdata[7:0]; tuser is filled on beat 0 only.
package tb_util_pkg;
  import pvs_pkg::*;

  function automatic logic [7:0] fill_byte(int seed, int b);
    return 8'((seed * 37 + b * 11 + (b >> 3)) & 8'hFF);
  endfunction

  function automatic axis_beat_t mk_beat(int seed, int k, int len, logic [47:0] dmac,
                                         logic tag_on, logic [11:0] vlan, port_vec_t src);
    axis_beat_t bt;
    bt = '0;
    for (int i = 0; i < 32; i++) begin
      int b;
      b = 32 * k + i;
      if (b < len) begin
        logic [7:0] v;
        v = fill_byte(seed, b);
        if (b < 6) v = dmac[8*(5-b) +: 8];
        if (tag_on && b == 12) v = 8'h81;
        if (tag_on && b == 13) v = 8'h00;
        if (tag_on && b == 14) v = {4'h0, vlan[11:8]};
        if (tag_on && b == 15) v = vlan[7:0];
        bt.tdata[8*i +: 8] = v;
        bt.tkeep[i] = 1'b1;
      end
    end
    bt.tlast = (32 * (k + 1) >= len);
    if (k == 0) begin
      bt.tuser.pkt_len  = 16'(len);
      bt.tuser.src_port = src;
    end
    return bt;
  endfunction

  function automatic int n_beats(int len);
    return (len + 31) / 32;
  endfunction

endpackage
