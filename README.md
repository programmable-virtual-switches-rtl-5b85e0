# PvS forwarding engine: parallel virtual switches on one data path

This RTL lets several independent packet switches share one physical switch.
The switches are called virtual switches (vS) and may belong to different tenants.
Each vS gets:

- a slot of its own (a *placeholder*) with private input and output queues;
- a private table memory;
- a private control channel.

A thin hypervisor sits around the slots. It has three parts:

- the **Input vS Interface (IvSI)** decides which vS a packet belongs to;
- the **Output vS Interface (OvSI)** decides which physical port a vS may send a packet to;
- the **Control vS Interface (CvSI)** routes register accesses so that each tenant reaches only its own slot.

None of the switches knows the others exist. None of them can send a packet to a port its tenant does not own.

The engine is the forwarding part of the PvS architecture, built for a NetFPGA SUME-class board:

- four 10G ports;
- a DMA stream to the host;
- a 256-bit AXI Stream data path at 200 MHz.

This implementation follows that architecture's block structure and isolation rules. The vS slots hold a small example layer-2 switch, because the original design fills them with switches compiled from P4 (see "Departures" below).

## How isolation works

Packets are tied to a tenant by three identifiers.

1. **VLAN id + source port → vS (Ingress table, IvSI).** Every frame must carry an 802.1Q tag: TPID 0x8100 at bytes 12–13, VLAN id in the low 12 bits of bytes 14–15. The IvSI looks up the pair (VLAN id, physical source port). A hit gives three things:
   - the vS's `device_id`;
   - a *virtual* source port that replaces `tuser.src_port`, so the vS only ever sees its own port numbering;
   - a forward or drop action.

   Untagged frames, misses and drop entries are discarded.

2. **device_id (placeholder).** The IvSI writes the `device_id` into the packet metadata. Each placeholder writes its own id into every packet it emits, whatever the switch inside did to the metadata, so a vS cannot impersonate another.

3. **(virtual dst_port, device_id, VLAN id) → physical port (Egress table, OvSI).** The vS chooses an output port in its own virtual port space. The OvSI maps that port to a physical port vector only if an Egress entry for exactly this vS and VLAN exists. Otherwise the packet is dropped.

   The same table connects two vS through a virtual link: the Egress entry points to a DMA port, the packet loops back through the DMA stream, and the Ingress table steers it to the second vS.

The control side follows the same rule. The CvSI cuts the AXI4-Lite address space into 64 KiB slices. Each slice has its own request bus, and a request is driven only onto the bus of the slice its address falls in. No placeholder ever sees another placeholder's accesses.

## Block structure

```
 RX0..3, DMA RX ─► IvSI ─┬─► [in q] vS 0 [out q] ─┐
                         ├─► [in q] vS 1 [out q] ─┤
                         ├─► ...                  ├─► OvSI ─► TX0..3, DMA TX
                         └─► [controller queue] ──┘
 AXI4-Lite ─► CvSI ─► slice 0 IvSI, slice 1 OvSI, slice 2+i vS i
```

| Module | Role |
|---|---|
| `pvs_top` | Wires everything. Five AXI Stream RX and TX ports; one AXI4-Lite slave. |
| `ivsi` | One packet buffer per RX stream, a round-robin arbiter, the parser, the Ingress table, the deployed mask, packet-in, and counters. |
| `ingress_table`, `egress_table` | Register-based match-action tables. The lowest matching index wins. |
| `vs_placeholder` | Input queue → vS pipeline → output queue. Re-stamps `device_id`. |
| `vs_l2_switch` | Example vS: destination-MAC lookup into a one-hot virtual port. A miss drops the packet. |
| `ovsi` | Round-robin over the vS outputs and the controller path, the Egress lookup, one buffer per TX stream, and the one-second packet counter. |
| `cvsi` | AXI4-Lite slave and address-based slice steering. |
| `axis_pkt_fifo`, `axis_rr_mux` | Shared building blocks: a beat FIFO with a free-space report, and a packet-granular round-robin multiplexer. |
| `pvs_pkg` | Bus widths, the `tuser` struct, the beat struct, the control-request struct, and header helpers. |

## Stream format and port numbering

Each AXI Stream beat is the packed struct `axis_beat_t`, which holds `tdata[255:0]`, `tkeep[31:0]`, `tuser` and `tlast`. `tvalid` and `tready` are separate signals. Byte 0 of the frame is `tdata[7:0]`. `tuser` is valid on the first beat of a packet.

| tuser bits | Field |
|---|---|
| 15:0 | `pkt_len`, in bytes |
| 23:16 | `src_port`, one-hot |
| 31:24 | `dst_port`, one-hot (several bits set = multicast) |
| 39:32 | `send_dig_to_cpu` |
| 47:40 | `device_id`, the vS the packet belongs to |
| 127:48 | reserved, zero |

Port vectors follow the NetFPGA convention:

- bit 2i is 10G port i;
- bit 2i+1 is the DMA (virtual) port paired with it.

Bit 7 (`8'b1000_0000`) is reserved for the controller. The OvSI sends every odd bit to the single DMA TX stream. TX index 4 is that DMA stream.

## Control interface and register maps

There is one AXI4-Lite slave with 32-bit data. Writes are full words; the write strobes are ignored.

| Slice | Base address | Target |
|---|---|---|
| 0 | 0x0000_0000 | IvSI |
| 1 | 0x0001_0000 | OvSI |
| 2+i | 0x0002_0000 + i·0x1_0000 | vS placeholder i |

An access beyond the last slice gets DECERR.

Timing of an access:

- a write's response arrives two cycles after the write is accepted;
- read data arrives three cycles after the read is accepted.

**IvSI** (byte offsets):

| Offset | Register |
|---|---|
| 0x000 | Deployed mask. Bit i set = vS i is running. Reset value: all set. |
| 0x004 | Packet-in: `{armed[16], device_id[15:8], vport[7:0]}` |
| 0x008 / 0x00C / 0x010 / 0x014 | Counters: forwarded / dropped / sent to the controller / dropped for lack of queue room |
| 0x100 + 8e | Ingress entry e, word 0: `{valid[31], drop[30], vlan[27:16], src_port[7:0]}` |
| 0x104 + 8e | Ingress entry e, word 1: `{device_id[15:8], virtual src_port[7:0]}` |

**OvSI**:

| Offset | Register |
|---|---|
| 0x000 | Packets forwarded in the last complete counting window |
| 0x004 | Packets forwarded so far in the current window |
| 0x008 | Packets dropped |
| 0x100 + 8e | Egress entry e, word 0: `{valid[31], drop[30], vlan[27:16], device_id[15:8], virtual dst_port[7:0]}` |
| 0x104 + 8e | Egress entry e, word 1: physical port vector `[7:0]` |

**Example L2 vS**: entry e at offset 8e.

- Word 0 is `mac[31:0]`.
- Word 1 is `{valid[31], port[23:16], mac[47:32]}`.

To use a tenant, write three things:

1. an Ingress entry mapping (VLAN, physical port) to the tenant's vS;
2. the vS's own table;
3. an Egress entry for each output the tenant may use.

`tb/tb_workload_flows.sv` shows the minimum sequence.

## Decisions inside the IvSI

The IvSI makes a decision on the first beat of every packet and holds it until `tlast`. The decisions are checked in this order:

1. **Packet-in.** A packet from the controller port (source bit 7) arrives while the packet-in register is armed. It goes straight to the vS named in that register, and its source port becomes the virtual port named there. This is how the controller injects a packet into a tenant's switch.
2. **Controller.** The Ingress hit names a vS that is not deployed: its mask bit is clear, or the id is beyond the array. The packet goes to the controller queue, and from there to the DMA TX stream. This keeps traffic for a switch being reconfigured, or not yet loaded, from disappearing silently.
3. **No room.** The destination queue has fewer free beats than the packet needs, computed from `pkt_len`. The packet is dropped whole and counted. Dropping, rather than waiting, keeps one congested vS from stalling the shared input path for every other tenant.
4. Otherwise the packet is **forwarded** to the vS.

## Decisions inside the OvSI

- Packets from the controller path, and vS packets whose `dst_port` is the controller bit, go to DMA TX without an Egress lookup. This is packet-out.
- Everything else needs an Egress hit with the forward action.
- A packet starts only when every TX buffer it goes to has room for the whole packet, computed from `pkt_len`. An empty buffer also counts as room, so a packet longer than the buffer is never stuck. If the room is not there, the round-robin passes over that vS and serves the next one. A congested TX port thus delays only the vS that send to it.
- A multicast vector writes the packet into all selected TX buffers in lock step.
- The packet counter stores its count and restarts every `COUNT_CYCLES` cycles. The default of 200,000,000 cycles is one second at 200 MHz, so register 0x000 reads packets per second.

## Performance

At the default parameters, `tb_workload_flows` measures:

- **Throughput:** a back-to-back flow of 512 packets of 256 bytes takes 4101 cycles for 4096 beats. That is one beat per cycle, 51 Gbit/s at 200 MHz.
- **Latency:** a 64-byte packet's first beat reaches TX 5 cycles after it enters RX.
- **Saturation:** `tb_workload_loopback` loops the four 10G ports in pairs (TX0→RX1, TX1→RX0, TX2→RX3, TX3→RX2) and sends four endless flows through one vS. It reads 51.1 Gbit/s from the packet counter. That is the same one-beat-per-cycle ceiling, because the shared IvSI and OvSI paths are the bottleneck and not the vS.

Queue depths are 64 beats everywhere, which is eight 256-byte packets.

## Departures from the original design, and limits

- **The vS are examples.** The original deploys P4 programs (a layer-2 switch, a router, a firewall, in-band telemetry) compiled by a vendor flow into the placeholders. Their insides are not available, so every slot holds `vs_l2_switch`: one 8-entry exact-match MAC table, with no learning and no flooding. Any module with the same stream and control-slice ports can replace it.
- **Packet-in lives in the IvSI.** The original description places packet-in handling in the output interface, but the packet has to reach a vS input. This implementation steers it in the IvSI, under a register.
- **Full queues drop.** The original says per-vS queues prevent interference, but does not say what happens when a queue fills. Here the IvSI drops the packet. A frame longer than a whole vS queue never fits. At the default depth of 64 beats, that means any frame over 2 KiB is always dropped. Raise `QDEPTH` for jumbo frames.
- **Blocking inside one vS.** A busy TX port does not hold up other vS (see "Decisions inside the OvSI"). But each vS output queue is first-in first-out. A packet waiting for a busy port therefore still holds back that same vS's later packets to other ports.
- **Control slices are fixed.** Every vS gets an equal 64 KiB slice of the address space. The original sizes each vS's slice at twice its initial tables and publishes the map to the control software. Here the map is fixed by `SLICE_BITS` and the slot number.
- **Table sizes are choices:**
  - 16 Ingress and 16 Egress entries, realised as registers with a parallel compare;
  - 8 entries in the example vS.
- **Not included:**
  - the 10G MAC/PHY, the DMA engine and PCIe, and the control masters (host driver, soft processor), which are vendor IP or software outside this RTL;
  - the credential check on control accesses;
  - partial-reconfiguration support for swapping a placeholder's contents at run time.

  The hypervisor's deployed mask is the hook for that last item: clearing a vS's bit diverts its traffic to the controller while the slot is reloaded.
- The default is four vS. `N_VS` is a parameter, up to 8, the width of the deployed mask. It scales the IvSI outputs, the OvSI inputs and the number of control slices.

## Simulating

Every testbench in `tb/` is self-checking. It prints `TB_RESULT checks=<n> failures=<n>` and stops on its own, or after a watchdog timeout. The tests are:

| Testbench | What it covers |
|---|---|
| one per module | that module on its own |
| `tb_pvs_top` | the whole engine with small queues and a short counter window. It exercises forwarding on every port, drops at each stage, the controller path, a deployed-mask swap, virtual links through a DMA loopback, packet-in and packet-out, queue overflow, and the counter. It fails if any of these never happened. |
| `tb_pvs_top_full` | the same scenario with the top at its default parameters |
| `tb_workload_flows` | the throughput and latency flows above |
| `tb_workload_loopback` | the looped-port saturation run above |

Example with Verilator 5. Any testbench can be named as the top module:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pvs_top \
    -y rtl -y tb +libext+.sv rtl/pvs_pkg.sv tb/tb_util_pkg.sv tb/tb_pvs_top.sv
./obj_dir/Vtb_pvs_top
```

Run the simulator from the repository root. Simulation takes seconds, except for `tb_pvs_top_full`, which takes under a minute.

The design uses one clock and an active-low asynchronous reset. All tables and registers reset to zero, except the deployed mask, which resets to all ones.
