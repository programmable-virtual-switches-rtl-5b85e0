// axis_pkt_fifo -- packet queue for the AXI Stream data path.
//
// Used for the per-port input buffers of the IvSI, the private input and
// output queues of every vS placeholder and the TX output buffers of the
// OvSI. It is a synchronous first-in first-out memory of whole beats
// (data, keep, metadata, last). Depth is a power of two.
//
// Interface: write side s_valid/s_beat/s_ready, read side m_valid/m_beat/
// m_ready, both AXI Stream handshakes. free_words tells a writer how many
// beats still fit, so it can decide before the first beat whether a whole
// packet fits. Timing: a beat written in cycle t can be read in cycle t+1;
// one read and one write per cycle. Reset empties the queue.
//
// Keeping separate queues per virtual switch follows the document's
// isolation argument; the depth is this design's choice.
module axis_pkt_fifo
  import pvs_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_valid,
  input  axis_beat_t                 s_beat,
  output logic                       s_ready,
  output logic                       m_valid,
  output axis_beat_t                 m_beat,
  input  logic                       m_ready,
  output logic [$clog2(DEPTH):0]     free_words
);
  localparam int unsigned AW = $clog2(DEPTH);

  axis_beat_t       mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic [AW:0]      used;

  assign used       = wr_ptr - rd_ptr;
  assign free_words = (AW+1)'(DEPTH) - used;
  assign s_ready    = used != (AW+1)'(DEPTH);
  assign m_valid    = used != '0;
  assign m_beat     = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (s_valid && s_ready) mem[wr_ptr[AW-1:0]] <= s_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (s_valid && s_ready) wr_ptr <= wr_ptr + 1'b1;
      if (m_valid && m_ready) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // Occupancy never leaves 0..DEPTH.
  a_bounds: assert property (@(posedge clk) disable iff (!rst_n) used <= (AW+1)'(DEPTH));

endmodule
