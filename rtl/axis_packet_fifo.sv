// axis_packet_fifo: store-and-forward FIFO for the gateway's 64-bit stream.
//
// A line (CSI-2 header beat, timestamp beat and all payload beats, ended by
// last = 1) is only offered at the output once its last beat has been
// written, so the Ethernet side never starts a line that is still arriving
// and never runs dry in the middle of one. A counter of complete lines is
// raised when a last beat is written and lowered when one is read; the output
// is valid while the FIFO is not empty and that counter is not zero.
//
// Interface: s_* (write side) and m_* (read side) carry gw_pkg::axis64_t
// with a valid/ready handshake. DEPTH must hold at least the longest line in
// beats; the default of 2048 beats holds two 5760-byte lines at 6 valid bytes
// per beat. Store-and-forward behaviour follows the design; the depth and the
// first-word-fall-through read are this design's choices.
module axis_packet_fifo
  import gw_pkg::*;
#(
  parameter int unsigned DEPTH = 2048   // power of two
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    s_valid,
  output logic    s_ready,
  input  axis64_t s_beat,
  output logic    m_valid,
  input  logic    m_ready,
  output axis64_t m_beat,
  output logic [$clog2(DEPTH):0] packets   // complete lines stored
);
  localparam int unsigned AW = $clog2(DEPTH);

  axis64_t     mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr, level;
  logic        wr_en, rd_en;
  logic        wr_last, rd_last;

  assign level   = wr_ptr - rd_ptr;
  assign s_ready = (level != (AW+1)'(DEPTH));
  assign m_beat  = mem[rd_ptr[AW-1:0]];
  assign m_valid = (level != '0) && (packets != '0);
  assign wr_en   = s_valid && s_ready;
  assign rd_en   = m_valid && m_ready;
  assign wr_last = wr_en && s_beat.last;
  assign rd_last = rd_en && m_beat.last;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr[AW-1:0]] <= s_beat;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      packets <= '0;
    end else begin
      if (wr_en) wr_ptr <= wr_ptr + 1'b1;
      if (rd_en) rd_ptr <= rd_ptr + 1'b1;
      case ({wr_last, rd_last})
        2'b10:   packets <= packets + 1'b1;
        2'b01:   packets <= packets - 1'b1;
        default: ;
      endcase
    end
  end

  a_m_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_beat));

endmodule
