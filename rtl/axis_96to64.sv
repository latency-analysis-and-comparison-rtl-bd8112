// axis_96to64: width conversion from the CSI-2 receiver's 96-bit stream to
// the gateway's 64-bit AXI stream.
//
// A 96-bit beat holds four pixel slots of 24 bits. Its valid bytes (keep,
// contiguous from byte 0) number at most 8 when pixels are 16 bits deep or
// less; such a beat becomes one 64-bit beat with the same keep. A beat with
// more than 8 valid bytes (pixels deeper than 16 bits) is sent over two
// clocks, the first carrying ceil(k/2) bytes and the second the rest, so each
// output beat holds the same number of bytes for even k (12 bytes become
// 6 + 6, 10 become 5 + 5). The header beat that opens each line,
// {timestamp[63:0], CSI-2 packet header[31:0]}, also becomes two beats: the
// packet header (kind BEAT_CSIHDR, keep 0x0F) and then the timestamp (kind
// BEAT_TSTAMP, keep 0xFF).
//
// The output is combinational from the input (no added latency); the input
// is acknowledged with the last output beat it produces. The one/two-beat
// rule follows the design; the equal split and the header-beat layout are
// this design's choices.
module axis_96to64
  import gw_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      s_valid,
  output logic      s_ready,
  input  csi_beat_t s_beat,
  output logic      m_valid,
  input  logic      m_ready,
  output axis64_t   m_beat
);
  logic        phase;      // 0: first output beat of the input beat, 1: second
  logic [3:0]  nbytes;     // valid bytes of the input beat
  logic [3:0]  first_n;    // bytes carried by the first of two beats
  logic        two_beats;
  logic [63:0] shifted;

  assign nbytes    = keep_count12(s_beat.keep);
  assign first_n   = (nbytes + 4'd1) >> 1;
  assign two_beats = s_beat.hdr || (nbytes > 4'd8);
  assign shifted   = 64'(s_beat.data >> {first_n, 3'b000});

  function automatic logic [7:0] mask_of(input logic [3:0] n);
    return 8'((9'd1 << n) - 9'd1);
  endfunction

  function automatic logic [63:0] bit_mask(input logic [7:0] keep);
    logic [63:0] m;
    for (int i = 0; i < 8; i++) m[8*i +: 8] = {8{keep[i]}};
    return m;
  endfunction

  always_comb begin
    m_beat      = '0;
    m_beat.kind = BEAT_PAYLOAD;
    if (s_beat.hdr) begin
      if (!phase) begin
        m_beat.kind = BEAT_CSIHDR;
        m_beat.sof  = s_beat.sof;
        m_beat.data = {32'd0, s_beat.data[31:0]};
        m_beat.keep = 8'h0F;
      end else begin
        m_beat.kind = BEAT_TSTAMP;
        m_beat.sof  = s_beat.sof;
        m_beat.data = s_beat.data[95:32];
        m_beat.keep = 8'hFF;
        m_beat.last = s_beat.last;
      end
    end else if (!two_beats) begin
      m_beat.data = s_beat.data[63:0];
      m_beat.keep = s_beat.keep[7:0];
      m_beat.last = s_beat.last;
    end else if (!phase) begin
      m_beat.data = s_beat.data[63:0] & bit_mask(mask_of(first_n));
      m_beat.keep = mask_of(first_n);
    end else begin
      m_beat.data = shifted & bit_mask(mask_of(nbytes - first_n));
      m_beat.keep = mask_of(nbytes - first_n);
      m_beat.last = s_beat.last;
    end
  end

  assign m_valid = s_valid;
  assign s_ready = m_ready && (!two_beats || phase);

  always_ff @(posedge clk) begin
    if (!rst_n)                                phase <= 1'b0;
    else if (m_valid && m_ready && two_beats)  phase <= ~phase;
  end

endmodule
