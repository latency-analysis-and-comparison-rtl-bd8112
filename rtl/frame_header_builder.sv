// frame_header_builder: assembles the 48-byte header of one gateway frame.
//
// The header is an Ethernet header with an 802.1Q VLAN tag, followed by an
// IEEE1722 (AVTP) common header and the line-specific fields that let the
// receiver put image lines back together and compute the latency:
//
//   bytes  0- 5  destination MAC         bytes 30-37  timestamp (64 bit)
//   bytes  6-11  source MAC              bytes 38-39  line number
//   bytes 12-13  Ethertype 0x8100        byte  40     [7:4] reserved, [3:0] intern seq num
//   bytes 14-15  VLAN tag (TCI)          byte  41     [7:4] reserved, [3:0] event
//   bytes 16-17  AVTP type 0x22F0        bytes 42-43  CSI-2 word count
//   byte  18     AVTP subtype            byte  44     CSI-2 data type
//   byte  19     sv, 6 reserved, tv      byte  45     [7:2] reserved, [1:0] VC
//   byte  20     sequence number         bytes 46-47  stream data length
//   byte  21     reserved
//   bytes 22-29  stream ID
//
// Besides placing the fields, the module works out the per-frame values:
// from the bytes of the line still to be sent (remaining) it derives the
// frame's payload length, min(remaining, MAX_PAYLOAD_BYTES), and whether
// this is the last frame of the line; both also go to the stream generator,
// which uses them to end the frame.
//
// Multi-byte fields are big-endian (network order). The field positions
// follow the design's frame layout; the Ethertype values, sv = tv = 1, the
// data type byte being {2'b00, DT} and the event bits (bit 0: last frame of
// the line, bit 1: first line of an image frame) are this design's choices.
//
// Output: word holds header word word_idx (0..5), i.e. frame bytes
// 8*word_idx..8*word_idx+7 with byte 8w+j in bits 8j+7:8j, which is the byte
// order of a 64-bit Ethernet MAC stream; an index above 5 gives zero. The
// stream generator steps word_idx through the header one word per clock.
// Purely combinational.
module frame_header_builder
  import gw_pkg::*;
#(
  parameter int unsigned MAX_PAYLOAD_BYTES = MAX_PAYLOAD
) (
  input  gw_cfg_t                    cfg,
  input  line_info_t                 info,
  input  logic [7:0]                 seq_num,     // AVTP sequence number
  input  logic [3:0]                 frag_idx,    // frame index within the line
  input  logic [15:0]                remaining,   // line bytes not yet framed
  output logic [15:0]                payload_len, // payload bytes of this frame
  output logic                       last_frag,   // this frame ends the line
  input  logic [2:0]                 word_idx,    // header word to output
  output logic [63:0]                word
);
  logic [7:0] b [HDR_BYTES];
  logic [3:0] event_bits;

  assign last_frag   = (remaining <= 16'(MAX_PAYLOAD_BYTES));
  assign payload_len = last_frag ? remaining : 16'(MAX_PAYLOAD_BYTES);
  assign event_bits  = {2'b00, info.sof, last_frag};

  always_comb begin
    for (int i = 0; i < 6; i++) begin
      b[i]     = cfg.dst_mac[8*(5-i) +: 8];
      b[6 + i] = cfg.src_mac[8*(5-i) +: 8];
    end
    {b[12], b[13]} = ETHTYPE_VLAN;
    {b[14], b[15]} = cfg.vlan_tci;
    {b[16], b[17]} = ETHTYPE_AVTP;
    b[18] = cfg.avtp_subtype;
    b[19] = {1'b1, 6'b000000, 1'b1};            // sv, reserved, tv
    b[20] = seq_num;
    b[21] = 8'h00;
    for (int i = 0; i < 8; i++) begin
      b[22 + i] = cfg.stream_id[8*(7-i) +: 8];
      b[30 + i] = info.timestamp[8*(7-i) +: 8];
    end
    {b[38], b[39]} = info.line_number;
    b[40] = {4'h0, frag_idx};
    b[41] = {4'h0, event_bits};
    {b[42], b[43]} = info.word_count;
    b[44] = {2'b00, info.data_type};
    b[45] = {6'b000000, info.vc};
    {b[46], b[47]} = payload_len;

    word = '0;
    for (int w = 0; w < HDR_WORDS; w++)
      if (word_idx == 3'(w))
        for (int j = 0; j < 8; j++)
          word[8*j +: 8] = b[8*w + j];
  end
endmodule
