// gw_pkg: types and constants shared by the CSI-2 to 10G Ethernet gateway.
//
// The gateway moves camera lines from a CSI-2 receiver (96-bit stream, four
// pixels per 200 MHz clock) to a 10G Ethernet MAC (64-bit AXI stream). The
// stream formats between the stages are defined here as packed structs; the
// frame layout constants follow the IEEE1722-based header of the design
// (48 header bytes, at most 1440 payload bytes per frame). Ethertype, VLAN
// and AVTP subtype values are this design's choices where the layout only
// names the field.
package gw_pkg;

  // ---------------------------------------------------------------------
  // Frame format
  // ---------------------------------------------------------------------
  localparam int unsigned HDR_BYTES       = 48;   // bytes 0..47 of the frame
  localparam int unsigned HDR_WORDS       = HDR_BYTES / 8;
  localparam int unsigned MAX_PAYLOAD     = 1440; // payload bytes per frame
  localparam logic [15:0] ETHTYPE_VLAN    = 16'h8100; // 802.1Q TPID
  localparam logic [15:0] ETHTYPE_AVTP    = 16'h22F0; // IEEE1722 Ethertype
  localparam logic [7:0]  AVTP_SUBTYPE_EXP = 8'h7F;   // experimental format

  // ---------------------------------------------------------------------
  // 96-bit stream from the CSI-2 receiver (four pixel slots of 24 bits).
  // The first beat of every line carries {timestamp[63:0], packet header[31:0]}
  // and has hdr = 1; sof marks the first line of an image frame.
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic        sof;   // first line of an image frame (with hdr)
    logic        hdr;   // beat carries CSI-2 packet header and timestamp
    logic        last;  // last beat of the line
    logic [11:0] keep;  // byte valid, contiguous from byte 0
    logic [95:0] data;
  } csi_beat_t;

  // ---------------------------------------------------------------------
  // 64-bit AXI stream inside the gateway (after the width conversion).
  // kind tells header, timestamp and payload beats apart.
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    BEAT_PAYLOAD = 2'd0,
    BEAT_CSIHDR  = 2'd1,
    BEAT_TSTAMP  = 2'd2
  } beat_kind_e;

  typedef struct packed {
    logic        sof;
    beat_kind_e  kind;
    logic        last;
    logic [7:0]  keep;
    logic [63:0] data;
  } axis64_t;

  // ---------------------------------------------------------------------
  // Per-line information extracted by the preprocessing stage.
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic [63:0] timestamp;   // hardware time at line reception
    logic [15:0] line_number; // line index inside the image frame
    logic [15:0] word_count;  // CSI-2 payload size of the line in bytes
    logic [5:0]  data_type;   // CSI-2 data type
    logic [1:0]  vc;          // CSI-2 virtual channel
    logic        sof;         // first line of an image frame
  } line_info_t;

  // ---------------------------------------------------------------------
  // Static configuration of the Ethernet stream.
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    BO_NONE      = 2'd0,  // bytes as received
    BO_SWAP16    = 2'd1,  // swap the two bytes of every 16-bit word
    BO_REVERSE   = 2'd2   // reverse the order of the valid bytes of a beat
  } byte_order_e;

  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [15:0] vlan_tci;
    logic [7:0]  avtp_subtype;
    logic [63:0] stream_id;
    byte_order_e byte_order;
  } gw_cfg_t;

  // Number of valid bytes of a contiguous keep mask.
  function automatic logic [3:0] keep_count8(input logic [7:0] keep);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < 8; i++) n = n + 4'(keep[i]);
    return n;
  endfunction

  function automatic logic [3:0] keep_count12(input logic [11:0] keep);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < 12; i++) n = n + 4'(keep[i]);
    return n;
  endfunction

endpackage
