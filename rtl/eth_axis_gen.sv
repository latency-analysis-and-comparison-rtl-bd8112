// eth_axis_gen: builds the 64-bit AXI stream for the 10G Ethernet MAC.
//
// One image line arrives as payload beats that each carry m valid bytes
// (m = 1..8, the same throughout a line) together with the line's
// line_info_t. A line is longer than an Ethernet frame should carry, so it
// is cut into frames of at most MAX_PAYLOAD (1440) payload bytes; the last
// frame of a line carries the rest. Because 1440 is a multiple of every
// usual m (1, 2, 3, 4, 5, 6, 8), a frame boundary never falls inside an
// input beat. Every frame is the 48-byte header from frame_header_builder
// (6 beats) followed by its payload packed into full 8-byte beats; only the
// last beat of a frame may be partial (keep = 2^k - 1) and it carries last.
//
// State machine: IDLE waits for the first payload beat of a line and latches
// the line information and word count; HDR sends the six header words; PAY
// moves payload through a 16-byte packing buffer. The buffer accepts an
// input beat while it holds at most 8 bytes and the frame still needs data,
// and emits a word whenever it holds 8 bytes or the frame's payload is all
// in. After the last beat of a frame it either starts the next frame of the
// same line (HDR) or returns to IDLE. The AVTP sequence number counts
// frames; the internal sequence number counts frames within a line.
//
// Interface: s_* payload input (gw_pkg::axis64_t, kind BEAT_PAYLOAD), info
// stable for the whole line, m_* the MAC stream with tready back-pressure.
// Frame length comes from the CSI-2 word count. Throughput is one output
// beat per clock when m_ready is high, plus six header beats per frame.
// Splitting at 1440 bytes and the state machine follow the design; the
// packing buffer and the IDLE/HDR/PAY encoding are this design's choices.
module eth_axis_gen
  import gw_pkg::*;
#(
  parameter int unsigned MAX_PAYLOAD_BYTES = MAX_PAYLOAD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  gw_cfg_t     cfg,
  input  line_info_t  info,
  input  logic        s_valid,
  output logic        s_ready,
  input  axis64_t     s_beat,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic [63:0] m_tdata,
  output logic [7:0]  m_tkeep,
  output logic        m_tlast,
  output logic        frame_start   // pulses with the first header beat of a frame
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY} state_e;

  state_e      state;
  line_info_t  line_r;
  logic [15:0] remaining;   // line bytes not yet taken (incl. current frame)
  logic [15:0] frame_len;   // payload bytes of the current frame (from the header builder)
  logic        last_frag;
  logic [15:0] taken;       // payload bytes of the current frame taken so far
  logic [7:0]  seq;
  logic [3:0]  frag;
  logic [2:0]  hdr_idx;
  logic [7:0]  pbuf [16];
  logic [4:0]  pcnt;

  logic [63:0]                 hdr_word;

  frame_header_builder #(.MAX_PAYLOAD_BYTES(MAX_PAYLOAD_BYTES)) u_hdr (
    .cfg         (cfg),
    .info        (line_r),
    .seq_num     (seq),
    .frag_idx    (frag),
    .remaining   (remaining),
    .payload_len (frame_len),
    .last_frag   (last_frag),
    .word_idx    (hdr_idx),
    .word        (hdr_word)
  );

  // ---------------- payload packing ----------------
  logic [3:0] n_in, out_n, shift_n;
  logic       all_taken, pay_out_valid, pay_out_last;
  logic       i_fire, o_fire;
  logic [4:0] base;
  logic [7:0] nbuf [16];

  assign n_in          = keep_count8(s_beat.keep);
  assign all_taken     = (taken == frame_len);
  assign pay_out_valid = (pcnt >= 5'd8) || (all_taken && pcnt != 5'd0);
  assign out_n         = (pcnt >= 5'd8) ? 4'd8 : pcnt[3:0];
  assign pay_out_last  = all_taken && (pcnt <= 5'd8);

  assign s_ready = (state == S_PAY) && !all_taken && (pcnt <= 5'd8);
  assign i_fire  = s_valid && s_ready;
  assign o_fire  = m_tvalid && m_tready;

  always_comb begin
    m_tvalid = 1'b0;
    m_tdata  = '0;
    m_tkeep  = '0;
    m_tlast  = 1'b0;
    case (state)
      S_HDR: begin
        m_tvalid = 1'b1;
        m_tdata  = hdr_word;
        m_tkeep  = 8'hFF;
      end
      S_PAY: begin
        m_tvalid = pay_out_valid;
        for (int j = 0; j < 8; j++) m_tdata[8*j +: 8] = pbuf[j];
        m_tkeep  = 8'((9'd1 << out_n) - 9'd1);
        m_tlast  = pay_out_last;
      end
      default: ;
    endcase
  end

  assign frame_start = (state == S_HDR) && (hdr_idx == 3'd0) && o_fire;

  always_comb begin
    shift_n = (state == S_PAY && o_fire) ? out_n : 4'd0;
    base    = pcnt - 5'(shift_n);
    for (int i = 0; i < 16; i++)
      nbuf[i] = (i + 32'(shift_n) < 16) ? pbuf[i + 32'(shift_n)] : 8'h00;
    if (i_fire)
      for (int j = 0; j < 8; j++)
        if (4'(j) < n_in) nbuf[32'(base) + j] = s_beat.data[8*j +: 8];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      line_r    <= '0;
      remaining <= '0;
      taken     <= '0;
      seq       <= '0;
      frag      <= '0;
      hdr_idx   <= '0;
      pcnt      <= '0;
      for (int i = 0; i < 16; i++) pbuf[i] <= '0;
    end else begin
      case (state)
        S_IDLE: if (s_valid && info.word_count != 16'd0) begin
          line_r    <= info;
          remaining <= info.word_count;
          frag      <= '0;
          hdr_idx   <= '0;
          state     <= S_HDR;
        end
        S_HDR: if (o_fire) begin
          hdr_idx <= hdr_idx + 3'd1;
          if (hdr_idx == 3'(HDR_WORDS - 1)) begin
            taken <= '0;
            state <= S_PAY;
          end
        end
        S_PAY: begin
          for (int i = 0; i < 16; i++) pbuf[i] <= nbuf[i];
          pcnt <= base + (i_fire ? 5'(n_in) : 5'd0);
          if (i_fire) taken <= taken + 16'(n_in);
          if (o_fire && pay_out_last) begin
            seq       <= seq + 8'd1;
            remaining <= remaining - frame_len;
            if (last_frag) begin
              state <= S_IDLE;
            end else begin
              frag      <= frag + 4'd1;
              hdr_idx   <= '0;
              state     <= S_HDR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The line's last payload beat must carry last, and no earlier beat may.
  a_last_at_end: assert property (@(posedge clk) disable iff (!rst_n)
    i_fire |-> s_beat.last == (taken + 16'(n_in) == remaining));
  a_no_split: assert property (@(posedge clk) disable iff (!rst_n)
    i_fire |-> taken + 16'(n_in) <= frame_len);
  a_m_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast));

endmodule
