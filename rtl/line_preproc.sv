// line_preproc: preprocessing of a buffered image line before framing.
//
// Each line leaves the packet FIFO as a CSI-2 packet-header beat, a
// timestamp beat and the payload beats (the last one flagged last). This
// stage takes the two leading beats off the stream and turns them into a
// line_info_t: data type and virtual channel from the data identifier byte,
// the word count (payload bytes of the line), the reception timestamp and a
// line number that restarts at 0 on the first line of an image frame (sof)
// and counts up otherwise. The payload beats are passed on, with their
// byte order adjusted by cfg_byte_order so that the receiver sees a fixed
// layout: unchanged, the two bytes of each 16-bit word swapped, or the
// valid bytes of the beat reversed.
//
// Packet header layout (CSI-2): byte 0 = {VC[1:0], DT[5:0]}, bytes 1-2 =
// word count, least significant byte first, byte 3 = ECC (checked by the
// receiver core, ignored here).
//
// Timing: the payload path is combinational (valid/ready pass straight
// through); info is written while the header and timestamp beats are taken
// and stays stable until the next line's header, i.e. for the whole payload
// of the line. Header and timestamp are consumed one per cycle without
// waiting for the downstream side. Splitting the header from the payload and
// the byte-order step follow the design; the three byte-order modes and the
// line counting rule are this design's choices.
module line_preproc
  import gw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  byte_order_e cfg_byte_order,
  input  logic        s_valid,
  output logic        s_ready,
  input  axis64_t     s_beat,
  output logic        m_valid,
  input  logic        m_ready,
  output axis64_t     m_beat,
  output line_info_t  info
);
  typedef enum logic [1:0] {S_HDR, S_TS, S_PAY} state_e;
  state_e      state;
  logic [15:0] line_cnt;
  logic        s_fire;

  function automatic logic [63:0] reorder(input logic [63:0] d, input logic [7:0] keep,
                                          input byte_order_e mode);
    logic [63:0] r;
    logic [3:0]  n;
    r = d;
    n = keep_count8(keep);
    case (mode)
      BO_SWAP16: begin
        for (int i = 0; i < 4; i++)
          if (keep[2*i+1]) r[16*i +: 16] = {d[16*i +: 8], d[16*i+8 +: 8]};
      end
      BO_REVERSE: begin
        for (int j = 0; j < 8; j++)
          if (4'(j) < n) r[8*j +: 8] = d[8*(32'(n) - 1 - j) +: 8];
      end
      default: ;
    endcase
    return r;
  endfunction

  always_comb begin
    m_beat      = s_beat;
    m_beat.data = reorder(s_beat.data, s_beat.keep, cfg_byte_order);
  end

  assign m_valid = (state == S_PAY) && s_valid;
  assign s_ready = (state == S_PAY) ? m_ready : 1'b1;
  assign s_fire  = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_HDR;
      line_cnt <= '1;
      info     <= '0;
    end else if (s_fire) begin
      unique case (state)
        S_HDR: if (s_beat.kind == BEAT_CSIHDR) begin
          info.data_type   <= s_beat.data[5:0];
          info.vc          <= s_beat.data[7:6];
          info.word_count  <= s_beat.data[23:8];
          info.sof         <= s_beat.sof;
          info.line_number <= s_beat.sof ? 16'd0 : line_cnt + 16'd1;
          line_cnt         <= s_beat.sof ? 16'd0 : line_cnt + 16'd1;
          state            <= S_TS;
        end
        S_TS: begin
          info.timestamp <= s_beat.data;
          state          <= s_beat.last ? S_HDR : S_PAY;
        end
        S_PAY: if (s_beat.last) state <= S_HDR;
        default: state <= S_HDR;
      endcase
    end
  end

  a_ts_follows_hdr: assert property (@(posedge clk) disable iff (!rst_n)
    s_valid && state == S_TS |-> s_beat.kind == BEAT_TSTAMP);
  a_pay_kind: assert property (@(posedge clk) disable iff (!rst_n)
    s_valid && state == S_PAY |-> s_beat.kind == BEAT_PAYLOAD);

endmodule
