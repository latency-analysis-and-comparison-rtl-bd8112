// tb_frame_header_builder: self-checking test of the 48-byte frame header.
//
// For random configurations, line information and fragment fields, the
// expected payload length (at most 1440 bytes, the rest of the line on its
// last frame) and last-frame flag are worked out here, and the expected
// header is built as a byte list, field by field in frame
// order (big-endian multi-byte fields), and compared with the module's
// output word for each word_idx 0..5, where frame byte 8w+j sits in bits
// 8j+7:8j of word w; indices 6 and 7 must give zero.
// A fixed example with known bytes at every field edge is checked as well.
`timescale 1ns/1ps
module tb_frame_header_builder;
  import gw_pkg::*;
  gw_cfg_t    cfg;
  line_info_t info;
  logic [7:0]  seq_num;
  logic [3:0]  frag_idx;
  logic [15:0] remaining, payload_len;
  logic        last_frag;
  logic [2:0]  word_idx;
  logic [63:0] word;
  logic [63:0] words [8];

  frame_header_builder dut (.*);

  int checks = 0, failures = 0;
  byte unsigned exp[$];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void be(longint unsigned v, int n);
    for (int i = n - 1; i >= 0; i--) exp.push_back(byte'(v >> (8 * i)));
  endfunction

  // read all eight word indices of the current header
  task automatic get_words();
    for (int w = 0; w < 8; w++) begin
      word_idx = 3'(w);
      #1;
      words[w] = word;
    end
    checks += 2;
    if (words[6] != '0 || words[7] != '0) begin failures++; $display("FAIL nonzero word past the header"); end
  endtask

  task automatic check_one();
    int len = (remaining > 1440) ? 1440 : remaining;
    bit lst = (remaining <= 1440);
    exp.delete();
    be(cfg.dst_mac, 6); be(cfg.src_mac, 6);
    be(16'h8100, 2); be(cfg.vlan_tci, 2); be(16'h22F0, 2);
    be(cfg.avtp_subtype, 1); be(8'b1000_0001, 1);
    be(seq_num, 1); be(0, 1);
    be(cfg.stream_id, 8); be(info.timestamp, 8); be(info.line_number, 2);
    be(frag_idx, 1); be({info.sof, lst}, 1);
    be(info.word_count, 2); be(info.data_type, 1); be(info.vc, 1);
    be(len, 2);
    get_words();
    checks += 2;
    if (payload_len != 16'(len)) begin failures++; $display("FAIL payload_len %0d for remaining %0d", payload_len, remaining); end
    if (last_frag != lst) begin failures++; $display("FAIL last_frag for remaining %0d", remaining); end
    for (int i = 0; i < 48; i++) begin
      checks++;
      if (words[i / 8][8 * (i % 8) +: 8] != exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL byte %0d = %02x expected %02x", i, words[i / 8][8 * (i % 8) +: 8], exp[i]);
      end
    end
  endtask

  initial begin
    cfg  = '{dst_mac: 48'h0102_0304_0506, src_mac: 48'h1112_1314_1516, vlan_tci: 16'h2122,
             avtp_subtype: 8'h7F, stream_id: 64'h3132_3334_3536_3738, byte_order: BO_NONE};
    info = '{timestamp: 64'h4142_4344_4546_4748, line_number: 16'h5152, word_count: 16'h6162,
             data_type: 6'h2C, vc: 2'd3, sof: 1'b1};
    seq_num = 8'h71; frag_idx = 4'h2; remaining = 16'h0123;
    get_words();
    // spot checks against hand-worked words
    checks++; if (words[0] != 64'h1211_0605_0403_0201) begin failures++; $display("FAIL word0 %h", words[0]); end
    checks++; if (words[2] != 64'h3231_0071_817F_F022) begin failures++; $display("FAIL word2 %h", words[2]); end
    checks++; if (words[5] != 64'h2301_032C_6261_0302) begin failures++; $display("FAIL word5 %h", words[5]); end
    check_one();
    repeat (200) begin
      cfg  = '{dst_mac: {$urandom, $urandom}, src_mac: {$urandom, $urandom}, vlan_tci: 16'($urandom),
               avtp_subtype: 8'($urandom), stream_id: {$urandom, $urandom}, byte_order: byte_order_e'($urandom_range(2))};
      info = '{timestamp: {$urandom, $urandom}, line_number: 16'($urandom), word_count: 16'($urandom),
               data_type: 6'($urandom), vc: 2'($urandom), sof: 1'($urandom)};
      seq_num = 8'($urandom); frag_idx = 4'($urandom);
      case ($urandom_range(3))
        0: remaining = 16'd1440;
        1: remaining = 16'd1441;
        2: remaining = 16'($urandom_range(1, 1440));
        default: remaining = 16'($urandom);
      endcase
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
