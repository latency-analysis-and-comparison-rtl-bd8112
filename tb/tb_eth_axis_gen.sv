// tb_eth_axis_gen: self-checking test of the Ethernet stream generator.
//
// Lines of payload beats with m = 3, 4, 5, 6 or 8 valid bytes are fed in
// with their line information while the MAC side applies random
// back-pressure. The expected frames are built here: 48 header bytes (field
// by field), then the line's payload cut into pieces of at most 1440 bytes;
// every frame is compared byte by byte, inner beats must be full (keep =
// 0xFF) and the AVTP sequence number must run on across lines. With ready
// always high and the input never empty, consecutive full frames must start
// 187 clocks apart (6 header beats, one clock to fill the packing buffer,
// 180 payload beats).
`timescale 1ns/1ps
module tb_eth_axis_gen;
  import gw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;
  gw_cfg_t cfg;
  line_info_t info;
  logic s_valid, s_ready;
  axis64_t s_beat;
  logic m_tvalid, m_tready, m_tlast, frame_start;
  logic [63:0] m_tdata;
  logic [7:0] m_tkeep;

  eth_axis_gen dut (.*);

  int checks = 0, failures = 0;
  typedef byte unsigned bq_t[$];
  bq_t exp_frames[$];
  bq_t cur;
  int seq = 0, ready_pct = 100, frames = 0, n_stall = 0;
  longint cycle = 0, fs_cycles[$];
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_tready <= ($urandom_range(99) < ready_pct);

  always @(posedge clk) if (rst_n) begin
    if (frame_start) fs_cycles.push_back(cycle);
    if (m_tvalid && !m_tready) n_stall++;
    if (m_tvalid && m_tready) begin
      for (int j = 0; j < 8; j++) if (m_tkeep[j]) cur.push_back(m_tdata[8*j +: 8]);
      if (!m_tlast) begin
        checks++;
        if (m_tkeep != 8'hFF) begin failures++; $display("FAIL partial inner beat"); end
      end else begin
        bq_t e;
        e = exp_frames.pop_front();
        checks++;
        if (e.size() != cur.size()) begin failures++; $display("FAIL frame %0d length %0d vs %0d", frames, cur.size(), e.size()); end
        else foreach (e[i]) if (e[i] != cur[i]) begin
          failures++; $display("FAIL frame %0d byte %0d %02x vs %02x", frames, i, cur[i], e[i]); break;
        end
        cur.delete();
        frames++;
      end
    end
  end

  function automatic void be(ref bq_t q, input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(byte'(v >> (8 * i)));
  endfunction

  logic acc = 0;
  always @(posedge clk) acc <= s_valid && s_ready;

  task automatic line(int m, int beats, bit sof, int line_no);
    bq_t pay;
    int wc = m * beats;
    int nfr = (wc + 1439) / 1440;
    line_info_t li = '{timestamp: {$urandom, $urandom}, line_number: 16'(line_no),
                       word_count: 16'(wc), data_type: 6'($urandom), vc: 2'($urandom), sof: sof};
    axis64_t bt [$];
    for (int i = 0; i < beats; i++) begin
      axis64_t b = '0;
      b.last = (i == beats - 1);
      for (int j = 0; j < m; j++) begin
        b.keep[j] = 1'b1;
        b.data[8*j +: 8] = 8'($urandom);
        pay.push_back(b.data[8*j +: 8]);
      end
      bt.push_back(b);
    end
    for (int f = 0; f < nfr; f++) begin
      bq_t fr;
      int len = (wc - 1440 * f > 1440) ? 1440 : wc - 1440 * f;
      be(fr, cfg.dst_mac, 6); be(fr, cfg.src_mac, 6); be(fr, 16'h8100, 2); be(fr, cfg.vlan_tci, 2);
      be(fr, 16'h22F0, 2); be(fr, cfg.avtp_subtype, 1); be(fr, 8'h81, 1); be(fr, seq & 255, 1);
      be(fr, 0, 1); be(fr, cfg.stream_id, 8); be(fr, li.timestamp, 8); be(fr, line_no, 2);
      be(fr, f, 1); be(fr, (sof ? 2 : 0) + (f == nfr - 1 ? 1 : 0), 1); be(fr, wc, 2);
      be(fr, li.data_type, 1); be(fr, li.vc, 1); be(fr, len, 2);
      for (int i = 0; i < len; i++) fr.push_back(pay[1440 * f + i]);
      exp_frames.push_back(fr);
      seq++;
    end
    @(negedge clk);
    info = li;
    foreach (bt[i]) begin
      s_valid = 1; s_beat = bt[i];
      do begin @(posedge clk); #1; end while (!acc);
      @(negedge clk);
    end
    s_valid = 0;
    // info must stay until the line has been framed
    while (exp_frames.size() != 0) @(negedge clk);
  endtask

  initial begin
    cfg = '{dst_mac: 48'h91E0_F000_FE00, src_mac: 48'h000A_3501_0203, vlan_tci: 16'hA00A,
            avtp_subtype: 8'h7F, stream_id: 64'hDEAD_BEEF_0000_0001, byte_order: BO_NONE};
    info = '0; s_valid = 0; s_beat = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // rate: 3 full frames back to back with ready high
    line(8, 540, 1, 0);
    checks++;
    if (fs_cycles.size() != 3 || fs_cycles[1] - fs_cycles[0] != 187 || fs_cycles[2] - fs_cycles[1] != 187) begin
      failures++; $display("FAIL frame spacing %p", fs_cycles);
    end
    ready_pct = 60;
    line(6, 960, 0, 1);     // 5760 bytes, RAW12-like
    line(8, 456, 0, 2);     // 3648 bytes
    line(5, 288, 0, 3);     // exactly 1440
    line(4, 25, 1, 0);      // 100 bytes
    line(3, 700, 0, 1);     // 2100 bytes
    line(8, 250, 0, 2);     // 2000 bytes
    for (int i = 0; i < 40; i++) line(8, 1 + $urandom_range(400), i == 0, i);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    $display("frames %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
