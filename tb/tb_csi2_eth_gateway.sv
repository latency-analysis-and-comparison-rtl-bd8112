// tb_csi2_eth_gateway: end-to-end test of the gateway at its default sizes.
//
// A CSI-2 receiver model sends image lines as the 96-bit stream (header beat
// with packet header and timestamp taken from t_fpga, then payload beats of
// k valid bytes). A reference model, written independently of the RTL,
// turns every line into the expected Ethernet frames (48-byte header,
// payload cut at 1440 bytes, byte order applied per 64-bit beat), and a
// monitor compares every frame byte by byte. The MAC side pauses the stream
// at random. Lines cover the three camera line sizes (5760 bytes RAW12 and
// YUV, 3648 bytes YUV), short lines, 24-bit and 20-bit pixels (beats split
// in two), all three byte-order modes, frame starts and a time load.
// It also checks that no frame of a line leaves before the line has fully
// arrived (packet mode), and that the delay from a line's last input beat to
// its first Ethernet beat is 6 clocks when nothing stalls. Each
// mechanism is counted and must occur at least once.
`timescale 1ns/1ps
module tb_csi2_eth_gateway;
  import gw_pkg::*;

  localparam int MAXP = 1440;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #2.5 clk = ~clk;   // 200 MHz

  gw_cfg_t     cfg;
  logic        time_load, time_adj_up, time_adj_down;
  logic [63:0] time_load_value, t_fpga;
  logic        csi_valid, csi_ready;
  csi_beat_t   csi_beat;
  logic        eth_tvalid, eth_tready, eth_tlast;
  logic [63:0] eth_tdata;
  logic [7:0]  eth_tkeep;
  logic        frame_start;
  logic [8:0]  in_fifo_level;
  logic [11:0] lines_buffered;

  csi2_eth_gateway dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------- reference model ----------------
  typedef byte unsigned bq_t[$];
  bq_t    exp_frames[$];
  longint line_last_in[$];      // cycle of last input beat, per line
  int     line_nframes[$];      // frames per line
  bit     line_measure[$];      // line used for the unstalled latency check
  int     exp_seq = 0;
  int     exp_line_no = -1;

  function automatic byte unsigned pay_byte(int line, int idx);
    return byte'((line * 37 + idx * 11 + (idx >> 8)) & 8'hFF);
  endfunction

  function automatic void push_be(ref bq_t q, input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(byte'(v >> (8 * i)));
  endfunction

  function automatic bq_t reorder_group(bq_t g, byte_order_e mode);
    bq_t r = g;
    if (mode == BO_SWAP16) begin
      for (int i = 0; i + 1 < g.size(); i += 2) begin
        r[i] = g[i + 1]; r[i + 1] = g[i];
      end
    end else if (mode == BO_REVERSE) begin
      foreach (g[i]) r[i] = g[g.size() - 1 - i];
    end
    return r;
  endfunction

  // Build the expected frames of a line and queue them.
  function automatic void expect_line(int line_id, int wc, int k, bit sof,
                                      longint unsigned ts, byte_order_e mode,
                                      logic [5:0] dt, logic [1:0] vc);
    bq_t pay;
    int nfr;
    int beats = wc / k;
    exp_line_no = sof ? 0 : exp_line_no + 1;
    for (int b = 0; b < beats; b++) begin
      bq_t all, g1, g2;
      for (int i = 0; i < k; i++) all.push_back(pay_byte(line_id, b * k + i));
      if (k <= 8) begin
        g1 = reorder_group(all, mode);
        foreach (g1[i]) pay.push_back(g1[i]);
      end else begin
        int h = (k + 1) / 2;
        for (int i = 0; i < k; i++) if (i < h) g1.push_back(all[i]); else g2.push_back(all[i]);
        g1 = reorder_group(g1, mode);
        g2 = reorder_group(g2, mode);
        foreach (g1[i]) pay.push_back(g1[i]);
        foreach (g2[i]) pay.push_back(g2[i]);
      end
    end
    nfr = (wc + MAXP - 1) / MAXP;
    for (int f = 0; f < nfr; f++) begin
      bq_t fr;
      int len = (wc - f * MAXP > MAXP) ? MAXP : wc - f * MAXP;
      push_be(fr, cfg.dst_mac, 6);
      push_be(fr, cfg.src_mac, 6);
      push_be(fr, 16'h8100, 2);
      push_be(fr, cfg.vlan_tci, 2);
      push_be(fr, 16'h22F0, 2);
      push_be(fr, cfg.avtp_subtype, 1);
      push_be(fr, 8'h81, 1);
      push_be(fr, exp_seq & 255, 1);
      push_be(fr, 0, 1);
      push_be(fr, cfg.stream_id, 8);
      push_be(fr, ts, 8);
      push_be(fr, exp_line_no, 2);
      push_be(fr, f, 1);
      push_be(fr, (sof ? 2 : 0) + ((f == nfr - 1) ? 1 : 0), 1);
      push_be(fr, wc, 2);
      push_be(fr, dt, 1);
      push_be(fr, vc, 1);
      push_be(fr, len, 2);
      for (int i = 0; i < len; i++) fr.push_back(pay[f * MAXP + i]);
      exp_frames.push_back(fr);
      exp_seq++;
    end
    line_nframes.push_back(nfr);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_multi = 0, n_short_last = 0, n_split = 0, n_hold = 0;
  int n_mode[3] = '{0, 0, 0};
  int n_sof = 0, n_time_load = 0, n_in_full = 0;
  int n_lat_checked = 0;

  always @(posedge clk) if (rst_n) begin
    if (eth_tvalid && !eth_tready) n_stall++;
    if (dut.u_pkt_fifo.level != 0 && lines_buffered == 0) n_hold++;
    if (csi_valid && !csi_ready) n_in_full++;
  end

  // ---------------- CSI-2 receiver model ----------------
  int line_id = 0;
  int ready_pct = 100;

  longint last_xfer;

  // Called at a falling edge with the beat on csi_*; returns right after the
  // rising edge that transfers it. csi_ready only changes on rising edges.
  task automatic put_beat();
    while (!csi_ready) @(negedge clk);
    last_xfer = cycle;
    @(posedge clk);
  endtask

  task automatic send_line(int wc, int k, bit sof, byte_order_e mode, bit measure,
                           int gap = 0);
    longint unsigned ts;
    logic [5:0] dt = (k == 12) ? 6'h24 : (k == 6 || k == 10) ? 6'h2C : 6'h1E;
    logic [1:0] vc = 2'(line_id);
    int beats = wc / k;
    csi_beat_t bt;
    // header beat
    @(negedge clk);
    ts = t_fpga;
    bt = '0;
    bt.hdr = 1'b1;
    bt.sof = sof;
    bt.keep = 12'hFFF;
    bt.data = {ts, 8'hA5, wc[15:0], vc, dt};
    csi_valid = 1'b1; csi_beat = bt;
    put_beat();
    expect_line(line_id, wc, k, sof, ts, mode, dt, vc);
    line_measure.push_back(measure);
    if (k > 8) n_split += beats;
    if (wc > MAXP) n_multi++;
    if (wc > MAXP && wc % MAXP != 0) n_short_last++;
    n_mode[mode]++;
    if (sof) n_sof++;
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
      if (gap > 0 && (b % 4) == 3) begin
        csi_valid = 1'b0;
        repeat (gap) @(negedge clk);
      end
      bt = '0;
      bt.keep = 12'((13'd1 << k) - 1);
      for (int i = 0; i < k; i++) bt.data[8*i +: 8] = pay_byte(line_id, b * k + i);
      bt.last = (b == beats - 1);
      csi_valid = 1'b1; csi_beat = bt;
      put_beat();
    end
    line_last_in.push_back(last_xfer);
    @(negedge clk);
    csi_valid = 1'b0;
    line_id++;
  endtask

  // ---------------- MAC model and monitor ----------------
  bq_t    cur;
  int     frames_seen = 0, frame_in_line = 0, lines_done = 0;
  longint first_beat_cycle = -1;

  always @(negedge clk) eth_tready <= ($urandom_range(99) < ready_pct);

  always @(posedge clk) if (rst_n && eth_tvalid && eth_tready) begin
    if (cur.size() == 0 && frame_in_line == 0) begin
      // first beat of a line's first frame
      checks++;
      if (line_last_in.size() == 0 || cycle <= line_last_in[0])
        fail("frame of a line left before the line was complete");
      if (line_measure.size() != 0 && line_measure[0]) begin
        checks++;
        n_lat_checked++;
        $display("line %0d: first Ethernet beat %0d clocks after its last input beat", lines_done, cycle - line_last_in[0]);
        if (cycle - line_last_in[0] != 6)
          fail($sformatf("tail latency %0d clocks", cycle - line_last_in[0]));
      end
    end
    for (int j = 0; j < 8; j++) if (eth_tkeep[j]) cur.push_back(eth_tdata[8*j +: 8]);
    if (!eth_tlast) begin
      checks++;
      if (eth_tkeep != 8'hFF) fail("partial beat inside a frame");
    end
    if (eth_tlast) begin
      bq_t e;
      checks++;
      if (exp_frames.size() == 0) fail("unexpected frame");
      else begin
        e = exp_frames.pop_front();
        if (e.size() != cur.size())
          fail($sformatf("frame %0d length %0d expected %0d", frames_seen, cur.size(), e.size()));
        else foreach (e[i]) if (e[i] != cur[i]) begin
          fail($sformatf("frame %0d byte %0d = %02x expected %02x", frames_seen, i, cur[i], e[i]));
          break;
        end
      end
      frames_seen++;
      frame_in_line++;
      cur.delete();
      if (line_nframes.size() != 0 && frame_in_line == line_nframes[0]) begin
        void'(line_nframes.pop_front());
        void'(line_last_in.pop_front());
        void'(line_measure.pop_front());
        frame_in_line = 0;
        lines_done++;
      end
    end
  end

  task automatic drain();
    int t = 0;
    while ((exp_frames.size() != 0) && t < 200000) begin @(posedge clk); t++; end
    repeat (20) @(posedge clk);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    cfg = '{dst_mac: 48'h01_1B_C5_0A_C0_00, src_mac: 48'h00_0A_35_12_34_56,
            vlan_tci: 16'h6002, avtp_subtype: AVTP_SUBTYPE_EXP,
            stream_id: 64'h000A_3512_3456_0001, byte_order: BO_NONE};
    time_load = 0; time_load_value = '0; time_adj_up = 0; time_adj_down = 0;
    csi_valid = 0; csi_beat = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // Unstalled lines: latency check, three camera line sizes.
    ready_pct = 100;
    send_line(5760, 6, 1'b1, BO_NONE, 1'b1);       // RAW12 line, 4 frames
    drain();
    send_line(5760, 8, 1'b0, BO_NONE, 1'b1);       // 16-bit YUV line
    drain();
    send_line(3648, 8, 1'b0, BO_NONE, 1'b1);       // 3648-byte line, short last frame
    drain();

    // Time base load.
    @(negedge clk); time_load = 1'b1; time_load_value = 64'h1234_5678_9ABC_0000;
    @(negedge clk); time_load = 1'b0;
    checks++;
    if (t_fpga != 64'h1234_5678_9ABC_0000) fail("time load");
    @(negedge clk);
    checks++;
    if (t_fpga != 64'h1234_5678_9ABC_0005) fail("time after load");
    n_time_load++;

    // Back-pressure, split beats, several lines in flight.
    ready_pct = 60;
    send_line(2880, 12, 1'b1, BO_NONE, 1'b0);      // 24-bit pixels
    send_line(1440, 10, 1'b0, BO_NONE, 1'b0);      // 20-bit pixels, exactly one frame
    send_line(600, 4, 1'b0, BO_NONE, 1'b0, 3);     // 8-bit pixels, gaps in the input
    send_line(5760, 6, 1'b0, BO_NONE, 1'b0);
    drain();

    // Byte-order modes (changed only while the gateway is idle).
    cfg.byte_order = BO_SWAP16;
    send_line(3000, 6, 1'b1, BO_SWAP16, 1'b0);
    send_line(1200, 12, 1'b0, BO_SWAP16, 1'b0);
    drain();
    cfg.byte_order = BO_REVERSE;
    send_line(2400, 8, 1'b0, BO_REVERSE, 1'b0);
    send_line(960, 12, 1'b0, BO_REVERSE, 1'b0);
    drain();

    // Long MAC stall: the input FIFO fills up behind a full packet FIFO.
    cfg.byte_order = BO_NONE;
    ready_pct = 0;
    fork
      begin
        send_line(5760, 6, 1'b1, BO_NONE, 1'b0);
        send_line(5760, 6, 1'b0, BO_NONE, 1'b0);
        send_line(5760, 6, 1'b0, BO_NONE, 1'b0);
      end
      begin
        repeat (4000) @(posedge clk);
        ready_pct = 80;
      end
    join
    drain();

    checks++;
    if (exp_frames.size() != 0) fail($sformatf("%0d frames never arrived", exp_frames.size()));
    checks++;
    if (lines_done != line_id) fail($sformatf("lines done %0d of %0d", lines_done, line_id));

    // Every mechanism must have happened.
    checks++; if (n_stall == 0)       fail("no MAC back-pressure");
    checks++; if (n_multi == 0)       fail("no line split over several frames");
    checks++; if (n_short_last == 0)  fail("no short last frame");
    checks++; if (n_split == 0)       fail("no 96-bit beat split over two clocks");
    checks++; if (n_hold == 0)        fail("packet FIFO never held back an incomplete line");
    checks++; if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) fail("byte-order mode unused");
    checks++; if (n_sof < 2)          fail("frame start not repeated");
    checks++; if (n_time_load == 0)   fail("no time load");
    checks++; if (n_in_full == 0)     fail("input FIFO never filled");
    checks++; if (n_lat_checked != 3) fail("latency not measured");
    $display("lines=%0d frames=%0d stall=%0d multi=%0d short_last=%0d split=%0d hold=%0d modes=%0d/%0d/%0d sof=%0d in_full=%0d",
             line_id, frames_seen, n_stall, n_multi, n_short_last, n_split, n_hold,
             n_mode[0], n_mode[1], n_mode[2], n_sof, n_in_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
