// tb_sensor_workloads: the three camera formats streamed through the gateway
// at its default sizes, with line latency measured against the hardware time.
//
// Each sensor sends one whole image frame (sof on its first line):
//   AR0820   2160 lines of 5760 bytes, RAW12 (4 pixels = 6 bytes per 96-bit beat)
//   IMX490   1860 lines of 5760 bytes, YUV 4:2:2 (4 pixels = 8 bytes per beat)
//   OV10650   940 lines of 3648 bytes, YUV 4:2:2 (8 bytes per beat)
// The receiver model delivers 3 bytes per 5 ns clock (0.6 byte/ns, the
// arrival rate that matches the 1.6652 ns/byte slope of the latency model
// t = 8653 ns + s * 1.6652 ns/byte) and leaves a blanking gap between lines.
// The MAC side takes 25 beats out of every 32 clocks, 64 bits at 156.25 MHz
// seen from a 200 MHz clock, i.e. the 10G line rate.
//
// For every line the monitor takes the timestamp from the header of the
// line's first frame and subtracts it from the hardware time when that
// frame's first beat leaves. Checks: every frame's header fields (line
// number, fragment index, lengths, timestamp) and payload bytes; no input
// overflow; each line's latency equals its arrival time plus the 6-clock
// pipeline (one clock either way for where the stamp is sampled), plus at
// most 7 clocks of MAC pacing; and the mean latency
// difference between 5760-byte and 3648-byte lines agrees within 2 % with
// the model's 2112 bytes * 1.6652 ns/byte = 3517 ns.
`timescale 1ns/1ps
module tb_sensor_workloads;
  import gw_pkg::*;

  localparam int GAP   = 300;    // blanking clocks between lines

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #2.5 clk = ~clk;

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

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- expected lines ----------------
  typedef struct {
    int     wc;
    int     line_no;
    int     seed;
    longint arrival_clocks;   // header beat to last beat
    longint ts;
  } line_t;
  line_t lines_q[$];

  function automatic byte unsigned pay_byte(int seed, int idx);
    return byte'((seed * 13 + idx * 7 + (idx >> 9)) & 8'hFF);
  endfunction

  // ---------------- MAC pacing and monitor ----------------
  int pace = 0;
  always @(negedge clk) begin
    eth_tready <= (pace < 25);
    pace <= (pace + 1) % 32;
  end

  int     byte_in_frame = 0, frag = 0, pay_off = 0;
  logic [7:0] hdr [48];
  longint first_out_time;
  real    lat_sum [3];
  int     lat_n [3];
  int     sensor_of_line [$];
  int     lines_out = 0;

  always @(posedge clk) if (rst_n && eth_tvalid && eth_tready) begin
    line_t L;
    logic [7:0] b;
    int len, s;
    longint unsigned ts;
    longint lat, lo;
    if (byte_in_frame == 0 && frag == 0) first_out_time = t_fpga;
    L = lines_q[0];
    for (int j = 0; j < 8; j++) if (eth_tkeep[j]) begin
      b = eth_tdata[8*j +: 8];
      if (byte_in_frame < 48) hdr[byte_in_frame] = b;
      else begin
        checks++;
        if (b != pay_byte(L.seed, pay_off)) fail($sformatf("line %0d payload byte %0d", L.line_no, pay_off));
        pay_off++;
      end
      byte_in_frame++;
    end
    if (eth_tlast) begin
      len = (L.wc - 1440 * frag > 1440) ? 1440 : L.wc - 1440 * frag;
      ts = {hdr[30], hdr[31], hdr[32], hdr[33], hdr[34], hdr[35], hdr[36], hdr[37]};
      checks += 5;
      if (byte_in_frame != 48 + len) fail($sformatf("frame length %0d", byte_in_frame));
      if ({hdr[46], hdr[47]} != 16'(len)) fail("stream data length");
      if ({hdr[42], hdr[43]} != 16'(L.wc)) fail("word count");
      if ({hdr[38], hdr[39]} != 16'(L.line_no)) fail($sformatf("line number %0d vs %0d", {hdr[38], hdr[39]}, L.line_no));
      if (hdr[40] != 8'(frag) || ts != L.ts) fail("fragment index or timestamp");
      if (frag == 0) begin
        lat = longint'(first_out_time - ts);
        lo = 5 * (L.arrival_clocks + 6);
        s = sensor_of_line[0];
        checks++;
        if (lat < lo - 5 || lat > lo + 35) fail($sformatf("latency %0d ns, arrival+pipeline %0d ns", lat, lo));
        lat_sum[s] += real'(lat);
        lat_n[s]++;
      end
      byte_in_frame = 0;
      frag++;
      if (pay_off == L.wc) begin
        void'(lines_q.pop_front());
        void'(sensor_of_line.pop_front());
        frag = 0;
        pay_off = 0;
        lines_out++;
      end
    end
  end

  int n_overflow = 0;
  always @(posedge clk) if (rst_n && csi_valid && !csi_ready) n_overflow++;

  // ---------------- receiver model: 3 bytes per clock ----------------
  int seed_ctr = 0;

  task automatic send_frame(int sensor, int nlines, int wc, int k, logic [5:0] dt);
    for (int ln = 0; ln < nlines; ln++) begin
      csi_beat_t bt;
      line_t L;
      longint t_hdr;
      int credit = 0;
      int beats = wc / k;
      L.wc = wc; L.line_no = ln; L.seed = seed_ctr++;
      @(negedge clk);
      L.ts = t_fpga;
      t_hdr = cycle;
      bt = '0;
      bt.hdr = 1'b1; bt.sof = (ln == 0); bt.keep = 12'hFFF;
      bt.data = {L.ts, 8'h00, 16'(wc), 2'd0, dt};
      csi_valid = 1'b1; csi_beat = bt;
      for (int b = 0; b < beats; b++) begin
        @(negedge clk);
        // wait for enough bytes to have arrived over the lanes
        credit += 3;
        while (credit < k) begin
          csi_valid = 1'b0;
          @(negedge clk);
          credit += 3;
        end
        credit -= k;
        bt = '0;
        bt.keep = 12'((13'd1 << k) - 1);
        for (int i = 0; i < k; i++) bt.data[8*i +: 8] = pay_byte(L.seed, b * k + i);
        bt.last = (b == beats - 1);
        csi_valid = 1'b1; csi_beat = bt;
        if (b == beats - 1) L.arrival_clocks = cycle - t_hdr;
      end
      lines_q.push_back(L);
      sensor_of_line.push_back(sensor);
      @(negedge clk);
      csi_valid = 1'b0;
      repeat (GAP) @(negedge clk);
    end
  endtask

  initial begin
    real m0, m1, m2, d, model_d;
    cfg = '{dst_mac: 48'h91E0_F000_FE01, src_mac: 48'h000A_3500_0001, vlan_tci: 16'h6002,
            avtp_subtype: AVTP_SUBTYPE_EXP, stream_id: 64'h000A_3500_0001_0000, byte_order: BO_NONE};
    time_load = 0; time_load_value = '0; time_adj_up = 0; time_adj_down = 0;
    csi_valid = 0; csi_beat = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    send_frame(0, 2160, 5760, 6, 6'h2C);   // AR0820, RAW12
    send_frame(1, 1860, 5760, 8, 6'h1E);   // IMX490, YUV422 8 bit
    send_frame(2, 940, 3648, 8, 6'h1E);   // OV10650, YUV422 8 bit
    while (lines_q.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);

    checks++;
    if (n_overflow != 0) fail($sformatf("input stalled %0d clocks: gateway slower than the sensor", n_overflow));
    checks++;
    if (lines_out != 2160 + 1860 + 940) fail($sformatf("%0d lines out", lines_out));
    m0 = lat_sum[0] / lat_n[0];
    m1 = lat_sum[1] / lat_n[1];
    m2 = lat_sum[2] / lat_n[2];
    d  = m1 - m2;
    model_d = 2112.0 * 1.6652;
    $display("mean gateway latency: AR0820 %0.1f ns, IMX490 %0.1f ns, OV10650 %0.1f ns", m0, m1, m2);
    $display("IMX490 - OV10650: %0.1f ns (latency model: %0.1f ns)", d, model_d);
    checks++;
    if (d < 0.98 * model_d || d > 1.02 * model_d) fail("latency slope differs from the model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
