// tb_axis_96to64: self-checking test of the 96-to-64-bit conversion.
//
// Sends lines of header beat + payload beats with 4, 5, 6, 8, 10 and 12
// valid bytes under random output back-pressure. The expected 64-bit beats
// are worked out in the testbench: the header beat gives a 4-byte packet
// header beat and an 8-byte timestamp beat; a payload beat with k <= 8 bytes
// gives one beat of k bytes; with k > 8 it gives ceil(k/2) and then the rest.
// Data, keep, kind, sof and last of every output beat are compared, and a
// line of 12-byte beats must take two clocks per input beat with ready high.
`timescale 1ns/1ps
module tb_axis_96to64;
  import gw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid, s_ready, m_valid, m_ready;
  csi_beat_t s_beat;
  axis64_t   m_beat;

  axis_96to64 dut (.*);

  int checks = 0, failures = 0;
  axis64_t exp_q[$];
  int ready_pct = 100;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_ready <= ($urandom_range(99) < ready_pct);

  int n_out = 0;
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    axis64_t e;
    checks++;
    n_out++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected beat"); end
    else begin
      e = exp_q.pop_front();
      if (m_beat !== e) begin
        failures++;
        $display("FAIL beat: got kind %0d keep %h last %b data %h / exp kind %0d keep %h last %b data %h",
                 m_beat.kind, m_beat.keep, m_beat.last, m_beat.data, e.kind, e.keep, e.last, e.data);
      end
    end
  end

  function automatic axis64_t mk(beat_kind_e kind, bit sof, bit last, int n, logic [95:0] src, int off);
    axis64_t b = '0;
    b.kind = kind; b.sof = sof; b.last = last;
    for (int i = 0; i < n; i++) begin
      b.keep[i] = 1'b1;
      b.data[8*i +: 8] = src[8*(off + i) +: 8];
    end
    return b;
  endfunction

  // handshake seen at the last rising edge
  logic acc = 0;
  always @(posedge clk) acc <= s_valid && s_ready;
  int edges;

  task automatic put(csi_beat_t b);
    @(negedge clk);
    s_valid = 1; s_beat = b;
    edges = 0;
    while (1) begin
      @(posedge clk);
      edges++;
      #1;
      if (acc) break;
    end
    @(negedge clk) s_valid = 0;
  endtask

  task automatic line(int k, int beats, bit sof);
    csi_beat_t b = '0;
    logic [95:0] d;
    d = {32'($urandom), 32'($urandom), 32'($urandom)};
    b.hdr = 1; b.sof = sof; b.keep = 12'hFFF; b.data = d;
    exp_q.push_back(mk(BEAT_CSIHDR, sof, 0, 4, d, 0));
    exp_q.push_back(mk(BEAT_TSTAMP, sof, 0, 8, d, 4));
    put(b);
    for (int i = 0; i < beats; i++) begin
      bit last = (i == beats - 1);
      d = {32'($urandom), 32'($urandom), 32'($urandom)};
      b = '0;
      b.keep = 12'((13'd1 << k) - 1);
      b.data = '0;
      for (int j = 0; j < k; j++) b.data[8*j +: 8] = d[8*j +: 8];
      b.last = last;
      if (k <= 8) exp_q.push_back(mk(BEAT_PAYLOAD, 0, last, k, b.data, 0));
      else begin
        int h = (k + 1) / 2;
        exp_q.push_back(mk(BEAT_PAYLOAD, 0, 0, h, b.data, 0));
        exp_q.push_back(mk(BEAT_PAYLOAD, 0, last, k - h, b.data, h));
      end
      put(b);
    end
  endtask

  initial begin
    s_valid = 0; s_beat = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // rate check: with ready always high a 12-byte beat takes two clocks
    begin
      csi_beat_t b = '0;
      b.keep = 12'hFFF; b.data = 96'h0B0A_0908_0706_0504_0302_0100; b.last = 1;
      exp_q.push_back(mk(BEAT_PAYLOAD, 0, 0, 6, b.data, 0));
      exp_q.push_back(mk(BEAT_PAYLOAD, 0, 1, 6, b.data, 6));
      put(b);
      checks++;
      if (edges != 2) begin failures++; $display("FAIL 12-byte beat took %0d clocks", edges); end
      b.keep = 12'h0FF;
      exp_q.push_back(mk(BEAT_PAYLOAD, 0, 1, 8, b.data, 0));
      put(b);
      checks++;
      if (edges != 1) begin failures++; $display("FAIL 8-byte beat took %0d clocks", edges); end
    end
    line(4, 20, 1);
    line(5, 20, 0);
    line(6, 20, 0);
    line(8, 20, 0);
    line(10, 20, 0);
    line(12, 20, 1);
    ready_pct = 50;
    line(6, 40, 1);
    line(12, 40, 0);
    line(10, 40, 0);
    line(8, 40, 0);
    repeat (50) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d beats missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
