// tb_axis_packet_fifo: self-checking test of the packet-mode FIFO.
//
// Writes packets of 1..40 beats (with pauses inside packets) into a 64-deep
// FIFO while the read side takes beats at random. Checks: every beat comes
// out unchanged and in order; no beat of a packet is offered before that
// packet's last beat has been written; the packets count matches a model;
// with the read side stopped, a complete packet appears at the output one
// clock after its last beat is written, and the FIFO stops accepting when
// full (and still delivers the complete packets it holds).
`timescale 1ns/1ps
module tb_axis_packet_fifo;
  import gw_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid, s_ready, m_valid, m_ready;
  axis64_t s_beat, m_beat;
  logic [6:0] packets;

  axis_packet_fifo #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  axis64_t model[$];
  int complete = 0;      // complete packets in the model
  int n_hold = 0, n_full = 0;
  int ready_pct = 50;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_ready <= ($urandom_range(99) < ready_pct);

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (packets != 7'(complete)) begin failures++; $display("FAIL packets %0d vs %0d", packets, complete); end
    checks++;
    if (m_valid != (complete != 0)) begin failures++; $display("FAIL m_valid %b complete %0d", m_valid, complete); end
    if (model.size() != 0 && complete == 0) n_hold++;
    if (!s_ready) n_full++;
    checks++;
    if (s_ready != (model.size() < D)) begin failures++; $display("FAIL s_ready"); end
    if (m_valid && m_ready) begin
      checks++;
      if (m_beat != model[0]) begin failures++; $display("FAIL data"); end
      if (model[0].last) complete--;
      void'(model.pop_front());
    end
    if (s_valid && s_ready) begin
      model.push_back(s_beat);
      if (s_beat.last) complete++;
    end
  end

  logic acc = 0;
  always @(posedge clk) acc <= s_valid && s_ready;

  task automatic put(axis64_t b);
    @(negedge clk);
    s_valid = 1; s_beat = b;
    do begin @(posedge clk); #1; end while (!acc);
    @(negedge clk) s_valid = 0;
  endtask

  task automatic packet(int n, int gap);
    for (int i = 0; i < n; i++) begin
      axis64_t b;
      b.data = {$urandom, $urandom};
      b.keep = 8'($urandom);
      b.kind = beat_kind_e'(i == 0 ? BEAT_CSIHDR : BEAT_PAYLOAD);
      b.sof  = 1'($urandom);
      b.last = (i == n - 1);
      put(b);
      if (gap > 0 && $urandom_range(3) == 0) repeat (gap) @(negedge clk);
    end
  endtask

  initial begin
    s_valid = 0; s_beat = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // held back until complete, then visible one clock after the last write
    ready_pct = 0;
    packet(10, 2);
    checks++;
    if (!m_valid) begin failures++; $display("FAIL complete packet not offered"); end
    // fill up completely with the read side stopped
    fork
      repeat (6) packet(12, 0);
    join_none
    repeat (200) @(negedge clk);
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    ready_pct = 60;
    wait fork;
    for (int p = 0; p < 150; p++) packet(1 + $urandom_range(39), $urandom_range(3));
    ready_pct = 100;
    repeat (200) @(negedge clk);
    checks++;
    if (model.size() != 0 || n_hold == 0) begin
      failures++; $display("FAIL left %0d hold %0d", model.size(), n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
