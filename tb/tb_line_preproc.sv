// tb_line_preproc: self-checking test of the preprocessing stage.
//
// Feeds lines (packet-header beat, timestamp beat, payload beats of m valid
// bytes) with random back-pressure and checks: header and timestamp beats
// never reach the output; info holds the data type, virtual channel, word
// count, timestamp, sof and line number of the line whose payload is
// passing (line number 0 at sof, then counting up); every payload beat is
// reordered as the byte-order mode asks (reference computed byte by byte
// here) with keep and last unchanged.
`timescale 1ns/1ps
module tb_line_preproc;
  import gw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  byte_order_e cfg_byte_order;
  logic s_valid, s_ready, m_valid, m_ready;
  axis64_t s_beat, m_beat;
  line_info_t info;

  line_preproc dut (.*);

  int checks = 0, failures = 0;
  axis64_t    exp_q[$];
  line_info_t exp_info_q[$];
  int         exp_nbeats_q[$];
  int ready_pct = 70;
  int beat_in_line = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_ready <= ($urandom_range(99) < ready_pct);

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    axis64_t e;
    checks += 2;
    e = exp_q.pop_front();
    if (m_beat != e) begin failures++; $display("FAIL beat %h vs %h (mode %0d)", m_beat.data, e.data, cfg_byte_order); end
    if (info != exp_info_q[0]) begin failures++; $display("FAIL info line %0d vs %0d ts %h vs %h", info.line_number, exp_info_q[0].line_number, info.timestamp, exp_info_q[0].timestamp); end
    if (m_beat.last) begin
      void'(exp_info_q.pop_front());
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

  int line_no = -1;

  task automatic line(int m, int beats, bit sof, byte_order_e mode);
    axis64_t b;
    line_info_t li;
    logic [5:0] dt = 6'($urandom);
    logic [1:0] vc = 2'($urandom);
    logic [15:0] wc = 16'(m * beats);
    logic [63:0] ts = {$urandom, $urandom};
    line_no = sof ? 0 : line_no + 1;
    li = '{timestamp: ts, line_number: 16'(line_no), word_count: wc, data_type: dt, vc: vc, sof: sof};
    exp_info_q.push_back(li);
    b = '0; b.kind = BEAT_CSIHDR; b.sof = sof; b.keep = 8'h0F;
    b.data = {32'd0, 8'h3C, wc, vc, dt};
    put(b);
    b = '0; b.kind = BEAT_TSTAMP; b.sof = sof; b.keep = 8'hFF; b.data = ts;
    put(b);
    for (int i = 0; i < beats; i++) begin
      axis64_t e;
      b = '0; b.kind = BEAT_PAYLOAD; b.last = (i == beats - 1);
      for (int j = 0; j < m; j++) begin b.keep[j] = 1; b.data[8*j +: 8] = 8'($urandom); end
      e = b;
      case (mode)
        BO_SWAP16:  for (int j = 0; j + 1 < m; j += 2) begin
                      e.data[8*j +: 8] = b.data[8*(j+1) +: 8];
                      e.data[8*(j+1) +: 8] = b.data[8*j +: 8];
                    end
        BO_REVERSE: for (int j = 0; j < m; j++) e.data[8*j +: 8] = b.data[8*(m-1-j) +: 8];
        default: ;
      endcase
      exp_q.push_back(e);
      put(b);
    end
  endtask

  initial begin
    s_valid = 0; s_beat = '0; cfg_byte_order = BO_NONE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int mode = 0; mode < 3; mode++) begin
      cfg_byte_order = byte_order_e'(mode);
      line(8, 12, 1, byte_order_e'(mode));
      line(6, 10, 0, byte_order_e'(mode));
      line(5, 9, 0, byte_order_e'(mode));
      line(4, 7, 0, byte_order_e'(mode));
      line(3, 5, 1, byte_order_e'(mode));
      repeat (30) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0 || exp_info_q.size() != 0) begin failures++; $display("FAIL leftovers"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
