// tb_sync_fifo: self-checking test of sync_fifo with a small depth.
//
// Random valid on the write side and random ready on the read side move
// 2000 words through an 8-deep FIFO. Every output word is compared with a
// queue model; level is compared with the model's occupancy every cycle;
// in_ready must be low exactly when 8 words are stored. Both full and empty
// must be reached. A word written into an empty FIFO must be readable one
// clock later.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [3:0] level;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int n_full = 0, n_empty = 0, sent = 0, got = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (level != 4'(model.size())) begin failures++; $display("FAIL level %0d vs %0d", level, model.size()); end
    checks++;
    if (in_ready != (model.size() < D)) begin failures++; $display("FAIL in_ready"); end
    checks++;
    if (out_valid != (model.size() != 0)) begin failures++; $display("FAIL out_valid"); end
    if (model.size() == D) n_full++;
    if (model.size() == 0) n_empty++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != model[0]) begin failures++; $display("FAIL data %h vs %h", out_data, model[0]); end
      void'(model.pop_front());
      got++;
    end
    if (in_valid && in_ready) begin model.push_back(in_data); sent++; end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // one word into the empty FIFO, visible one clock later
    in_valid = 1; in_data = 16'hBEEF;
    @(negedge clk) in_valid = 0;
    checks++;
    if (!(out_valid && out_data == 16'hBEEF)) begin failures++; $display("FAIL fall-through"); end
    out_ready = 1;
    @(negedge clk) out_ready = 0;
    for (int phase = 0; phase < 3; phase++) begin
      int wp = (phase == 0) ? 90 : (phase == 1) ? 20 : 60;
      int rp = (phase == 0) ? 20 : (phase == 1) ? 90 : 60;
      repeat (700) begin
        @(negedge clk);
        in_valid  = ($urandom_range(99) < wp);
        in_data   = 16'($urandom);
        out_ready = ($urandom_range(99) < rp);
      end
    end
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (got != sent || n_full == 0 || n_empty == 0) begin
      failures++; $display("FAIL sent %0d got %0d full %0d empty %0d", sent, got, n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
