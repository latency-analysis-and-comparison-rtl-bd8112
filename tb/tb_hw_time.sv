// tb_hw_time: self-checking test of the nanosecond time base.
//
// Checks that the time starts at 0 after reset, advances by NS_PER_CLK
// (5 ns at 200 MHz) every clock, takes a loaded value on the next edge, and
// advances by one nanosecond more or less in a cycle with adj_up or
// adj_down (and by the plain step when both are set).
`timescale 1ns/1ps
module tb_hw_time;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;
  logic load, adj_up, adj_down;
  logic [63:0] load_value, now_ns;

  hw_time dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] expv;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what);
    checks++;
    if (now_ns != expv) begin failures++; $display("FAIL %s: %0d expected %0d", what, now_ns, expv); end
  endtask

  initial begin
    load = 0; adj_up = 0; adj_down = 0; load_value = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expv = 0; chk("reset");
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); expv += 5; chk("count");
    end
    load = 1; load_value = 64'hFFFF_FFFF_FFFF_FF00;
    @(negedge clk); load = 0; expv = 64'hFFFF_FFFF_FFFF_FF00; chk("load");
    for (int i = 0; i < 100; i++) begin
      adj_up = 1'($urandom); adj_down = 1'($urandom);
      @(negedge clk);
      expv += 5 + ((adj_up && !adj_down) ? 1 : 0) - ((adj_down && !adj_up) ? 1 : 0);
      chk("adjust / wrap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
