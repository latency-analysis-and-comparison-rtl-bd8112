// hw_time: the FPGA hardware time, a 64-bit nanosecond counter.
//
// The gateway stamps every image line with this time when the CSI-2
// receiver sees the line; the receiver of the Ethernet frames subtracts the
// stamp from its own arrival time to get the line latency. The counter adds
// NS_PER_CLK every clock (5 ns at the 200 MHz stream clock). A time
// synchronisation engine outside this module (gPTP over a separate Ethernet
// port) may overwrite the time with load/load_value, or trim the rate by
// adding one extra nanosecond (adj_up) or skipping one (adj_down) in a cycle.
// The counter and its load are this design's own realisation of the time
// base the design reads; the adjustment ports are the simplest hooks a
// synchronisation engine needs.
module hw_time #(
  parameter int unsigned NS_PER_CLK = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [63:0] load_value,
  input  logic        adj_up,
  input  logic        adj_down,
  output logic [63:0] now_ns
);
  logic [63:0] step;

  always_comb begin
    step = 64'(NS_PER_CLK);
    if (adj_up && !adj_down)  step = step + 64'd1;
    if (adj_down && !adj_up)  step = step - 64'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     now_ns <= '0;
    else if (load)  now_ns <= load_value;
    else            now_ns <= now_ns + step;
  end
endmodule
