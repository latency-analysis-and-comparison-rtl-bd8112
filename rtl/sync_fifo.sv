// sync_fifo: single-clock first-word-fall-through FIFO with a valid/ready
// handshake on both sides.
//
// In the gateway it is the buffer right behind the CSI-2 receiver, holding
// 96-bit beats (plus sideband) until the width converter takes them. The
// storage is a plain array written at wr_ptr and read combinationally at
// rd_ptr, so a word written in one cycle is visible at the output in the
// next. Pointers carry one extra wrap bit to tell full from empty.
//
// Interface: in_valid/in_ready/in_data and out_valid/out_ready/out_data;
// a transfer happens when valid and ready are both high on a rising edge.
// level gives the number of stored words. Reset (rst_n low, synchronous)
// empties the FIFO. The depth is this design's choice; the buffering stage
// itself follows the gateway's block diagram.
module sync_fifo #(
  parameter int unsigned WIDTH = 111,
  parameter int unsigned DEPTH = 256   // power of two
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [WIDTH-1:0]       in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [WIDTH-1:0]       out_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             wr_en, rd_en;

  assign level     = wr_ptr - rd_ptr;
  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rd_ptr[AW-1:0]];
  assign wr_en     = in_valid && in_ready;
  assign rd_en     = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr_en) wr_ptr <= wr_ptr + 1'b1;
      if (rd_en) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // Output word must not change while it is offered and not taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
