// csi2_eth_gateway: CSI-2 to 10G Ethernet gateway built entirely in logic.
//
// Image lines from a CSI-2 receiver core (96-bit stream, up to four pixels
// per 200 MHz clock, each line opened by a beat holding the CSI-2 packet
// header and the reception timestamp) are turned into IEEE1722-based
// Ethernet frames for a 10G MAC (64-bit AXI stream). The path is:
//
//   input FIFO (sync_fifo, 96 bit) -> width conversion (axis_96to64)
//   -> packet-mode FIFO (axis_packet_fifo) -> preprocessing (line_preproc)
//   -> frame header and Ethernet stream generation (eth_axis_gen)
//
// The packet-mode FIFO releases a line only when it is complete, so the
// latency from a line's timestamp to its first Ethernet beat is the time the
// line takes to arrive plus a few clocks of pipeline; no whole image is ever
// buffered. hw_time is the nanosecond time base; its value (t_fpga) goes to
// the CSI-2 receiver core, which stamps each line with it.
//
// Interface: one clock (clk, 200 MHz in the reference system) and a
// synchronous active-low reset. csi_* is the receiver's stream (csi_ready
// low means the input FIFO is full; a camera cannot wait, so it counts as an
// overflow in the system); eth_* is the MAC's AXI stream, on which the MAC
// may pause the gateway with eth_tready. cfg holds the frame addressing and
// the byte-order mode. The order of stages follows the design; running
// every stage on one clock and the FIFO depths are this design's choices.
module csi2_eth_gateway
  import gw_pkg::*;
#(
  parameter int unsigned IN_FIFO_DEPTH     = 256,
  parameter int unsigned PKT_FIFO_DEPTH    = 2048,
  parameter int unsigned MAX_PAYLOAD_BYTES = MAX_PAYLOAD,
  parameter int unsigned NS_PER_CLK        = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  gw_cfg_t     cfg,
  // time base
  input  logic        time_load,
  input  logic [63:0] time_load_value,
  input  logic        time_adj_up,
  input  logic        time_adj_down,
  output logic [63:0] t_fpga,
  // CSI-2 receiver core stream
  input  logic        csi_valid,
  output logic        csi_ready,
  input  csi_beat_t   csi_beat,
  // 10G Ethernet MAC stream
  output logic        eth_tvalid,
  input  logic        eth_tready,
  output logic [63:0] eth_tdata,
  output logic [7:0]  eth_tkeep,
  output logic        eth_tlast,
  // status
  output logic        frame_start,
  output logic [$clog2(IN_FIFO_DEPTH):0]  in_fifo_level,
  output logic [$clog2(PKT_FIFO_DEPTH):0] lines_buffered
);
  localparam int unsigned CSI_W = $bits(csi_beat_t);

  hw_time #(.NS_PER_CLK(NS_PER_CLK)) u_time (
    .clk, .rst_n,
    .load       (time_load),
    .load_value (time_load_value),
    .adj_up     (time_adj_up),
    .adj_down   (time_adj_down),
    .now_ns     (t_fpga)
  );

  // ---------------- input FIFO ----------------
  logic        f1_valid, f1_ready;
  logic [CSI_W-1:0] f1_data;
  csi_beat_t   f1_beat;

  sync_fifo #(.WIDTH(CSI_W), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid  (csi_valid),
    .in_ready  (csi_ready),
    .in_data   (csi_beat),
    .out_valid (f1_valid),
    .out_ready (f1_ready),
    .out_data  (f1_data),
    .level     (in_fifo_level)
  );
  assign f1_beat = csi_beat_t'(f1_data);

  // ---------------- conversion to AXIS ----------------
  logic    cv_valid, cv_ready;
  axis64_t cv_beat;

  axis_96to64 u_conv (
    .clk, .rst_n,
    .s_valid (f1_valid),
    .s_ready (f1_ready),
    .s_beat  (f1_beat),
    .m_valid (cv_valid),
    .m_ready (cv_ready),
    .m_beat  (cv_beat)
  );

  // ---------------- packet-mode FIFO ----------------
  logic    pf_valid, pf_ready;
  axis64_t pf_beat;

  axis_packet_fifo #(.DEPTH(PKT_FIFO_DEPTH)) u_pkt_fifo (
    .clk, .rst_n,
    .s_valid (cv_valid),
    .s_ready (cv_ready),
    .s_beat  (cv_beat),
    .m_valid (pf_valid),
    .m_ready (pf_ready),
    .m_beat  (pf_beat),
    .packets (lines_buffered)
  );

  // ---------------- preprocessing ----------------
  logic       pp_valid, pp_ready;
  axis64_t    pp_beat;
  line_info_t pp_info;

  line_preproc u_pre (
    .clk, .rst_n,
    .cfg_byte_order (cfg.byte_order),
    .s_valid (pf_valid),
    .s_ready (pf_ready),
    .s_beat  (pf_beat),
    .m_valid (pp_valid),
    .m_ready (pp_ready),
    .m_beat  (pp_beat),
    .info    (pp_info)
  );

  // ---------------- frame header + Ethernet AXIS ----------------
  eth_axis_gen #(.MAX_PAYLOAD_BYTES(MAX_PAYLOAD_BYTES)) u_gen (
    .clk, .rst_n,
    .cfg         (cfg),
    .info        (pp_info),
    .s_valid     (pp_valid),
    .s_ready     (pp_ready),
    .s_beat      (pp_beat),
    .m_tvalid    (eth_tvalid),
    .m_tready    (eth_tready),
    .m_tdata     (eth_tdata),
    .m_tkeep     (eth_tkeep),
    .m_tlast     (eth_tlast),
    .frame_start (frame_start)
  );

endmodule
