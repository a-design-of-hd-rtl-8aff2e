// bt1120_tx_top: video output of the signal processing board (FPGA).
//
// The board reads 1920x1080 YCbCr 4:2:2 video from an HD CMOS sensor with an
// 80 MHz word clock and, having no room to store frames, forwards it at once
// to the video compression board as BT.1120: luma on one 8-bit bus, chroma on
// the other, both on the same 80 MHz clock, which the DM6467 video port
// captures in HDTV mode (Y on channel 0, C on channel 1). Because the rate
// is not one of the standard BT.1120 rates, the receiver relies only on the
// embedded EAV/SAV codes, and the frame rate (5, 10 or 20 fps, chosen by
// the system platform) is made by idling between lines.
//
// frame_rate_ctrl issues line and frame triggers for the selected rate and
// bt1120_encoder turns each trigger into one BT.1120 line, pulling pixels
// from the sensor read path with pix_rd (data expected in the same cycle).
//
// Timing: vpif_y/vpif_c are registered; the first EAV of a frame leaves two
// clocks after the frame trigger. A rate change on fps_sel takes effect at
// the next frame boundary.
module bt1120_tx_top
  import bt1120_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 80_000_000,
  parameter int unsigned H_BLANK     = 720,
  parameter int unsigned H_ACTIVE    = 1920,
  parameter int unsigned V_TOTAL     = 1125,
  parameter int unsigned V_ACT_FIRST = 42,
  parameter int unsigned V_ACT_LAST  = 1121,
  localparam int unsigned LW         = $clog2(V_TOTAL + 1)
) (
  input  logic          clk,          // 80 MHz sensor / video word clock
  input  logic          rst_n,
  input  fps_e          fps_sel,      // frame rate requested by the platform
  output fps_e          fps_cur,      // frame rate in force
  // sensor read path
  output logic          pix_rd,
  input  logic [7:0]    y_in,
  input  logic [7:0]    c_in,
  // BT.1120 to the video port of the compression board
  output logic [7:0]    vpif_y,       // to VPIF channel 0
  output logic [7:0]    vpif_c,       // to VPIF channel 1
  // status
  output logic          line_busy,    // a line is being sent
  output logic          frame_begin,
  output logic [LW-1:0] line_num
);

  logic line_start, frame_start;

  frame_rate_ctrl #(
    .CLK_HZ (CLK_HZ),
    .V_TOTAL(V_TOTAL),
    .H_TOTAL(H_BLANK + H_ACTIVE)
  ) u_rate (
    .clk, .rst_n, .fps_sel, .fps_cur, .line_start, .frame_start
  );

  bt1120_encoder #(
    .H_BLANK    (H_BLANK),
    .H_ACTIVE   (H_ACTIVE),
    .V_TOTAL    (V_TOTAL),
    .V_ACT_FIRST(V_ACT_FIRST),
    .V_ACT_LAST (V_ACT_LAST)
  ) u_enc (
    .clk, .rst_n, .line_start, .frame_start,
    .pix_rd, .y_in, .c_in,
    .y_out(vpif_y), .c_out(vpif_c),
    .busy(line_busy), .frame_begin, .line_num
  );

endmodule
