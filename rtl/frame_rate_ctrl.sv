// frame_rate_ctrl: line and frame triggers for a selectable frame rate.
//
// The sensor data, and with it the BT.1120 stream, runs on an 80 MHz word
// clock, and the system platform switches the frame rate among 5, 10 and
// 20 frames per second. A full 1125-line frame takes 1125 x 2640 clocks at
// the fastest, so the rate is set by stretching the line period: this block
// counts a frame period of CLK_HZ/fps clocks, and within it issues V_TOTAL
// line triggers spaced (CLK_HZ/fps)/V_TOTAL clocks apart (rounded down). The
// last line of a frame absorbs the remainder, so the frame period is exact.
// How the rate is derived is this design's own choice; the clock, the frame
// size and the three rates are those of the system it is built for.
//
// Interface: fps_sel may change at any time; it is sampled at each frame
// boundary, so a switch takes effect with the next frame and never cuts a
// frame short. The reserved code 2'b11 keeps the current rate. line_start
// and frame_start are one-cycle pulses; frame_start always comes with a
// line_start. The first frame starts on the first clock after reset, at
// 20 fps unless fps_sel says otherwise.
module frame_rate_ctrl
  import bt1120_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 80_000_000,  // word clock
  parameter int unsigned V_TOTAL = 1125,        // lines per frame
  parameter int unsigned H_TOTAL = 2640,        // shortest line the encoder sends
  localparam int unsigned FW     = $clog2(CLK_HZ / 5 + 1),
  localparam int unsigned LW     = $clog2(V_TOTAL + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  fps_e fps_sel,      // requested frame rate
  output fps_e fps_cur,      // frame rate of the frame being sent
  output logic line_start,   // next line may start
  output logic frame_start   // next line is line 1
);

  localparam int unsigned FRAME_5  = CLK_HZ / 5;
  localparam int unsigned FRAME_10 = CLK_HZ / 10;
  localparam int unsigned FRAME_20 = CLK_HZ / 20;

  function automatic logic [FW-1:0] frame_clks(fps_e f);
    unique case (f)
      FPS_5:   return FW'(FRAME_5);
      FPS_10:  return FW'(FRAME_10);
      default: return FW'(FRAME_20);
    endcase
  endfunction

  function automatic logic [FW-1:0] line_clks(fps_e f);
    unique case (f)
      FPS_5:   return FW'(FRAME_5 / V_TOTAL);
      FPS_10:  return FW'(FRAME_10 / V_TOTAL);
      default: return FW'(FRAME_20 / V_TOTAL);
    endcase
  endfunction

  logic [FW-1:0] frame_cnt;  // clocks left in the frame
  logic [FW-1:0] line_cnt;   // clocks left in the line
  logic [LW-1:0] lines;      // lines triggered in this frame
  fps_e          rate, rate_nx;
  logic          frame_edge, line_edge;

  assign rate_nx    = (fps_sel == FPS_5 || fps_sel == FPS_10 || fps_sel == FPS_20) ? fps_sel : rate;
  assign frame_edge = (frame_cnt == '0);
  assign line_edge  = !frame_edge && (line_cnt == '0) && (lines != LW'(V_TOTAL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_cnt <= '0;
      line_cnt  <= '0;
      lines     <= '0;
      rate      <= FPS_20;
    end else if (frame_edge) begin
      rate      <= rate_nx;
      frame_cnt <= frame_clks(rate_nx) - 1'b1;
      line_cnt  <= line_clks(rate_nx) - 1'b1;
      lines     <= LW'(1);
    end else begin
      frame_cnt <= frame_cnt - 1'b1;
      if (line_edge) begin
        line_cnt <= line_clks(rate) - 1'b1;
        lines    <= lines + 1'b1;
      end else if (line_cnt != '0) begin
        line_cnt <= line_cnt - 1'b1;
      end
    end
  end

  assign fps_cur     = rate;
  assign frame_start = frame_edge;
  assign line_start  = frame_edge || line_edge;

  if (FRAME_20 / V_TOTAL < H_TOTAL) begin : g_too_fast
    $error("at 20 fps a line period is shorter than the encoder's line");
  end

endmodule
