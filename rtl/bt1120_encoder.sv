// bt1120_encoder: BT.1120 word generator of the signal processing board.
//
// Sends one frame of YCbCr 4:2:2 video as two parallel 8-bit streams, Y on
// one bus and C (Cb0 Cr0 Cb1 Cr1 ...) on the other, for the DM6467 video
// port, which takes Y on its channel 0 and C on its channel 1. Two Mealy
// state machines drive it: bt1120_line_fsm steps through the lines of the
// frame and bt1120_region_fsm through the regions of a line. Every line
// carries, on both buses:
//   EAV   FF 00 00 XY   XY = B6 in vertical blanking, 9D in picture lines
//   aux   line number (2), error detection (2), ancillary/blanking words
//   SAV   FF 00 00 XY   XY = AB in vertical blanking, 80 in picture lines
//   active H_ACTIVE words: pixels in picture lines, blank level otherwise
//   IDLE  blank level until the next line trigger
// The blank level is 10h on Y and 80h on C. As in the timing table the design
// follows, the line-number and error-detection words carry the blank level,
// not a coded line number or CRC: the receiver locks on EAV/SAV alone.
//
// Pixel input: in every cycle of the active region of a picture line the
// encoder raises pix_rd, and the source must present that pixel's Y and C on
// y_in/c_in in the same cycle (a first-word-fall-through read). There is no
// line store: the pixel words pass straight through one register.
//
// Timing: outputs are registered. The word chosen in a cycle (described by
// region/col of the state machines) appears on y_out/c_out one clock later.
// line_start is accepted only while the encoder idles; the first EAV word
// leaves two clocks after the trigger. Reset leaves the encoder idle with
// the blank levels on the buses.
module bt1120_encoder
  import bt1120_pkg::*;
#(
  parameter int unsigned H_BLANK     = 720,
  parameter int unsigned H_ACTIVE    = 1920,
  parameter int unsigned V_TOTAL     = 1125,
  parameter int unsigned V_ACT_FIRST = 42,
  parameter int unsigned V_ACT_LAST  = 1121,
  localparam int unsigned CW         = $clog2(H_BLANK + H_ACTIVE),
  localparam int unsigned LW         = $clog2(V_TOTAL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          line_start,   // trigger for the next line
  input  logic          frame_start,  // with line_start: next line is line 1
  output logic          pix_rd,       // pixel consumed this cycle
  input  logic [7:0]    y_in,         // luma of the pixel
  input  logic [7:0]    c_in,         // Cb (even pixel) or Cr (odd pixel)
  output logic [7:0]    y_out,        // BT.1120 Y stream
  output logic [7:0]    c_out,        // BT.1120 C stream
  output logic          busy,         // a line is being sent
  output logic          frame_begin,  // Mealy: line 1 starts this cycle
  output logic [LW-1:0] line_num      // line being sent
);

  region_e       region;
  logic [CW-1:0] col;
  logic          line_begin;
  logic          v_blank;

  bt1120_region_fsm #(
    .H_BLANK (H_BLANK),
    .H_ACTIVE(H_ACTIVE)
  ) u_region (
    .clk, .rst_n, .line_start,
    .region, .col, .line_begin, .line_end()
  );

  bt1120_line_fsm #(
    .V_TOTAL    (V_TOTAL),
    .V_ACT_FIRST(V_ACT_FIRST),
    .V_ACT_LAST (V_ACT_LAST)
  ) u_line (
    .clk, .rst_n, .line_begin, .frame_start,
    .lstate(), .line_num, .v_blank, .frame_begin
  );

  // Word of a timing reference code: position 0..3 of FF 00 00 XY.
  function automatic logic [7:0] trs_word(logic [1:0] pos, logic v, logic h);
    unique case (pos)
      2'd0:    return PREAMBLE0;
      2'd3:    return v ? (h ? XY_EAV_BLANK : XY_SAV_BLANK)
                        : (h ? XY_EAV_ACTIVE : XY_SAV_ACTIVE);
      default: return PREAMBLE1;
    endcase
  endfunction

  logic [1:0] sav_pos;
  logic [7:0] y_nx, c_nx;

  assign sav_pos = col[1:0] - 2'(H_BLANK);  // H_BLANK - 4 is the first SAV word
  assign pix_rd  = (region == RG_ACTIVE) && !v_blank;

  always_comb begin
    y_nx = Y_BLANK;
    c_nx = C_BLANK;
    unique case (region)
      RG_EAV: begin
        y_nx = trs_word(col[1:0], v_blank, 1'b1);
        c_nx = y_nx;
      end
      RG_SAV: begin
        y_nx = trs_word(sav_pos, v_blank, 1'b0);
        c_nx = y_nx;
      end
      RG_ACTIVE: if (!v_blank) begin
        y_nx = y_in;
        c_nx = c_in;
      end
      default: ;  // aux words and IDLE carry the blank levels
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out <= Y_BLANK;
      c_out <= C_BLANK;
    end else begin
      y_out <= y_nx;
      c_out <= c_nx;
    end
  end

  assign busy = (region != RG_IDLE);

endmodule
