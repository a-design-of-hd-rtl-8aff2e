// bt1120_pkg: shared types and constants of the BT.1120 transmitter.
//
// The transmitter sends 1920x1080 progressive video as two 8-bit word
// streams, luma (Y) and interleaved chroma (C = Cb,Cr,Cb,Cr...). Every line
// is a 720-clock horizontal blanking interval followed by 1920 active words;
// a frame is 1125 lines of which lines 42..1121 carry picture. The timing
// reference codes and the blanking levels below are those of the BT.1120
// timing table the design is built to (EAV/SAV = FF 00 00 XY, with
// XY = B6/AB in vertical blanking and 9D/80 in active lines; blank level 10h
// for Y and 80h for C). The enum encodings are this design's own choice.
package bt1120_pkg;

  // Regions of one line, in the order they are sent.
  typedef enum logic [2:0] {
    RG_EAV    = 3'd0,  // FF 00 00 XY, end of active video
    RG_AUX    = 3'd1,  // line number, error detection, ancillary/blanking
    RG_SAV    = 3'd2,  // FF 00 00 XY, start of active video
    RG_ACTIVE = 3'd3,  // active picture words
    RG_IDLE   = 3'd4   // waiting for the next line trigger
  } region_e;

  // Vertical position of a line within the frame.
  typedef enum logic [1:0] {
    LN_TOP    = 2'd0,  // lines 1..41, vertical blanking
    LN_ACTIVE = 2'd1,  // lines 42..1121, picture
    LN_BOTTOM = 2'd2   // lines 1122..1125, vertical blanking
  } line_state_e;

  // Output frame rate selected by the system platform.
  typedef enum logic [1:0] {
    FPS_5  = 2'd0,
    FPS_10 = 2'd1,
    FPS_20 = 2'd2
  } fps_e;

  localparam logic [7:0] PREAMBLE0 = 8'hFF;
  localparam logic [7:0] PREAMBLE1 = 8'h00;

  // Fourth word of the timing reference codes: 1 F V H P3 P2 P1 P0 with
  // F = 0 (progressive) and the protection bits P3..P0 = V^H, F^H, F^V, F^V^H.
  localparam logic [7:0] XY_EAV_BLANK  = 8'hB6;
  localparam logic [7:0] XY_SAV_BLANK  = 8'hAB;
  localparam logic [7:0] XY_EAV_ACTIVE = 8'h9D;
  localparam logic [7:0] XY_SAV_ACTIVE = 8'h80;

  localparam logic [7:0] Y_BLANK = 8'h10;
  localparam logic [7:0] C_BLANK = 8'h80;

endpackage
