// bt1120_region_fsm: horizontal state machine of the BT.1120 encoder.
//
// A line is split into five regions that are sent in this order: EAV
// (4 words), auxiliary words (2 line-number words, 2 error-detection words
// and the ancillary/blanking words), SAV (4 words), the active picture
// (H_ACTIVE words) and IDLE. A column counter runs from 0 at the first EAV
// word and the state moves on when the counter reaches the last column of a
// region. The line layout (720-clock blanking interval, 1920 active words)
// follows the BT.1120 timing table the design is built to; the IDLE region
// after the active words, which lasts until the next line trigger, is how
// the line period is stretched to lower the frame rate below the rate the
// 80 MHz word clock would otherwise give.
//
// Interface: line_start is a one-cycle trigger. It is accepted only in IDLE;
// the EAV then begins on the next clock. region/col describe the word being
// sent in the current cycle. The Mealy outputs line_begin (trigger accepted)
// and line_end (last active word) are combinational pulses. After reset the
// machine waits in IDLE.
module bt1120_region_fsm
  import bt1120_pkg::*;
#(
  parameter int unsigned H_BLANK  = 720,   // EAV + aux + SAV words
  parameter int unsigned H_ACTIVE = 1920,  // active words per line
  localparam int unsigned H_TOTAL = H_BLANK + H_ACTIVE,
  localparam int unsigned CW      = $clog2(H_TOTAL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          line_start,  // trigger for the next line
  output region_e       region,      // region of the current word
  output logic [CW-1:0] col,         // column of the current word (0 = first EAV word)
  output logic          line_begin,  // Mealy: trigger accepted this cycle
  output logic          line_end     // Mealy: last active word this cycle
);

  localparam logic [CW-1:0] EAV_LAST    = CW'(3);
  localparam logic [CW-1:0] AUX_LAST    = CW'(H_BLANK - 5);
  localparam logic [CW-1:0] SAV_LAST    = CW'(H_BLANK - 1);
  localparam logic [CW-1:0] ACTIVE_LAST = CW'(H_TOTAL - 1);

  region_e state, state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      RG_IDLE:   if (line_start)          state_nx = RG_EAV;
      RG_EAV:    if (col == EAV_LAST)     state_nx = RG_AUX;
      RG_AUX:    if (col == AUX_LAST)     state_nx = RG_SAV;
      RG_SAV:    if (col == SAV_LAST)     state_nx = RG_ACTIVE;
      RG_ACTIVE: if (col == ACTIVE_LAST)  state_nx = RG_IDLE;
      default:                            state_nx = RG_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RG_IDLE;
      col   <= '0;
    end else begin
      state <= state_nx;
      if (state == RG_IDLE || state_nx == RG_IDLE) col <= '0;
      else                                         col <= col + 1'b1;
    end
  end

  assign region     = state;
  assign line_begin = (state == RG_IDLE) && line_start;
  assign line_end   = (state == RG_ACTIVE) && (col == ACTIVE_LAST);

  // The line trigger must not arrive before the previous line is complete.
  a_trigger_in_idle: assert property (@(posedge clk) disable iff (!rst_n)
    line_start |-> state == RG_IDLE)
    else $error("line_start while a line is still being sent");

  if (H_BLANK < 12) begin : g_bad_blank
    $error("H_BLANK must hold EAV, line number, CRC and SAV (12 words)");
  end

endmodule
