// bt1120_line_fsm: vertical state machine of the BT.1120 encoder.
//
// Counts the lines of a frame (1-based) and tracks which vertical region the
// current line belongs to: lines 1..V_ACT_FIRST-1 are top vertical blanking,
// V_ACT_FIRST..V_ACT_LAST carry picture, the rest up to V_TOTAL are bottom
// blanking. The defaults (1125 lines, picture on 42..1121) follow the BT.1120
// timing table the design is built to.
//
// Interface: line_begin advances to the next line, wrapping after V_TOTAL;
// if frame_start is high with it, the next line is line 1 whatever the count
// was. The state and line number change on the clock edge that ends the
// line_begin cycle, so they are valid for the whole line that follows. The
// Mealy output frame_begin pulses when the line being started is line 1.
// Reset puts the counter on the last line, so the first line sent is line 1.
module bt1120_line_fsm
  import bt1120_pkg::*;
#(
  parameter int unsigned V_TOTAL     = 1125,
  parameter int unsigned V_ACT_FIRST = 42,
  parameter int unsigned V_ACT_LAST  = 1121,
  localparam int unsigned LW         = $clog2(V_TOTAL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          line_begin,   // a new line starts
  input  logic          frame_start,  // with line_begin: restart at line 1
  output line_state_e   lstate,       // vertical region of the current line
  output logic [LW-1:0] line_num,     // current line number, 1..V_TOTAL
  output logic          v_blank,      // current line is vertical blanking
  output logic          frame_begin   // Mealy: line 1 starts this cycle
);

  line_state_e   state, state_nx;
  logic [LW-1:0] num_nx;

  always_comb begin
    if (frame_start || line_num == LW'(V_TOTAL)) num_nx = LW'(1);
    else                                        num_nx = line_num + 1'b1;

    state_nx = state;
    if (line_begin) begin
      unique case (state)
        LN_TOP:    if (num_nx == LW'(V_ACT_FIRST))    state_nx = LN_ACTIVE;
        LN_ACTIVE: if (num_nx == LW'(V_ACT_LAST + 1)) state_nx = LN_BOTTOM;
        LN_BOTTOM: ;
        default:                                      state_nx = LN_TOP;
      endcase
      if (num_nx == LW'(1)) state_nx = LN_TOP;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= LN_BOTTOM;
      line_num <= LW'(V_TOTAL);
    end else if (line_begin) begin
      state    <= state_nx;
      line_num <= num_nx;
    end
  end

  assign lstate      = state;
  assign v_blank     = (state != LN_ACTIVE);
  assign frame_begin = line_begin && (num_nx == LW'(1));

  if (!(V_ACT_FIRST > 1 && V_ACT_FIRST <= V_ACT_LAST && V_ACT_LAST < V_TOTAL)) begin : g_bad_lines
    $error("need 1 < V_ACT_FIRST <= V_ACT_LAST < V_TOTAL");
  end

endmodule
