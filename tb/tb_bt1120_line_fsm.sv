// tb_bt1120_line_fsm: self-checking test of the line state machine.
//
// Uses a 12-line frame with picture on lines 3..9. Lines are started at
// random intervals; now and then a frame restart comes in the middle of a
// frame. A reference line counter in the testbench predicts line number,
// vertical region and the frame_begin pulse for every line.
module tb_bt1120_line_fsm;
  import bt1120_pkg::*;
  localparam int VT = 12, VF = 3, VL = 9;

  logic clk = 0, rst_n = 0, line_begin = 0, frame_start = 0;
  line_state_e lstate;
  logic [$clog2(VT+1)-1:0] line_num;
  logic v_blank, frame_begin;
  int checks = 0, failures = 0;

  bt1120_line_fsm #(.V_TOTAL(VT), .V_ACT_FIRST(VF), .V_ACT_LAST(VL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int ref_line = VT;
  int frames = 0, restarts = 0;

  function automatic line_state_e ref_state(int l);
    if (l < VF) return LN_TOP;
    if (l <= VL) return LN_ACTIVE;
    return LN_BOTTOM;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(int'(line_num) == VT && lstate == LN_BOTTOM, "state after reset");
    for (int n = 0; n < 600; n++) begin
      bit fs;
      int nxt;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      fs = (n % 97 == 50);  // occasional restart in mid-frame
      nxt = (fs || ref_line == VT) ? 1 : ref_line + 1;
      line_begin <= 1;
      frame_start <= fs;
      #1;
      check(frame_begin == (nxt == 1), "frame_begin pulse");
      @(posedge clk);
      line_begin <= 0;
      frame_start <= 0;
      if (fs) restarts++;
      if (nxt == 1) frames++;
      ref_line = nxt;
      #1;
      check(int'(line_num) == ref_line, "line number");
      check(lstate == ref_state(ref_line), "vertical region");
      check(v_blank == (ref_state(ref_line) != LN_ACTIVE), "v_blank");
    end
    check(frames > 40 && restarts > 3, "coverage of wrap and restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
