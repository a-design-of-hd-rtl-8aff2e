// tb_frame_rate_ctrl: self-checking test of the frame-rate trigger generator.
//
// With a 2200 Hz clock and 12-line frames the frame periods are 110, 220 and
// 440 clocks for 20, 10 and 5 fps and the line spacing 9, 18 and 36 clocks,
// the last line taking the remainder. The test measures every trigger
// interval, the number of lines per frame, and that a rate change (requested
// in the middle of a frame) only takes effect at the next frame boundary;
// the reserved code 2'b11 must keep the rate in force.
module tb_frame_rate_ctrl;
  import bt1120_pkg::*;
  localparam int HZ = 2200, VT = 12;

  logic clk = 0, rst_n = 0;
  fps_e fps_sel = FPS_20, fps_cur;
  logic line_start, frame_start;
  int checks = 0, failures = 0;

  frame_rate_ctrl #(.CLK_HZ(HZ), .V_TOTAL(VT), .H_TOTAL(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic int fps_of(fps_e f);
    case (f) FPS_5: return 5; FPS_10: return 10; default: return 20; endcase
  endfunction

  int cyc = 0, frame_t0 = -1, line_t = -1, nlines = 0, cur_fps = 20;
  int frames_at[int];
  int switches = 0, held = 0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (frame_start) check(line_start, "frame_start comes with line_start");
    if (frame_start) begin
      int nf;
      if (frame_t0 >= 0) begin
        check(cyc - frame_t0 == HZ / cur_fps, "frame period");
        check(nlines == VT, "lines per frame");
        check(cyc - line_t == HZ / cur_fps - (VT - 1) * (HZ / cur_fps / VT), "last line period");
        frames_at[cur_fps]++;
      end
      nf = (fps_sel == 2'b11) ? cur_fps : fps_of(fps_sel);
      if (fps_sel == 2'b11) held++;
      if (nf != cur_fps) switches++;
      cur_fps = nf;
      frame_t0 = cyc;
      line_t = cyc;
      nlines = 1;
    end else if (line_start) begin
      check(cyc - line_t == HZ / cur_fps / VT, "line spacing");
      line_t = cyc;
      nlines++;
    end
    if (frame_t0 >= 0 && cyc > frame_t0)
      check(fps_of(fps_cur) == cur_fps, "fps_cur reports the rate in force");
  end

  task automatic wait_frames(int n);
    repeat (n) begin
      @(negedge clk);
      while (!frame_start) @(negedge clk);
    end
    repeat (30) @(negedge clk);  // change the request in mid-frame
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_frames(2);
    fps_sel = FPS_10;  wait_frames(2);
    fps_sel = FPS_5;   wait_frames(2);
    fps_sel = fps_e'(2'b11); wait_frames(2);
    fps_sel = FPS_20;  wait_frames(3);
    check(frames_at[20] >= 3 && frames_at[10] == 2 && frames_at[5] == 4, "frames at each rate");
    check(switches == 3 && held >= 1, "rate switches and reserved code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
