// tb_bt1120_tx_top: end-to-end test of the BT.1120 transmitter.
//
// Runs the whole FPGA output path at reduced size (16 blanking + 16 active
// words per line, 12 lines with picture on lines 3..10, an 8 kHz clock so
// that a frame lasts 400/800/1600 clocks at 20/10/5 fps) through a sequence
// of rate requests: 20 fps, 10 fps, 5 fps, the reserved code, 20 fps again.
// A sensor model supplies a known pixel sequence on pix_rd, and a behavioural
// video-port receiver decodes the two output buses. The test checks the
// receiver saw no protocol error, that every pixel arrives once and in
// order, the number of picture and blanking lines per frame, and every
// frame period against CLK_HZ/fps of the rate in force (measured between
// first picture lines, so corrected for the blanking lines at a switch). It counts how often
// each mechanism happened (rate switches to each rate, the reserved code
// keeping the rate, top and bottom vertical blanking lines, idle clocks
// between lines) and fails if one never did.
module tb_bt1120_tx_top;
  import bt1120_pkg::*;
  localparam int HZ = 8000, HB = 16, HA = 16, VT = 12, VF = 3, VL = 10;
  localparam int PIC_LINES = VL - VF + 1;

  logic clk = 0, rst_n = 0;
  fps_e fps_sel = FPS_20, fps_cur;
  logic pix_rd, line_busy, frame_begin;
  logic [7:0] y_in, c_in, vpif_y, vpif_c;
  logic [$clog2(VT+1)-1:0] line_num;
  int checks = 0, failures = 0;

  bt1120_tx_top #(.CLK_HZ(HZ), .H_BLANK(HB), .H_ACTIVE(HA), .V_TOTAL(VT),
                  .V_ACT_FIRST(VF), .V_ACT_LAST(VL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic logic [7:0] pat_y(int n); return 8'(1 + (n * 7) % 254); endfunction
  function automatic logic [7:0] pat_c(int n); return 8'(1 + (n * 13 + 5) % 254); endfunction
  function automatic int fps_of(fps_e f);
    case (f) FPS_5: return 5; FPS_10: return 10; default: return 20; endcase
  endfunction

  // sensor model
  int rd_count = 0;
  assign y_in = pat_y(rd_count);
  assign c_in = pat_c(rd_count);
  always @(posedge clk) if (pix_rd) rd_count++;

  logic rx_valid, rx_pic;
  int rx_x, rx_line, rx_err, rx_eav, rx_sav, rx_vbl, rx_lp, rx_fp;
  logic [7:0] rx_y, rx_c;
  vpif_rx_model #(.H_ACTIVE(HA)) rx (
    .clk, .y(vpif_y), .c(vpif_c), .pix_valid(rx_valid), .pix_x(rx_x), .pix_line(rx_line),
    .pix_y(rx_y), .pix_c(rx_c), .pic_start(rx_pic), .errors(rx_err), .eav_count(rx_eav),
    .sav_count(rx_sav), .vblank_lines(rx_vbl), .last_line_period(rx_lp),
    .last_frame_period(rx_fp));

  // mechanism counters
  int n_sw[int];           // switches into each rate
  int n_held = 0;          // frames started with the reserved code
  int n_top = 0, n_bot = 0, n_idle = 0, frames = 0;
  int rate = 20;
  int rate_q[$];

  always @(negedge clk) if (rst_n) begin
    if (frame_begin) begin
      int nr;
      nr = (fps_sel == 2'b11) ? rate : fps_of(fps_sel);
      if (fps_sel == 2'b11) n_held++;
      if (nr != rate) n_sw[nr]++;
      rate = nr;
      rate_q.push_back(rate);
      frames++;
    end
    if (!line_busy) n_idle++;
  end

  int rx_idx = 0, frame_pix = 0, vbl_at_pic = 0;
  always @(negedge clk) begin
    if (rx_valid) begin
      check(rx_y == pat_y(rx_idx) && rx_c == pat_c(rx_idx), "pixel value and order");
      check(rx_x == rx_idx % HA && rx_line == (rx_idx / HA) % PIC_LINES, "pixel position");
      rx_idx++;
      frame_pix++;
    end
    if (rx_pic) begin
      if (rx_idx > 0) begin
        int r, rn;
        r = rate_q.pop_front();
        rn = rate_q[0];
        check(frame_pix == HA * PIC_LINES, "pixels per frame");
        // picture starts VF-1 lines into a frame: the lines before it run at
        // the spacing of the next frame's rate
        check(rx_fp == HZ / r + (VF - 1) * (HZ / rn / VT - HZ / r / VT), "frame period");
        check(rx_vbl - vbl_at_pic == VT - PIC_LINES, "blanking lines per frame");
        n_bot += VT - VL;
        n_top += VF - 1;
      end
      vbl_at_pic = rx_vbl;
      frame_pix = 0;
    end
  end

  task automatic wait_frames(int n);
    repeat (n) begin
      @(negedge clk);
      while (!frame_begin) @(negedge clk);
    end
    repeat (50) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_frames(2);
    fps_sel = FPS_10;        wait_frames(2);
    fps_sel = FPS_5;         wait_frames(2);
    fps_sel = fps_e'(2'b11); wait_frames(1);
    fps_sel = FPS_20;        wait_frames(3);
    check(rx_err == 0, "receiver protocol errors");
    check(rx_eav - rx_sav inside {0, 1}, "every EAV has its SAV");
    check(rd_count - rx_idx <= HA * PIC_LINES, "pixels read reach the receiver");
    check(n_sw[10] > 0, "switched to 10 fps");
    check(n_sw[5] > 0, "switched to 5 fps");
    check(n_sw[20] > 0, "switched back to 20 fps");
    check(n_held > 0, "reserved code kept the rate");
    check(n_top > 0 && n_bot > 0, "top and bottom vertical blanking");
    check(n_idle > 0, "idle between lines");
    $display("frames=%0d pixels=%0d switches 10:%0d 5:%0d 20:%0d held=%0d vblank top=%0d bottom=%0d idle=%0d",
             frames, rx_idx, n_sw[10], n_sw[5], n_sw[20], n_held, n_top, n_bot, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
