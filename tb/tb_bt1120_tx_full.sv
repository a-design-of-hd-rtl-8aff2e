// tb_bt1120_tx_full: the transmitter at full size, every parameter at its
// default (1920x1080 picture in 1125 lines of 720 + 1920 words, 80 MHz).
//
// Sends one frame at each of the three rates: 20 fps, then 10 fps, then
// 5 fps (each switch requested during the frame before), and watches the
// fourth frame begin. A behavioural video-port receiver decodes the buses.
// Checks: no protocol error; all 3 x 1920 x 1080 pixels arrive once, in
// order and at the right column and line; 45 blanking lines per frame;
// picture line periods 80e6/fps/1125 = 3555, 7111 and 14222 clocks; frame
// periods of 4,000,000, 8,000,000 and 16,000,000 clocks (measured between
// first picture lines, so corrected by the 41 top blanking lines that follow
// a rate switch).
module tb_bt1120_tx_full;
  import bt1120_pkg::*;
  localparam int HZ = 80_000_000, HA = 1920, VT = 1125, PIC = 1080, VF = 42;

  logic clk = 0, rst_n = 0;
  fps_e fps_sel = FPS_20, fps_cur;
  logic pix_rd, line_busy, frame_begin;
  logic [7:0] y_in, c_in, vpif_y, vpif_c;
  logic [10:0] line_num;
  int checks = 0, failures = 0;

  bt1120_tx_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30_000_000) @(posedge clk);
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

  int rx_idx = 0, bad = 0, pics = 0, vbl0 = 0;
  int fp[3];
  int lp20 = 0, lp10 = 0, lp5 = 0;
  always @(negedge clk) begin
    if (rx_valid) begin
      if (!(rx_y == pat_y(rx_idx) && rx_c == pat_c(rx_idx) && rx_x == rx_idx % HA &&
            rx_line == (rx_idx / HA) % PIC)) bad++;
      rx_idx++;
    end
    if (rx_pic) begin
      if (pics > 0) begin
        fp[pics-1] = rx_fp;
        check(rx_vbl - vbl0 == VT - PIC, "blanking lines per frame");
      end
      vbl0 = rx_vbl;
      pics++;
    end
    if (rx_valid && rx_x == 0 && rx_line == 500) begin
      if (pics == 1) lp20 = rx_lp; else if (pics == 2) lp10 = rx_lp; else lp5 = rx_lp;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (1_000_000) @(negedge clk);
    check(fps_cur == FPS_20, "first frame at 20 fps");
    fps_sel = FPS_10;
    while (pics < 2) @(negedge clk);
    repeat (1_000_000) @(negedge clk);
    check(fps_cur == FPS_10, "second frame at 10 fps");
    fps_sel = FPS_5;
    while (pics < 4) @(negedge clk);
    check(fps_cur == FPS_5, "third frame at 5 fps");
    check(rx_err == 0, "receiver protocol errors");
    check(bad == 0, "pixel values and positions");
    check(rx_idx == 3 * HA * PIC, "pixels of three frames");
    check(lp20 == 3555, "line period at 20 fps");
    check(lp10 == 7111, "line period at 10 fps");
    check(fp[0] == HZ / 20 + (VF - 1) * (7111 - 3555), "first frame period");
    check(lp5 == 14222, "line period at 5 fps");
    check(fp[1] == HZ / 10 + (VF - 1) * (14222 - 7111), "second frame period");
    check(fp[2] == HZ / 5, "third frame period");
    $display("pixels=%0d line periods %0d/%0d/%0d frame periods %0d/%0d/%0d",
             rx_idx, lp20, lp10, lp5, fp[0], fp[1], fp[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
