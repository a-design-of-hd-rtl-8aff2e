// tb_bt1120_encoder: self-checking test of the BT.1120 word generator.
//
// Small frame: 16 blanking words, 8 active words, 10 lines with picture on
// lines 3..8. A sensor model answers pix_rd with a known pixel sequence
// (values kept inside 01h..FEh, as BT.1120 reserves 00h and FFh). For every
// clock the testbench predicts the Y and C word from its own line counter
// and the timing table (EAV FF 00 00 B6/9D, aux words at 10h/80h, SAV
// FF 00 00 AB/80, pixels or blank level, blank level while idle), two clocks
// after each accepted trigger. A behavioural receiver checks the same streams
// independently for protocol errors and recovers the pixels.
module tb_bt1120_encoder;
  import bt1120_pkg::*;
  localparam int HB = 16, HA = 8, HT = HB + HA, VT = 10, VF = 3, VL = 8;

  logic clk = 0, rst_n = 0, line_start = 0, frame_start = 0;
  logic pix_rd, busy, frame_begin;
  logic [7:0] y_in, c_in, y_out, c_out;
  logic [$clog2(VT+1)-1:0] line_num;
  int checks = 0, failures = 0;

  bt1120_encoder #(.H_BLANK(HB), .H_ACTIVE(HA), .V_TOTAL(VT),
                   .V_ACT_FIRST(VF), .V_ACT_LAST(VL)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] pat_y(int n); return 8'(1 + (n * 7) % 254); endfunction
  function automatic logic [7:0] pat_c(int n); return 8'(1 + (n * 13 + 5) % 254); endfunction

  // sensor: first-word-fall-through pixel source
  int rd_count = 0;
  assign y_in = pat_y(rd_count);
  assign c_in = pat_c(rd_count);
  always @(posedge clk) if (pix_rd) rd_count++;

  // independent receiver
  logic rx_valid, rx_pic;
  int rx_x, rx_line, rx_err, rx_eav, rx_sav, rx_vbl, rx_lp, rx_fp;
  logic [7:0] rx_y, rx_c;
  vpif_rx_model #(.H_ACTIVE(HA)) rx (
    .clk, .y(y_out), .c(c_out), .pix_valid(rx_valid), .pix_x(rx_x), .pix_line(rx_line),
    .pix_y(rx_y), .pix_c(rx_c), .pic_start(rx_pic), .errors(rx_err), .eav_count(rx_eav),
    .sav_count(rx_sav), .vblank_lines(rx_vbl), .last_line_period(rx_lp),
    .last_frame_period(rx_fp));

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

  // reference word generator (advanced on every negedge)
  int ref_line = VT;       // line being sent
  int ref_k = -1;          // index of the word now on the outputs, -1 idle
  int pend = 0;            // clocks until word 0 reaches the outputs
  int exp_idx = 0;         // next pixel expected
  int lines_sent = 0, rx_idx = 0;

  function automatic logic [7:0] ref_word(bit is_c, int k, int line, int idx);
    bit vb = (line < VF || line > VL);
    logic [7:0] blank = is_c ? 8'h80 : 8'h10;
    if (k < 0) return blank;
    case (k)
      0, HB - 4:         return 8'hFF;
      1, 2, HB - 3, HB - 2: return 8'h00;
      3:                 return vb ? 8'hB6 : 8'h9D;
      HB - 1:            return vb ? 8'hAB : 8'h80;
      default: ;
    endcase
    if (k < HB || vb) return blank;
    return is_c ? pat_c(idx) : pat_y(idx);
  endfunction

  bit trig_seen = 0, trig_fs = 0;
  int edges = 0, raise_edge = 0;
  always @(posedge clk) begin
    edges++;
    if (line_start) begin trig_seen <= 1; trig_fs <= frame_start; end
  end

  always @(negedge clk) if (rst_n) begin
    bit vb;
    // word now on the outputs
    if (pend > 0) begin
      pend--;
      if (pend == 0) ref_k = 0;
    end else if (ref_k >= 0) begin
      ref_k = (ref_k == HT - 1) ? -1 : ref_k + 1;
    end
    vb = (ref_line < VF || ref_line > VL);
    check(y_out == ref_word(0, ref_k, ref_line, exp_idx), "Y word");
    check(c_out == ref_word(1, ref_k, ref_line, exp_idx), "C word");
    if (ref_k >= HB && !vb) exp_idx++;
    if (ref_k == 0) check(edges - raise_edge == 2, "trigger to first EAV word latency");
    if (trig_seen) begin
      trig_seen = 0;
      ref_line = (trig_fs || ref_line == VT) ? 1 : ref_line + 1;
      pend = 1;
      check(int'(line_num) == ref_line, "line number");
    end
  end

  // receiver pixels must come back in read order
  always @(negedge clk) if (rx_valid) begin
    check(rx_y == pat_y(rx_idx) && rx_c == pat_c(rx_idx), "received pixel");
    check(rx_x == rx_idx % HA, "received column");
    rx_idx++;
  end

  task automatic send_line(bit fs);
    line_start = 1;
    frame_start = fs;
    raise_edge = edges;
    #1;
    check(busy == 0, "idle before trigger");
    check(frame_begin == (fs || ref_line == VT), "frame_begin pulse");
    @(negedge clk);
    line_start = 0;
    frame_start = 0;
    lines_sent++;
    repeat (HT + 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 36; n++) begin
      repeat ($urandom_range(0, 5)) @(negedge clk);
      send_line(n == 25);  // restart at line 1 in mid-frame once
    end
    repeat (4) @(negedge clk);
    check(rx_err == 0, "receiver protocol errors");
    check(rx_eav == lines_sent && rx_sav == lines_sent, "EAV/SAV per line");
    check(rx_idx == exp_idx && rd_count == exp_idx, "pixels read = sent = received");
    check(exp_idx == HA * ((VL - VF + 1) * 3 + (5 - VF + 1)) , "pixel count of 3 frames + partial");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
