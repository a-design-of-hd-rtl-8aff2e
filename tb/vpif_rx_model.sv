// vpif_rx_model: behavioural BT.1120 receiver for the testbenches.
//
// Stands in for the HDTV capture of a video port: it watches the Y and C
// word streams, finds the FF 00 00 XY timing reference codes on both, checks
// that the two buses carry the same code at the same time, that XY has bit 7
// set, F = 0 and correct protection bits, and that every word between an EAV
// and the next SAV is at the blank level (10h on Y, 80h on C). After each
// SAV with V = 0 it delivers the next H_ACTIVE words as pixels, numbered by
// column and by picture line; the first picture line after vertical blanking
// is picture line 0 and raises pic_start. It also measures the number of
// clocks between consecutive EAVs (line period) and between consecutive
// pic_start events (frame period). Not synthesizable; testbench use only.
module vpif_rx_model #(
  parameter int unsigned H_ACTIVE = 1920
) (
  input  logic       clk,
  input  logic [7:0] y,
  input  logic [7:0] c,
  output logic       pix_valid,
  output int         pix_x,
  output int         pix_line,
  output logic [7:0] pix_y,
  output logic [7:0] pix_c,
  output logic       pic_start,     // pulse: picture line 0 begins
  output int         errors,        // protocol errors seen
  output int         eav_count,
  output int         sav_count,
  output int         vblank_lines,  // lines with V = 1 seen
  output int         last_line_period,
  output int         last_frame_period
);
  logic [7:0] yh [3];
  logic [7:0] ch [3];
  int  cyc = 0;
  int  act_left = 0;
  int  x = 0;
  int  line = -1;
  logic in_aux = 0;
  logic prev_v = 1;
  longint last_eav = -1, last_pic = -1;

  initial begin
    errors = 0; eav_count = 0; sav_count = 0; vblank_lines = 0;
    last_line_period = 0; last_frame_period = 0;
    pix_valid = 0; pic_start = 0; pix_x = 0; pix_line = 0; pix_y = 0; pix_c = 0;
    foreach (yh[i]) begin yh[i] = 0; ch[i] = 0; end
  end

  function automatic logic xy_ok(logic [7:0] xy);
    logic f, v, h;
    f = xy[6]; v = xy[5]; h = xy[4];
    return xy[7] && !f && xy[3:0] == {v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

  always @(posedge clk) begin
    cyc++;
    pix_valid <= 0;
    pic_start <= 0;
    if (act_left > 0) begin
      pix_valid <= 1; pix_x <= x; pix_line <= line; pix_y <= y; pix_c <= c;
      x++;
      act_left--;
    end else if (yh[2] == 8'hFF && yh[1] == 8'h00 && yh[0] == 8'h00) begin
      // fourth word of a timing reference code
      if (!(ch[2] == 8'hFF && ch[1] == 8'h00 && ch[0] == 8'h00 && c == y)) begin
        errors++; $display("RX: C stream TRS mismatch at %0d", cyc);
      end
      if (!xy_ok(y)) begin errors++; $display("RX: bad XY %h at %0d", y, cyc); end
      if (y[4]) begin  // EAV
        eav_count++;
        if (last_eav >= 0) last_line_period = int'(cyc - last_eav);
        last_eav = cyc;
        in_aux = 1;
        if (y[5]) vblank_lines++;
      end else begin   // SAV
        sav_count++;
        in_aux = 0;
        if (!y[5]) begin
          if (prev_v) begin
            line = 0;
            if (last_pic >= 0) last_frame_period = int'(cyc - last_pic);
            last_pic = cyc;
            pic_start <= 1;
          end else line++;
          act_left = H_ACTIVE;
          x = 0;
        end
        prev_v = y[5];
      end
    end else if (in_aux && !(y == 8'hFF || (y == 8'h00 && yh[0] == 8'hFF) ||
                             (y == 8'h00 && yh[0] == 8'h00 && yh[1] == 8'hFF))) begin
      if (y != 8'h10 || c != 8'h80) begin
        errors++; $display("RX: aux word %h/%h not blank at %0d", y, c, cyc);
      end
    end
    yh[2] = yh[1]; yh[1] = yh[0]; yh[0] = y;
    ch[2] = ch[1]; ch[1] = ch[0]; ch[0] = c;
  end
endmodule
