// tb_bt1120_region_fsm: self-checking test of the line region state machine.
//
// Runs a short line (16 blanking words, 8 active words) and fires line
// triggers after random idle gaps, including back-to-back with the end of a
// line. A reference counter, started by the testbench at each trigger,
// predicts region and column of every cycle from the line layout
// (EAV 0..3, aux 4..H_BLANK-5, SAV H_BLANK-4..H_BLANK-1, active, then IDLE);
// the Mealy pulses line_begin/line_end and the line length (H_BLANK+H_ACTIVE
// clocks from trigger to IDLE) are checked as well.
module tb_bt1120_region_fsm;
  import bt1120_pkg::*;
  localparam int HB = 16, HA = 8, HT = HB + HA;

  logic clk = 0, rst_n = 0, line_start = 0;
  region_e region;
  logic [$clog2(HT)-1:0] col;
  logic line_begin, line_end;
  int checks = 0, failures = 0;

  bt1120_region_fsm #(.H_BLANK(HB), .H_ACTIVE(HA)) dut (.*);

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

  int ref_col = -1;  // -1: idle
  int lines_done = 0, begin_seen = 0, end_seen = 0;

  function automatic region_e ref_region(int k);
    if (k < 0)        return RG_IDLE;
    if (k < 4)        return RG_EAV;
    if (k < HB - 4)   return RG_AUX;
    if (k < HB)       return RG_SAV;
    return RG_ACTIVE;
  endfunction

  // stimulus: triggers only while the reference says idle
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      int gap = (n % 5 == 0) ? 0 : $urandom_range(0, 6);
      repeat (gap) @(negedge clk);
      line_start = 1;
      @(negedge clk);
      line_start = 0;
      while (!line_end) @(negedge clk);
      @(negedge clk);
    end
    repeat (3) @(posedge clk);
    check(begin_seen == 200, "number of accepted triggers");
    check(end_seen == 200, "number of completed lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model and per-cycle comparison
  int trig_cyc, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      check(region == ref_region(ref_col), "region");
      if (ref_col >= 0) check(int'(col) == ref_col, "column");
      check(line_begin == (ref_col < 0 && line_start), "line_begin pulse");
      check(line_end == (ref_col == HT - 1), "line_end pulse");
      if (line_begin) begin_seen++;
      if (line_end) begin
        end_seen++;
        check(cyc - trig_cyc == HT, "line length in clocks");
      end
      if (ref_col < 0) begin
        if (line_start) begin ref_col = 0; trig_cyc = cyc; end
      end else if (ref_col == HT - 1) ref_col = -1;
      else ref_col++;
    end
  end
endmodule
