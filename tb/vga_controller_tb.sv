// vga_controller_tb: self-checking test of the 1440x900 timing generator at
// its default parameters.
//
// Over two whole frames it measures, in pixel clocks: the line period
// (1904), the horizontal sync pulse (152, low, starting 1520 clocks after the
// first pixel of a line), the frame period in lines (932), the vertical sync
// pulse (3 lines, low, starting 901 lines after the first line), the number
// of displayed pixels per frame (1440 x 900) and that row/column count
// 0..899 / 0..1439 while disp_ena is high. It also checks frame_start and
// that n_blank follows disp_ena.
`timescale 1ns/1ps
module vga_controller_tb;

  logic pixel_clk = 1'b0;
  always #4.6875 pixel_clk = ~pixel_clk;   // 106.667 MHz

  logic        rst_n;
  logic        h_sync, v_sync, disp_ena, n_blank, n_sync, frame_start;
  logic [31:0] column, row;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  vga_controller dut (.pixel_clk, .rst_n, .h_sync, .v_sync, .disp_ena, .column, .row,
                      .n_blank, .n_sync, .frame_start);

  // reference position, counted independently from the first frame_start
  int  ref_x, ref_y;
  bit  locked = 0;
  int  frames = 0, pix_in_frame = 0, hs_low = 0, vs_low_lines = 0;
  int  hs_start = -1, last_hs_fall = -1, cyc = 0, vs_start_line = -1;
  logic hs_d = 1'b1, vs_d = 1'b1;
  int  line_periods = 0, hpulse_ok = 0;

  always @(posedge pixel_clk) if (rst_n) begin
    #0.1;
    cyc++;
    if (frame_start) begin
      if (locked) begin
        check(ref_x == 0 && ref_y == 0, $sformatf("frame_start at %0d,%0d", ref_x, ref_y));
        check(pix_in_frame == 1440 * 900, $sformatf("displayed pixels %0d", pix_in_frame));
        check(vs_low_lines == 3, $sformatf("vsync lines %0d", vs_low_lines));
        frames++;
      end
      locked = 1; ref_x = 0; ref_y = 0; pix_in_frame = 0; vs_low_lines = 0;
    end
    if (locked) begin
      check(disp_ena == (ref_x < 1440 && ref_y < 900), $sformatf("disp_ena at %0d,%0d", ref_x, ref_y));
      check(n_blank == disp_ena, "n_blank");
      if (disp_ena) begin
        pix_in_frame++;
        if (column != 32'(ref_x) || row != 32'(ref_y))
          check(0, $sformatf("row/col %0d/%0d exp %0d/%0d", row, column, ref_y, ref_x));
      end
      check(h_sync == !(ref_x >= 1520 && ref_x < 1672), $sformatf("hsync at x=%0d", ref_x));
      check(v_sync == !(ref_y >= 901 && ref_y < 904), $sformatf("vsync at y=%0d", ref_y));
      if (ref_x == 0 && !v_sync) vs_low_lines++;
      if (!h_sync && hs_d) begin
        if (last_hs_fall >= 0) begin
          check(cyc - last_hs_fall == 1904, "line period");
          line_periods++;
        end
        last_hs_fall = cyc;
      end
      hs_d = h_sync;
      ref_x++;
      if (ref_x == 1904) begin ref_x = 0; ref_y = (ref_y + 1) % 932; end
    end
  end

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    wait (frames == 2);
    check(line_periods > 1800, "line periods measured");
    check(n_sync == 1'b1, "n_sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * 1904 * 932 + 1000) @(posedge pixel_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
