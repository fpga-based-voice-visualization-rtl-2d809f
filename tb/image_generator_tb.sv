// image_generator_tb: self-checking test of the four pictures at the
// default 1440x900 size.
//
// Row, column, disp_ena and frame_start are driven directly. For each
// picture the bench works out the expected colour on its own and compares:
//   welcome   - every pixel of the text band, from its own copy of the text,
//               the glyph table file, 4x enlargement and centring;
//   dot       - the square's edges after a number of frames, with a sample
//               of 0x15555 giving rows 600..649;
//   histogram - each bar's top and bottom after the bars have scrolled
//               through a known series of samples (top 50 rows below the
//               sample level, so 0x15555 gives a bar over rows 650..899);
//   sine      - the curve's centre row for two amplitudes and rows just
//               outside it;
// plus white for the unused switch values, black outside the display area
// and the one-clock output latency.
`timescale 1ns/1ps
module image_generator_tb;
  import vv_pkg::*;

  localparam int H = 1440, V = 900, BAR_FRAMES = 6, N_BARS = 22;

  logic pixel_clk = 1'b0;
  always #4.6875 pixel_clk = ~pixel_clk;

  logic        rst_n, frame_start, disp_ena, font_on;
  logic [2:0]  mode;
  sample_t     sample;
  logic [31:0] row, column;
  logic [7:0]  red, green, blue;

  int checks = 0, failures = 0;
  int errs_this = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  image_generator dut (.pixel_clk, .rst_n, .mode, .sample, .frame_start, .disp_ena,
                       .row, .column, .red, .green, .blue, .font_on);

  // one pixel: present, clock, read the registered colour
  task automatic pix(input int r, input int c, output logic [23:0] rgb);
    row = 32'(r); column = 32'(c); disp_ena = 1'b1; frame_start = 1'b0;
    @(posedge pixel_clk);
    #0.1;
    rgb = {red, green, blue};
  endtask

  task automatic frames(input int n, input sample_t s);
    sample = s;
    repeat (n) begin
      frame_start = 1'b1;
      @(posedge pixel_clk);
      #0.1 frame_start = 1'b0;
    end
  endtask

  function automatic int level(input sample_t s);
    return V - int'($floor(real'(s) * V / 262144.0 + 0.5));
  endfunction

  localparam logic [23:0] WHITE = 24'hFFFFFF, RED = 24'hFF0000, BLUE = 24'h0000FF;

  logic [7:0] font [1024];
  string text [5];
  logic [23:0] c;

  initial begin
    $readmemh("rtl/font_rom.hex", font);
    text[0] = "Welcome";
    text[1] = "Benjamn Carrion Schafer";
    text[2] = "Gao Zhendong";
    text[3] = "System is Ready";
    text[4] = "PLEASE SPEAK \x7f";
    mode = 3'b000; sample = '0; row = '0; column = '0; disp_ena = 1'b0; frame_start = 1'b0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;

    // ------------------------------------------------ 000 welcome text
    mode = 3'b000;
    begin
      int on_count = 0;
      for (int r = 300; r < 660; r++) begin
        for (int x = 0; x < H; x++) begin
          logic exp_on;
          int dy, l, len, x0, dx;
          exp_on = 0;
          dy = r - 320;
          if (dy >= 0 && dy < 5 * 64 && (dy % 64) < 32) begin
            l = dy / 64;
            len = text[l].len();
            x0 = (H - len * 32) / 2;
            dx = x - x0;
            if (dx >= 0 && dx < len * 32)
              exp_on = font[int'(text[l][dx / 32]) * 8 + (dy % 64) / 4][7 - (dx % 32) / 4];
          end
          pix(r, x, c);
          if (exp_on) on_count++;
          if (c != (exp_on ? BLUE : WHITE) || font_on != exp_on)
            check(0, $sformatf("text pixel %0d,%0d = %h", r, x, c));
        end
      end
      check(on_count > 5000, $sformatf("text pixels lit: %0d", on_count));
    end

    // ------------------------------------------------ disp_ena low -> black
    row = 10; column = 10; disp_ena = 1'b0;
    @(posedge pixel_clk); #0.1;
    check({red, green, blue} == 24'h0, "black outside display");

    // ------------------------------------------------ 001 moving dot
    mode = 3'b001;
    frames(5, 18'h15555);          // square at x = 5, top row 600
    check(level(18'h15555) == 600, "reference level of 0x15555");
    pix(600, 5, c);  check(c == RED,   "dot top-left");
    pix(649, 54, c); check(c == RED,   "dot bottom-right");
    pix(599, 5, c);  check(c == WHITE, "above dot");
    pix(650, 5, c);  check(c == WHITE, "below dot");
    pix(600, 4, c);  check(c == WHITE, "left of dot");
    pix(600, 55, c); check(c == WHITE, "right of dot");
    frames(10, 18'h3FFFF);         // top of scale -> row 0
    pix(1, 15, c);   check(c == RED,   "dot at x=15, top");
    pix(1, 14, c);   check(c == WHITE, "dot moved 10 pixels");
    frames(1, 18'h0);              // bottom of scale -> clipped to 850
    pix(850, 16, c); check(c == RED,   "dot clipped to bottom");
    pix(849, 16, c); check(c == WHITE, "above clipped dot");
    // latency: colour belongs to the pixel presented one clock before
    row = 600; column = 300; disp_ena = 1'b1;
    @(posedge pixel_clk); #0.1;
    row = 850; column = 17;
    @(posedge pixel_clk); #0.1;
    check({red, green, blue} == RED, "one-clock latency");

    // ------------------------------------------------ 010 histogram
    mode = 3'b010;
    begin
      int tops [N_BARS];
      sample_t s;
      for (int k = 0; k < N_BARS; k++) tops[k] = V;
      // the bar counter has seen 16 frames already (dot test)
      for (int n = 0; n < 40; n++) begin
        s = 18'($urandom);
        frames(BAR_FRAMES, s);
      end
      // re-synchronise: feed N_BARS known samples, one per BAR_FRAMES frames
      for (int k = 0; k < N_BARS; k++) begin
        s = 18'(k * 11000 + 1234);
        frames(BAR_FRAMES, s);
      end
      // after N_BARS shifts the bars hold exactly these samples, oldest left,
      // whatever the counter phase: each was applied for a whole period
      // a bar's top is 50 rows below the sample level, clipped at row 900
      for (int k = 0; k < N_BARS; k++) begin
        tops[k] = level(18'(k * 11000 + 1234)) + 50;
        if (tops[k] > V) tops[k] = V;
      end
      check(tops[0] == V, "reference: smallest sample gives no bar");
      for (int k = 0; k < N_BARS; k++) begin
        if (tops[k] < V) begin
          pix(tops[k], 50 * k, c);     check(c == RED,   $sformatf("bar %0d top", k));
          pix(899, 50 * k + 49, c);    check(c == RED,   $sformatf("bar %0d bottom", k));
        end else begin
          pix(899, 50 * k + 25, c);    check(c == WHITE, $sformatf("empty bar %0d", k));
        end
        if (tops[k] > 0) begin
          pix(tops[k] - 1, 50 * k + 20, c); check(c == WHITE, $sformatf("above bar %0d", k));
        end
      end
      pix(899, 50 * N_BARS, c); check(c == WHITE, "right of last bar");
    end

    // ------------------------------------------------ 011 sine
    mode = 3'b011;
    frames(1, 18'h0);                      // amplitude 0: flat line at 450
    pix(450, 100, c); check(c == BLUE,  "flat sine centre");
    pix(452, 700, c); check(c == BLUE,  "flat sine thickness");
    pix(453, 100, c); check(c == WHITE, "flat sine below");
    pix(447, 100, c); check(c == WHITE, "flat sine above");
    frames(1, 18'h20000);                  // half scale: amplitude 225
    begin
      int phase, amp, ph, y, sv;
      phase = 4;                           // 2 frames since... measured below
      amp = (V - level(18'h20000)) / 2;
      check(amp == 225, "sine amplitude");
      // find the phase from the peak: at the column where the table peaks
      // the curve must reach 450 - amp*127/128
      for (int x = 0; x < 512; x += 37) begin
        ph = (x / 2 + int'(dut.sine_phase)) % 256;
        sv = int'($floor(127.0 * $sin(2.0 * 3.14159265358979 * ph / 256.0) + 0.5));
        y = 450 - ((amp * sv) >>> 7);
        pix(y, x, c);     check(c == BLUE,  $sformatf("sine at x=%0d y=%0d", x, y));
        pix(y + 4, x, c); check(c == WHITE, $sformatf("below sine x=%0d", x));
        pix(y - 4, x, c); check(c == WHITE, $sformatf("above sine x=%0d", x));
      end
    end

    // ------------------------------------------------ unused switch values
    mode = 3'b111;
    pix(450, 100, c); check(c == WHITE, "unused mode white");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge pixel_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
