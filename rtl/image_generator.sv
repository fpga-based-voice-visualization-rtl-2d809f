// image_generator: picks the colour of every pixel for the four pictures.
//
// The three switches select the picture (vv_pkg::vis_mode_e):
//   000 welcome  - the five-line welcome message in blue on white, read from
//                  display_rom; each 8x8 glyph cell is enlarged
//                  (1 << CHAR_SHIFT) times and lines are 1 << LINE_SHIFT
//                  pixels apart, every line centred on the screen.
//   001 dot      - a DOT_SIZE x DOT_SIZE red square on white that moves one
//                  pixel to the right per frame; its top edge is the sample
//                  level, V_PIXELS - round(sample * V_PIXELS / 2^18).
//   010 histogram - N_BARS red bars, BAR_W pixels wide, bar k covering
//                  columns [BAR_W*k, BAR_W*(k+1)); each bar rises from the
//                  bottom of the screen to BAR_GAP rows below the level of
//                  one sample (0x15555 gives a bar over rows 650..899). Every
//                  BAR_FRAMES frames the bars move one place to the left and
//                  the newest sample enters on the right.
//   011 sine     - a blue sine curve on white centred on the middle line; its
//                  amplitude is sample * (V_PIXELS/2) / 2^18, its period is
//                  512 pixels and it moves SINE_STEP table steps per frame.
//   other values - plain white.
// The four pictures, their colours, the 50-pixel square and bar width, the
// 22 bars and the sample-to-height scaling (a sample of 0x15555 puts the
// square at rows 600..650 and leaves rows 0..650 above a bar empty) follow
// the design description. How the bars
// scroll, the glyph size, the text position, the sine period and
// thickness and the animation rates are this implementation's choices. The
// sample is read as an unsigned number from 0 to 2^18-1.
//
// Timing: the colour is registered, so red/green/blue describe the pixel
// whose row/column/disp_ena were presented one pixel_clk earlier; outside
// the display area the colour is black. Per-frame state (square position,
// bar heights, sine phase and amplitude) updates on frame_start. rst_n is
// asynchronous, active low.
module image_generator
  import vv_pkg::*;
#(
  parameter int unsigned H_PIXELS   = 1440,
  parameter int unsigned V_PIXELS   = 900,
  parameter int unsigned COORD_W    = 32,
  parameter int unsigned TEXT_Y0    = 320,
  parameter int unsigned CHAR_SHIFT = 2,
  parameter int unsigned LINE_SHIFT = 6,
  parameter int unsigned DOT_SIZE   = 50,
  parameter int unsigned BAR_W      = 50,
  parameter int unsigned N_BARS     = 22,
  parameter int unsigned BAR_GAP    = 50,
  parameter int unsigned BAR_FRAMES = 6,
  parameter int unsigned SINE_STEP  = 2,
  parameter int unsigned SINE_THICK = 3
) (
  input  logic               pixel_clk,
  input  logic               rst_n,
  input  logic [2:0]         mode,
  input  sample_t            sample,
  input  logic               frame_start,
  input  logic               disp_ena,
  input  logic [COORD_W-1:0] row,
  input  logic [COORD_W-1:0] column,
  output logic [7:0]         red,
  output logic [7:0]         green,
  output logic [7:0]         blue,
  output logic               font_on
);

  localparam int unsigned YW = $clog2(V_PIXELS + 1);
  localparam int unsigned XW = $clog2(H_PIXELS + 1);
  localparam int unsigned N_LINES = 5;
  localparam int unsigned CELL = 8 << CHAR_SHIFT;  // enlarged glyph size in pixels

  // ------------------------------------------------------------ sample -> screen level
  // level = V_PIXELS - round(sample * V_PIXELS / 2^18), the row of the
  // sample's height (0x15555 -> 600 on a 900-line screen)
  function automatic logic [YW-1:0] level_of(input sample_t s);
    logic [SAMPLE_W+YW-1:0] prod;
    prod = s * (SAMPLE_W+YW)'(V_PIXELS) + (SAMPLE_W+YW)'(1 << (SAMPLE_W - 1));
    return YW'(V_PIXELS) - prod[SAMPLE_W +: YW];
  endfunction

  logic [YW-1:0] level;
  assign level = level_of(sample);

  // ------------------------------------------------------------ sine table
  typedef logic signed [7:0] sine_tab_t [256];
  function automatic sine_tab_t make_sine();
    sine_tab_t t;
    for (int i = 0; i < 256; i++)
      t[i] = 8'($rtoi($floor(127.0 * $sin(2.0 * 3.14159265358979 * i / 256.0) + 0.5)));
    return t;
  endfunction
  localparam sine_tab_t SINE = make_sine();

  // ------------------------------------------------------------ per-frame state
  logic [XW-1:0] dot_x;
  logic [YW-1:0] dot_y;
  // A bar's top row sits BAR_GAP rows below the sample level (the same
  // offset as the square's bottom edge), clipped to the bottom of the screen.
  function automatic logic [YW-1:0] bar_top_of(input logic [YW-1:0] lv);
    logic [YW:0] t;
    t = {1'b0, lv} + (YW+1)'(BAR_GAP);
    return (t > (YW+1)'(V_PIXELS)) ? YW'(V_PIXELS) : t[YW-1:0];
  endfunction

  logic [YW-1:0] bar_top [N_BARS];
  logic [$clog2(BAR_FRAMES+1)-1:0] bar_frames;
  logic [7:0]    sine_phase;
  logic [YW-2:0] sine_amp;

  always_ff @(posedge pixel_clk or negedge rst_n) begin
    if (!rst_n) begin
      dot_x      <= '0;
      dot_y      <= YW'(V_PIXELS - DOT_SIZE);
      bar_frames <= '0;
      sine_phase <= '0;
      sine_amp   <= '0;
      for (int k = 0; k < N_BARS; k++) bar_top[k] <= YW'(V_PIXELS);
    end else if (frame_start) begin
      dot_x      <= (dot_x == XW'(H_PIXELS - DOT_SIZE)) ? '0 : dot_x + 1'b1;
      dot_y      <= (level > YW'(V_PIXELS - DOT_SIZE)) ? YW'(V_PIXELS - DOT_SIZE) : level;
      sine_phase <= sine_phase + 8'(SINE_STEP);
      sine_amp   <= (YW-1)'((YW'(V_PIXELS) - level) >> 1);
      if (bar_frames == ($bits(bar_frames))'(BAR_FRAMES - 1)) begin
        bar_frames <= '0;
        for (int k = 0; k < N_BARS - 1; k++) bar_top[k] <= bar_top[k+1];
        bar_top[N_BARS-1] <= bar_top_of(level);
      end else begin
        bar_frames <= bar_frames + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ welcome text
  logic [COORD_W-1:0] text_dy, text_dx, line_x0, line_w;
  logic [2:0]         text_line;
  logic [4:0]         char_idx, line_len;
  logic [2:0]         glyph_row;
  logic [7:0]         glyph;
  logic [6:0]         char_code;
  logic               text_pix;

  always_comb begin
    text_dy   = row - COORD_W'(TEXT_Y0);
    text_line = 3'(text_dy >> LINE_SHIFT);
    glyph_row = 3'(text_dy >> CHAR_SHIFT);
  end

  display_rom u_rom (
    .line      (text_line),
    .char_idx  (char_idx),
    .glyph_row (glyph_row),
    .char_code (char_code),
    .glyph     (glyph),
    .line_len  (line_len)
  );

  always_comb begin
    line_w   = COORD_W'(line_len) << (CHAR_SHIFT + 3);
    line_x0  = (COORD_W'(H_PIXELS) - line_w) >> 1;
    text_dx  = column - line_x0;
    char_idx = 5'(text_dx >> (CHAR_SHIFT + 3));
    text_pix = (row >= COORD_W'(TEXT_Y0))
            && (text_dy < COORD_W'(N_LINES << LINE_SHIFT))
            && (text_dy[LINE_SHIFT-1:0] < (LINE_SHIFT)'(CELL))
            && (column >= line_x0) && (text_dx < line_w)
            && glyph[3'd7 - 3'(text_dx >> CHAR_SHIFT)];
  end

  // ------------------------------------------------------------ moving dot
  logic dot_pix;
  assign dot_pix = (column >= COORD_W'(dot_x)) && (column < COORD_W'(dot_x) + COORD_W'(DOT_SIZE))
                && (row >= COORD_W'(dot_y))    && (row < COORD_W'(dot_y) + COORD_W'(DOT_SIZE));

  // ------------------------------------------------------------ histogram
  logic bar_pix;
  always_comb begin
    bar_pix = 1'b0;
    for (int k = 0; k < N_BARS; k++)
      if (column >= COORD_W'(BAR_W * k) && column < COORD_W'(BAR_W * (k + 1))
          && row >= COORD_W'(bar_top[k]) && row < COORD_W'(V_PIXELS))
        bar_pix = 1'b1;
  end

  // ------------------------------------------------------------ sine waveform
  logic signed [7:0]         sine_val;
  logic signed [YW+8:0]      sine_prod;
  logic signed [COORD_W:0]   sine_y, sine_dist;
  logic                      sine_pix;
  always_comb begin
    sine_val  = SINE[8'(column >> 1) + sine_phase];
    sine_prod = $signed({1'b0, sine_amp}) * sine_val;
    sine_y    = $signed((COORD_W+1)'(V_PIXELS / 2)) - (COORD_W+1)'(sine_prod >>> 7);
    sine_dist = $signed({1'b0, row}) - sine_y;
    sine_pix  = (sine_dist > -$signed((COORD_W+1)'(SINE_THICK)))
             && (sine_dist <  $signed((COORD_W+1)'(SINE_THICK)));
  end

  // ------------------------------------------------------------ colour select
  rgb_t colour;
  logic flag;
  always_comb begin
    colour = RGB_WHITE;
    flag   = 1'b0;
    unique case (mode)
      MODE_WELCOME:   begin flag = text_pix; if (text_pix) colour = RGB_BLUE; end
      MODE_DOT:       begin flag = dot_pix;  if (dot_pix)  colour = RGB_RED;  end
      MODE_HISTOGRAM: begin flag = bar_pix;  if (bar_pix)  colour = RGB_RED;  end
      MODE_SINE:      begin flag = sine_pix; if (sine_pix) colour = RGB_BLUE; end
      default:        ;
    endcase
    if (!disp_ena) begin
      colour = '0;
      flag   = 1'b0;
    end
  end

  always_ff @(posedge pixel_clk or negedge rst_n) begin
    if (!rst_n) begin
      {red, green, blue} <= '0;
      font_on            <= 1'b0;
    end else begin
      {red, green, blue} <= colour;
      font_on            <= flag;
    end
  end

endmodule
