// voice_vis_top_tb: end-to-end test of the voice visualiser.
//
// A behavioural AC'97 codec supplies BIT_CLK and the sound samples; a model
// of the LCD's 4-bit bus and a frame grabber on the VGA outputs observe the
// two displays. The LCD wait times are shortened through the top's
// parameters (LCD_*); the video path runs at the full 1440x900 size. The
// bench checks, and counts how often each mechanism happened:
//   * codec configuration: the twelve register writes reach the codec, the
//     PCM-out volume, record gain and DAC rate hold their values, and the
//     controller reports the configuration done;
//   * loop-back: each captured sample is sent back to the codec in the next
//     frame's slots 3 and 4;
//   * LCD: a whole round (S0 initialisation, S1 16 range decisions, S2
//     address, S3 32 characters, S4 clear and back to S0) with the sample
//     moved through all four ranges, character by character;
//   * VGA: line and frame periods and, per frame, the pixels of the picture
//     selected by the switches: the welcome text's blue pixel count, the red
//     square (50 x 50, top row 600 for a sample of 0x15555) and its motion,
//     the histogram's bars growing one per frame, and the flat sine line
//     (1440 x 5 blue pixels for a zero sample); each mode switch is counted.
`timescale 1ns/1ps
module voice_vis_top_tb;
  import vv_pkg::*;

  localparam int LCD_PON = 30_000, LCD_E = 5, LCD_CMD = 40, LCD_CLR = 150,
                 LCD_COL = 20_000, LCD_HOLD = 2_000;

  logic clk = 1'b0, pixel_clk = 1'b0;
  always #5 clk = ~clk;                    // 100 MHz
  always #4.6875 pixel_clk = ~pixel_clk;   // 106.667 MHz

  logic       rst_n;
  logic [2:0] sw;
  logic [4:0] volume;
  logic       bit_clk, sdata_in, sync, sdata_out, n_reset;
  logic       lcd_e, lcd_rs, lcd_rw;
  logic [7:0] lcd_data;
  logic [7:0] r, g, b;
  logic       hs, vs, n_blank, n_sync, codec_ready, config_done;
  logic [2:0] lcd_state;

  logic [17:0] tx_l, tx_r, sent_l, sent_r;
  logic [95:0] rx_frame;
  int rx_frames, reg_writes, tx_frames;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  voice_vis_top #(
    .LCD_POWER_ON_CYCLES (LCD_PON), .LCD_E_CYCLES (LCD_E), .LCD_CMD_CYCLES (LCD_CMD),
    .LCD_CLEAR_CYCLES (LCD_CLR), .LCD_COL_CYCLES (LCD_COL), .LCD_HOLD_CYCLES (LCD_HOLD),
    .BAR_FRAMES (1)
  ) dut (
    .clk, .pixel_clk, .rst_n, .sw, .volume,
    .ac97_bit_clk (bit_clk), .ac97_sdata_in (sdata_in), .ac97_sync (sync),
    .ac97_sdata_out (sdata_out), .ac97_n_reset (n_reset),
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_data,
    .vga_red (r), .vga_green (g), .vga_blue (b), .vga_h_sync (hs), .vga_v_sync (vs),
    .vga_n_blank (n_blank), .vga_n_sync (n_sync),
    .codec_ready, .config_done, .lcd_state
  );

  ac97_codec_model codec (
    .ac97_n_reset (n_reset), .sync, .sdata_out, .bit_clk, .sdata_in,
    .tx_l, .tx_r, .rx_frame, .rx_frames, .reg_writes, .sent_l, .sent_r, .tx_frames
  );

  // ---------------------------------------------------------------- loop-back
  // slots 3/4 of each frame carry the samples the codec sent in the frame
  // before; the model updates rx_frame and sent_l/sent_r in the same step
  logic [17:0] prev_l, prev_r;
  int loopbacks = 0;
  always @(rx_frames) if (rx_frames > 0) begin
    if (rx_frames > 3) begin
      if (rx_frame[39:22] == prev_l && rx_frame[19:2] == prev_r) loopbacks++;
      else check(0, $sformatf("loop-back %h/%h exp %h/%h", rx_frame[39:22], rx_frame[19:2], prev_l, prev_r));
    end
    prev_l = sent_l;
    prev_r = sent_r;
  end

  // ---------------------------------------------------------------- LCD bus
  logic [4:0] nib [$];
  logic e_d = 1'b0;
  always @(posedge clk) begin
    if (!lcd_e && e_d) nib.push_back({lcd_rs, lcd_data[7:4]});
    e_d <= lcd_e;
  end
  int lcd_rounds = 0;
  logic [2:0] lst_d = 3'd0;
  always @(posedge clk) begin
    if (lst_d == 3'd4 && lcd_state == 3'd0) lcd_rounds++;
    lst_d <= lcd_state;
  end

  // ---------------------------------------------------------------- VGA grabber
  localparam logic [23:0] WHITE = 24'hFFFFFF, RED = 24'hFF0000, BLUE = 24'h0000FF;
  int pcyc = 0, hs_fall = -1, vs_fall = -1, line_no = -1, col_no = 0;
  int red_px = 0, blue_px = 0, first_red_line = -1, first_red_col = -1, other_px = 0;
  int f_red [$], f_blue [$], f_first_line [$], f_first_col [$], f_other [$];
  int vga_frames = 0;
  logic hs_d = 1'b1, vs_d = 1'b1, nb_d = 1'b0;
  always @(posedge pixel_clk) begin
    pcyc++;
    if (!hs && hs_d) begin
      if (hs_fall >= 0) check(pcyc - hs_fall == 1904, $sformatf("line period %0d", pcyc - hs_fall));
      hs_fall = pcyc;
    end
    if (!vs && vs_d) begin
      if (vs_fall >= 0) begin
        check(pcyc - vs_fall == 1904 * 932, $sformatf("frame period %0d", pcyc - vs_fall));
        f_red.push_back(red_px); f_blue.push_back(blue_px); f_other.push_back(other_px);
        f_first_line.push_back(first_red_line); f_first_col.push_back(first_red_col);
        vga_frames++;
      end
      vs_fall = pcyc;
      red_px = 0; blue_px = 0; other_px = 0; first_red_line = -1; first_red_col = -1; line_no = -1;
    end
    if (n_blank && !nb_d) begin line_no++; col_no = 0; end
    if (n_blank) begin
      if ({r, g, b} == RED) begin
        red_px++;
        if (first_red_line < 0) begin first_red_line = line_no; first_red_col = col_no; end
      end else if ({r, g, b} == BLUE) blue_px++;
      else if ({r, g, b} != WHITE) other_px++;
      col_no++;
    end
    hs_d <= hs; vs_d <= vs; nb_d <= n_blank;
  end

  // ---------------------------------------------------------------- references
  logic [7:0] font [1024];
  string text [5];
  function automatic int text_blue_pixels();
    int n = 0;
    for (int l = 0; l < 5; l++)
      for (int c = 0; c < text[l].len(); c++)
        for (int rr = 0; rr < 8; rr++)
          for (int bb = 0; bb < 8; bb++)
            if (font[int'(text[l][c]) * 8 + rr][bb]) n += 16;
    return n;
  endfunction

  function automatic logic [7:0] lcd_char(input int ln, input logic [1:0] rg);
    if (ln == 0) return (rg == 2'd3) ? 8'h2D : (rg == 2'd2) ? 8'h5F : 8'h20;
    return (rg == 2'd1) ? 8'h2D : (rg == 2'd0) ? 8'h5F : 8'h20;
  endfunction

  task automatic wait_frame_end(input int n);
    int target;
    target = vga_frames + n;
    wait (vga_frames == target);
  endtask

  // ---------------------------------------------------------------- sequence
  int mode_switches = 0, dot_moves = 0, bar_growth = 0, range_seen [4];
  logic [1:0] rng [16];

  initial begin
    $readmemh("rtl/font_rom.hex", font);
    text[0] = "Welcome";
    text[1] = "Benjamn Carrion Schafer";
    text[2] = "Gao Zhendong";
    text[3] = "System is Ready";
    text[4] = "PLEASE SPEAK \x7f";
    foreach (range_seen[i]) range_seen[i] = 0;
    sw = 3'b000; volume = 5'd21;
    tx_l = 18'h15555; tx_r = 18'h2AAAA;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;

    // ---- codec configuration
    wait (rx_frames == 16);
    check(config_done, "configuration done");
    check(reg_writes >= 12, $sformatf("register writes %0d", reg_writes));
    check(codec.regs[8'h18] == 16'h0808, "PCM-out volume register");
    check(codec.regs[8'h1C] == 16'h0F0F, "record gain register");
    check(codec.regs[8'h2C] == 16'hBB80, "DAC rate register");
    check(codec.regs[8'h02] == 16'h0A0A, "master volume register");
    check(codec_ready, "codec ready seen");

    // ---- LCD round: the sample walks through the four ranges
    wait (lcd_state == 3'd1);
    for (int j = 0; j < 16; j++) begin
      rng[j] = 2'((j * 3 + 2) % 4);
      repeat (LCD_COL / 2) @(posedge clk);
      tx_l = {rng[j], 16'($urandom)};
      range_seen[rng[j]]++;
      repeat (LCD_COL - LCD_COL / 2) @(posedge clk);
    end
    wait (lcd_state == 3'd0);
    begin
      logic [4:0] exp [$];
      int start;
      // the round's nibbles: single 0010, 2C, 0F, 06, 80, 16 chars, C0, 16 chars, 01
      exp.push_back(5'b0_0010);
      begin
        logic [7:0] bytes [$];
        logic       rs [$];
        bytes = '{8'h2C, 8'h0F, 8'h06, 8'h80}; rs = '{0, 0, 0, 0};
        for (int j = 0; j < 16; j++) begin bytes.push_back(lcd_char(0, rng[j])); rs.push_back(1); end
        bytes.push_back(8'hC0); rs.push_back(0);
        for (int j = 0; j < 16; j++) begin bytes.push_back(lcd_char(1, rng[j])); rs.push_back(1); end
        bytes.push_back(8'h01); rs.push_back(0);
        foreach (bytes[i]) begin
          exp.push_back({rs[i], bytes[i][7:4]});
          exp.push_back({rs[i], bytes[i][3:0]});
        end
      end
      check(nib.size() >= exp.size(), $sformatf("LCD nibbles %0d", nib.size()));
      for (int i = 0; i < exp.size() && i < nib.size(); i++)
        check(nib[i] == exp[i], $sformatf("LCD nibble %0d: %h exp %h", i, nib[i], exp[i]));
    end
    check(lcd_rw == 1'b0, "LCD rw low");

    // ---- VGA: welcome text (mode 000 since reset)
    tx_l = 18'h15555;
    wait_frame_end(1);                   // the frame in progress may be partial
    wait_frame_end(1);
    check(f_blue[$] == text_blue_pixels(), $sformatf("welcome blue pixels %0d exp %0d", f_blue[$], text_blue_pixels()));
    check(f_red[$] == 0 && f_other[$] == 0, "welcome: only blue on white");

    // ---- moving dot
    @(negedge vs); sw = 3'b001; mode_switches++;
    // one frame end closes the frame before the switch, two whole frames follow
    wait_frame_end(3);
    check(f_red[$] == 2500, $sformatf("dot pixels %0d", f_red[$]));
    check(f_first_line[$] == 600, $sformatf("dot top row %0d", f_first_line[$]));
    if (f_first_col[$] == f_first_col[$-1] + 1) dot_moves++;
    else check(0, $sformatf("dot column %0d after %0d", f_first_col[$], f_first_col[$-1]));

    // ---- histogram: one new bar of height 250 per frame
    @(negedge vs); sw = 3'b010; mode_switches++;
    wait_frame_end(3);
    check(f_red[$] - f_red[$-1] == 50 * 250, $sformatf("histogram growth %0d", f_red[$] - f_red[$-1]));
    if (f_red[$] - f_red[$-1] == 50 * 250) bar_growth++;

    // ---- sine: zero sample -> flat line 5 pixels thick
    tx_l = 18'h0;
    @(negedge vs); sw = 3'b011; mode_switches++;
    wait_frame_end(3);
    check(f_blue[$] == 1440 * 5, $sformatf("sine pixels %0d", f_blue[$]));
    check(f_red[$] == 0 && f_other[$] == 0, "sine: only blue on white");

    // ---- mechanism counts
    check(loopbacks > 100, $sformatf("loop-backs %0d", loopbacks));
    check(lcd_rounds >= 1, $sformatf("LCD rounds %0d", lcd_rounds));
    foreach (range_seen[i]) check(range_seen[i] > 0, $sformatf("LCD range %0d used", i + 1));
    check(mode_switches == 3, "mode switches");
    check(dot_moves == 1, "dot moved");
    check(bar_growth == 1, "histogram grew");
    $display("mechanisms: config_writes=%0d loopbacks=%0d lcd_rounds=%0d mode_switches=%0d dot_moves=%0d bar_growth=%0d vga_frames=%0d",
             reg_writes, loopbacks, lcd_rounds, mode_switches, dot_moves, bar_growth, vga_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
