// voice_vis_top: real-time voice visualisation on a character LCD and a
// VGA monitor.
//
// Sound enters an AC'97 codec, whose serial AC-link is run by
// ac97_controller; ac97_cmd configures the codec's registers through the
// same link, one register per frame. Each ADC channel is looped back to its
// DAC channel (so the input can be heard), and the left-channel sample is
// the signal shown on both displays:
//   * lcd_controller (system clock) draws a 16-column, 4-range waveform on
//     a 16x2 character LCD;
//   * vga_controller and image_generator (pixel clock) paint a 1440x900
//     picture chosen by the three switches: welcome text, moving square,
//     histogram or sine curve. The RGB values go to an external video DAC.
// Three clocks meet here: the codec's BIT_CLK, the 100 MHz system clock and
// the pixel clock (106.667 MHz from the FPGA's clock manager, 100 MHz x 16 /
// 15). The clock manager, the codec, the video DAC and the LCD module are
// outside this RTL: their clocks and pins are ports. Samples cross from
// BIT_CLK to the system clock inside ac97_controller and from the system
// clock to the pixel clock in sample_cdc.
//
// The block structure and connections follow the design's system diagram.
// The loop-back, the choice of the left channel and the one-pixel delay of
// the sync and blank signals (so that they line up with the registered
// colour of image_generator) are this implementation's.
//
// rst_n is asynchronous, active low, and resets all three domains; hold it
// until BIT_CLK runs, which the codec starts after ac97_n_reset rises: the
// controller's cold-reset counter runs on the system clock for that reason.
module voice_vis_top
  import vv_pkg::*;
#(
  parameter int unsigned LCD_POWER_ON_CYCLES = 4_000_000,
  parameter int unsigned LCD_E_CYCLES        = 50,
  parameter int unsigned LCD_CMD_CYCLES      = 5_000,
  parameter int unsigned LCD_CLEAR_CYCLES    = 200_000,
  parameter int unsigned LCD_COL_CYCLES      = 100_000_000,
  parameter int unsigned LCD_HOLD_CYCLES     = 200_000_000,
  parameter int unsigned H_PIXELS = 1440,
  parameter int unsigned H_FP     = 80,
  parameter int unsigned H_PULSE  = 152,
  parameter int unsigned H_BP     = 232,
  parameter int unsigned V_PIXELS = 900,
  parameter int unsigned V_FP     = 1,
  parameter int unsigned V_PULSE  = 3,
  parameter int unsigned V_BP     = 28,
  parameter int unsigned BAR_FRAMES = 6
) (
  input  logic       clk,          // 100 MHz system clock
  input  logic       pixel_clk,    // pixel clock from the clock manager
  input  logic       rst_n,
  input  logic [2:0] sw,           // picture select
  input  logic [4:0] volume,       // playback volume, 31 = loudest
  // AC'97 codec
  input  logic       ac97_bit_clk,
  input  logic       ac97_sdata_in,
  output logic       ac97_sync,
  output logic       ac97_sdata_out,
  output logic       ac97_n_reset,
  // character LCD
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [7:0] lcd_data,
  // video DAC and monitor
  output logic [7:0] vga_red,
  output logic [7:0] vga_green,
  output logic [7:0] vga_blue,
  output logic       vga_h_sync,
  output logic       vga_v_sync,
  output logic       vga_n_blank,
  output logic       vga_n_sync,
  // status
  output logic       codec_ready,
  output logic       config_done,
  output logic [2:0] lcd_state
);

  // ------------------------------------------------------------ audio
  ac97_cmd_t  cmd;
  sample_t    l_bus_out, r_bus_out, l_sample, r_sample;
  logic       frame_ready, sample_valid;
  logic [3:0] cmd_state;
  logic [7:0] bit_count;

  ac97_cmd u_ac97_cmd (
    .bit_clk (ac97_bit_clk),
    .rst_n   (rst_n),
    .ready   (frame_ready),
    .volume  (volume),
    .cmd     (cmd),
    .state   (cmd_state),
    .done    (config_done)
  );

  ac97_controller u_ac97 (
    .clk          (clk),
    .bit_clk      (ac97_bit_clk),
    .rst_n        (rst_n),
    .ac97_n_reset (ac97_n_reset),
    .sync         (ac97_sync),
    .sdata_out    (ac97_sdata_out),
    .sdata_in     (ac97_sdata_in),
    .cmd          (cmd),
    .l_bus        (l_bus_out),
    .r_bus        (r_bus_out),
    .l_bus_out    (l_bus_out),
    .r_bus_out    (r_bus_out),
    .ready        (frame_ready),
    .codec_ready  (codec_ready),
    .bit_count    (bit_count),
    .l_sample     (l_sample),
    .r_sample     (r_sample),
    .sample_valid (sample_valid)
  );

  // ------------------------------------------------------------ LCD
  lcd_controller #(
    .POWER_ON_CYCLES (LCD_POWER_ON_CYCLES),
    .E_CYCLES        (LCD_E_CYCLES),
    .CMD_CYCLES      (LCD_CMD_CYCLES),
    .CLEAR_CYCLES    (LCD_CLEAR_CYCLES),
    .COL_CYCLES      (LCD_COL_CYCLES),
    .HOLD_CYCLES     (LCD_HOLD_CYCLES)
  ) u_lcd (
    .clk      (clk),
    .rst_n    (rst_n),
    .sample   (l_sample),
    .lcd_e    (lcd_e),
    .lcd_rs   (lcd_rs),
    .lcd_rw   (lcd_rw),
    .lcd_data (lcd_data),
    .state    (lcd_state)
  );

  // ------------------------------------------------------------ VGA
  sample_t pix_sample;
  logic    pix_sample_valid;

  sample_cdc #(.WIDTH(SAMPLE_W)) u_cdc (
    .src_clk   (clk),
    .rst_n     (rst_n),
    .src_valid (sample_valid),
    .src_data  (l_sample),
    .dst_clk   (pixel_clk),
    .dst_data  (pix_sample),
    .dst_valid (pix_sample_valid)
  );

  logic        h_sync, v_sync, disp_ena, n_blank, frame_start;
  logic [31:0] row, column;

  vga_controller #(
    .H_PIXELS (H_PIXELS), .H_FP (H_FP), .H_PULSE (H_PULSE), .H_BP (H_BP),
    .V_PIXELS (V_PIXELS), .V_FP (V_FP), .V_PULSE (V_PULSE), .V_BP (V_BP)
  ) u_vga (
    .pixel_clk   (pixel_clk),
    .rst_n       (rst_n),
    .h_sync      (h_sync),
    .v_sync      (v_sync),
    .disp_ena    (disp_ena),
    .column      (column),
    .row         (row),
    .n_blank     (n_blank),
    .n_sync      (vga_n_sync),
    .frame_start (frame_start)
  );

  logic font_on;

  image_generator #(
    .H_PIXELS   (H_PIXELS),
    .V_PIXELS   (V_PIXELS),
    .BAR_FRAMES (BAR_FRAMES)
  ) u_img (
    .pixel_clk   (pixel_clk),
    .rst_n       (rst_n),
    .mode        (sw),
    .sample      (pix_sample),
    .frame_start (frame_start),
    .disp_ena    (disp_ena),
    .row         (row),
    .column      (column),
    .red         (vga_red),
    .green       (vga_green),
    .blue        (vga_blue),
    .font_on     (font_on)
  );

  // sync and blank delayed one pixel to line up with the registered colour
  always_ff @(posedge pixel_clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_h_sync  <= 1'b1;
      vga_v_sync  <= 1'b1;
      vga_n_blank <= 1'b0;
    end else begin
      vga_h_sync  <= h_sync;
      vga_v_sync  <= v_sync;
      vga_n_blank <= n_blank;
    end
  end

endmodule
