// vga_controller: video timing generator for a 1440x900, 60 Hz monitor.
//
// Two counters run on the pixel clock: h_count over one line
// (display + front porch + sync pulse + back porch = 1904 pixel clocks) and
// v_count over one frame (900 + 1 + 3 + 28 = 932 lines). From them come the
// horizontal and vertical sync pulses, the display-enable flag and the
// current pixel's row and column. The porch and pulse lengths are the
// design's numbers for 1440x900 at 60 Hz (pixel clock 106.47 MHz; the clock
// generator delivers 106.667 MHz). Sync pulses are active low by default,
// as the timing drawings show; the polarity is a parameter. n_blank follows
// disp_ena and n_sync is held high (no sync on green) for the video DAC;
// that choice, and counting row/column as plain pixel indices, are this
// implementation's.
//
// Timing: every output is registered and describes the same pixel;
// row/column keep their last display value outside the display area, where
// disp_ena is low. frame_start pulses for one cycle with the first pixel
// (row 0, column 0) of each frame. rst_n is asynchronous, active low.
module vga_controller #(
  parameter int unsigned H_PIXELS = 1440,
  parameter int unsigned H_FP     = 80,
  parameter int unsigned H_PULSE  = 152,
  parameter int unsigned H_BP     = 232,
  parameter bit          H_POL    = 1'b0,
  parameter int unsigned V_PIXELS = 900,
  parameter int unsigned V_FP     = 1,
  parameter int unsigned V_PULSE  = 3,
  parameter int unsigned V_BP     = 28,
  parameter bit          V_POL    = 1'b0,
  parameter int unsigned COORD_W  = 32
) (
  input  logic               pixel_clk,
  input  logic               rst_n,
  output logic               h_sync,
  output logic               v_sync,
  output logic               disp_ena,
  output logic [COORD_W-1:0] column,
  output logic [COORD_W-1:0] row,
  output logic               n_blank,
  output logic               n_sync,
  output logic               frame_start
);

  localparam int unsigned H_PERIOD = H_PIXELS + H_FP + H_PULSE + H_BP;
  localparam int unsigned V_PERIOD = V_PIXELS + V_FP + V_PULSE + V_BP;
  localparam int unsigned HW = $clog2(H_PERIOD);
  localparam int unsigned VW = $clog2(V_PERIOD);

  logic [HW-1:0] h_count;
  logic [VW-1:0] v_count;

  always_ff @(posedge pixel_clk or negedge rst_n) begin
    if (!rst_n) begin
      h_count <= '0;
      v_count <= '0;
    end else if (h_count == HW'(H_PERIOD - 1)) begin
      h_count <= '0;
      v_count <= (v_count == VW'(V_PERIOD - 1)) ? '0 : v_count + 1'b1;
    end else begin
      h_count <= h_count + 1'b1;
    end
  end

  logic h_active, v_active, h_in_pulse, v_in_pulse;
  always_comb begin
    h_active   = h_count < HW'(H_PIXELS);
    v_active   = v_count < VW'(V_PIXELS);
    h_in_pulse = (h_count >= HW'(H_PIXELS + H_FP)) && (h_count < HW'(H_PIXELS + H_FP + H_PULSE));
    v_in_pulse = (v_count >= VW'(V_PIXELS + V_FP)) && (v_count < VW'(V_PIXELS + V_FP + V_PULSE));
  end

  always_ff @(posedge pixel_clk or negedge rst_n) begin
    if (!rst_n) begin
      h_sync      <= ~H_POL;
      v_sync      <= ~V_POL;
      disp_ena    <= 1'b0;
      column      <= '0;
      row         <= '0;
      n_blank     <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      h_sync      <= h_in_pulse ? H_POL : ~H_POL;
      v_sync      <= v_in_pulse ? V_POL : ~V_POL;
      disp_ena    <= h_active && v_active;
      n_blank     <= h_active && v_active;
      frame_start <= (h_count == '0) && (v_count == '0);
      if (h_active) column <= COORD_W'(h_count);
      if (v_active) row    <= COORD_W'(v_count);
    end
  end

  assign n_sync = 1'b1;

endmodule
