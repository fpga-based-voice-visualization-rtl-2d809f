// lcd_controller: draws a rough waveform of the sound on a 16x2 character LCD.
//
// A five-state machine, as the design describes it, runs the display:
//   S0 initialisation - wait for the LCD to power up, then send function set
//                       (nibble 0010, then 0010 1100: 4-bit bus, two lines),
//                       display on/off (0000 1111: display, cursor and blink
//                       on) and entry mode (0000 0110: increment, no shift).
//   S1 decision       - every COL_CYCLES clocks take the current sample and
//                       decide its range, b = sample[17:16] + 1 (four ranges
//                       of 65536 in 0..262143), and record the mark for the
//                       next of the 16 columns; after 16 columns go on.
//   S2 DDRAM address  - set the DDRAM address to the first cell of line 1.
//   S3 display        - write the 16 cells of line 1, set the address of
//                       line 2 and write its 16 cells. Ranges 4 and 3 are
//                       drawn in line 1, ranges 2 and 1 in line 2; the upper
//                       range of a line shows '-', the lower one '_', and the
//                       other line of that column shows a space.
//   S4 clear          - keep the picture for HOLD_CYCLES, send clear display
//                       (0000 0001) and return to S0.
// Every byte goes out as two nibbles on lcd_data[7:4] (upper first), each
// latched by a high pulse of lcd_e of E_CYCLES clocks with E_CYCLES low
// before the next nibble; after each instruction or character the
// controller waits CMD_CYCLES (CLEAR_CYCLES after clear). rw is held low:
// the controller only writes and never polls the busy flag.
//
// The states, the command codes, the four ranges and the 4-bit bus follow
// the design description (its entry-mode code is read as 0000 0110, the
// form the LCD's entry-mode instruction takes). The characters used, the
// one-second column period, the hold time and the E-pulse timing are this
// implementation's choices; the minimum waits are those of the LCD's
// initialisation sequence (over 40 ms, 39 us and 1.53 ms) with margin.
//
// Interface: clk (100 MHz by default), rst_n asynchronous active low,
// sample = latest PCM value (unsigned, clk domain). lcd_data[3:0] are
// unused in 4-bit mode and driven low. state shows the current S0..S4.
module lcd_controller
  import vv_pkg::*;
#(
  parameter int unsigned POWER_ON_CYCLES = 4_000_000,    // 40 ms
  parameter int unsigned E_CYCLES        = 50,           // 0.5 us
  parameter int unsigned CMD_CYCLES      = 5_000,        // 50 us
  parameter int unsigned CLEAR_CYCLES    = 200_000,      // 2 ms
  parameter int unsigned COL_CYCLES      = 100_000_000,  // 1 s per column
  parameter int unsigned HOLD_CYCLES     = 200_000_000   // 2 s
) (
  input  logic       clk,
  input  logic       rst_n,
  input  sample_t    sample,
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [7:0] lcd_data,
  output logic [2:0] state
);

  typedef enum logic [2:0] {S0_INIT, S1_DECIDE, S2_ADDR, S3_DISPLAY, S4_CLEAR} lcd_state_e;

  localparam int unsigned CW = $clog2(HOLD_CYCLES > COL_CYCLES ?
                                      (HOLD_CYCLES > POWER_ON_CYCLES ? HOLD_CYCLES : POWER_ON_CYCLES) :
                                      (COL_CYCLES > POWER_ON_CYCLES ? COL_CYCLES : POWER_ON_CYCLES)) + 1;

  localparam logic [7:0] CMD_FUNCTION = 8'b0010_1100;
  localparam logic [7:0] CMD_DISPLAY  = 8'b0000_1111;
  localparam logic [7:0] CMD_ENTRY    = 8'b0000_0110;
  localparam logic [7:0] CMD_CLEAR    = 8'b0000_0001;
  localparam logic [7:0] CMD_LINE1    = 8'h80;  // set DDRAM address 0x00
  localparam logic [7:0] CMD_LINE2    = 8'hC0;  // set DDRAM address 0x40
  localparam logic [7:0] CH_UPPER     = 8'h2D;  // '-'
  localparam logic [7:0] CH_LOWER     = 8'h5F;  // '_'
  localparam logic [7:0] CH_BLANK     = 8'h20;  // ' '

  // ------------------------------------------------------------ byte writer
  typedef enum logic [2:0] {W_IDLE, W_SETUP, W_HIGH, W_LOW, W_WAIT} wr_state_e;

  wr_state_e      wr_state;
  logic           job_start, job_rs, job_nibble_only, job_done;
  logic [7:0]     job_byte;
  logic [CW-1:0]  job_wait;
  logic [7:0]     wr_byte;
  logic           wr_second, wr_nibble_only;
  logic [CW-1:0]  wr_cnt, wr_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_state       <= W_IDLE;
      wr_byte        <= '0;
      wr_second      <= 1'b0;
      wr_nibble_only <= 1'b0;
      wr_cnt         <= '0;
      wr_wait        <= '0;
      lcd_e          <= 1'b0;
      lcd_rs         <= 1'b0;
      lcd_data       <= '0;
      job_done       <= 1'b0;
    end else begin
      job_done <= 1'b0;
      unique case (wr_state)
        W_IDLE: if (job_start) begin
          wr_byte        <= job_byte;
          wr_nibble_only <= job_nibble_only;
          wr_wait        <= job_wait;
          wr_second      <= 1'b0;
          lcd_rs         <= job_rs;
          lcd_data       <= {job_byte[7:4], 4'b0000};
          wr_state       <= W_SETUP;
        end
        W_SETUP: begin            // data and rs settle one clock before E
          lcd_e    <= 1'b1;
          wr_cnt   <= '0;
          wr_state <= W_HIGH;
        end
        W_HIGH: begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt == CW'(E_CYCLES - 1)) begin
            lcd_e    <= 1'b0;
            wr_cnt   <= '0;
            wr_state <= W_LOW;
          end
        end
        W_LOW: begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt == CW'(E_CYCLES - 1)) begin
            wr_cnt <= '0;
            if (!wr_second && !wr_nibble_only) begin
              wr_second <= 1'b1;
              lcd_data  <= {wr_byte[3:0], 4'b0000};
              wr_state  <= W_SETUP;
            end else begin
              wr_state <= W_WAIT;
            end
          end
        end
        W_WAIT: begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt == wr_wait - 1'b1) begin
            job_done <= 1'b1;
            wr_state <= W_IDLE;
          end
        end
        default: wr_state <= W_IDLE;
      endcase
    end
  end

  assign lcd_rw = 1'b0;

  // ------------------------------------------------------------ main state machine
  lcd_state_e     st;
  logic [5:0]     step;       // position inside the current state
  logic           busy;       // a job has been issued and is not done yet
  logic [CW-1:0]  timer;
  logic [1:0]     mark [16];  // range of each column, b-1

  assign state = st;

  // character for cell `col` of `line` (0 = top)
  function automatic logic [7:0] cell_char(input logic ln, input logic [1:0] m);
    if (m[1] == ~ln) return m[0] ? CH_UPPER : CH_LOWER;
    return CH_BLANK;
  endfunction

  // job for the current state and step
  always_comb begin
    job_start       = 1'b0;
    job_rs          = 1'b0;
    job_byte        = '0;
    job_nibble_only = 1'b0;
    job_wait        = CW'(CMD_CYCLES);
    if (!busy && !job_done) begin
      unique case (st)
        S0_INIT: if (timer == CW'(POWER_ON_CYCLES)) begin
          job_start = (step < 6'd4);
          unique case (step)
            6'd0:    begin job_byte = CMD_FUNCTION; job_nibble_only = 1'b1; end
            6'd1:    job_byte = CMD_FUNCTION;
            6'd2:    job_byte = CMD_DISPLAY;
            default: job_byte = CMD_ENTRY;
          endcase
        end
        S2_ADDR: begin
          job_start = 1'b1;
          job_byte  = CMD_LINE1;
        end
        S3_DISPLAY: begin
          job_start = (step < 6'd33);
          if (step == 6'd16) begin
            job_byte = CMD_LINE2;
          end else begin
            job_rs   = 1'b1;
            job_byte = (step < 6'd16) ? cell_char(1'b0, mark[step[3:0]])
                                      : cell_char(1'b1, mark[4'(step - 6'd17)]);
          end
        end
        S4_CLEAR: if (timer == CW'(HOLD_CYCLES)) begin
          job_start = (step == 6'd0);
          job_byte  = CMD_CLEAR;
          job_wait  = CW'(CLEAR_CYCLES);
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S0_INIT;
      step  <= '0;
      busy  <= 1'b0;
      timer <= '0;
      for (int i = 0; i < 16; i++) mark[i] <= '0;
    end else begin
      if (job_start) busy <= 1'b1;
      if (job_done) begin
        busy <= 1'b0;
        step <= step + 1'b1;
      end
      unique case (st)
        S0_INIT: begin
          if (timer != CW'(POWER_ON_CYCLES)) timer <= timer + 1'b1;
          if (job_done && step == 6'd3) begin
            st    <= S1_DECIDE;
            step  <= '0;
            timer <= '0;
          end
        end
        S1_DECIDE: begin
          if (timer == CW'(COL_CYCLES - 1)) begin
            timer             <= '0;
            mark[step[3:0]]   <= sample[SAMPLE_W-1 -: 2];
            step              <= step + 1'b1;
            if (step == 6'd15) begin
              st   <= S2_ADDR;
              step <= '0;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S2_ADDR: if (job_done) begin
          st   <= S3_DISPLAY;
          step <= '0;
        end
        S3_DISPLAY: if (job_done && step == 6'd32) begin
          st    <= S4_CLEAR;
          step  <= '0;
          timer <= '0;
        end
        S4_CLEAR: begin
          if (timer != CW'(HOLD_CYCLES)) timer <= timer + 1'b1;
          if (job_done) begin
            st    <= S0_INIT;
            step  <= '0;
            timer <= '0;
          end
        end
        default: st <= S0_INIT;
      endcase
    end
  end

endmodule
