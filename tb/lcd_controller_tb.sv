// lcd_controller_tb: self-checking test of the character-LCD state machine,
// with shortened wait times.
//
// A model of the LCD's 4-bit bus collects every nibble on the falling edge
// of E together with RS. The bench feeds a known sample for each of the 16
// columns while the controller is in S1 and builds the nibble stream it
// expects for two full rounds: the initialisation (0010, 0010 1100,
// 0000 1111, 0000 0110), the line-1 address, sixteen characters, the
// line-2 address, sixteen characters and the clear instruction. It also
// checks the E pulse width, the power-on wait, the wait after each byte,
// the hold time before the clear, that RW stays low, and that the state
// machine passes S0..S4 in order and returns to S0.
`timescale 1ns/1ps
module lcd_controller_tb;
  import vv_pkg::*;

  localparam int unsigned POWER_ON = 100, E_CYC = 3, CMD = 12, CLR = 25, COL = 40, HOLD = 60;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n;
  sample_t    sample;
  logic       lcd_e, lcd_rs, lcd_rw;
  logic [7:0] lcd_data;
  logic [2:0] state;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  lcd_controller #(.POWER_ON_CYCLES(POWER_ON), .E_CYCLES(E_CYC), .CMD_CYCLES(CMD),
                   .CLEAR_CYCLES(CLR), .COL_CYCLES(COL), .HOLD_CYCLES(HOLD)) dut (
    .clk, .rst_n, .sample, .lcd_e, .lcd_rs, .lcd_rw, .lcd_data, .state);

  // ---------------------------------------------------------------- bus model
  logic [4:0] got [$];          // {rs, nibble}
  int cyc = 0, e_rise = -1, e_fall = -1, prev_fall = -1, reset_cyc = 0;
  int nibble_no = 0;
  logic e_d = 1'b0;
  int pending_gap = 0;
  bit first_of_round = 1, half = 0;          // minimum gap before the next E rise
  always @(posedge clk) begin
    cyc++;
    check(lcd_rw == 1'b0, "rw low");
    if (lcd_e && !e_d) begin
      if (nibble_no == 0)
        check(cyc - reset_cyc >= POWER_ON, $sformatf("power-on wait %0d", cyc - reset_cyc));
      else if (pending_gap > 0)
        check(cyc - e_fall >= pending_gap, $sformatf("wait after nibble %0d: %0d < %0d", nibble_no, cyc - e_fall, pending_gap));
      e_rise = cyc;
      pending_gap = 0;
    end
    if (!lcd_e && e_d) begin
      check(cyc - e_rise == E_CYC, $sformatf("E width %0d", cyc - e_rise));
      got.push_back({lcd_rs, lcd_data[7:4]});
      check(lcd_data[3:0] == 4'b0, "unused data lines low");
      e_fall = cyc;
      nibble_no++;
      // the first nibble of a round is sent alone; otherwise two per byte
      if (first_of_round) begin
        pending_gap = CMD;
        first_of_round = 0;
      end else if (half == 0) begin
        pending_gap = E_CYC;
        half = 1;
      end else begin
        half = 0;
        if (got.size() >= 2 && got[got.size()-1] == 5'b0_0001 && got[got.size()-2] == 5'b0_0000) begin
          pending_gap = CLR;
          first_of_round = 1;
        end else begin
          pending_gap = CMD;
        end
      end
    end
    e_d <= lcd_e;
  end

  // ---------------------------------------------------------------- states
  logic [2:0] st_d = 3'd0;
  int s4_to_s0 = 0, order_ok = 1;
  always @(posedge clk) if (rst_n) begin
    if (state != st_d) begin
      if (!(state == st_d + 3'd1 || (st_d == 3'd4 && state == 3'd0))) order_ok = 0;
      if (st_d == 3'd4 && state == 3'd0) s4_to_s0++;
    end
    st_d <= state;
  end

  // ---------------------------------------------------------------- expectation
  logic [4:0] exp [$];
  task automatic push_byte(input logic rs, input logic [7:0] b);
    exp.push_back({rs, b[7:4]});
    exp.push_back({rs, b[3:0]});
  endtask
  function automatic logic [7:0] cell_exp(input int ln, input logic [1:0] b);
    if (ln == 0) return (b == 2'd3) ? 8'h2D : (b == 2'd2) ? 8'h5F : 8'h20;
    return (b == 2'd1) ? 8'h2D : (b == 2'd0) ? 8'h5F : 8'h20;
  endfunction

  logic [1:0] rng [16];
  task automatic run_round(input int seed);
    // S0 expected
    exp.push_back({1'b0, 4'b0010});
    push_byte(0, 8'h2C); push_byte(0, 8'h0F); push_byte(0, 8'h06);
    wait (state == 3'd1);
    for (int j = 0; j < 16; j++) begin
      rng[j] = 2'((j * 3 + seed) % 4);
      repeat (COL / 2) @(posedge clk);
      sample <= {rng[j], 16'($urandom)};
      repeat (COL - COL / 2) @(posedge clk);
    end
    push_byte(0, 8'h80);
    for (int j = 0; j < 16; j++) push_byte(1, cell_exp(0, rng[j]));
    push_byte(0, 8'hC0);
    for (int j = 0; j < 16; j++) push_byte(1, cell_exp(1, rng[j]));
    push_byte(0, 8'h01);
    wait (state == 3'd4);
    begin
      int t4;
      t4 = cyc;
      wait (lcd_e);
      check(cyc - t4 >= HOLD, $sformatf("hold before clear %0d", cyc - t4));
    end
    wait (state == 3'd0);
  endtask

  initial begin
    sample = '0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    reset_cyc = cyc;
    // shift sample phase so that captures fall mid-value
    run_round(1);
    run_round(2);
    repeat (10) @(posedge clk);
    check(got.size() == exp.size(), $sformatf("nibble count %0d exp %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("nibble %0d: rs/data %h exp %h", i, got[i], exp[i]));
    check(order_ok == 1, "states in order S0..S4");
    check(s4_to_s0 == 2, $sformatf("S4->S0 %0d times", s4_to_s0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
