// ac97_controller_tb: self-checking test of the AC-link frame engine.
//
// A behavioural codec supplies BIT_CLK and sends a new left/right sample pair
// in every frame; the bench changes the command and the outgoing PCM words
// every frame. It checks, frame by frame: the cold-reset pulse length, SYNC
// high for exactly 16 BIT_CLK cycles of a 256-cycle frame, the tag
// (frame and slots 1..4 valid, the rest zero), slots 1..4 against what was
// presented at the frame start, the captured input samples in the BIT_CLK
// domain when `ready` pulses (once per 256 BIT_CLK cycles) and their copy in
// the system-clock domain.
`timescale 1ns/1ps
module ac97_controller_tb;
  import vv_pkg::*;

  localparam int unsigned RESET_CYCLES = 20;
  localparam int unsigned N_FRAMES     = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic ac97_n_reset, sync, sdata_out, sdata_in, bit_clk;
  ac97_cmd_t cmd;
  sample_t l_bus, r_bus, l_bus_out, r_bus_out, l_sample, r_sample;
  logic ready, codec_ready, sample_valid;
  logic [7:0] bit_count;

  logic [17:0] tx_l, tx_r, sent_l, sent_r;
  logic [95:0] rx_frame;
  int rx_frames, reg_writes, tx_frames;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  ac97_controller #(.RESET_CYCLES(RESET_CYCLES)) dut (
    .clk, .bit_clk, .rst_n, .ac97_n_reset, .sync, .sdata_out, .sdata_in,
    .cmd, .l_bus, .r_bus, .l_bus_out, .r_bus_out, .ready, .codec_ready,
    .bit_count, .l_sample, .r_sample, .sample_valid
  );

  ac97_codec_model #(.HALF_NS(40ns)) codec (
    .ac97_n_reset, .sync, .sdata_out, .bit_clk, .sdata_in,
    .tx_l, .tx_r, .rx_frame, .rx_frames, .reg_writes, .sent_l, .sent_r, .tx_frames
  );

  // stimulus: new command and PCM each frame, changed mid-frame
  int frame_no = 0;
  ac97_cmd_t cmd_at_start;
  sample_t   l_at_start, r_at_start;
  always @(posedge bit_clk) begin
    if (dut.bit_count == 8'd128) begin
      frame_no++;
      cmd   <= '{addr: 8'(frame_no * 2), data: 16'(frame_no * 16'h1357)};
      l_bus <= 18'(frame_no * 18'h0_4F1B);
      r_bus <= 18'(~(frame_no * 18'h0_2C3D));
      tx_l  <= 18'($urandom);
      tx_r  <= 18'($urandom);
    end
    if (dut.bit_count == 8'd255) begin
      cmd_at_start <= cmd;
      l_at_start   <= l_bus;
      r_at_start   <= r_bus;
    end
  end

  // expected outgoing frame, latched when the frame starts
  logic [95:0] exp_frame;
  logic [95:0] exp_q [$];
  always @(posedge bit_clk) if (rst_n && dut.bit_count == 8'd255)
    exp_q.push_back({16'hF800, cmd.addr, 12'h0, cmd.data, 4'h0,
                     l_bus, 2'b00, r_bus, 2'b00});

  // received frames compared against expectation
  always @(rx_frames) if (rx_frames > 0) begin
    if (exp_q.size() == 0) check(1'b0, "frame received without a start");
    else begin
      exp_frame = exp_q.pop_front();
      check(rx_frame == exp_frame, $sformatf("frame %0d: got %h exp %h", rx_frames, rx_frame, exp_frame));
    end
  end

  // SYNC length and frame period (in BIT_CLK cycles)
  int sync_len = 0, cyc = 0, last_rise = -1, sync_frames = 0;
  logic sync_d = 1'b0;
  always @(posedge bit_clk) begin
    cyc++;
    if (sync) sync_len++;
    if (sync && !sync_d) begin
      if (last_rise >= 0) begin
        check(cyc - last_rise == 256, $sformatf("frame period %0d", cyc - last_rise));
        sync_frames++;
      end
      last_rise = cyc;
    end
    if (!sync && sync_d) begin
      check(sync_len == 16, $sformatf("sync high for %0d bits", sync_len));
      sync_len = 0;
    end
    sync_d <= sync;
  end

  // ready pulses and captured samples
  int ready_cnt = 0, last_ready = -1;
  always @(posedge bit_clk) if (ready) begin
    ready_cnt++;
    if (last_ready >= 0) check(cyc - last_ready == 256, "ready period");
    last_ready = cyc;
  end
  always @(negedge bit_clk) if (ready && tx_frames > 0) begin
    check(l_bus_out == sent_l && r_bus_out == sent_r,
          $sformatf("captured %h/%h exp %h/%h", l_bus_out, r_bus_out, sent_l, sent_r));
    check(codec_ready, "codec_ready from input tag");
  end

  // clk-domain copy
  int valid_cnt = 0;
  always @(posedge clk) if (sample_valid) begin
    valid_cnt++;
    if (valid_cnt > 1) check(l_sample == l_bus_out && r_sample == r_bus_out, "clk-domain copy");
  end

  // cold reset length
  int nres = 0;
  always @(posedge clk) if (rst_n && !ac97_n_reset) nres++;

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    cmd = '{addr: 8'h18, data: 16'h0808};
    l_bus = '0; r_bus = '0; tx_l = 18'h15555; tx_r = 18'h2AAAA;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (ac97_n_reset);
    check(nres == RESET_CYCLES + 1 || nres == RESET_CYCLES,
          $sformatf("cold reset held %0d clocks", nres));
    wait (rx_frames == N_FRAMES);
    repeat (10) @(posedge clk);
    check(sync_frames >= N_FRAMES - 2, "frames seen");
    check(ready_cnt >= N_FRAMES - 1, "ready pulses");
    check(valid_cnt >= N_FRAMES - 2, "clk-domain samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
