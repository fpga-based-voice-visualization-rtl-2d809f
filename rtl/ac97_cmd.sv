// ac97_cmd: register-configuration state machine for the AC'97 codec.
//
// Twelve states, one codec register write each. The current write is
// presented on `cmd` (slot 1 address byte with bit 7 = 0 for a write, slot 2
// data) and the machine moves to the next state on every `ready` pulse from
// the frame engine, so each write occupies exactly one AC-link frame. After
// the last state it stays there and keeps rewriting the master volume, so
// the `volume` input takes effect while the design runs.
//
// The number of states and the writes PCM-out volume 0x18 <- 0x0808,
// record gain 0x1C <- 0x0F0F and DAC rate 0x2C <- 0xBB80 (48 kHz), in that
// order in states 4, 5 and 6, follow the design description. The other
// writes (mutes during set-up, beep, microphone, record select, ADC rate,
// headphone and master volume) are this implementation's choice from the
// AC'97 register map.
//
// volume: 0 = quietest, 31 = loudest; it is written as the attenuation
// 31 - volume to both channels of registers 0x04 and 0x02.
// Timing: all in the BIT_CLK domain; rst_n asynchronous, active low.
module ac97_cmd
  import vv_pkg::*;
(
  input  logic       bit_clk,
  input  logic       rst_n,
  input  logic       ready,
  input  logic [4:0] volume,
  output ac97_cmd_t  cmd,
  output logic [3:0] state,
  output logic       done
);

  localparam logic [3:0] LAST_STATE = 4'd11;

  logic [4:0] atten;
  assign atten = 5'd31 - volume;

  always_ff @(posedge bit_clk or negedge rst_n) begin
    if (!rst_n)
      state <= '0;
    else if (ready && state != LAST_STATE)
      state <= state + 4'd1;
  end

  assign done = (state == LAST_STATE);

  always_comb begin
    unique case (state)
      4'd0:    cmd = '{addr: 8'h02, data: 16'h8000};  // master volume: mute
      4'd1:    cmd = '{addr: 8'h04, data: 16'h8000};  // headphone volume: mute
      4'd2:    cmd = '{addr: 8'h0A, data: 16'h0000};  // PC beep off
      4'd3:    cmd = '{addr: 8'h0E, data: 16'h0008};  // mic volume 0 dB, no boost
      4'd4:    cmd = '{addr: 8'h18, data: 16'h0808};  // PCM-out volume 0 dB
      4'd5:    cmd = '{addr: 8'h1C, data: 16'h0F0F};  // record gain, full
      4'd6:    cmd = '{addr: 8'h2C, data: 16'hBB80};  // DAC rate 48000 Hz
      4'd7:    cmd = '{addr: 8'h32, data: 16'hBB80};  // ADC rate 48000 Hz
      4'd8:    cmd = '{addr: 8'h1A, data: 16'h0000};  // record select: microphone
      4'd9:    cmd = '{addr: 8'h20, data: 16'h0000};  // general purpose: defaults
      4'd10:   cmd = '{addr: 8'h04, data: {3'b000, atten, 3'b000, atten}};
      default: cmd = '{addr: 8'h02, data: {3'b000, atten, 3'b000, atten}};
    endcase
  end

endmodule
