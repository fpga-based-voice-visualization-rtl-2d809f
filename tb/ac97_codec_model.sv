// ac97_codec_model: behavioural model of an AC'97 codec's digital link, for
// simulation only (it is not synthesizable).
//
// After ac97_n_reset rises it starts BIT_CLK (half period HALF_NS). It
// watches SYNC and SDATA_OUT on the falling edge of BIT_CLK: a rising SYNC
// marks bit 0 of a frame. Each received frame's first 96 bits (tag and
// slots 1..4) are kept in rx_frame and counted in rx_frames; a write in
// slot 1/2 with valid tag bits is stored in regs[] and counted in
// reg_writes. Towards the controller it sends, on the rising edge of
// BIT_CLK, a tag of codec-ready plus slots 3 and 4 valid, and tx_l / tx_r
// (sampled when a frame starts) as the left and right PCM samples; the
// values of the last frame sent completely are in sent_l / sent_r, and
// tx_frames counts those frames. The first frame after reset is not
// recognised (no SYNC edge seen yet) and is not counted.
module ac97_codec_model #(
  parameter realtime HALF_NS = 40.69ns
) (
  input  logic        ac97_n_reset,
  input  logic        sync,
  input  logic        sdata_out,
  output logic        bit_clk,
  output logic        sdata_in,
  input  logic [17:0] tx_l,
  input  logic [17:0] tx_r,
  output logic [95:0] rx_frame,
  output int          rx_frames,
  output int          reg_writes,
  output logic [17:0] sent_l,
  output logic [17:0] sent_r,
  output int          tx_frames
);

  logic [15:0] regs [128];
  int          idx;          // index of the bit last sampled (falling edge)
  logic        sync_q;
  logic [95:0] rx_sr;
  logic [95:0] tx_frame;
  logic        in_frame;

  initial begin
    bit_clk    = 1'b0;
    sdata_in   = 1'b0;
    idx        = 255;
    sync_q     = 1'b0;
    in_frame   = 1'b0;
    rx_frames  = 0;
    reg_writes = 0;
    tx_frames  = 0;
    rx_frame   = '0;
    rx_sr      = '0;
    tx_frame   = '0;
    sent_l     = '0;
    sent_r     = '0;
    foreach (regs[i]) regs[i] = '0;
    forever begin
      #(HALF_NS);
      if (ac97_n_reset) bit_clk = ~bit_clk;
      else begin
        bit_clk  = 1'b0;
        idx      = 255;
        sync_q   = 1'b0;
        in_frame = 1'b0;
      end
    end
  end

  // receive side
  always @(negedge bit_clk) begin
    if (!ac97_n_reset) begin
      idx      = 255;
      sync_q   = 1'b0;
      in_frame = 1'b0;
    end else if (sync && !sync_q) begin
      idx      = 0;
      in_frame = 1'b1;
    end else begin
      idx = (idx + 1) % 256;
    end
    if (ac97_n_reset) sync_q = sync;
    if (in_frame && idx < 96) rx_sr[95 - idx] = sdata_out;
    if (in_frame && idx == 95) begin
      rx_frame = rx_sr;
      rx_frames++;
      // tag bit 15 frame valid, 14 slot 1 valid, 13 slot 2 valid
      if (rx_sr[95] && rx_sr[94] && rx_sr[93] && !rx_sr[79]) begin
        regs[rx_sr[78:72]] = rx_sr[59:44];
        reg_writes++;
      end
    end
    if (in_frame && idx == 95) begin
      sent_l = tx_frame[39:22];
      sent_r = tx_frame[19:2];
      tx_frames++;
    end
  end

  // transmit side: bit idx+1 is put on the line at the rising edge
  always @(posedge bit_clk) begin
    int nxt;
    nxt = (idx + 1) % 256;
    if (nxt == 0) begin
      tx_frame = {16'b1001_1000_0000_0000, 20'h0, 20'h0,
                  tx_l, 2'b00, tx_r, 2'b00};
    end
    sdata_in <= (nxt < 96) ? tx_frame[95 - nxt] : 1'b0;
  end

endmodule
