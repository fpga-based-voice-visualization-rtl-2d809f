// ac97_controller: AC-link frame engine between the FPGA and an AC'97 codec.
//
// The codec supplies BIT_CLK (12.288 MHz). Each frame is 256 bits: a 16-bit
// tag followed by twelve 20-bit slots. An 8-bit counter (bit_count, 0..255)
// tracks the bit on the line; SYNC is high while the tag is sent
// (bit_count 0..15). Outgoing bits change on the rising edge of BIT_CLK and
// incoming bits are sampled on the falling edge, as the AC-link requires.
//
// Output frame (towards the codec): slot 0 tag, slot 1 command address,
// slot 2 command data, slot 3 left PCM, slot 4 right PCM; slots 5..12 are
// sent as zero. The tag marks the frame and slots 1..4 valid, bits 2..0 are
// zero. Input frame (from the codec): slots 3 and 4 carry the left and right
// ADC samples; the upper 18 bits of each 20-bit slot are kept. The slot
// layout and the tag rules follow the design description; the 18-bit sample
// width, loading the outgoing frame one bit before it starts and capturing
// the input samples at the end of slot 4 are this implementation's choices.
//
// Interface and timing:
//   * bit_clk domain: cmd, l_bus, r_bus are sampled when a frame starts;
//     l_bus_out/r_bus_out update and `ready` pulses for one BIT_CLK cycle at
//     the end of slot 4 of every frame (one pulse per 256 BIT_CLK cycles).
//   * clk domain: the same samples are handed over through a toggle
//     synchroniser; l_sample/r_sample change and sample_valid pulses about
//     three clk cycles after `ready`. clk must be faster than BIT_CLK.
//   * ac97_n_reset is a cold-reset pulse, low for RESET_CYCLES clk cycles
//     after rst_n is released. rst_n is asynchronous, active low, and resets
//     both domains.
module ac97_controller
  import vv_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 200  // 2 us at 100 MHz (>= 1 us cold reset)
) (
  input  logic      clk,
  input  logic      bit_clk,
  input  logic      rst_n,
  // codec pins
  output logic      ac97_n_reset,
  output logic      sync,
  output logic      sdata_out,
  input  logic      sdata_in,
  // bit_clk domain
  input  ac97_cmd_t cmd,
  input  sample_t   l_bus,
  input  sample_t   r_bus,
  output sample_t   l_bus_out,
  output sample_t   r_bus_out,
  output logic      ready,
  output logic      codec_ready,
  output logic [7:0] bit_count,
  // clk domain
  output sample_t   l_sample,
  output sample_t   r_sample,
  output logic      sample_valid
);

  localparam int unsigned OUT_BITS = AC_TAG_BITS + 4 * AC_SLOT_BITS;  // 96
  localparam int unsigned IN_BITS  = 2 * AC_SLOT_BITS;                // slots 3, 4

  // ---------------------------------------------------------------- clk domain: cold reset
  logic [$clog2(RESET_CYCLES+1)-1:0] rst_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_cnt      <= '0;
      ac97_n_reset <= 1'b0;
    end else if (rst_cnt != RESET_CYCLES[$bits(rst_cnt)-1:0]) begin
      rst_cnt      <= rst_cnt + 1'b1;
      ac97_n_reset <= 1'b0;
    end else begin
      ac97_n_reset <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- bit_clk domain: output frame
  logic [15:0]         tag_out;
  logic [OUT_BITS-1:0] frame_out;
  logic [OUT_BITS-1:0] out_sr;

  always_comb begin
    // frame valid, slots 1..4 valid, slots 5..12 invalid, bits 2..0 zero
    tag_out   = {1'b1, 4'b1111, 8'b0, 3'b000};
    frame_out = {tag_out,
                 cmd.addr, 12'h000,          // slot 1: R/W + register index
                 cmd.data, 4'h0,             // slot 2: register data
                 l_bus, 2'b00,               // slot 3: left PCM
                 r_bus, 2'b00};              // slot 4: right PCM
  end

  always_ff @(posedge bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_count <= 8'd255;
      sync      <= 1'b0;
      sdata_out <= 1'b0;
      out_sr    <= '0;
    end else begin
      bit_count <= bit_count + 8'd1;
      // SYNC is high while bit_count is 0..15 (the tag)
      sync      <= (bit_count == 8'd255) || (bit_count < 8'd15);
      if (bit_count == 8'd255) begin
        sdata_out <= frame_out[OUT_BITS-1];
        out_sr    <= {frame_out[OUT_BITS-2:0], 1'b0};
      end else begin
        sdata_out <= out_sr[OUT_BITS-1];
        out_sr    <= {out_sr[OUT_BITS-2:0], 1'b0};
      end
    end
  end

  // ---------------------------------------------------------------- bit_clk domain: input frame
  logic [IN_BITS-1:0] in_sr;
  logic [15:0]        in_tag;

  always_ff @(negedge bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr  <= '0;
      in_tag <= '0;
    end else begin
      if (bit_count < 8'(AC_TAG_BITS))
        in_tag <= {in_tag[14:0], sdata_in};
      if (bit_count >= 8'(AC_SLOT3_START) && bit_count < 8'(AC_SLOT4_START + AC_SLOT_BITS))
        in_sr <= {in_sr[IN_BITS-2:0], sdata_in};
    end
  end

  logic toggle_bc;
  always_ff @(posedge bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      l_bus_out   <= '0;
      r_bus_out   <= '0;
      ready       <= 1'b0;
      codec_ready <= 1'b0;
      toggle_bc   <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (bit_count == 8'(AC_TAG_BITS - 1))
        codec_ready <= in_tag[15];  // full tag seen at the falling edge of bit 15
      if (bit_count == 8'(AC_SLOT4_START + AC_SLOT_BITS - 1)) begin
        l_bus_out <= in_sr[IN_BITS-1 -: SAMPLE_W];
        r_bus_out <= in_sr[AC_SLOT_BITS-1 -: SAMPLE_W];
        ready     <= 1'b1;
        toggle_bc <= ~toggle_bc;
      end
    end
  end

  // ---------------------------------------------------------------- hand-over to clk domain
  logic [2:0] toggle_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      toggle_sync  <= '0;
      l_sample     <= '0;
      r_sample     <= '0;
      sample_valid <= 1'b0;
    end else begin
      toggle_sync  <= {toggle_sync[1:0], toggle_bc};
      sample_valid <= 1'b0;
      if (toggle_sync[2] != toggle_sync[1]) begin
        // l_bus_out/r_bus_out have been stable for two clk cycles and stay
        // stable for a whole frame, so they can be copied here.
        l_sample     <= l_bus_out;
        r_sample     <= r_bus_out;
        sample_valid <= 1'b1;
      end
    end
  end

endmodule
