// sample_cdc: carries a slowly changing sample word into another clock domain.
//
// The source side flips a toggle flag each time `src_valid` pulses and holds
// `src_data` steady until the next pulse. The destination side passes the
// flag through a three-flip-flop synchroniser and copies the data word when
// it sees the flag change, so the word is only read while it is stable.
// This is a helper of this implementation: it moves audio samples (one per
// AC-link frame, about 20.8 us apart) into the pixel-clock domain.
//
// Timing: dst_data changes, and dst_valid pulses for one dst_clk cycle,
// three to four dst_clk cycles after src_valid. Source pulses must be at
// least four dst_clk cycles apart. rst_n is asynchronous, active low.
module sample_cdc #(
  parameter int unsigned WIDTH = 18
) (
  input  logic             src_clk,
  input  logic             rst_n,
  input  logic             src_valid,
  input  logic [WIDTH-1:0] src_data,
  input  logic             dst_clk,
  output logic [WIDTH-1:0] dst_data,
  output logic             dst_valid
);

  logic             src_toggle;
  logic [WIDTH-1:0] src_hold;
  logic [2:0]       dst_sync;

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n) begin
      src_toggle <= 1'b0;
      src_hold   <= '0;
    end else if (src_valid) begin
      src_toggle <= ~src_toggle;
      src_hold   <= src_data;
    end
  end

  always_ff @(posedge dst_clk or negedge rst_n) begin
    if (!rst_n) begin
      dst_sync  <= '0;
      dst_data  <= '0;
      dst_valid <= 1'b0;
    end else begin
      dst_sync  <= {dst_sync[1:0], src_toggle};
      dst_valid <= dst_sync[2] ^ dst_sync[1];
      if (dst_sync[2] ^ dst_sync[1]) dst_data <= src_hold;
    end
  end

endmodule
