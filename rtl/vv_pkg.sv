// vv_pkg: types and constants shared by the voice-visualisation design.
//
// It holds the sample width of the AC-link PCM data (18 bits), the
// visualisation modes chosen by the three slide switches, the AC-link frame
// geometry (a 16-bit tag followed by twelve 20-bit slots, 256 bits in all)
// and the 1440x900 at 60 Hz video timing. The frame geometry and the video
// timing numbers are those of the AC'97 link and of the monitor mode the
// design targets; the encoding of the mode enum follows the switch values
// used for each picture.
package vv_pkg;

  // PCM sample carried in slots 3 and 4 (upper 18 of the 20 slot bits).
  localparam int unsigned SAMPLE_W = 18;
  typedef logic [SAMPLE_W-1:0] sample_t;

  // AC-link frame: tag (16 bits) + 12 slots of 20 bits = 256 bits.
  localparam int unsigned AC_TAG_BITS   = 16;
  localparam int unsigned AC_SLOT_BITS  = 20;
  localparam int unsigned AC_FRAME_BITS = 256;
  // First bit (bit_count value) of each slot used by the design.
  localparam int unsigned AC_SLOT1_START = 16;
  localparam int unsigned AC_SLOT2_START = 36;
  localparam int unsigned AC_SLOT3_START = 56;
  localparam int unsigned AC_SLOT4_START = 76;

  // One codec register write: address byte (bit 7 = read request) + data.
  typedef struct packed {
    logic [7:0]  addr;
    logic [15:0] data;
  } ac97_cmd_t;

  // Picture selected by the three switches.
  typedef enum logic [2:0] {
    MODE_WELCOME   = 3'b000,
    MODE_DOT       = 3'b001,
    MODE_HISTOGRAM = 3'b010,
    MODE_SINE      = 3'b011
  } vis_mode_e;

  // 24-bit colour for the video DAC.
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  localparam rgb_t RGB_WHITE = '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
  localparam rgb_t RGB_RED   = '{r: 8'hFF, g: 8'h00, b: 8'h00};
  localparam rgb_t RGB_BLUE  = '{r: 8'h00, g: 8'h00, b: 8'hFF};

endpackage
