// display_rom: message and character-glyph ROM for the welcome screen.
//
// It stores the five lines of the welcome message shown on the monitor and
// an 8x8-pixel glyph for every 7-bit character code, and turns a position
// inside the text (line, character, glyph row) into eight pixels. The lines
// are "Welcome", "Benjamn Carrion Schafer", "Gao Zhendong",
// "System is Ready" and "PLEASE SPEAK" followed by a right arrow, as the
// welcome screen shows them. The glyph table (rtl/font_rom.hex, 128 x 8
// bytes, 5x7 glyphs with one-row descenders) and the 8x8 cell are this
// implementation's choices; only the characters of the message are drawn.
//
// Interface: line (0..4), char_idx (0..31) and glyph_row (0..7) in;
// char_code, glyph (bit 7 = leftmost pixel) and line_len (characters in the
// line) out. Positions past the end of a line read as a space. The read is
// combinational: the outputs follow the inputs in the same cycle.
module display_rom #(
  parameter string FONT_FILE = "rtl/font_rom.hex"
) (
  input  logic [2:0] line,
  input  logic [4:0] char_idx,
  input  logic [2:0] glyph_row,
  output logic [6:0] char_code,
  output logic [7:0] glyph,
  output logic [4:0] line_len
);

  // Message lines, left-aligned and padded with spaces to 32 characters;
  // character i of a line is byte 31-i of its constant.
  localparam int unsigned MAX_LEN = 32;
  typedef logic [8*MAX_LEN-1:0] text_line_t;
  localparam text_line_t LINE0 = "Welcome                         ";
  localparam text_line_t LINE1 = "Benjamn Carrion Schafer         ";
  localparam text_line_t LINE2 = "Gao Zhendong                    ";
  localparam text_line_t LINE3 = "System is Ready                 ";
  localparam text_line_t LINE4 = "PLEASE SPEAK \x7f                  ";

  function automatic logic [6:0] msg_char(input logic [2:0] l, input logic [4:0] i);
    text_line_t t;
    unique case (l)
      3'd0:    t = LINE0;
      3'd1:    t = LINE1;
      3'd2:    t = LINE2;
      3'd3:    t = LINE3;
      3'd4:    t = LINE4;
      default: t = {MAX_LEN{8'h20}};
    endcase
    return t[8*(MAX_LEN-1-int'(i)) +: 7];
  endfunction

  function automatic logic [4:0] msg_len(input logic [2:0] l);
    unique case (l)
      3'd0:    return 5'd7;
      3'd1:    return 5'd23;
      3'd2:    return 5'd12;
      3'd3:    return 5'd15;
      3'd4:    return 5'd14;
      default: return 5'd0;
    endcase
  endfunction

  logic [7:0] font [128*8];
  initial $readmemh(FONT_FILE, font);

  assign char_code = msg_char(line, char_idx);
  assign line_len  = msg_len(line);
  assign glyph     = font[{char_code, glyph_row}];

endmodule
