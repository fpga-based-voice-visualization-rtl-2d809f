// display_rom_tb: self-checking test of the welcome-message and glyph ROM.
//
// Reads every character position of the five message lines and compares the
// code and the line length with the expected text; positions past the end
// must read as spaces. Checks a set of glyph rows worked out by hand from
// the 5x7 shapes (W, e, A, the arrow, space) and that all eight rows of a
// space are blank.
`timescale 1ns/1ps
module display_rom_tb;

  logic [2:0] line;
  logic [4:0] char_idx;
  logic [2:0] glyph_row;
  logic [6:0] char_code;
  logic [7:0] glyph;
  logic [4:0] line_len;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  display_rom dut (.line, .char_idx, .glyph_row, .char_code, .glyph, .line_len);

  string text [5];

  task automatic glyph_at(input int l, input int c, input int r, input logic [7:0] exp, input string what);
    line = 3'(l); char_idx = 5'(c); glyph_row = 3'(r);
    #1;
    check(glyph == exp, $sformatf("%s: glyph %h exp %h", what, glyph, exp));
  endtask

  initial begin
    text[0] = "Welcome";
    text[1] = "Benjamn Carrion Schafer";
    text[2] = "Gao Zhendong";
    text[3] = "System is Ready";
    text[4] = "PLEASE SPEAK ";
    for (int l = 0; l < 5; l++) begin
      for (int c = 0; c < 32; c++) begin
        logic [6:0] exp;
        if (l == 4 && c == 13) exp = 7'h7F;
        else if (c < text[l].len()) exp = 7'(text[l][c]);
        else exp = 7'h20;
        line = 3'(l); char_idx = 5'(c); glyph_row = 3'd0;
        #1;
        check(char_code == exp, $sformatf("line %0d char %0d: %h exp %h", l, c, char_code, exp));
      end
      check(line_len == 5'((l == 4) ? 14 : text[l].len()), $sformatf("line %0d length %0d", l, line_len));
    end
    // 'W' is line 0, char 0
    glyph_at(0, 0, 0, 8'h44, "W row 0");
    glyph_at(0, 0, 3, 8'h54, "W row 3");
    glyph_at(0, 0, 5, 8'h6C, "W row 5");
    glyph_at(0, 0, 7, 8'h00, "W row 7");
    // 'e' is line 0, char 1
    glyph_at(0, 1, 4, 8'h7C, "e row 4");
    glyph_at(0, 1, 2, 8'h38, "e row 2");
    // 'A' is line 4, char 3 ("PLEASE")
    glyph_at(4, 3, 0, 8'h38, "A row 0");
    glyph_at(4, 3, 3, 8'h7C, "A row 3");
    // arrow
    glyph_at(4, 13, 3, 8'h7C, "arrow row 3");
    glyph_at(4, 13, 1, 8'h10, "arrow row 1");
    // 'j' descender: line 1 char 3
    glyph_at(1, 3, 7, 8'h30, "j row 7");
    for (int r = 0; r < 8; r++) glyph_at(0, 20, r, 8'h00, "space");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
