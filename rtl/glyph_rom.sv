// glyph_rom: 5x7 character font for the on-screen text.
//
// Combinational: for an ASCII code and a glyph row 0..7 (top first) it returns five
// pixels, bit 4 leftmost. Row 7 is the blank gap under each glyph. Only the characters
// the display uses are defined (digits, '.', '/', the capitals of the labels and 'd',
// 'm', 'u'); any other code is blank. The design uses a character ROM for its text but
// does not give one; this font is this design's own.
module glyph_rom (
  input  logic [7:0] ch,
  input  logic [2:0] row,
  output logic [4:0] bits
);
  logic [34:0] g;   // seven rows of five bits, top row in bits 34:30

  always_comb begin
    case (ch)
      "0": g = 35'b01110_10001_10011_10101_11001_10001_01110;
      "1": g = 35'b00100_01100_00100_00100_00100_00100_01110;
      "2": g = 35'b01110_10001_00001_00010_00100_01000_11111;
      "3": g = 35'b11111_00010_00100_00010_00001_10001_01110;
      "4": g = 35'b00010_00110_01010_10010_11111_00010_00010;
      "5": g = 35'b11111_10000_11110_00001_00001_10001_01110;
      "6": g = 35'b00110_01000_10000_11110_10001_10001_01110;
      "7": g = 35'b11111_00001_00010_00100_01000_01000_01000;
      "8": g = 35'b01110_10001_10001_01110_10001_10001_01110;
      "9": g = 35'b01110_10001_10001_01111_00001_00010_01100;
      ".": g = 35'b00000_00000_00000_00000_00000_01100_01100;
      "/": g = 35'b00000_00001_00010_00100_01000_10000_00000;
      "A": g = 35'b01110_10001_10001_11111_10001_10001_10001;
      "B": g = 35'b11110_10001_10001_11110_10001_10001_11110;
      "C": g = 35'b01110_10001_10000_10000_10000_10001_01110;
      "E": g = 35'b11111_10000_10000_11110_10000_10000_11111;
      "G": g = 35'b01110_10001_10000_10111_10001_10001_01111;
      "H": g = 35'b10001_10001_10001_11111_10001_10001_10001;
      "I": g = 35'b01110_00100_00100_00100_00100_00100_01110;
      "M": g = 35'b10001_11011_10101_10101_10001_10001_10001;
      "N": g = 35'b10001_10001_11001_10101_10011_10001_10001;
      "R": g = 35'b11110_10001_10001_11110_10100_10010_10001;
      "S": g = 35'b01111_10000_10000_01110_00001_00001_11110;
      "T": g = 35'b11111_00100_00100_00100_00100_00100_00100;
      "U": g = 35'b10001_10001_10001_10001_10001_10001_01110;
      "V": g = 35'b10001_10001_10001_10001_10001_01010_00100;
      "X": g = 35'b10001_10001_01010_00100_01010_10001_10001;
      "d": g = 35'b00001_00001_01101_10011_10001_10001_01111;
      "m": g = 35'b00000_00000_11010_10101_10101_10001_10001;
      "u": g = 35'b00000_00000_10001_10001_10001_10011_01101;
      default: g = '0;
    endcase
    bits = (row == 3'd7) ? 5'b0 : g[34 - 5*row -: 5];
  end
endmodule
