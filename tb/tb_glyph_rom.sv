// tb_glyph_rom: checks glyphs against bitmaps drawn out here row by row, that the
// eighth row is always blank and that an undefined code gives a blank cell.
module tb_glyph_rom;
  int checks = 0, failures = 0;
  logic [7:0] ch;
  logic [2:0] row;
  logic [4:0] bits;
  glyph_rom dut (.ch, .row, .bits);

  task automatic expect_glyph(byte c, string pic);
    // pic: 7 rows of 5 characters, '#' for a lit pixel
    for (int r = 0; r < 8; r++) begin
      logic [4:0] want;
      want = 0;
      if (r < 7) for (int k = 0; k < 5; k++) want[4-k] = (pic[r*5 + k] == "#");
      ch = c; row = 3'(r); #1;
      checks++;
      if (bits !== want) begin failures++; $display("'%c' row %0d: %b expected %b", c, r, bits, want); end
    end
  endtask

  initial begin
    expect_glyph("0", " ### #   ##  ### # ###  ##   # ### ");
    expect_glyph("1", "  #   ##    #    #    #    #   ### ");
    expect_glyph("V", "#   ##   ##   ##   ##   # # #   #  ");
    expect_glyph("H", "#   ##   ##   #######   ##   ##   #");
    expect_glyph(".", "                          ##   ## ");
    expect_glyph("m", "          ## # # # ## # ##   ##   #");
    expect_glyph("?", "                                   ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
