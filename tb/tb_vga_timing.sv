// tb_vga_timing: runs two full frames and measures the raster: 1344 clocks per line with
// a 136-clock hsync starting 1048 clocks into the line (1024 + 24), 806 lines per frame
// with a 6-line vsync starting at line 771 (768 + 3), and 1024 x 768 unblanked pixels per
// frame, and checks that hcount/vcount agree with the blanking.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  always #7.692 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  vga_timing dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int visible, hs_len, hs_start, vs_lines, lines, frame_clocks, bad;
  logic hs_d, vs_d;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // align to the start of a frame
    while (!(hcount == 0 && vcount == 0)) @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      visible = 0; hs_len = 0; hs_start = -1; vs_lines = 0; lines = 0; frame_clocks = 0; bad = 0;
      hs_d = 0; vs_d = 0;
      do begin
        if (!blank) visible++;
        if (vcount == 10 && hsync) begin
          hs_len++;
          if (!hs_d) hs_start = int'(hcount);
        end
        if (hcount == 0 && vsync) vs_lines++;
        if (hcount == 0 && vsync && !vs_d && vcount != 771) bad++;
        if (blank != (hcount >= 1024 || vcount >= 768)) bad++;
        if (hcount == 0) lines++;
        hs_d = hsync;
        if (hcount == 0) vs_d = vsync;
        frame_clocks++;
        @(negedge clk);
      end while (!(hcount == 0 && vcount == 0));
      checks += 5;
      if (frame_clocks != 1344 * 806) begin failures++; $display("frame %0d clocks", frame_clocks); end
      if (visible != 1024 * 768) begin failures++; $display("visible %0d", visible); end
      if (hs_len != 136 || hs_start != 1048) begin failures++; $display("hsync %0d at %0d", hs_len, hs_start); end
      if (vs_lines != 6 || lines != 806) begin failures++; $display("vsync %0d lines of %0d", vs_lines, lines); end
      if (bad != 0) begin failures++; $display("%0d inconsistent clocks", bad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
