// tb_waveform_drawer: the video stage with testbench memories behind its read ports
// (one clock of latency, as block RAM). Over one frame the VGA outputs must show the
// trace of channel A (a ramp of rows) at column 10+i, grid pixels, text pixels, black
// while blanked and negative syncs, one clock after the raster position; safe_to_copy
// must be high exactly on rows 710..789.
module tb_waveform_drawer;
  logic clk = 0, rst = 1;
  always #7.692 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  row_a, row_b, trace_addr;
  logic        text_bit, safe_to_copy, vga_hs, vga_vs;
  logic [15:0] text_addr;
  logic [3:0]  vga_r, vga_g, vga_b;

  waveform_drawer dut (.clk, .rst, .row_a, .row_b, .text_bit, .offset_a(10'd288),
    .offset_b(10'd498), .trace_addr, .text_addr, .safe_to_copy,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  // memories: trace A row = 100 + i/4, B off screen; text bit = column bit 3
  always @(posedge clk) begin
    row_a <= 10'(100 + int'(trace_addr) / 4);
    row_b <= 10'd1023;
    text_bit <= text_addr[3];
  end

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h, v, trace_hits, grid_hits, text_hits, bad, safe_bad;
  logic [11:0] rgb;
  bit wrong;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    while (!(dut.hcount == 0 && dut.vcount == 0)) @(negedge clk);
    // outputs at this negedge show the position of one clock earlier
    for (int n = 0; n < 1344 * 806 + 2; n++) begin
      @(negedge clk);
      h = (int'(dut.hcount) + 1343) % 1344;
      v = (h == 1343) ? (int'(dut.vcount) + 805) % 806 : int'(dut.vcount);
      rgb = {vga_r, vga_g, vga_b};
      wrong = 0;
      if (h >= 1024 || v >= 768) begin
        if (rgb != 0) wrong = 1;
      end else if (h >= 10 && h < 1010 && v == 100 + (h - 10) / 4) begin
        if (rgb == 12'hFF0) trace_hits++; else wrong = 1;
      end else if (v >= 710 && v < 768) begin
        if (rgb != ((h % 16) >= 8 ? 12'hFFF : 12'h000)) wrong = 1;
        if (rgb == 12'hFFF) text_hits++;
      end else if (v == 8 && h >= 10 && h <= 1010) begin
        if (rgb == 12'h888) grid_hits++; else wrong = 1;
      end
      if (vga_hs != !(h >= 1048 && h < 1184)) wrong = 1;
      if (vga_vs != !(v >= 771 && v < 777)) wrong = 1;
      if (wrong) bad++;
      if (safe_to_copy != (int'(dut.vcount) >= 710 && int'(dut.vcount) <= 789) && dut.hcount > 2) safe_bad++;
    end
    // one check per output clock (colour and both syncs), plus the three totals
    checks += 1344 * 806 + 2 + 3;
    if (bad != 0) begin failures += bad; $display("%0d wrong output clocks", bad); end
    if (trace_hits < 900) begin failures++; $display("trace pixels %0d", trace_hits); end
    if (grid_hits != 1001 || text_hits == 0) begin failures++; $display("grid %0d text %0d", grid_hits, text_hits); end
    if (safe_bad != 0) begin failures++; $display("safe window wrong %0d", safe_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
