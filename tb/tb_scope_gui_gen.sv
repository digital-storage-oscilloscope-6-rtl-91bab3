// tb_scope_gui_gen: sweeps the visible screen and compares every pixel with a model of
// the display written here: gray grid lines at columns 10+100k and rows 8+70k inside
// the 1000 x 700 area, traces at the rows given for columns 10..1009 (A yellow over
// B green), white text pixels in rows 710..767, and the ground arrows just right of the
// grid. Also checks the read-ahead addresses of the trace and text memories.
module tb_scope_gui_gen;
  int checks = 0, failures = 0;

  logic [10:0] hcount;
  logic [9:0]  vcount, row_a, row_b, offset_a, offset_b, trace_addr;
  logic        text_bit;
  logic [15:0] text_addr;
  logic [11:0] pixel_out;

  scope_gui_gen dut (.hcount, .vcount, .row_a, .row_b, .text_bit, .offset_a, .offset_b,
                     .trace_addr, .text_addr, .pixel_out);

  function automatic int trace_row_a(int col); return 100 + (col * 7) % 500; endfunction
  function automatic int trace_row_b(int col); return (col % 50 == 0) ? 1023 : 400 + (col * 3) % 200; endfunction
  function automatic bit text_model(int x, int y); return ((x * 13 + y * 7) % 5) == 0; endfunction

  function automatic bit arrow(int x, int y, int g);
    int dy = (y > g) ? y - g : g - y;
    int dx = x - 1012;
    return dy <= 3 && dx >= 0 && dx < 4 && dx >= dy;
  endfunction

  int exp_px, col, bad_addr;
  int counts[4];
  initial begin
    offset_a = 10'd288; offset_b = 10'd498;
    bad_addr = 0;
    for (int y = 0; y < 768; y += (y < 700 ? 3 : 1)) begin
      for (int x = 0; x < 1024; x++) begin
        hcount = 11'(x); vcount = 10'(y);
        col = x - 10;
        row_a = (col >= 0 && col < 1000) ? 10'(trace_row_a(col)) : 10'd1023;
        row_b = (col >= 0 && col < 1000) ? 10'(trace_row_b(col)) : 10'd1023;
        text_bit = (y >= 710) ? text_model(x, y - 710) : 1'b0;
        #1;
        exp_px = 0;
        if (x >= 10 && x <= 1010 && y >= 8 && y <= 708 && ((x - 10) % 100 == 0 || (y - 8) % 70 == 0)) exp_px = 'h888;
        if (y >= 710 && text_model(x, y - 710)) exp_px |= 'hFFF;
        if (arrow(x, y, 288)) exp_px |= 'hFF0;
        if (arrow(x, y, 498)) exp_px |= 'h0F0;
        if (col >= 0 && col < 1000 && (trace_row_a(col) == y || trace_row_b(col) == y))
          exp_px = (trace_row_a(col) == y ? 'hFF0 : 0) | (trace_row_b(col) == y ? 'h0F0 : 0);
        checks++;
        if (int'(pixel_out) != exp_px) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d): %h expected %h", x, y, pixel_out, exp_px);
        end
        if (exp_px == 'h888) counts[0]++;
        if (exp_px == 'hFF0) counts[1]++;
        if (exp_px == 'h0F0) counts[2]++;
        if (exp_px == 'hFFF) counts[3]++;
        if (x >= 9 && x <= 1008 && int'(trace_addr) != x - 9) bad_addr++;
        if (y >= 710 && x < 1023 && int'(text_addr) != (y - 710) * 1024 + x + 1) bad_addr++;
      end
    end
    // end of line: the next line's first text pixel
    hcount = 11'd1343; vcount = 10'd711; #1;
    if (int'(text_addr) != 2 * 1024) bad_addr++;
    checks++;
    if (bad_addr != 0) begin failures++; $display("%0d wrong read-ahead addresses", bad_addr); end
    checks++;
    if (counts[0] == 0 || counts[1] == 0 || counts[2] == 0 || counts[3] == 0) begin failures++; $display("a layer never appeared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
