// waveform_drawer: the video side of the oscilloscope, clocked at 65 MHz.
//
// vga_timing produces the 1024x768 raster; scope_gui_gen turns each raster position,
// the two channels' trace rows and the text bitmap into a colour. The colour, syncs and
// blank are registered together one clock after the raster counters, the colour is
// forced to black while blanking and the syncs leave inverted (negative polarity for
// this mode), as the board's VGA port expects. safe_to_copy is high while the raster is
// on rows 710..789, below the grid, so the frame buffers can replace the traces without
// tearing a visible frame; the copy needs 10 us of the 1.6 ms this window lasts. This
// follows the design description, which has the drawer signal when it is not reading
// the trace memories.
module waveform_drawer
  import dso_pkg::*;
#(
  parameter int unsigned AW = $clog2(N_SAMPLES)
) (
  input  logic               clk,            // 65 MHz pixel clock
  input  logic               rst,
  input  row_t               row_a,
  input  row_t               row_b,
  input  logic               text_bit,
  input  row_t               offset_a,
  input  row_t               offset_b,
  output logic [AW-1:0]      trace_addr,
  output logic [TEXT_AW-1:0] text_addr,
  output logic               safe_to_copy,
  output logic [3:0]         vga_r,
  output logic [3:0]         vga_g,
  output logic [3:0]         vga_b,
  output logic               vga_hs,
  output logic               vga_vs
);
  localparam int unsigned SAFE_FIRST = TEXT_Y0;   // 710
  localparam int unsigned SAFE_LAST  = 789;

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  rgb_t        pixel;
  rgb_t        rgb_q;
  logic        hs_q, vs_q, blank_q;

  vga_timing u_timing (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  scope_gui_gen #(.AW(AW)) u_gui (
    .hcount, .vcount, .row_a, .row_b, .text_bit, .offset_a, .offset_b,
    .trace_addr, .text_addr, .pixel_out(pixel));

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb_q <= BLACK;
      hs_q <= 1'b0;
      vs_q <= 1'b0;
      blank_q <= 1'b1;
      safe_to_copy <= 1'b0;
    end else begin
      rgb_q <= pixel;
      hs_q <= hsync;
      vs_q <= vsync;
      blank_q <= blank;
      safe_to_copy <= (32'(vcount) >= SAFE_FIRST) && (32'(vcount) <= SAFE_LAST);
    end
  end

  assign vga_r = blank_q ? 4'h0 : rgb_q[11:8];
  assign vga_g = blank_q ? 4'h0 : rgb_q[7:4];
  assign vga_b = blank_q ? 4'h0 : rgb_q[3:0];
  assign vga_hs = ~hs_q;
  assign vga_vs = ~vs_q;
endmodule
