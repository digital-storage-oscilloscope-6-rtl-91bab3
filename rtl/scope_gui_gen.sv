// scope_gui_gen: colour of the screen pixel at (hcount, vcount).
//
// Layers, from top: the two traces (A yellow, B green; where they meet the colours OR),
// then, ORed together, the gray 10 x 10 grid (lines every 100 columns from column 10 and
// every 70 rows from row 8, a 1000 x 700 area), the white text bitmap below the grid
// (rows 710..767), and a small left-pointing arrow per channel just right of the grid
// marking its ground row (A yellow, B green). Trace sample i is drawn at column 10+i, on
// the row the interpreter stored for it.
//
// Memory reads: the trace and text RAMs answer one clock after their address, so this
// block addresses them for the next pixel: trace column hcount+1 (trace_addr =
// hcount-9) and text pixel (hcount+1, vcount), or the next line's first pixel at the end
// of a line. pixel_out is combinational and refers to the current (hcount, vcount).
// Grid geometry, colours and the ground markers follow the design description; the
// arrow's shape and the read-ahead scheme are this design's.
module scope_gui_gen
  import dso_pkg::*;
#(
  parameter int unsigned AW = $clog2(N_SAMPLES)
) (
  input  logic [10:0]        hcount,
  input  logic [9:0]         vcount,
  input  row_t               row_a,        // trace rows for column hcount
  input  row_t               row_b,
  input  logic               text_bit,     // text pixel for (hcount, vcount)
  input  row_t               offset_a,
  input  row_t               offset_b,
  output logic [AW-1:0]      trace_addr,
  output logic [TEXT_AW-1:0] text_addr,
  output rgb_t               pixel_out
);
  localparam int unsigned H_TOTAL = 1344;

  rgb_t grid_px, trace_a_px, trace_b_px, text_px, gnd_a_px, gnd_b_px;
  logic in_grid_box, on_vline, on_hline, in_trace_cols;
  int   h, v;

  // ground arrow: tip at column GRID_X1+2 on the ground row, 4 columns wide,
  // one column narrower for each row away from the ground row (3 rows up and down)
  function automatic logic arrow(input int hh, input int vv, input row_t gnd);
    int dy, dx;
    dy = vv - int'(gnd);
    if (dy < 0) dy = -dy;
    dx = hh - int'(GRID_X1) - 2;
    return (dy <= 3) && (dx >= 0) && (dx < 4) && (dx >= dy);
  endfunction

  always_comb begin
    h = int'(hcount);
    v = int'(vcount);
    in_grid_box = (h >= int'(GRID_X0)) && (h <= int'(GRID_X1)) &&
                  (v >= int'(GRID_Y0)) && (v <= int'(GRID_Y1));
    on_vline = (h >= int'(GRID_X0)) && (((h - int'(GRID_X0)) % int'(H_STEP)) == 0);
    on_hline = (v >= int'(GRID_Y0)) && (((v - int'(GRID_Y0)) % int'(V_STEP)) == 0);
    grid_px = (in_grid_box && (on_vline || on_hline)) ? GRAY : BLACK;

    in_trace_cols = (h >= int'(GRID_X0)) && (h < int'(GRID_X0 + N_SAMPLES));
    trace_a_px = (in_trace_cols && row_a == PIX_W'(v)) ? YELLOW : BLACK;
    trace_b_px = (in_trace_cols && row_b == PIX_W'(v)) ? GREEN : BLACK;

    text_px = (v >= int'(TEXT_Y0) && v < int'(TEXT_Y0 + TEXT_ROWS) && h < 1024 && text_bit)
              ? WHITE : BLACK;
    gnd_a_px = arrow(h, v, offset_a) ? YELLOW : BLACK;
    gnd_b_px = arrow(h, v, offset_b) ? GREEN : BLACK;

    if ((trace_a_px | trace_b_px) != BLACK) pixel_out = trace_a_px | trace_b_px;
    else pixel_out = grid_px | text_px | gnd_a_px | gnd_b_px;
  end

  // read-ahead addresses
  int nh, nv;
  always_comb begin
    nh = h + 1;
    nv = v;
    if (nh == int'(H_TOTAL)) begin
      nh = 0;
      nv = v + 1;
    end
    trace_addr = (nh >= int'(GRID_X0) && nh < int'(GRID_X0 + N_SAMPLES))
                 ? AW'(nh - int'(GRID_X0)) : '0;
    text_addr = (nv >= int'(TEXT_Y0) && nv < int'(TEXT_Y0 + TEXT_ROWS) && nh < 1024)
                ? TEXT_AW'((nv - int'(TEXT_Y0)) * 1024 + nh) : '0;
  end
endmodule
