// display_text_handler: renders the settings and measurement read-out into the text
// bitmap shown below the grid.
//
// The bitmap is 1024 x 58 one-bit pixels (screen rows 710..767), addressed
// row*1024 + column. This block sweeps every address once per 59,392 clocks and writes
// the pixel it should hold, so the text follows the settings within one sweep. Values
// are latched at the start of a sweep, so a sweep never mixes two readings.
//
// Layout: two text lines of 16 x 16-pixel cells (5x7 glyphs drawn at twice size), bitmap
// rows 4..19 and 30..45; seven fields of nine cells, starting at cell_idx 1 + 9*f.
//   line 0: volts/div ("500mV/d"), "CH TRIG", "AVERAGE", "MAXIMUM", "MINIMUM", "RMS"
//   line 1: time/div ("100uS/d"), threshold ("500mV"), the four measurements of the
//           selected channel as "XX.XXXV", and "CH A" / "CH B"
// A measurement code c becomes c*1000/4096 mV (0.244 mV per code), times 50 when that
// channel's 1:50 attenuator is on, and so is the volts/div figure. The fields and their
// order are those of the display in the design description; the cell_idx size, the positions
// and the sweep-and-rewrite method are this design's choices.
module display_text_handler
  import dso_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [2:0]          timescale,
  input  logic [2:0]          voltage_scale,
  input  logic [9:0]          threshold_mv,
  input  logic                channel_select,
  input  logic                attenuated,      // 1:50 on the selected channel
  input  sample_t             average,
  input  sample_t             maximum,
  input  sample_t             minimum,
  input  sample_t             rms,
  output logic                we,
  output logic [TEXT_AW-1:0]  addr,
  output logic                pixel,
  output logic                sweep_done       // one pulse per finished sweep
);
  localparam int unsigned FIELDS = 7;
  localparam int unsigned FIELD_CELLS = 9;
  localparam int unsigned LINE0_Y = 4;
  localparam int unsigned LINE1_Y = 30;

  // ---- latched values -------------------------------------------------------------
  logic [2:0] ts_l, vs_l;
  logic [9:0] thr_l;
  logic       ch_l, att_l;
  sample_t    avg_l, max_l, min_l, rms_l;

  // ---- sweep counters -------------------------------------------------------------
  logic [9:0] x;   // 0..1023
  logic [5:0] y;   // 0..57

  // binary to five BCD digits (shift-and-add-3)
  function automatic logic [19:0] to_bcd(input logic [16:0] v);
    logic [19:0] b;
    b = '0;
    for (int i = 16; i >= 0; i--) begin
      for (int d = 0; d < 5; d++)
        if (b[4*d +: 4] >= 4'd5) b[4*d +: 4] = b[4*d +: 4] + 4'd3;
      b = {b[18:0], v[i]};
    end
    return b;
  endfunction

  function automatic logic [7:0] digit(input logic [3:0] d);
    return 8'h30 + {4'h0, d};
  endfunction

  // code -> mV, times 50 when attenuated
  function automatic logic [16:0] code_to_mv(input sample_t c, input logic att);
    logic [27:0] p;
    p = att ? 28'(c) * 28'd50000 : 28'(c) * 28'd1000;
    return 17'(p >> 12);
  endfunction

  // "XX.XXXV" followed by two blanks
  function automatic logic [71:0] volts_field(input sample_t c, input logic att);
    logic [19:0] b;
    b = to_bcd(code_to_mv(c, att));
    return {digit(b[19:16]), digit(b[15:12]), ".", digit(b[11:8]), digit(b[7:4]),
            digit(b[3:0]), "V", "  "};
  endfunction

  // number with leading zeros blanked, left aligned, then a suffix; 9 characters
  function automatic logic [71:0] number_field(input logic [16:0] v, input logic [31:0] suffix,
                                                input int unsigned suffix_len);
    logic [19:0] b;
    logic [71:0] f;
    int unsigned pos;
    logic lead;
    b = to_bcd(v);
    f = {9{8'h20}};
    pos = 0;
    lead = 1'b1;
    for (int d = 4; d >= 0; d--) begin
      if (b[4*d +: 4] != 0 || d == 0) lead = 1'b0;
      if (!lead) begin
        f[71 - 8*pos -: 8] = digit(b[4*d +: 4]);
        pos++;
      end
    end
    for (int s = 0; s < 4; s++) begin
      if (s < 32'(suffix_len)) begin
        f[71 - 8*pos -: 8] = suffix[31 - 8*(s + 4 - suffix_len) -: 8];
        pos++;
      end
    end
    return f;
  endfunction

  function automatic logic [71:0] time_field(input logic [2:0] ts);
    case (ts)
      3'd0:    return {"100uS/d", "  "};
      3'd1:    return {"1mS/d", "    "};
      3'd2:    return {"10mS/d", "   "};
      3'd3:    return {"100mS/d", "  "};
      default: return {"1S/d", "     "};
    endcase
  endfunction

  logic [71:0] line0 [FIELDS];
  logic [71:0] line1 [FIELDS];

  always_comb begin
    line0[0] = number_field((17'(volts_per_div_mv(vs_l)) * (att_l ? 17'd50 : 17'd1)), "mV/d", 4);
    line0[1] = {"CH TRIG", "  "};
    line0[2] = {"AVERAGE", "  "};
    line0[3] = {"MAXIMUM", "  "};
    line0[4] = {"MINIMUM", "  "};
    line0[5] = {"RMS", "      "};
    line0[6] = {9{8'h20}};
    line1[0] = time_field(ts_l);
    line1[1] = number_field(17'(thr_l), {16'h2020, "mV"}, 2);
    line1[2] = volts_field(avg_l, att_l);
    line1[3] = volts_field(max_l, att_l);
    line1[4] = volts_field(min_l, att_l);
    line1[5] = volts_field(rms_l, att_l);
    line1[6] = ch_l ? {"CH B", "     "} : {"CH A", "     "};
  end

  // ---- character and glyph pixel under (x, y) ----------------------------------------
  logic [5:0] cell_idx;
  logic [2:0] gx, gy;
  logic       in_line0, in_line1, in_field;
  logic [2:0] field;
  logic [3:0] pos;
  logic [7:0] ch;
  logic [4:0] glyph_bits;

  always_comb begin
    cell_idx = x[9:4];
    gx   = x[3:1];
    in_line0 = (32'(y) >= LINE0_Y) && (32'(y) < LINE0_Y + 16);
    in_line1 = (32'(y) >= LINE1_Y) && (32'(y) < LINE1_Y + 16);
    gy = in_line1 ? 3'((32'(y) - LINE1_Y) >> 1) : 3'((32'(y) - LINE0_Y) >> 1);
    in_field = 1'b0;
    field = '0;
    pos = '0;
    for (int f = 0; f < FIELDS; f++) begin
      if (32'(cell_idx) >= 1 + FIELD_CELLS*f && 32'(cell_idx) < 1 + FIELD_CELLS*(f+1)) begin
        in_field = 1'b1;
        field = 3'(f);
        pos = 4'(32'(cell_idx) - 1 - FIELD_CELLS*f);
      end
    end
    ch = 8'h20;
    if (in_field && in_line0) ch = line0[field][71 - 8*pos -: 8];
    if (in_field && in_line1) ch = line1[field][71 - 8*pos -: 8];
  end

  glyph_rom u_font (.ch, .row(gy), .bits(glyph_bits));

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0;
      we <= 1'b0; addr <= '0; pixel <= 1'b0;
      sweep_done <= 1'b0;
      ts_l <= '0; vs_l <= '0; thr_l <= '0; ch_l <= 1'b0; att_l <= 1'b0;
      avg_l <= '0; max_l <= '0; min_l <= '0; rms_l <= '0;
    end else begin
      sweep_done <= 1'b0;
      if (x == 0 && y == 0) begin
        ts_l <= timescale; vs_l <= voltage_scale; thr_l <= threshold_mv;
        ch_l <= channel_select; att_l <= attenuated;
        avg_l <= average; max_l <= maximum; min_l <= minimum; rms_l <= rms;
      end
      we <= 1'b1;
      addr <= {y, x};
      pixel <= (in_line0 || in_line1) && (gx < 3'd5) && glyph_bits[3'd4 - gx];
      if (x == 10'd1023) begin
        x <= '0;
        if (32'(y) == TEXT_ROWS-1) begin
          y <= '0;
          sweep_done <= 1'b1;
        end else begin
          y <= y + 1'b1;
        end
      end else begin
        x <= x + 1'b1;
      end
    end
  end
endmodule
