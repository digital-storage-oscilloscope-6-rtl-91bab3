// dso_pkg: constants and small lookup functions shared by the oscilloscope blocks.
//
// The capture length (1000 samples, one per grid column), the 12-bit sample width, the
// 1000x700 grid drawn on a 1024x768 screen (10 divisions of 100 columns by 70 rows), the
// timescale decimation table and the voltage scaling table all follow the design
// description. The grid origin (column 10, row 8), the colour encoding (4 bits per RGB
// channel) and the text area below the grid are this design's own choices.
package dso_pkg;

  // ---- sampling ---------------------------------------------------------------------
  localparam int unsigned SAMPLE_W  = 12;     // XADC resolution
  localparam int unsigned N_SAMPLES = 1000;   // one sample per grid column
  localparam int unsigned PIX_W     = 10;     // screen row of a trace point

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [PIX_W-1:0]    row_t;

  // Decimation: keep one sample, then skip N (timescale table of the description).
  // setting 0..4 -> 100us/div, 1ms/div, 10ms/div, 100ms/div, 1s/div
  function automatic logic [15:0] skip_count(input logic [2:0] setting);
    case (setting)
      3'd0:    return 16'd0;
      3'd1:    return 16'd10;
      3'd2:    return 16'd100;
      3'd3:    return 16'd1000;
      3'd4:    return 16'd10000;
      default: return 16'd0;
    endcase
  endfunction

  localparam logic [2:0] MAX_TIMESCALE = 3'd4;

  // Vertical scaling: a sample code is divided by this value to give rows above ground.
  // setting 0..7 -> 17, 50, 100, 200, 300, 500, 750, 1000 mV/div
  function automatic logic [7:0] pixel_scaler(input logic [2:0] setting);
    case (setting)
      3'd0: return 8'd1;
      3'd1: return 8'd3;
      3'd2: return 8'd6;
      3'd3: return 8'd12;
      3'd4: return 8'd17;
      3'd5: return 8'd29;
      3'd6: return 8'd44;
      default: return 8'd59;
    endcase
  endfunction

  // Displayed mV per division for each voltage setting (before 1:50 attenuation).
  function automatic logic [15:0] volts_per_div_mv(input logic [2:0] setting);
    case (setting)
      3'd0: return 16'd17;
      3'd1: return 16'd50;
      3'd2: return 16'd100;
      3'd3: return 16'd200;
      3'd4: return 16'd300;
      3'd5: return 16'd500;
      3'd6: return 16'd750;
      default: return 16'd1000;
    endcase
  endfunction

  // ---- screen geometry --------------------------------------------------------------
  localparam int unsigned H_STEP   = 100;  // columns per horizontal division
  localparam int unsigned V_STEP   = 70;   // rows per vertical division
  localparam int unsigned GRID_X0  = 10;   // left grid line
  localparam int unsigned GRID_Y0  = 8;    // top grid line
  localparam int unsigned GRID_X1  = GRID_X0 + 10*H_STEP;  // 1010
  localparam int unsigned GRID_Y1  = GRID_Y0 + 10*V_STEP;  // 708
  localparam int unsigned TEXT_Y0  = 710;  // first row of the text strip
  localparam int unsigned TEXT_ROWS = 58;  // rows 710..767
  localparam int unsigned TEXT_AW  = 16;   // text bitmap address: row*1024 + column
  localparam logic [PIX_W-1:0] ROW_NONE = '1;  // trace point that is off the grid

  // default ground rows of the two channels (4th and 7th grid line)
  localparam logic [PIX_W-1:0] OFFSET_A_DEFAULT = PIX_W'(GRID_Y0 + 4*V_STEP);
  localparam logic [PIX_W-1:0] OFFSET_B_DEFAULT = PIX_W'(GRID_Y0 + 7*V_STEP);

  // ---- colours, 4 bits per channel as {R,G,B} ---------------------------------------
  typedef logic [11:0] rgb_t;
  localparam rgb_t BLACK  = 12'h000;
  localparam rgb_t WHITE  = 12'hFFF;
  localparam rgb_t GRAY   = 12'h888;
  localparam rgb_t YELLOW = 12'hFF0;
  localparam rgb_t GREEN  = 12'h0F0;

  // ---- settings shared by the pipeline ------------------------------------------------
  typedef struct packed {
    logic [2:0] timescale;        // index into skip_count
    logic [2:0] voltage_scale;    // index into pixel_scaler
    row_t       offset_a;         // ground row of channel A
    row_t       offset_b;         // ground row of channel B
    logic [9:0] threshold_mv;     // trigger level for the read-out, code*1000/4096 mV
    sample_t    threshold_code;   // trigger level as an ADC code, 0..4088
    logic       edge_falling;     // 0 rising, 1 falling
    logic       channel_select;   // 0 channel A, 1 channel B
    logic       run_mode;         // free-running, no trigger needed
    logic       manual_trigger;   // button forcing a trigger
    logic       filter_enable;    // route samples through the low-pass filter
    logic       ac_coupling;      // AFE relay: AC coupling
    logic       atten_a;          // AFE relay: 1:50 on channel A
    logic       atten_b;          // AFE relay: 1:50 on channel B
  } settings_t;

endpackage
