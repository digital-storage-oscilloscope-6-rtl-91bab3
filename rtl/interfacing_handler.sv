// interfacing_handler: the input handler and global settings manager.
//
// Four rotary knobs (each with a push button) and the board switches and buttons set the
// oscilloscope's global settings, which every other stage reads from `settings`:
//   knob 1  voltage scale 0..7 (17 mV/div .. 1 V/div); button: back to 17 mV/div
//   knob 2  ground row of the channel picked by sw[2] (A when low), 10 rows per step,
//           rows 8..708; clockwise moves it up; button: back to its default row
//   knob 3  trigger threshold, codes 0..4088 (0..998 mV) in steps of 8 codes (about 2 mV);
//           button: back to code 2048 (500 mV)
//   knob 4  timescale 0..4 (100 us/div .. 1 s/div); button: back to 100 us/div
//   sw[0] low-pass filter, sw[1] measured/trigger channel (B when high), sw[3] falling
//   edge, sw[13] AC coupling (AFE), sw[14] 1:50 attenuation on both channels (AFE),
//   sw[15] run mode (free-running), btnu manual trigger.
// The threshold is kept as an ADC code and also given in mV for the read-out,
// code * 1000 / 4096 (0.244 mV per code, 1 V full scale). Buttons and knob lines are
// debounced; switches pass a 2-flop synchroniser. Settings stop at the ends of their
// ranges.
//
// The settings list and ranges, the threshold range and step (0..998 mV, about 2 mV, held
// as a code so that the read-out shows values such as 593 mV), the default ground rows and
// the knob assignment follow the design description; the knob directions and the button
// actions are this design's choices. led shows
// {sw[15:8], edge, channel, voltage scale, timescale}.
module interfacing_handler
  import dso_pkg::*;
#(
  parameter int unsigned BUTTON_DEBOUNCE  = 1_000_000,
  parameter int unsigned ENCODER_DEBOUNCE = 10_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] sw,
  input  logic        btnu,
  input  logic [3:0]  enc_a,
  input  logic [3:0]  enc_b,
  input  logic [3:0]  enc_btn,      // active low, as on the KY-040
  output settings_t   settings,
  output logic [15:0] led
);
  localparam sample_t THRESHOLD_DEFAULT = 12'd2048;   // 500 mV
  localparam sample_t THRESHOLD_MAX     = 12'd4088;   // 998 mV
  localparam sample_t THRESHOLD_STEP    = 12'd8;      // 1.95 mV

  logic [3:0] a_clean, b_clean, btn_clean, inc, dec;
  logic       manual_clean;
  logic [15:0] sw_s1, sw_s;

  for (genvar k = 0; k < 4; k++) begin : g_knob
    debounce #(.COUNT(ENCODER_DEBOUNCE)) u_db_a (.clk, .rst, .noisy_in(enc_a[k]), .clean_out(a_clean[k]));
    debounce #(.COUNT(ENCODER_DEBOUNCE)) u_db_b (.clk, .rst, .noisy_in(enc_b[k]), .clean_out(b_clean[k]));
    debounce #(.COUNT(BUTTON_DEBOUNCE)) u_db_btn (.clk, .rst, .noisy_in(!enc_btn[k]), .clean_out(btn_clean[k]));
    rotary_encoder u_enc (.clk, .rst, .a(a_clean[k]), .b(b_clean[k]), .inc(inc[k]), .dec(dec[k]));
  end

  debounce #(.COUNT(BUTTON_DEBOUNCE)) u_db_manual (.clk, .rst, .noisy_in(btnu), .clean_out(manual_clean));

  logic [2:0] voltage_scale, timescale;
  row_t       offset_a, offset_b;
  sample_t    threshold;

  always_ff @(posedge clk) begin
    sw_s1 <= sw;
    sw_s  <= sw_s1;
    if (rst) begin
      voltage_scale <= '0;
      timescale <= '0;
      offset_a <= OFFSET_A_DEFAULT;
      offset_b <= OFFSET_B_DEFAULT;
      threshold <= THRESHOLD_DEFAULT;
    end else begin
      // knob 1: voltage scale
      if (inc[0] && voltage_scale != 3'd7) voltage_scale <= voltage_scale + 1'b1;
      else if (dec[0] && voltage_scale != 3'd0) voltage_scale <= voltage_scale - 1'b1;
      else if (btn_clean[0]) voltage_scale <= '0;
      // knob 2: ground row of one channel (smaller row = higher on screen)
      if (!sw_s[2]) begin
        if (inc[1] && 32'(offset_a) >= GRID_Y0 + 10) offset_a <= offset_a - 10'd10;
        else if (dec[1] && 32'(offset_a) + 10 <= GRID_Y1) offset_a <= offset_a + 10'd10;
        else if (btn_clean[1]) offset_a <= OFFSET_A_DEFAULT;
      end else begin
        if (inc[1] && 32'(offset_b) >= GRID_Y0 + 10) offset_b <= offset_b - 10'd10;
        else if (dec[1] && 32'(offset_b) + 10 <= GRID_Y1) offset_b <= offset_b + 10'd10;
        else if (btn_clean[1]) offset_b <= OFFSET_B_DEFAULT;
      end
      // knob 3: threshold
      if (inc[2] && threshold < THRESHOLD_MAX) threshold <= threshold + THRESHOLD_STEP;
      else if (dec[2] && threshold != 12'd0) threshold <= threshold - THRESHOLD_STEP;
      else if (btn_clean[2]) threshold <= THRESHOLD_DEFAULT;
      // knob 4: timescale
      if (inc[3] && timescale != MAX_TIMESCALE) timescale <= timescale + 1'b1;
      else if (dec[3] && timescale != 3'd0) timescale <= timescale - 1'b1;
      else if (btn_clean[3]) timescale <= '0;
    end
  end

  logic [21:0] thr_product;   // code * 1000
  always_comb begin
    thr_product = 22'(threshold) * 22'd1000;
    settings.timescale      = timescale;
    settings.voltage_scale  = voltage_scale;
    settings.offset_a       = offset_a;
    settings.offset_b       = offset_b;
    settings.threshold_mv   = 10'(thr_product >> 12);
    settings.threshold_code = threshold;
    settings.edge_falling   = sw_s[3];
    settings.channel_select = sw_s[1];
    settings.run_mode       = sw_s[15];
    settings.manual_trigger = manual_clean;
    settings.filter_enable  = sw_s[0];
    settings.ac_coupling    = sw_s[13];
    settings.atten_a        = sw_s[14];
    settings.atten_b        = sw_s[14];
    led = {sw_s[15:8], sw_s[3], sw_s[1], voltage_scale, timescale};
  end
endmodule
