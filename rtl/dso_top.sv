// dso_top: two-channel digital storage oscilloscope with a VGA display.
//
// Pipeline, per channel: the converter's samples (1 MS/s, 12 bits, read over its DRP)
// are decimated by the timescale setting, optionally low-pass filtered and watched by
// the trigger monitor (data_acquisition). Each channel's waveform_interpreter keeps
// N/2 = 500 samples before the selected channel's trigger and 500 after, then reads the
// 1000 samples back to compute the trace row of every grid column and the channel's
// average, minimum, maximum and RMS. pixel_frame_buffer hands the rows to the 65 MHz video
// side while the raster is below the grid; waveform_drawer draws grid, traces, ground
// markers and the text bitmap that display_text_handler keeps up to date.
// interfacing_handler turns knobs, switches and buttons into the global settings.
//
// Clocks: clk_100mhz runs acquisition, interpretation, text and settings; clk_65mhz
// (1024x768 at 60 Hz) runs the video side. The clock generator and the dual-ADC macro
// are outside this module: the 65 MHz clock is an input and the converter's DRP and
// end-of-conversion signals are ports. btnc resets everything (synchronised to each
// clock). Settings read by the video side (the ground rows) change only on a knob step
// and are used there without further synchronisation.
//
// Trigger sources: the selected channel's edge trigger, the manual-trigger button or run
// mode; either channel's interpreter restarts when the timescale changes. All this
// follows the design description; the handshake between interpreter, frame buffer and
// drawer is this design's, and an assertion checks its rule that no trace row is written
// while a copy is pending.
module dso_top
  import dso_pkg::*;
#(
  parameter int unsigned N                = N_SAMPLES,
  parameter int unsigned BUTTON_DEBOUNCE  = 1_000_000,
  parameter int unsigned ENCODER_DEBOUNCE = 10_000
) (
  input  logic        clk_100mhz,
  input  logic        clk_65mhz,
  input  logic        btnc,              // reset
  input  logic        btnu,              // manual trigger
  input  logic [15:0] sw,
  input  logic [3:0]  enc_a,
  input  logic [3:0]  enc_b,
  input  logic [3:0]  enc_btn,
  // dual ADC, dynamic reconfiguration port
  output logic [6:0]  adc_drp_addr,
  output logic        adc_drp_en,
  input  logic [15:0] adc_drp_do,
  input  logic        adc_drp_ready,
  input  logic        adc_eoc,
  // analog front end relays
  output logic        ac_coupling_enable,
  output logic        attenuation_enable1,
  output logic        attenuation_enable2,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic [15:0] led
);
  localparam int unsigned AW = $clog2(N);

  // ---- resets ----------------------------------------------------------------------
  logic [1:0] rst_sync_100, rst_sync_65;
  logic       rst, rst_video;
  always_ff @(posedge clk_100mhz) rst_sync_100 <= {rst_sync_100[0], btnc};
  always_ff @(posedge clk_65mhz)  rst_sync_65  <= {rst_sync_65[0], btnc};
  assign rst = rst_sync_100[1];
  assign rst_video = rst_sync_65[1];

  // ---- settings ----------------------------------------------------------------------
  settings_t settings;
  interfacing_handler #(.BUTTON_DEBOUNCE(BUTTON_DEBOUNCE), .ENCODER_DEBOUNCE(ENCODER_DEBOUNCE))
    u_io (.clk(clk_100mhz), .rst, .sw, .btnu, .enc_a, .enc_b, .enc_btn, .settings, .led);

  assign ac_coupling_enable  = settings.ac_coupling;
  assign attenuation_enable1 = settings.atten_a;
  assign attenuation_enable2 = settings.atten_b;

  // ---- acquisition -------------------------------------------------------------------
  sample_t sample_a, sample_b;
  logic    ready_a, ready_b, trigger;

  data_acquisition u_acq (
    .clk(clk_100mhz), .rst,
    .timescale(settings.timescale), .filter_enable(settings.filter_enable),
    .channel_select(settings.channel_select), .edge_falling(settings.edge_falling),
    .threshold(settings.threshold_code),
    .drp_addr(adc_drp_addr), .drp_en(adc_drp_en), .drp_do(adc_drp_do),
    .drp_ready(adc_drp_ready), .eoc(adc_eoc),
    .sample_a, .sample_b, .sample_ready_a(ready_a), .sample_ready_b(ready_b), .trigger);

  // restart both captures when the timescale changes
  logic [2:0] timescale_last;
  logic       interp_rst;
  always_ff @(posedge clk_100mhz) begin
    timescale_last <= settings.timescale;
    interp_rst <= rst || (timescale_last != settings.timescale);
  end

  logic capture_trigger;
  assign capture_trigger = trigger || settings.manual_trigger || settings.run_mode;

  // ---- interpretation, per channel -------------------------------------------------------
  logic          pix_we_a, pix_we_b, done_a, done_b, busy_a, busy_b, cap_a, cap_b;
  logic          copied_a, copied_b;
  logic [AW-1:0] pix_addr_a, pix_addr_b;
  row_t          pix_row_a, pix_row_b;
  sample_t       avg_a, min_a, max_a, rms_a, avg_b, min_b, max_b, rms_b;

  waveform_interpreter #(.N(N)) u_interp_a (
    .clk(clk_100mhz), .rst(interp_rst), .sample(sample_a), .sample_ready(ready_a),
    .trigger(capture_trigger), .voltage_scale(settings.voltage_scale),
    .offset(settings.offset_a), .hold(busy_a),
    .pix_we(pix_we_a), .pix_addr(pix_addr_a), .pix_row(pix_row_a),
    .frame_done(done_a), .capturing(cap_a),
    .average(avg_a), .minimum(min_a), .maximum(max_a), .rms(rms_a));

  waveform_interpreter #(.N(N)) u_interp_b (
    .clk(clk_100mhz), .rst(interp_rst), .sample(sample_b), .sample_ready(ready_b),
    .trigger(capture_trigger), .voltage_scale(settings.voltage_scale),
    .offset(settings.offset_b), .hold(busy_b),
    .pix_we(pix_we_b), .pix_addr(pix_addr_b), .pix_row(pix_row_b),
    .frame_done(done_b), .capturing(cap_b),
    .average(avg_b), .minimum(min_b), .maximum(max_b), .rms(rms_b));

  // ---- frame buffers -----------------------------------------------------------------
  logic          safe_to_copy;
  logic [AW-1:0] trace_addr;
  row_t          row_a, row_b;

  pixel_frame_buffer #(.N(N)) u_fb_a (
    .clk(clk_100mhz), .rst, .pix_we(pix_we_a), .pix_addr(pix_addr_a), .pix_row(pix_row_a),
    .frame_done(done_a), .safe_65(safe_to_copy), .busy(busy_a), .copy_done(copied_a),
    .clk_video(clk_65mhz), .rd_addr(trace_addr), .rd_row(row_a));

  pixel_frame_buffer #(.N(N)) u_fb_b (
    .clk(clk_100mhz), .rst, .pix_we(pix_we_b), .pix_addr(pix_addr_b), .pix_row(pix_row_b),
    .frame_done(done_b), .safe_65(safe_to_copy), .busy(busy_b), .copy_done(copied_b),
    .clk_video(clk_65mhz), .rd_addr(trace_addr), .rd_row(row_b));

  // Handshake rule: an interpreter never writes trace rows while its frame buffer still
  // has a frame waiting for, or in, the copy to the display RAM. Checked from the first
  // reset on (before it, registers hold power-up values).
  logic reset_seen = 1'b0;
  always_ff @(posedge clk_100mhz) begin
    if (rst) reset_seen <= 1'b1;
    if (reset_seen && !rst) begin
      assert (!(pix_we_a && busy_a)) else $error("channel A trace written during a pending copy");
      assert (!(pix_we_b && busy_b)) else $error("channel B trace written during a pending copy");
    end
  end

  // ---- text ------------------------------------------------------------------------
  logic                text_we, text_px, text_bit, text_sweep_done;
  logic [TEXT_AW-1:0]  text_wr_addr, text_rd_addr;

  display_text_handler u_text (
    .clk(clk_100mhz), .rst,
    .timescale(settings.timescale), .voltage_scale(settings.voltage_scale),
    .threshold_mv(settings.threshold_mv), .channel_select(settings.channel_select),
    .attenuated(settings.channel_select ? settings.atten_b : settings.atten_a),
    .average(settings.channel_select ? avg_b : avg_a),
    .maximum(settings.channel_select ? max_b : max_a),
    .minimum(settings.channel_select ? min_b : min_a),
    .rms(settings.channel_select ? rms_b : rms_a),
    .we(text_we), .addr(text_wr_addr), .pixel(text_px), .sweep_done(text_sweep_done));

  dual_port_ram #(.DEPTH(TEXT_ROWS * 1024), .WIDTH(1), .AW(TEXT_AW)) u_text_ram (
    .clk_a(clk_100mhz), .we_a(text_we), .wr_addr(text_wr_addr), .wr_data(text_px),
    .clk_b(clk_65mhz), .rd_addr(text_rd_addr), .rd_data(text_bit));

  // ---- video -------------------------------------------------------------------------
  waveform_drawer #(.AW(AW)) u_drawer (
    .clk(clk_65mhz), .rst(rst_video),
    .row_a, .row_b, .text_bit,
    .offset_a(settings.offset_a), .offset_b(settings.offset_b),
    .trace_addr, .text_addr(text_rd_addr), .safe_to_copy,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);
endmodule
