// data_acquisition: the acquisition stage of both channels.
//
// xadc_handler delivers decimated sample pairs from the converter. Each channel then
// either passes straight on or, when filter_enable is set, through its own fir_lowpass
// (the filtered stream lags by 32 clocks). A trigger_monitor watches each channel's
// outgoing stream; the channel picked by channel_select is the trigger source for both
// channels, so the two traces are captured against the same event. All of this follows
// the design description. Switching the filter while samples flow may drop or repeat one
// sample; that is accepted.
module data_acquisition
  import dso_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  timescale,
  input  logic        filter_enable,
  input  logic        channel_select,
  input  logic        edge_falling,
  input  sample_t     threshold,
  // converter DRP
  output logic [6:0]  drp_addr,
  output logic        drp_en,
  input  logic [15:0] drp_do,
  input  logic        drp_ready,
  input  logic        eoc,
  // to the interpreters
  output sample_t     sample_a,
  output sample_t     sample_b,
  output logic        sample_ready_a,
  output logic        sample_ready_b,
  output logic        trigger          // selected channel's trigger
);
  sample_t raw_a, raw_b, filt_a, filt_b;
  logic    raw_valid, filt_valid_a, filt_valid_b;
  logic    trig_a, trig_b;

  xadc_handler u_adc (
    .clk, .rst, .timescale,
    .drp_addr, .drp_en, .drp_do, .drp_ready, .eoc,
    .sample_a(raw_a), .sample_b(raw_b), .sample_valid(raw_valid)
  );

  fir_lowpass u_fir_a (.clk, .rst, .in_valid(raw_valid), .in_sample(raw_a),
                       .out_valid(filt_valid_a), .out_sample(filt_a));
  fir_lowpass u_fir_b (.clk, .rst, .in_valid(raw_valid), .in_sample(raw_b),
                       .out_valid(filt_valid_b), .out_sample(filt_b));

  always_comb begin
    sample_a       = filter_enable ? filt_a       : raw_a;
    sample_b       = filter_enable ? filt_b       : raw_b;
    sample_ready_a = filter_enable ? filt_valid_a : raw_valid;
    sample_ready_b = filter_enable ? filt_valid_b : raw_valid;
  end

  trigger_monitor u_trig_a (.clk, .rst, .threshold, .sample(sample_a),
                            .new_sample(sample_ready_a), .edge_falling, .triggered(trig_a));
  trigger_monitor u_trig_b (.clk, .rst, .threshold, .sample(sample_b),
                            .new_sample(sample_ready_b), .edge_falling, .triggered(trig_b));

  assign trigger = channel_select ? trig_b : trig_a;
endmodule
