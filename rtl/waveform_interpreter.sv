// waveform_interpreter: capture and interpretation of one channel.
//
// Holds the channel's sample storage, an N x 12-bit RAM, between the circular buffer
// manager, which writes it around the trigger point, and the measurement/pixel pass,
// which reads the finished frame back in order. The manager waits while the pass runs,
// so RAM reads and writes never overlap. Outputs are the trace rows for the frame
// buffer (one write per column), a frame_done pulse when a frame's rows and
// measurements are final, and the four measurements as ADC codes. The structure follows
// the design description's waveform interpreter.
module waveform_interpreter
  import dso_pkg::*;
#(
  parameter int unsigned N  = N_SAMPLES,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  sample_t       sample,
  input  logic          sample_ready,
  input  logic          trigger,
  input  logic [2:0]    voltage_scale,
  input  row_t          offset,
  input  logic          hold,          // frame buffer still busy with the last frame
  output logic          pix_we,
  output logic [AW-1:0] pix_addr,
  output row_t          pix_row,
  output logic          frame_done,
  output logic          capturing,     // high while samples are being gathered
  output sample_t       average,
  output sample_t       minimum,
  output sample_t       maximum,
  output sample_t       rms
);
  logic          wr_en, frame_ready;
  logic [AW-1:0] wr_addr, rd_addr, start_addr;
  sample_t       wr_data, rd_data;

  circular_buffer_manager #(.N(N), .AW(AW)) u_manager (
    .clk, .rst, .sample, .sample_ready, .trigger,
    .conversion_done(frame_done),
    .wr_en, .wr_addr, .wr_data, .frame_ready, .start_addr);

  dual_port_ram #(.DEPTH(N), .WIDTH(SAMPLE_W), .AW(AW)) u_samples (
    .clk_a(clk), .we_a(wr_en), .wr_addr, .wr_data,
    .clk_b(clk), .rd_addr, .rd_data);

  waveform_math #(.N(N), .AW(AW)) u_math (
    .clk, .rst, .begin_frame(frame_ready), .hold, .start_addr,
    .voltage_scale, .offset,
    .rd_addr, .rd_data,
    .pix_we, .pix_addr, .pix_row,
    .conversion_done(frame_done),
    .average, .minimum, .maximum, .rms);

  assign capturing = !frame_ready;
endmodule
