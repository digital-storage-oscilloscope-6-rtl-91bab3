// fir_lowpass: 31-tap (30th order) low-pass FIR filter for one 12-bit sample stream.
//
// The coefficients are the Hamming-window design fir1(30, 0.2) rounded after scaling by
// 1024, i.e. h[k] = round(1024 * w[k] * sin(0.2*pi*(k-15)) / (pi*(k-15)) / g) with
// w[k] = 0.54 - 0.46*cos(2*pi*k/30) and g normalising the DC gain to 1. With the 1 MS/s
// input this puts the cutoff at 100 kHz. The order, the rounding to 1024ths and the
// 100 kHz cutoff follow the design description; the structure (one shared multiplier
// stepping through the taps, MAC_CYCLES = 31 clocks per sample) is this design's own.
//
// Interface: in_valid/in_sample push one sample; out_valid pulses with out_sample
// 31 clock edges later. The output is the sum of products divided by 1024 and clamped to
// 0..4095. Samples must arrive at least 32 clocks apart (they come 100 clocks apart at
// the full 1 MS/s rate on a 100 MHz clock); one that arrives during a computation is
// dropped.
module fir_lowpass
  import dso_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t in_sample,
  output logic    out_valid,
  output sample_t out_sample
);
  localparam int unsigned TAPS = 31;
  localparam int signed COEF [31] = '{
     0,   1,   3,   4,   4,   0,  -8, -19, -26, -22,   0,  41,  94, 149, 189, 204,
   189, 149,  94,  41,   0, -22, -26, -19,  -8,   0,   4,   4,   3,   1,   0};

  sample_t history [TAPS];
  logic [$clog2(TAPS+1)-1:0] tap;
  logic busy;
  logic signed [31:0] acc;
  logic signed [31:0] product;

  assign product = $signed({1'b0, history[tap]}) * 32'(COEF[tap]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) history[i] <= '0;
      tap <= '0;
      busy <= 1'b0;
      acc <= '0;
      out_valid <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          history[0] <= in_sample;
          for (int i = 1; i < TAPS; i++) history[i] <= history[i-1];
          tap <= '0;
          acc <= '0;
          busy <= 1'b1;
        end
      end else begin
        acc <= acc + product;
        if (32'(tap) == TAPS-1) begin
          busy <= 1'b0;
          out_valid <= 1'b1;
          if (acc + product < 0) out_sample <= '0;
          else if (((acc + product) >>> 10) > 4095) out_sample <= '1;
          else out_sample <= SAMPLE_W'((acc + product) >>> 10);
        end else begin
          tap <= tap + 1'b1;
        end
      end
    end
  end
endmodule
