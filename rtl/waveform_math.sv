// waveform_math: the pixel calculator and the measurement calculator of one channel.
//
// Once a capture is complete (`begin_frame`, the circular buffer's frame-ready level,
// high and not yet served) and the trace buffer is free (`hold` low),
// this block reads the N samples back from the sample RAM in display order, starting at
// start_addr and wrapping after N-1. For each sample it
//   - updates the running maximum (from 0), minimum (from 4095), sum and sum of squares;
//   - divides the sample by the voltage-scaling divisor (1, 3, 6, 12, 17, 29, 44, 59)
//     and writes the trace row `offset - quotient` for that column into the trace buffer,
//     or ROW_NONE when the point would lie above the top grid line (row 8).
// After the last sample it divides the sum and the sum of squares by N, takes the
// integer square root of the latter, updates average/minimum/maximum/rms together and
// pulses conversion_done. The measurements and their register sizes, the divisor table
// and the read-back-after-capture order follow the design description; the bit-serial
// divider and square root, and ROW_NONE for off-grid points, are this design's choices.
//
// Timing: per sample 3 clocks of RAM access plus SAMPLE_W+1 of division, so about
// N*(SAMPLE_W+5) clocks (about 17 k at N = 1000), then about 2*SAMPLE_W+log2(N) more for
// the mean square and root. Outputs are 12-bit ADC codes.
module waveform_math
  import dso_pkg::*;
#(
  parameter int unsigned N  = N_SAMPLES,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          begin_frame,
  input  logic          hold,          // trace buffer not free yet: do not start
  input  logic [AW-1:0] start_addr,
  input  logic [2:0]    voltage_scale,
  input  row_t          offset,
  // sample RAM read port (one clock of latency)
  output logic [AW-1:0] rd_addr,
  input  sample_t       rd_data,
  // trace buffer write port
  output logic          pix_we,
  output logic [AW-1:0] pix_addr,
  output row_t          pix_row,
  // results
  output logic          conversion_done,
  output sample_t       average,
  output sample_t       minimum,
  output sample_t       maximum,
  output sample_t       rms
);
  localparam int unsigned NW    = $clog2(N + 1);
  localparam int unsigned SUM_W = SAMPLE_W + NW;
  localparam int unsigned SQ_W0 = 2*SAMPLE_W + NW;
  localparam int unsigned SQ_W  = SQ_W0 + (SQ_W0 % 2);   // even, for the root

  typedef enum logic [2:0] {IDLE, ADDR, WAIT, READ, DIVIDE, MEAN, ROOT, FINISH} state_t;
  state_t state;

  logic [AW-1:0]    index;
  logic [7:0]       scaler;
  row_t             ground;
  logic [SUM_W-1:0] sum;
  logic [SQ_W-1:0]  sum_sq;
  sample_t          max_r, min_r;
  logic             mean_got, msq_got;
  sample_t          mean_r;
  logic             served;      // the current begin_frame level has been handled

  // pixel divider
  logic    pdiv_start, pdiv_busy, pdiv_done;
  sample_t pdiv_q;
  logic [7:0] pdiv_r;
  seq_divider #(.DW(SAMPLE_W), .VW(8)) u_pix_div (
    .clk, .rst, .start(pdiv_start), .dividend(rd_data), .divisor(scaler),
    .busy(pdiv_busy), .done(pdiv_done), .quotient(pdiv_q), .remainder(pdiv_r));

  // mean and mean-square dividers
  logic mdiv_start, mdiv_busy, mdiv_done, sdiv_busy, sdiv_done;
  logic [SUM_W-1:0] mdiv_q;
  logic [SQ_W-1:0]  sdiv_q;
  logic [NW-1:0]    mdiv_r, sdiv_r;
  seq_divider #(.DW(SUM_W), .VW(NW)) u_mean_div (
    .clk, .rst, .start(mdiv_start), .dividend(sum), .divisor(NW'(N)),
    .busy(mdiv_busy), .done(mdiv_done), .quotient(mdiv_q), .remainder(mdiv_r));
  seq_divider #(.DW(SQ_W), .VW(NW)) u_msq_div (
    .clk, .rst, .start(mdiv_start), .dividend(sum_sq), .divisor(NW'(N)),
    .busy(sdiv_busy), .done(sdiv_done), .quotient(sdiv_q), .remainder(sdiv_r));

  logic sqrt_start, sqrt_busy, sqrt_done;
  logic [SQ_W/2-1:0] sqrt_root;
  int_sqrt #(.W(SQ_W)) u_sqrt (
    .clk, .rst, .start(sqrt_start), .radicand(sdiv_q),
    .busy(sqrt_busy), .done(sqrt_done), .root(sqrt_root));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      index <= '0;
      rd_addr <= '0;
      scaler <= 8'd1;
      ground <= OFFSET_A_DEFAULT;
      sum <= '0; sum_sq <= '0;
      max_r <= '0; min_r <= '1;
      pix_we <= 1'b0; pix_addr <= '0; pix_row <= ROW_NONE;
      pdiv_start <= 1'b0; mdiv_start <= 1'b0; sqrt_start <= 1'b0;
      mean_got <= 1'b0; msq_got <= 1'b0; mean_r <= '0;
      conversion_done <= 1'b0;
      average <= '0; minimum <= '0; maximum <= '0; rms <= '0;
      served <= 1'b0;
    end else begin
      if (!begin_frame) served <= 1'b0;
      pix_we <= 1'b0;
      pdiv_start <= 1'b0;
      mdiv_start <= 1'b0;
      sqrt_start <= 1'b0;
      conversion_done <= 1'b0;
      case (state)
        IDLE: if (begin_frame && !served && !hold) begin
          served <= 1'b1;
          scaler <= pixel_scaler(voltage_scale);
          ground <= offset;
          sum <= '0; sum_sq <= '0;
          max_r <= '0; min_r <= '1;
          index <= '0;
          rd_addr <= start_addr;
          state <= WAIT;
        end
        ADDR: state <= WAIT;   // rd_addr was advanced on the way here
        WAIT: state <= READ;
        READ: begin
          sum    <= sum + SUM_W'(rd_data);
          sum_sq <= sum_sq + SQ_W'(rd_data) * SQ_W'(rd_data);
          if (rd_data > max_r) max_r <= rd_data;
          if (rd_data < min_r) min_r <= rd_data;
          pdiv_start <= 1'b1;
          state <= DIVIDE;
        end
        DIVIDE: if (pdiv_done) begin
          pix_we <= 1'b1;
          pix_addr <= index;
          pix_row <= (32'(pdiv_q) + GRID_Y0 > 32'(ground)) ? ROW_NONE
                                                          : ground - PIX_W'(pdiv_q);
          if (32'(index) == N-1) begin
            mdiv_start <= 1'b1;
            mean_got <= 1'b0;
            msq_got <= 1'b0;
            state <= MEAN;
          end else begin
            index <= index + 1'b1;
            rd_addr <= (32'(rd_addr) == N-1) ? '0 : rd_addr + 1'b1;
            state <= ADDR;
          end
        end
        MEAN: begin
          if (mdiv_done) begin
            mean_r <= SAMPLE_W'(mdiv_q);
            mean_got <= 1'b1;
          end
          if (sdiv_done) begin
            msq_got <= 1'b1;
            sqrt_start <= 1'b1;
          end
          if ((mean_got || mdiv_done) && (msq_got || sdiv_done)) state <= ROOT;
        end
        ROOT: if (sqrt_done) begin
          state <= FINISH;
        end
        FINISH: begin
          average <= mean_r;
          maximum <= max_r;
          minimum <= min_r;
          rms <= SAMPLE_W'(sqrt_root);
          conversion_done <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
