// circular_buffer_manager: pre/post-trigger capture into an N-entry circular sample RAM.
//
// Every incoming sample is written at the next address, wrapping after N-1. The manager
// first gathers N/2 samples (PRE). It then stays ARMED: each further sample overwrites
// the oldest, and the start address of the N/2 most recent samples advances with it.
// The first sample that arrives with `trigger` high is kept as the first post-trigger
// sample (POST); after N/2 post-trigger samples in all, the RAM holds N samples in order
// from start_addr. The manager stops writing, raises frame_ready and holds it until the
// measurement pass reports conversion_done, then starts a new capture. This behaviour is
// the design description's; the state names are this design's.
//
// Timing: one RAM write on the clock after each sample_ready. With the trigger forced
// high (free-running) a frame takes N samples plus the measurement pass.
module circular_buffer_manager
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
  input  logic          conversion_done,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output sample_t       wr_data,
  output logic          frame_ready,
  output logic [AW-1:0] start_addr
);
  localparam int unsigned HALF = N / 2;

  typedef enum logic [1:0] {PRE, ARMED, POST, HOLD} state_t;
  state_t state;

  logic [AW-1:0] next_addr;   // where the next sample goes
  logic [AW:0]   count;       // samples held in the current window
  logic [AW-1:0] oldest;      // start of the window

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] a);
    return (32'(a) == N-1) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= PRE;
      next_addr <= '0;
      count <= '0;
      oldest <= '0;
      wr_en <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      frame_ready <= 1'b0;
      start_addr <= '0;
    end else begin
      wr_en <= 1'b0;
      if (sample_ready && state != HOLD) begin
        wr_en <= 1'b1;
        wr_addr <= next_addr;
        wr_data <= sample;
        next_addr <= inc(next_addr);
      end
      case (state)
        PRE: if (sample_ready) begin
          count <= count + 1'b1;
          if (32'(count) + 1 == HALF) state <= ARMED;
        end
        ARMED: if (sample_ready) begin
          if (trigger) begin
            count <= count + 1'b1;
            state <= POST;
          end else begin
            oldest <= inc(oldest);
          end
        end
        POST: if (sample_ready) begin
          count <= count + 1'b1;
          if (32'(count) + 1 == N) begin
            state <= HOLD;
            frame_ready <= 1'b1;
            start_addr <= oldest;
          end
        end
        HOLD: if (conversion_done) begin
          frame_ready <= 1'b0;
          count <= '0;
          oldest <= next_addr;
          state <= PRE;
        end
        default: state <= PRE;
      endcase
    end
  end
endmodule
