// trigger_monitor: edge trigger on one channel's sample stream.
//
// Keeps the three most recent samples. The trend is taken from the newest and the oldest
// of them (rising when the newest is larger, falling when it is smaller); the threshold
// test is made on the middle sample, which must lie within +/-SLACK codes of the
// threshold so that a signal stepping over the level still fires. Only the selected edge
// fires. The window, the test and the slack of 5 codes follow the design description;
// the level-hold output, the fill count before the first verdict and the reset to zero
// are this design's choices.
//
// Timing: on the clock edge where new_sample is high the window shifts; `triggered` is
// updated on the following edge and then holds until the next sample, so a consumer that
// looks at it together with the next new_sample sees the verdict on the window so far.
module trigger_monitor
  import dso_pkg::*;
#(
  parameter int unsigned SLACK = 5
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t threshold,
  input  sample_t sample,
  input  logic    new_sample,
  input  logic    edge_falling,   // 0 rising, 1 falling
  output logic    triggered
);
  sample_t newest, middle, oldest;
  logic    window_full;
  logic [1:0] fill;

  logic [SAMPLE_W:0] lo, hi;
  logic near, trend_ok;

  always_comb begin
    lo = {1'b0, threshold} - (SAMPLE_W+1)'(SLACK);
    hi = {1'b0, threshold} + (SAMPLE_W+1)'(SLACK);
    if ({1'b0, threshold} < (SAMPLE_W+1)'(SLACK)) lo = '0;
    near     = ({1'b0, middle} >= lo) && ({1'b0, middle} <= hi);
    trend_ok = edge_falling ? (newest < oldest) : (newest > oldest);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      newest <= '0; middle <= '0; oldest <= '0;
      fill <= '0;
      triggered <= 1'b0;
    end else begin
      if (new_sample) begin
        newest <= sample;
        middle <= newest;
        oldest <= middle;
        if (fill != 2'd3) fill <= fill + 2'd1;
      end
      triggered <= window_full && near && trend_ok;
    end
  end

  assign window_full = (fill == 2'd3);
endmodule
