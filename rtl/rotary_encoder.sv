// rotary_encoder: turns a quadrature knob's debounced A/B lines into step pulses.
//
// One step per detent: on each rising edge of A, B low means a clockwise step (inc for
// one clock) and B high an anticlockwise one (dec for one clock). The design decodes
// its four KY-040 knobs from their A/B transition sequence into increase/decrease
// pulses; using the edge of A with the level of B is this design's choice.
module rotary_encoder (
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic inc,
  output logic dec
);
  logic a_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_last <= a;
      inc <= 1'b0;
      dec <= 1'b0;
    end else begin
      a_last <= a;
      inc <= a && !a_last && !b;
      dec <= a && !a_last && b;
    end
  end
endmodule
