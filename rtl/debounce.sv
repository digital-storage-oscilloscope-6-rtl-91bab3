// debounce: passes a noisy input through once it has held one level for COUNT clocks.
//
// A 2-flop synchroniser first brings the input into the clock domain. Any change
// restarts the counter; clean_out takes the new level after COUNT stable clocks. On
// reset clean_out is loaded with the current input. The design debounces all buttons
// and encoder lines, with 1,000,000 clocks (10 ms at 100 MHz) for buttons and 10,000 for
// the encoder lines; the synchroniser is this design's addition.
module debounce #(
  parameter int unsigned COUNT = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy_in,
  output logic clean_out
);
  localparam int unsigned CW = $clog2(COUNT + 1);
  logic [1:0]    sync;
  logic          last;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    sync <= {sync[0], noisy_in};
    if (rst) begin
      last <= sync[1];
      clean_out <= sync[1];
      count <= '0;
    end else if (sync[1] != last) begin
      last <= sync[1];
      count <= '0;
    end else if (32'(count) == COUNT) begin
      clean_out <= last;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
