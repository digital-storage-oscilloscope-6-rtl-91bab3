// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Pulse `start` with dividend and divisor; `done` pulses DW+1 clocks later with quotient
// and remainder, which then hold until the next start. A zero divisor gives an all-ones
// quotient. The measurement path of the oscilloscope needs a divider for the pixel
// position and for the mean; the design description says only that a multi-cycle
// divider was used, so this simple bit-serial form is this design's choice.
module seq_divider #(
  parameter int unsigned DW = 12,   // dividend width
  parameter int unsigned VW = 8     // divisor width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient,
  output logic [VW-1:0] remainder
);
  logic [DW-1:0] q;
  logic [VW:0]   r;
  logic [VW-1:0] d;
  logic [$clog2(DW+1)-1:0] bits_left;
  logic [VW:0]   r_shift;

  assign r_shift = {r[VW-1:0], q[DW-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      q <= '0; r <= '0; d <= '0;
      bits_left <= '0;
      quotient <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q <= dividend;
        r <= '0;
        d <= divisor;
        bits_left <= ($clog2(DW+1))'(DW);
        busy <= 1'b1;
      end else if (busy) begin
        if (bits_left == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
          quotient <= (d == 0) ? '1 : q;
          remainder <= r[VW-1:0];
        end else begin
          if (r_shift >= {1'b0, d}) begin
            r <= r_shift - {1'b0, d};
            q <= {q[DW-2:0], 1'b1};
          end else begin
            r <= r_shift;
            q <= {q[DW-2:0], 1'b0};
          end
          bits_left <= bits_left - 1'b1;
        end
      end
    end
  end
endmodule
