// int_sqrt: integer square root, floor(sqrt(radicand)), one result bit per clock.
//
// Pulse `start`; `done` pulses W/2+1 clocks later with `root`, which then holds. It is
// the classic non-restoring digit-by-digit method (two radicand bits per step). The
// design description uses a multi-cycle square-root core for the RMS value without
// describing it; this form is this design's choice. W must be even.
module int_sqrt #(
  parameter int unsigned W = 34
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [W-1:0]   radicand,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  logic [W-1:0]   x;      // radicand bits not yet consumed, MSBs first
  logic [W/2+1:0] rem;
  logic [W/2-1:0] q;
  logic [$clog2(W/2+1)-1:0] steps;
  logic [W/2+1:0] trial, rem_next;

  always_comb begin
    rem_next = {rem[W/2-1:0], x[W-1:W-2]};
    trial    = {q, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0;
      x <= '0; rem <= '0; q <= '0; steps <= '0; root <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x <= radicand;
        rem <= '0;
        q <= '0;
        steps <= ($clog2(W/2+1))'(W/2);
        busy <= 1'b1;
      end else if (busy) begin
        if (steps == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= q;
        end else begin
          x <= {x[W-3:0], 2'b00};
          if (rem_next >= trial) begin
            rem <= rem_next - trial;
            q <= {q[W/2-2:0], 1'b1};
          end else begin
            rem <= rem_next;
            q <= {q[W/2-2:0], 1'b0};
          end
          steps <= steps - 1'b1;
        end
      end
    end
  end
endmodule
