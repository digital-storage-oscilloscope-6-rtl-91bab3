// xadc_model: behavioural stand-in for the FPGA's dual 12-bit ADC in simultaneous,
// continuous sampling mode, seen through its dynamic reconfiguration port.
//
// Not synthesizable logic: a test model. Every PERIOD clocks it converts the codes on
// code_a/code_b (auxiliary inputs 3 and 11), stores them in status registers 0x13 and
// 0x1B as {code, 4'b0} and pulses eoc for one clock. A DRP read (den high for one clock
// with daddr) answers LATENCY clocks later with drdy high for one clock and do holding
// the register. conversions counts the conversions made.
module xadc_model #(
  parameter int unsigned PERIOD  = 100,   // 1 MS/s at 100 MHz
  parameter int unsigned LATENCY = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] code_a,
  input  logic [11:0] code_b,
  input  logic [6:0]  daddr,
  input  logic        den,
  output logic [15:0] dout,
  output logic        drdy,
  output logic        eoc,
  output int unsigned conversions
);
  logic [15:0] reg_a, reg_b;
  int unsigned tick;
  int          pending;
  logic [6:0]  addr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      tick <= 0; eoc <= 1'b0; drdy <= 1'b0; dout <= '0;
      reg_a <= '0; reg_b <= '0; pending <= -1; addr_q <= '0; conversions <= 0;
    end else begin
      eoc <= 1'b0;
      drdy <= 1'b0;
      if (tick == PERIOD - 1) begin
        tick <= 0;
        reg_a <= {code_a, 4'b0};
        reg_b <= {code_b, 4'b0};
        eoc <= 1'b1;
        conversions <= conversions + 1;
      end else begin
        tick <= tick + 1;
      end
      if (den) begin
        pending <= int'(LATENCY) - 1;
        addr_q <= daddr;
      end else if (pending == 0) begin
        drdy <= 1'b1;
        dout <= (addr_q == 7'h13) ? reg_a : (addr_q == 7'h1B) ? reg_b : 16'hDEAD;
        pending <= -1;
      end else if (pending > 0) begin
        pending <= pending - 1;
      end
    end
  end
endmodule
