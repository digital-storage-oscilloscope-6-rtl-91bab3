// dual_port_ram: simple dual-port block RAM with independent write and read clocks.
//
// Port A writes one word per clk_a cycle when we_a is high. Port B reads: rd_data holds
// mem[rd_addr] one clk_b edge after rd_addr is presented (one cycle of read latency, as
// an FPGA block RAM). The same module serves as the 1000 x 12-bit sample storage, the
// 1000 x 10-bit trace buffers and the 1-bit text bitmap; DEPTH and WIDTH are set per use.
// Contents start at zero. Whether the memories are single- or dual-clock is not stated
// in the design description; dual clocks are needed where a 100 MHz writer meets the
// 65 MHz video reader, so all uses share this form.
module dual_port_ram #(
  parameter int unsigned DEPTH = 1000,
  parameter int unsigned WIDTH = 12,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk_a,
  input  logic             we_a,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             clk_b,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk_a) begin
    if (we_a && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk_b) begin
    rd_data <= (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
  end
endmodule
