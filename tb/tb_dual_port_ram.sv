// tb_dual_port_ram: random writes on the 100 MHz port and reads on an unrelated 65 MHz
// port, compared with a testbench copy of the memory; checks the one-clock read latency
// and that addresses beyond DEPTH read as zero.
module tb_dual_port_ram;
  logic clk_a = 0, clk_b = 0;
  always #5 clk_a = ~clk_a;
  always #7.692 clk_b = ~clk_b;

  localparam int DEPTH = 1000;
  logic        we_a;
  logic [9:0]  wr_addr, rd_addr;
  logic [11:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [11:0] model [DEPTH];

  dual_port_ram #(.DEPTH(DEPTH), .WIDTH(12)) dut (.clk_a, .we_a, .wr_addr, .wr_data,
                                                  .clk_b, .rd_addr, .rd_data);

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = 0;
    we_a = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    // writes
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk_a);
      we_a = 1;
      wr_addr = 10'($urandom_range(0, DEPTH-1));
      wr_data = 12'($urandom);
      model[wr_addr] = wr_data;
    end
    @(negedge clk_a);
    we_a = 0;
    // reads: data appears after the next clk_b edge
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk_b);
      rd_addr = 10'($urandom_range(0, DEPTH-1));
      @(negedge clk_b);
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        $display("addr %0d: got %h expected %h", rd_addr, rd_data, model[rd_addr]);
      end
    end
    // latency: change the address, the old word stays until the next edge
    @(negedge clk_b); rd_addr = 10'd5;
    @(negedge clk_b); rd_addr = 10'd6;
    @(posedge clk_b); #1;
    checks++;
    if (rd_data !== model[6]) begin failures++; $display("latency"); end
    @(negedge clk_b); rd_addr = 10'd1010;
    @(negedge clk_b);
    checks++;
    if (rd_data !== 0) begin failures++; $display("out of range read %h", rd_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
