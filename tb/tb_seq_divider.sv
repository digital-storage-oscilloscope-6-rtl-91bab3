// tb_seq_divider: random 22-bit by 10-bit and 12-bit by 8-bit divisions compared with
// the testbench's own / and %, including the 1000 divisor of the averages and the
// DW+1 clock latency.
module tb_seq_divider;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        s1, b1, d1;
  logic [21:0] n1, q1;
  logic [9:0]  v1, r1;
  seq_divider #(.DW(22), .VW(10)) dut1 (.clk, .rst, .start(s1), .dividend(n1), .divisor(v1),
                                        .busy(b1), .done(d1), .quotient(q1), .remainder(r1));
  logic        s2, b2, d2;
  logic [11:0] n2, q2;
  logic [7:0]  v2, r2;
  seq_divider #(.DW(12), .VW(8)) dut2 (.clk, .rst, .start(s2), .dividend(n2), .divisor(v2),
                                       .busy(b2), .done(d2), .quotient(q2), .remainder(r2));

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat;
  initial begin
    s1 = 0; s2 = 0; n1 = 0; v1 = 1; n2 = 0; v2 = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      n1 = 22'($urandom_range(0, 4095000));
      v1 = (i % 3 == 0) ? 10'd1000 : 10'($urandom_range(1, 1023));
      n2 = 12'($urandom);
      v2 = 8'($urandom_range(1, 255));
      s1 = 1; s2 = 1;
      @(negedge clk);
      s1 = 0; s2 = 0;
      lat = 1;
      while (!d1 && lat < 100) begin
        if (d2) begin
          checks++;
          if (q2 != n2 / v2 || r2 != n2 % v2) begin failures++; $display("12/8: %0d/%0d -> %0d r %0d", n2, v2, q2, r2); end
        end
        @(negedge clk); lat++;
      end
      checks++;
      if (q1 != n1 / v1 || r1 != n1 % v1) begin failures++; $display("%0d/%0d -> %0d r %0d", n1, v1, q1, r1); end
      checks++;
      if (lat != 24) begin failures++; $display("latency %0d", lat); end  // done rises on the 23rd edge after the start edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
