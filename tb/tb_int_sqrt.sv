// tb_int_sqrt: random 34-bit radicands (and the edge cases 0, 1, squares and
// squares minus one) compared with the largest r for which r*r <= x, worked out in the
// testbench by 64-bit arithmetic.
module tb_int_sqrt;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic [33:0] x;
  logic [16:0] root;
  int_sqrt #(.W(34)) dut (.clk, .rst, .start, .radicand(x), .busy, .done, .root);

  function automatic longint ref_root(longint v);
    longint r = 0;
    for (int b = 16; b >= 0; b--) if ((r + (64'd1 << b)) * (r + (64'd1 << b)) <= v) r += (64'd1 << b);
    return r;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(longint v);
    int lat;
    @(negedge clk);
    x = 34'(v);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (longint'(root) != ref_root(v)) begin failures++; $display("sqrt(%0d) = %0d, expected %0d", v, root, ref_root(v)); end
    checks++;
    if (lat != 19) begin failures++; $display("latency %0d", lat); end  // done rises on the 18th edge after the start edge
  endtask

  initial begin
    longint r;
    start = 0; x = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    one(0); one(1); one(2); one(3); one(4);
    one(64'd16769025);          // 4095^2
    one(64'd16769024);
    one((64'd1 << 34) - 1);
    for (int i = 0; i < 300; i++) begin
      r = longint'($urandom_range(0, 131071));
      one(i[0] ? r * r : (longint'($urandom) << 2) | longint'($urandom_range(0, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
