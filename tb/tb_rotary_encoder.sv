// tb_rotary_encoder: drives full quadrature cycles in both directions, with random dwell
// times, and checks one single-clock inc pulse per clockwise cycle (A rises while B is
// low), one dec pulse per anticlockwise cycle, and never both at once.
module tb_rotary_encoder;
  logic clk = 0, rst = 1, a = 0, b = 0, inc, dec;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int incs = 0, decs = 0;

  rotary_encoder dut (.clk, .rst, .a, .b, .inc, .dec);

  always @(posedge clk) if (!rst) begin
    if (inc) incs++;
    if (dec) decs++;
    if (inc || dec) checks++;
    if (inc && dec) begin failures++; $display("inc and dec together"); end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic phase(logic na, logic nb);
    a = na; b = nb;
    repeat ($urandom_range(1, 8)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      int want_inc, want_dec, n;
      bit cw;
      cw = $urandom_range(1);
      n = $urandom_range(1, 5);
      want_inc = incs + (cw ? n : 0);
      want_dec = decs + (cw ? 0 : n);
      repeat (n) begin
        if (cw) begin phase(1, 0); phase(1, 1); phase(0, 1); phase(0, 0); end
        else    begin phase(0, 1); phase(1, 1); phase(1, 0); phase(0, 0); end
      end
      repeat (2) @(negedge clk);
      checks++;
      if (incs != want_inc || decs != want_dec) begin
        failures++;
        $display("turn %0d (%s x%0d): inc %0d/%0d dec %0d/%0d", t, cw ? "cw" : "ccw", n,
                 incs, want_inc, decs, want_dec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
