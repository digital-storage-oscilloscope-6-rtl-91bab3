// tb_debounce: with COUNT = 50, bursts of glitches shorter than COUNT must never reach
// the output, and a level held for good must appear after COUNT..COUNT+4 clocks (the
// synchroniser adds two). Run for both directions and for random burst lengths.
module tb_debounce;
  localparam int COUNT = 50;
  logic clk = 0, rst = 1, noisy_in = 0, clean_out;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  debounce #(.COUNT(COUNT)) dut (.clk, .rst, .noisy_in, .clean_out);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic level;
  initial begin
    level = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (clean_out !== 1'b0) begin failures++; $display("not low after reset"); end
    for (int trial = 0; trial < 40; trial++) begin
      int lat;
      // bounce: pulses of the new level shorter than COUNT, separated by the old level
      repeat (1 + $urandom_range(6)) begin
        noisy_in = !level;
        repeat ($urandom_range(1, COUNT - 5)) begin
          @(negedge clk);
          checks++;
          if (clean_out !== level) begin failures++; $display("trial %0d: glitch passed", trial); end
        end
        noisy_in = level;
        repeat ($urandom_range(1, 10)) @(negedge clk);
      end
      // settle at the new level
      noisy_in = !level;
      lat = 0;
      while (clean_out === level && lat < 3 * COUNT) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat < COUNT || lat > COUNT + 4) begin failures++; $display("trial %0d: latency %0d", trial, lat); end
      level = !level;
      repeat (10) @(negedge clk);
      checks++;
      if (clean_out !== level) begin failures++; $display("trial %0d: output did not stay", trial); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
