// tb_fir_lowpass: checks the 31-tap low-pass filter against a reference that designs
// the same filter from its formula in floating point (Hamming-window sinc, cutoff 0.2 of
// Nyquist, DC gain 1, taps rounded to 1024ths) and convolves in the testbench. Also
// checks the 32-clock latency (out_valid seen in the 32nd clock period after the edge
// that took the input), the DC response (a constant input comes out unchanged
// once the history is full) and the attenuation of a 400 kHz tone.
module tb_fir_lowpass;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  logic [11:0] in_sample, out_sample;
  int checks = 0, failures = 0;

  fir_lowpass dut (.clk, .rst, .in_valid, .in_sample, .out_valid, .out_sample);

  int coef[31];
  int hist[31];
  real pi = 3.14159265358979;

  initial begin
    real h[31], s, w, x;
    s = 0;
    for (int k = 0; k < 31; k++) begin
      x = k - 15;
      w = 0.54 - 0.46 * $cos(2.0 * pi * k / 30.0);
      h[k] = (k == 15) ? 0.2 : $sin(0.2 * pi * x) / (pi * x);
      h[k] = h[k] * w;
      s = s + h[k];
    end
    for (int k = 0; k < 31; k++) begin
      x = h[k] / s * 1024.0;
      coef[k] = (x >= 0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
    end
  end

  function automatic int reference();
    int acc = 0;
    for (int k = 0; k < 31; k++) acc += coef[k] * hist[k];
    if (acc < 0) return 0;
    acc = acc >>> 10;
    return (acc > 4095) ? 4095 : acc;
  endfunction

  int latency, got, peak_lo, peak_hi;
  task automatic push(int v, output int result);
    for (int k = 30; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    @(negedge clk);
    in_sample = 12'(v);
    in_valid = 1;
    @(negedge clk);   // taken on the edge just passed
    in_valid = 0;
    latency = 1;
    while (!out_valid && latency < 100) begin @(negedge clk); latency++; end
    result = int'(out_sample);
    checks++;
    if (result != reference()) begin
      failures++;
      $display("input %0d: got %0d expected %0d", v, result, reference());
    end
    checks++;
    if (latency != 32) begin failures++; $display("latency %0d", latency); end  // out_valid rises on the 31st edge after the input edge
    repeat ($urandom_range(1, 60)) @(negedge clk);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_sample = 0;
    for (int k = 0; k < 31; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    for (int i = 0; i < 200; i++) push($urandom_range(0, 4095), got);
    for (int i = 0; i < 40; i++) push(1000, got);
    checks++;
    if (got != 1000) begin failures++; $display("DC gain: %0d", got); end
    // 400 kHz at 1 MS/s: about 5 steps per 2 samples; amplitude 1000 around 2048
    peak_lo = 4095; peak_hi = 0;
    for (int i = 0; i < 80; i++) begin
      push(2048 + int'(1000.0 * $sin(2.0 * pi * 0.4 * i)), got);
      if (i > 40) begin
        if (got < peak_lo) peak_lo = got;
        if (got > peak_hi) peak_hi = got;
      end
    end
    checks++;
    if (peak_hi - peak_lo > 100) begin failures++; $display("400 kHz swing %0d", peak_hi - peak_lo); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
