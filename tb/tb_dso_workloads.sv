// tb_dso_workloads: the oscilloscope at its default sizes on the signals it is meant to
// show at 100 us/div: 10 kHz sine, square and ramp of 500 mV peak to peak, and a 10 kHz
// sine of 900 mV peak to peak, all centred on mid-scale (the front end's +0.5 V offset),
// converted by the behavioural ADC at 1 MS/s and shown at 300 mV/div (divisor 17).
//
// For each signal it waits for three frames of channel A (B carries the same signal) and
// checks, independently of the design:
//   - the frame's 1000 trace rows are ground - code/17 of 1000 consecutive samples
//     recorded at the interpreter input, and the four measurements equal those computed
//     here from the same samples;
//   - the frame spans 10 periods (9..11 rising mid-scale crossings), the peak-to-peak
//     value and the average are those of the signal within 2 %, and the RMS is within
//     1 % of the signal's (sqrt(mid^2 + A^2/2) sine, sqrt(mid^2 + A^2) square,
//     sqrt(mid^2 + A^2/3) ramp);
//   - triggered frames cross the 500 mV threshold upwards at sample 500.
// The sine and ramp are captured on the rising-edge trigger. The square is shown in run
// mode: its steps jump over the trigger's +-5 code window, so the edge trigger (which
// needs a sample near the level) does not fire on an ideal square.
module tb_dso_workloads;
  import dso_pkg::*;
  logic clk_100mhz = 0, clk_65mhz = 0;
  always #5 clk_100mhz = ~clk_100mhz;
  always #7.692 clk_65mhz = ~clk_65mhz;

  logic btnc = 1, btnu = 0;
  logic [15:0] sw = 0, led;
  logic [3:0] enc_a = 0, enc_b = 0, enc_btn = 4'hF;
  logic [6:0] adc_drp_addr;
  logic adc_drp_en, adc_drp_ready, adc_eoc;
  logic [15:0] adc_drp_do;
  logic ac_coupling_enable, attenuation_enable1, attenuation_enable2;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs;

  dso_top dut (.clk_100mhz, .clk_65mhz, .btnc, .btnu, .sw, .enc_a, .enc_b, .enc_btn,
    .adc_drp_addr, .adc_drp_en, .adc_drp_do, .adc_drp_ready, .adc_eoc,
    .ac_coupling_enable, .attenuation_enable1, .attenuation_enable2,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .led);

  logic [11:0] code_a, code_b;
  int unsigned conversions;
  xadc_model #(.PERIOD(100), .LATENCY(4)) adc (.clk(clk_100mhz), .rst(1'b0),
    .code_a, .code_b, .daddr(adc_drp_addr), .den(adc_drp_en),
    .dout(adc_drp_do), .drdy(adc_drp_ready), .eoc(adc_eoc), .conversions);

  // shape 0 sine, 1 square, 2 ramp; amp in codes; period 100 conversions (10 kHz)
  int shape = 0, amp = 1024;
  function automatic int wave(int n);
    real ph;
    ph = real'(n % 100) / 100.0;
    case (shape)
      0: return int'($floor(2048.0 + real'(amp) * $sin(2.0 * 3.14159265358979 * ph) + 0.5));
      1: return (ph < 0.5) ? 2048 + amp : 2048 - amp;
      default: return int'($floor(2048.0 - real'(amp) + 2.0 * real'(amp) * ph + 0.5));
    endcase
  endfunction
  always_comb begin
    code_a = 12'(wave(int'(conversions)));
    code_b = code_a;
  end

  int checks = 0, failures = 0;
  localparam int HIST = 1 << 20;
  int hist [HIST];
  int nh = 0;
  row_t rows [1000];
  bit checking = 0, triggered_mode = 1;
  int skip = 0, good_frames = 0;
  int pend_avg, pend_min, pend_max, pend_rms;
  bit pend = 0;

  always @(posedge clk_100mhz) if (!btnc && dut.ready_a) begin
    hist[nh % HIST] = int'(dut.sample_a);
    nh++;
  end
  always @(posedge clk_100mhz) if (dut.pix_we_a) rows[dut.pix_addr_a] = dut.pix_row_a;

  function automatic int expect_row(int code);
    int q;
    q = code / 17;
    return (q + 8 > 288) ? 1023 : 288 - q;
  endfunction

  function automatic void check_frame();
    int p, found, lo, hi, s, crossings, rlo, rhi;
    longint sum, sumsq;
    real want_rms, got_rms;
    found = -1;
    for (p = nh - 1000; p >= 0 && p > nh - 60000 && found < 0; p--) begin
      bit ok;
      ok = 1;
      for (int k = 0; k < 1000 && ok; k++)
        if (int'(rows[k]) != expect_row(hist[(p + k) % HIST])) ok = 0;
      if (ok) found = p;
    end
    checks++;
    if (found < 0) begin failures++; $display("shape %0d: frame matches no recorded samples", shape); return; end
    sum = 0; sumsq = 0; lo = 4095; hi = 0; crossings = 0; rlo = 1023; rhi = 0;
    for (int k = 0; k < 1000; k++) begin
      s = hist[(found + k) % HIST];
      sum += s; sumsq += longint'(s) * s;
      if (s < lo) lo = s;
      if (s > hi) hi = s;
      if (k > 0 && hist[(found + k - 1) % HIST] < 2048 && s >= 2048) crossings++;
      if (int'(rows[k]) < rlo) rlo = int'(rows[k]);
      if (int'(rows[k]) > rhi) rhi = int'(rows[k]);
    end
    pend_avg = int'(sum / 1000); pend_min = lo; pend_max = hi;
    pend_rms = int'($floor($sqrt(real'(sumsq / 1000))));
    while ((pend_rms + 1) * (pend_rms + 1) <= sumsq / 1000) pend_rms++;
    while (pend_rms * pend_rms > sumsq / 1000) pend_rms--;
    pend = 1;
    want_rms = (shape == 0) ? $sqrt(2048.0**2 + real'(amp)**2 / 2.0) :
               (shape == 1) ? $sqrt(2048.0**2 + real'(amp)**2) : $sqrt(2048.0**2 + real'(amp)**2 / 3.0);
    got_rms = real'(pend_rms);
    checks += 5;
    if (crossings < 9 || crossings > 11) begin failures++; $display("shape %0d: %0d periods in a frame", shape, crossings); end
    if (real'(hi - lo) < 0.98 * 2.0 * amp || real'(hi - lo) > 1.02 * 2.0 * amp) begin
      failures++; $display("shape %0d: peak to peak %0d codes", shape, hi - lo); end
    if (pend_avg < 2007 || pend_avg > 2089) begin failures++; $display("shape %0d: average %0d", shape, pend_avg); end
    if (got_rms < 0.99 * want_rms || got_rms > 1.01 * want_rms) begin
      failures++; $display("shape %0d: rms %0d, signal %0.1f", shape, pend_rms, want_rms); end
    if (rhi - rlo < (2 * amp) / 17 - 3 || rhi - rlo > (2 * amp) / 17 + 3) begin
      failures++; $display("shape %0d: trace spans %0d rows", shape, rhi - rlo); end
    if (triggered_mode) begin
      checks++;
      if (!(hist[(found + 490) % HIST] < 2048 && hist[(found + 510) % HIST] > 2048)) begin
        failures++; $display("shape %0d: not triggered on the rising edge", shape); end
    end
    good_frames++;
  endfunction

  always @(posedge clk_100mhz) begin
    if (pend) begin
      checks++;
      if (int'(dut.avg_a) != pend_avg || int'(dut.min_a) != pend_min || int'(dut.max_a) != pend_max ||
          int'(dut.rms_a) != pend_rms) begin
        failures++;
        $display("shape %0d: measurements %0d %0d %0d %0d, expected %0d %0d %0d %0d", shape,
                 dut.avg_a, dut.min_a, dut.max_a, dut.rms_a, pend_avg, pend_min, pend_max, pend_rms);
      end
      pend = 0;
    end
    if (dut.done_a) begin
      if (checking && skip == 0) check_frame();
      else if (skip > 0) skip--;
    end
  end

  task automatic wait_clocks(int n); repeat (n) @(negedge clk_100mhz); endtask
  task automatic turn_cw(int k);
    enc_a[k] = 1; wait_clocks(10100); enc_b[k] = 1; wait_clocks(10100);
    enc_a[k] = 0; wait_clocks(10100); enc_b[k] = 0; wait_clocks(10100);
  endtask

  task automatic run_workload(string name, int sh, int a, bit trig);
    int t;
    checking = 0;
    shape = sh; amp = a; triggered_mode = trig; sw[15] = !trig;
    wait_clocks(10);
    skip = 2; good_frames = 0; checking = 1;
    t = 0;
    while (good_frames < 3 && t < 2000) begin wait_clocks(10000); t++; end
    checks++;
    if (good_frames < 3) begin failures++; $display("%s: only %0d frames", name, good_frames); end
    else $display("%s: 3 frames, last avg %0d min %0d max %0d rms %0d", name,
                  dut.avg_a, dut.min_a, dut.max_a, dut.rms_a);
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait_clocks(20);
    btnc = 0;
    wait_clocks(100);
    repeat (4) turn_cw(0);   // 300 mV/div
    run_workload("10 kHz 500 mVpp sine", 0, 1024, 1);
    run_workload("10 kHz 500 mVpp square", 1, 1024, 0);
    run_workload("10 kHz 500 mVpp ramp", 2, 1024, 1);
    run_workload("10 kHz 900 mVpp sine", 0, 1843, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
