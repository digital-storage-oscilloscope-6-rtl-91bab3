// tb_data_acquisition: the acquisition stage with the ADC model. Channel A sees a
// triangle wave and channel B its mirror image. Checks that unfiltered samples are the
// converted codes, that the trigger fires (for the selected channel and edge) only when
// the selected channel's middle sample is within 5 codes of the threshold with the
// matching trend, and that with the filter on the samples are the filter of the
// testbench's reference convolution and arrive 32 clocks after the raw pair (one to enter the filter,
// 31 to compute).
module tb_data_acquisition;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]  timescale = 0;
  logic        filter_enable = 0, channel_select = 0, edge_falling = 0;
  logic [11:0] threshold = 12'd2000;
  logic [6:0]  drp_addr;
  logic        drp_en, drp_ready, eoc;
  logic [15:0] drp_do;
  logic [11:0] code_a, code_b, sample_a, sample_b;
  logic        ready_a, ready_b, trigger;
  int unsigned conversions;

  xadc_model u_model (.clk, .rst, .code_a, .code_b, .daddr(drp_addr), .den(drp_en),
                      .dout(drp_do), .drdy(drp_ready), .eoc, .conversions);
  data_acquisition dut (.clk, .rst, .timescale, .filter_enable, .channel_select, .edge_falling,
                        .threshold, .drp_addr, .drp_en, .drp_do, .drp_ready, .eoc,
                        .sample_a, .sample_b, .sample_ready_a(ready_a), .sample_ready_b(ready_b),
                        .trigger);

  // triangle, period 200 conversions, 1000..3000 in steps of 20
  function automatic int tri_wave(int n);
    int p = n % 200;
    return (p < 100) ? 1000 + 20 * p : 3000 - 20 * (p - 100);
  endfunction
  always_comb begin
    code_a = 12'(tri_wave(int'(conversions)));
    code_b = 12'(4000 - tri_wave(int'(conversions)));
  end

  // reference trigger on the selected stream
  int ha[$], hb[$];
  int fires = 0, raw_seen = 0, filt_seen = 0;
  int coef[31] = '{0, 1, 3, 4, 4, 0, -8, -19, -26, -22, 0, 41, 94, 149, 189, 204,
                   189, 149, 94, 41, 0, -22, -26, -19, -8, 0, 4, 4, 3, 1, 0};
  int raw_hist_a[31];
  int raw_cycle, cycle = 0;
  bit expect_trig;

  always @(posedge clk) cycle++;

  function automatic bit rule(ref int h[$]);
    int n, m, o, t;
    t = int'(threshold);
    if (h.size() < 3) return 0;
    n = h[h.size()-1]; m = h[h.size()-2]; o = h[h.size()-3];
    if (m < t - 5 || m > t + 5) return 0;
    return edge_falling ? (n < o) : (n > o);
  endfunction

  always @(negedge clk) begin
    if (!rst) begin
      if (dut.u_adc.sample_valid) begin
        for (int k = 30; k > 0; k--) raw_hist_a[k] = raw_hist_a[k-1];
        raw_hist_a[0] = int'(dut.u_adc.sample_a);
        raw_cycle = cycle;
      end
      if (ready_a) begin
        ha.push_back(int'(sample_a));
        hb.push_back(int'(sample_b));
        checks++;
        if (!filter_enable) begin
          raw_seen++;
          if (int'(sample_a) != tri_wave(int'(conversions) - 1) ||
              int'(sample_b) != 4000 - tri_wave(int'(conversions) - 1)) begin
            failures++; $display("raw sample %0d/%0d", sample_a, sample_b);
          end
        end else begin
          int acc;
          acc = 0;
          filt_seen++;
          for (int k = 0; k < 31; k++) acc += coef[k] * raw_hist_a[k];
          acc = (acc < 0) ? 0 : (acc >>> 10);
          if (acc > 4095) acc = 4095;
          if (int'(sample_a) != acc || cycle - raw_cycle != 32) begin
            failures++; $display("filtered %0d expected %0d, lag %0d", sample_a, acc, cycle - raw_cycle);
          end
        end
        // trigger after two more edges reflects this window
        expect_trig = channel_select ? rule(hb) : rule(ha);
        @(negedge clk); @(negedge clk);
        checks++;
        if (trigger !== expect_trig) begin failures++; $display("trigger %0d expected %0d", trigger, expect_trig); end
        if (trigger) fires++;
      end
    end
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int f0;
  initial begin
    for (int k = 0; k < 31; k++) raw_hist_a[k] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (100 * 420) @(negedge clk);
    checks++; if (fires < 2) begin failures++; $display("A rising fired %0d", fires); end
    f0 = fires; edge_falling = 1;
    repeat (100 * 420) @(negedge clk);
    checks++; if (fires - f0 < 2) begin failures++; $display("A falling fired %0d", fires - f0); end
    f0 = fires; channel_select = 1; ha.delete(); hb.delete();
    repeat (100 * 420) @(negedge clk);
    checks++; if (fires - f0 < 2) begin failures++; $display("B falling fired %0d", fires - f0); end
    filter_enable = 1; ha.delete(); hb.delete();
    repeat (100 * 420) @(negedge clk);
    checks++; if (filt_seen < 400 || raw_seen < 1000) begin failures++; $display("seen %0d %0d", raw_seen, filt_seen); end
    $display("fires %0d raw %0d filtered %0d", fires, raw_seen, filt_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
