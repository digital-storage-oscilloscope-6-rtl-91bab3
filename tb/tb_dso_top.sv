// tb_dso_top: end-to-end test of the whole oscilloscope at its default sizes (1000-sample
// captures, 1,000,000 / 10,000-clock debouncing, full 1024x768 raster), with a
// behavioural dual ADC (xadc_model) converting testbench waveforms at 1 MS/s.
//
// Waveforms (n = conversion index): channel A a 1 kHz sine of 1023 codes amplitude
// around mid-scale (500 mV peak-to-peak at 4.096 codes/mV); channel B a 2 kHz sine of 600
// codes, plus a 250 kHz square of +-300 codes while the filter is tested; or both
// constant, below the threshold. (The trigger has no hysteresis, so B is only triggered
// on while it is clean or filtered.)
//
// Independent checks, made on every frame:
//   - every converted sample reaching the interpreters is the ADC code of the latest
//     conversion (filter off), and decimated samples arrive every 100*(skip+1) clocks;
//   - the 1000 trace rows a channel writes are offset - code/divisor (or "none" above the
//     grid) of 1000 consecutive samples recorded here, and the channel's average, minimum,
//     maximum and RMS equal those worked out here from the same samples;
//   - in triggered frames the selected channel crosses the threshold in the set direction
//     around sample 500 (500 before the trigger, 500 after);
//   - the VGA output of a whole frame shows each channel's trace (yellow A, green B) on
//     exactly the rows of the last copied frame;
//   - the text bitmap, read back as characters, names the selected channel and shows the
//     volts/div including the 1:50 attenuator.
// Mechanisms counted (each must happen): rising and falling edge trigger, knob changes
// of voltage scale / ground row / timescale, channel select, low-pass filter, run mode,
// manual trigger (and no frame without a trigger), decimation with a timescale change,
// frame copy to the display, interpreter held while the copy is pending, text sweeps,
// front-end relay outputs.
module tb_dso_top;
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

  // ---- ADC ----------------------------------------------------------------------------
  logic [11:0] code_a, code_b;
  int unsigned conversions;
  int wave_mode = 0;   // 0 sines with B's square, 1 constants, 2 clean sines
  xadc_model #(.PERIOD(100), .LATENCY(4)) adc (.clk(clk_100mhz), .rst(1'b0),
    .code_a, .code_b, .daddr(adc_drp_addr), .den(adc_drp_en),
    .dout(adc_drp_do), .drdy(adc_drp_ready), .eoc(adc_eoc), .conversions);

  function automatic int wave(bit ch, int n, int mode);
    real t;
    if (mode == 1) return ch ? 1200 : 1000;
    t = 2.0 * 3.14159265358979 * real'(n);
    if (!ch) return int'($floor(2048.0 + 1023.0 * $sin(t / 1000.0) + 0.5));
    return int'($floor(2048.0 + 600.0 * $sin(t / 500.0) + 0.5))
           + ((mode == 2) ? 0 : (((n / 2) % 2) ? 300 : -300));
  endfunction

  always_comb begin
    code_a = 12'(wave(0, int'(conversions), wave_mode));
    code_b = 12'(wave(1, int'(conversions), wave_mode));
  end

  // ---- bookkeeping ---------------------------------------------------------------------
  int checks = 0, failures = 0;
  int m_rising = 0, m_falling = 0, m_vscale = 0, m_offset = 0, m_timescale = 0, m_chsel = 0;
  int m_filter = 0, m_run = 0, m_manual = 0, m_no_trigger_idle = 0, m_decimation = 0;
  int m_copy = 0, m_hold = 0, m_text = 0, m_relays = 0, m_video = 0, m_chsel_text = 0;
  int frames_a = 0, frames_b = 0;

  // expected settings, as this testbench sets them
  int  exp_vs = 0, exp_off_a = 288, exp_off_b = 498, exp_ts = 0;
  bit  exp_falling = 0, exp_ch = 0, exp_filter = 0, exp_run = 0;
  bit  checking = 0;
  int  skip_a = 0, skip_b = 0;
  localparam int DIVISOR [8] = '{1, 3, 6, 12, 17, 29, 44, 59};   // codes per row
  localparam int THR_CODE = 2048;                                  // 500 mV

  // sample history, per channel
  localparam int HIST = 1 << 20;
  int hist_a [HIST];
  int hist_b [HIST];
  int nh = 0;
  longint last_ready_t = 0;
  int gap_ok = 0, gap_bad = 0;

  always @(posedge clk_100mhz) if (!btnc) begin
    if (dut.ready_a !== dut.ready_b) begin failures++; $display("channels out of step"); end
    if (dut.ready_a) begin
      hist_a[nh % HIST] = int'(dut.sample_a);
      hist_b[nh % HIST] = int'(dut.sample_b);
      nh++;
      if (!exp_filter && dut.settings.filter_enable == 0) begin
        checks++;
        if (int'(dut.sample_a) != wave(0, int'(conversions) - 1, wave_mode) ||
            int'(dut.sample_b) != wave(1, int'(conversions) - 1, wave_mode)) begin
          failures++;
          $display("%t: sample %0d/%0d is not the latest conversion %0d/%0d", $time,
                   dut.sample_a, dut.sample_b, wave(0, int'(conversions) - 1, wave_mode),
                   wave(1, int'(conversions) - 1, wave_mode));
        end
      end
      if (checking && last_ready_t != 0) begin
        if ($time - last_ready_t == 1000 * (exp_ts == 0 ? 1 : 11)) gap_ok++;
        else gap_bad++;
      end
      last_ready_t = $time;
    end
  end

  // trace rows written by each interpreter, and the copies shown
  row_t rows_a [1000];
  row_t rows_b [1000];
  row_t shown_a [1000];
  row_t shown_b [1000];
  bit   shown_valid = 0;
  always @(posedge clk_100mhz) begin
    if (dut.pix_we_a) rows_a[dut.pix_addr_a] = dut.pix_row_a;
    if (dut.pix_we_b) rows_b[dut.pix_addr_b] = dut.pix_row_b;
    if (dut.copied_a) begin shown_a = rows_a; m_copy++; shown_valid = 1; end
    if (dut.copied_b) shown_b = rows_b;
    if (dut.busy_a && dut.u_interp_a.frame_ready) m_hold++;
    if (dut.text_sweep_done) m_text++;
  end

  // ---- frame check ---------------------------------------------------------------------
  int pend_avg [2], pend_min [2], pend_max [2], pend_rms [2];
  bit pend [2] = '{0, 0};

  function automatic int expect_row(int code, int off);
    int q;
    q = code / DIVISOR[exp_vs];
    return (q + 8 > off) ? 1023 : off - q;
  endfunction

  function automatic void check_frame(bit ch);
    int off, p, found, lo, hi, s;
    longint sum, sumsq;
    off = ch ? exp_off_b : exp_off_a;
    found = -1;
    for (p = nh - 1000; p >= 0 && p > nh - 60000 && found < 0; p--) begin
      bit ok;
      ok = 1;
      for (int k = 0; k < 1000 && ok; k++) begin
        s = ch ? hist_b[(p + k) % HIST] : hist_a[(p + k) % HIST];
        if (int'(ch ? rows_b[k] : rows_a[k]) != expect_row(s, off)) ok = 0;
      end
      if (ok) found = p;
    end
    checks++;
    if (found < 0) begin
      failures++;
      $display("%t: channel %s frame matches no 1000 recorded samples (vs %0d offset %0d)",
               $time, ch ? "B" : "A", exp_vs, off);
      return;
    end
    sum = 0; sumsq = 0; lo = 4095; hi = 0;
    for (int k = 0; k < 1000; k++) begin
      s = ch ? hist_b[(found + k) % HIST] : hist_a[(found + k) % HIST];
      sum += s; sumsq += longint'(s) * s;
      if (s < lo) lo = s;
      if (s > hi) hi = s;
    end
    pend_avg[ch] = int'(sum / 1000);
    pend_min[ch] = lo;
    pend_max[ch] = hi;
    pend_rms[ch] = int'($floor($sqrt(real'(sumsq / 1000))));
    while ((pend_rms[ch] + 1) * (pend_rms[ch] + 1) <= sumsq / 1000) pend_rms[ch]++;
    while (pend_rms[ch] * pend_rms[ch] > sumsq / 1000) pend_rms[ch]--;
    pend[ch] = 1;

    // mechanisms seen in this frame
    if (ch == 0 && exp_vs == 4 && off == 288 && wave_mode != 1) m_vscale++;
    if (ch == 0 && off == 258) m_offset++;
    if (!exp_run && wave_mode != 1 && ch == exp_ch) begin
      int v_pre, v_post;
      bit near;
      v_pre = ch ? hist_b[(found + 490) % HIST] : hist_a[(found + 490) % HIST];
      v_post  = ch ? hist_b[(found + 510) % HIST] : hist_a[(found + 510) % HIST];
      checks++;
      if (exp_falling ? (v_pre > THR_CODE && v_post < THR_CODE) : (v_pre < THR_CODE && v_post > THR_CODE)) begin
        if (exp_falling) m_falling++; else m_rising++;
        if (ch) m_chsel++;
      end else begin
        failures++;
        $display("%t: channel %s frame not triggered on a %s edge: %0d .. %0d", $time,
                 ch ? "B" : "A", exp_falling ? "falling" : "rising", v_pre, v_post);
      end
    end
    if (ch == 1 && wave_mode == 0) begin
      checks++;
      if (exp_filter) begin
        if (hi - lo < 1400) m_filter++;
        else begin failures++; $display("filtered B still spans %0d codes", hi - lo); end
      end else if (hi - lo < 1600) begin
        failures++; $display("unfiltered B spans only %0d codes", hi - lo);
      end
    end
    if (ch == 0 && wave_mode != 1) begin
      int crossings;
      crossings = 0;
      for (int k = 1; k < 1000; k++)
        if (hist_a[(found + k - 1) % HIST] < 2048 && hist_a[(found + k) % HIST] >= 2048) crossings++;
      checks++;
      if (exp_ts == 1 && crossings >= 10 && crossings <= 12) m_decimation++;
      else if (exp_ts == 0 && crossings <= 2) ;
      else begin failures++; $display("%0d periods of A in a frame at timescale %0d", crossings, exp_ts); end
    end
    if (wave_mode == 1 && exp_run) m_run++;
  endfunction

  always @(posedge clk_100mhz) begin
    // measurements are compared one clock v_post the frame ends
    for (int c = 0; c < 2; c++) if (pend[c]) begin
      sample_t av, mn, mx, rm;
      av = c ? dut.avg_b : dut.avg_a; mn = c ? dut.min_b : dut.min_a;
      mx = c ? dut.max_b : dut.max_a; rm = c ? dut.rms_b : dut.rms_a;
      checks++;
      if (int'(av) != pend_avg[c] || int'(mn) != pend_min[c] || int'(mx) != pend_max[c] ||
          int'(rm) != pend_rms[c]) begin
        failures++;
        $display("%t: channel %0d measurements avg %0d/%0d min %0d/%0d max %0d/%0d rms %0d/%0d",
                 $time, c, av, pend_avg[c], mn, pend_min[c], mx, pend_max[c], rm, pend_rms[c]);
      end
      pend[c] = 0;
    end
    if (dut.done_a) begin
      frames_a++;
      if (checking && skip_a == 0) check_frame(0);
      else if (skip_a > 0) skip_a--;
    end
    if (dut.done_b) begin
      frames_b++;
      if (checking && skip_b == 0) check_frame(1);
      else if (skip_b > 0) skip_b--;
    end
  end

  // ---- VGA monitor -----------------------------------------------------------------------
  int vh = 0, vv = 0;
  bit vlocked = 0, vs_last = 1;
  row_t ref_a [1000];
  row_t ref_b [1000];
  bit ref_valid = 0, video_check = 0;
  int hits_a, hits_b, misses;
  always @(negedge clk_65mhz) begin
    if (vs_last && !vga_vs && !btnc && $time > 10000) begin
      if (vlocked && (vv != 771 || vh != 0)) begin failures++; $display("vsync at %0d,%0d", vh, vv); end
      vh = 0; vv = 771; vlocked = 1;
    end
    vs_last = vga_vs;
    if (vlocked) begin
      if (vh == 0 && vv == 0) begin
        ref_valid = shown_valid && video_check && checking;
        ref_a = shown_a; ref_b = shown_b;
        hits_a = 0; hits_b = 0; misses = 0;
      end
      if (ref_valid && vv < 768 && vh >= 10 && vh < 1010) begin
        if (int'(ref_a[vh - 10]) == vv) begin
          if (vga_r == 4'hF && vga_g == 4'hF) hits_a++; else misses++;
        end
        if (int'(ref_b[vh - 10]) == vv) begin
          if (vga_g == 4'hF) hits_b++; else misses++;
        end
        if (int'(ref_a[vh - 10]) != vv && int'(ref_b[vh - 10]) != vv && vga_r == 4'hF &&
            vga_g == 4'hF && vga_b == 4'h0 && !(vh >= 1010)) misses++;
      end
      if (ref_valid && vv == 767 && vh == 1023) begin
        checks++;
        if (misses == 0 && hits_a > 900 && hits_b > 900) m_video++;
        else begin failures++; $display("video frame: %0d/%0d trace pixels, %0d wrong", hits_a, hits_b, misses); end
        ref_valid = 0;
      end
      if (vh == 1343) begin vh = 0; vv = (vv == 805) ? 0 : vv + 1; end
      else vh++;
    end
  end

  // ---- text read-back ------------------------------------------------------------------
  logic [7:0] fch; logic [2:0] frow; logic [4:0] fbits;
  glyph_rom font (.ch(fch), .row(frow), .bits(fbits));
  logic [34:0] font_tab [128];

  function automatic string text_cells(int y0, int c0, int n);
    string s;
    s = "";
    for (int c = c0; c < c0 + n; c++) begin
      logic [34:0] pat;
      byte found;
      for (int r = 0; r < 7; r++)
        for (int k = 0; k < 5; k++)
          pat[34 - 5*r - k] = dut.u_text_ram.mem[(y0 + 2*r) * 1024 + 16*c + 2*k];
      found = "?";
      for (int q = 127; q >= 32; q--) if (font_tab[q] == pat) found = byte'(q);
      s = {s, string'(found)};
    end
    return s;
  endfunction

  // ---- stimulus helpers ---------------------------------------------------------------------
  task automatic wait_clocks(int n); repeat (n) @(negedge clk_100mhz); endtask

  task automatic turn(int k, bit cw);
    // one detent, each phase held longer than the 10,000-clock line debounce
    if (cw) begin enc_a[k] = 1; wait_clocks(10100); enc_b[k] = 1; wait_clocks(10100);
                  enc_a[k] = 0; wait_clocks(10100); enc_b[k] = 0; wait_clocks(10100); end
    else    begin enc_b[k] = 1; wait_clocks(10100); enc_a[k] = 1; wait_clocks(10100);
                  enc_b[k] = 0; wait_clocks(10100); enc_a[k] = 0; wait_clocks(10100); end
  endtask

  task automatic pause_checks();
    checking = 0;
  endtask

  task automatic resume_checks();
    // the frame under way may mix old and new settings: skip it
    wait_clocks(4);
    skip_a = 2; skip_b = 2;
    gap_ok = 0; gap_bad = 0; last_ready_t = 0;
    checking = 1;
  endtask

  task automatic wait_count(ref int counter, input int target, input string what, input int max_ms);
    int t;
    t = 0;
    while (counter < target && t < max_ms * 100) begin wait_clocks(1000); t++; end
    if (counter < target) $display("%t: gave up waiting for %s (%0d of %0d)", $time, what, counter, target);
  endtask

  initial begin
    #1500000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int done_before;
  string txt;
  initial begin
    for (int q = 0; q < 128; q++)
      for (int r = 0; r < 7; r++) begin
        fch = 8'(q); frow = 3'(r); #1;
        font_tab[q][34 - 5*r -: 5] = fbits;
      end
    wait_clocks(20);
    btnc = 0;
    wait_clocks(100);

    // voltage scale 17 mV/div -> 300 mV/div (divisor 17): four clockwise steps of knob 1
    repeat (4) turn(0, 1);
    exp_vs = 4;
    checks++;
    if (dut.settings.voltage_scale != 3'd4) begin failures++; $display("voltage scale %0d", dut.settings.voltage_scale); end
    resume_checks();
    video_check = 1;

    // rising-edge trigger on A, and the picture on the screen
    wait_count(m_rising, 2, "rising-edge frames", 200);
    wait_count(m_video, 1, "a checked video frame", 200);

    // falling edge
    pause_checks(); sw[3] = 1; exp_falling = 1; resume_checks();
    wait_count(m_falling, 2, "falling-edge frames", 200);

    // knob 2: ground row of A three steps up
    pause_checks(); sw[3] = 0; exp_falling = 0;
    repeat (3) turn(1, 1);
    exp_off_a = 258;
    resume_checks();
    wait_count(m_offset, 2, "frames at the new ground row", 200);
    wait_count(m_video, 2, "a video frame at the new ground row", 200);

    // channel B selected for trigger and read-out
    pause_checks(); sw[1] = 1; exp_ch = 1; wave_mode = 2; resume_checks();
    wait_count(m_chsel, 2, "frames triggered by channel B", 200);
    wait_clocks(2 * 1024 * 58 + 10);
    txt = text_cells(30, 55, 4);
    checks++;
    if (txt == "CH B") m_chsel_text++;
    else begin failures++; $display("channel field reads '%s'", txt); end

    // low-pass filter on B's 250 kHz component
    pause_checks(); sw[0] = 1; exp_filter = 1; wave_mode = 0; resume_checks();
    wait_count(m_filter, 2, "filtered frames", 200);
    pause_checks(); sw[0] = 0; exp_filter = 0; sw[1] = 0; exp_ch = 0; resume_checks();

    // front-end relays and the attenuated volts/div read-out
    sw[13] = 1; sw[14] = 1;
    wait_clocks(2 * 1024 * 58 + 10);
    txt = text_cells(4, 1, 9);
    checks++;
    if (ac_coupling_enable && attenuation_enable1 && attenuation_enable2 && txt == "15000mV/d") m_relays++;
    else begin failures++; $display("relays %b%b%b, volts/div '%s'", ac_coupling_enable, attenuation_enable1, attenuation_enable2, txt); end
    sw[13] = 0; sw[14] = 0;
    wait_clocks(10);
    checks++;
    if (ac_coupling_enable || attenuation_enable1 || attenuation_enable2) begin failures++; $display("relays stuck"); end

    // run mode: constant inputs that never cross the threshold still give frames
    pause_checks(); wave_mode = 1; sw[15] = 1; exp_run = 1; resume_checks();
    wait_count(m_run, 2, "run-mode frames", 200);

    // no trigger, no frame; then the manual trigger button
    pause_checks(); sw[15] = 0; exp_run = 0;
    wait_clocks(4_000_000);
    done_before = frames_a;
    wait_clocks(2_000_000);
    checks++;
    if (frames_a == done_before) m_no_trigger_idle++;
    else begin failures++; $display("frames without a trigger"); end
    resume_checks();
    btnu = 1;
    wait_clocks(1_200_000);
    btnu = 0;
    wait_clocks(4_000_000);
    checks++;
    if (frames_a > done_before) m_manual++;
    else begin failures++; $display("manual trigger gave no frame"); end

    // knob 4: timescale 100 us/div -> 1 ms/div, sine again
    pause_checks(); wave_mode = 0;
    turn(3, 1);
    exp_ts = 1;
    checks++;
    if (dut.settings.timescale == 3'd1) m_timescale++;
    else begin failures++; $display("timescale %0d", dut.settings.timescale); end
    resume_checks();
    wait_count(m_decimation, 2, "decimated frames", 300);
    checks++;
    if (gap_bad != 0 || gap_ok < 1000) begin failures++; $display("sample spacing: %0d right, %0d wrong", gap_ok, gap_bad); end

    // ---- summary ----
    $display("rising %0d falling %0d vscale %0d offset %0d timescale %0d chsel %0d/%0d filter %0d",
             m_rising, m_falling, m_vscale, m_offset, m_timescale, m_chsel, m_chsel_text, m_filter);
    $display("run %0d manual %0d idle %0d decimation %0d copy %0d hold %0d text %0d relays %0d video %0d",
             m_run, m_manual, m_no_trigger_idle, m_decimation, m_copy, m_hold, m_text, m_relays, m_video);
    $display("frames A %0d B %0d, samples %0d, sim time %0t", frames_a, frames_b, nh, $time);
    foreach (mech_counts[i]) begin
      checks++;
      if (mech_counts[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mech_counts [17];
  always_comb mech_counts = '{m_rising, m_falling, m_vscale, m_offset, m_timescale, m_chsel,
                              m_chsel_text, m_filter, m_run, m_manual, m_no_trigger_idle,
                              m_decimation, m_copy, m_hold, m_text, m_relays, m_video};
endmodule
