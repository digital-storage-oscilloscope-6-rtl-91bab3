// tb_display_text_handler: lets the handler sweep the text bitmap into a testbench
// array, then reads the characters back off the pixels (each 16 x 16 cell must hold a
// 5x7 glyph drawn at twice size, blank outside it) and compares the two text lines
// with strings worked out here from the input values: labels, volts/div with and
// without the 1:50 attenuator, time/div, threshold in mV, the four measurements as
// XX.XXXV (code*1000/4096 mV) and the channel name. It also checks sweep_done spacing
// and that every bitmap address is written once per sweep.
module tb_display_text_handler;
  import dso_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] timescale, voltage_scale;
  logic [9:0] threshold_mv;
  logic channel_select, attenuated;
  sample_t average, maximum, minimum, rms;
  logic we, pixel, sweep_done;
  logic [TEXT_AW-1:0] addr;

  display_text_handler dut (.clk, .rst, .timescale, .voltage_scale, .threshold_mv,
    .channel_select, .attenuated, .average, .maximum, .minimum, .rms,
    .we, .addr, .pixel, .sweep_done);

  // font reference: a separate ROM instance, scanned once into a table
  logic [7:0] fch; logic [2:0] frow; logic [4:0] fbits;
  glyph_rom font (.ch(fch), .row(frow), .bits(fbits));
  logic [34:0] font_tab [128];

  logic bitmap [TEXT_ROWS][1024];
  int writes;
  always @(posedge clk) if (we) begin
    bitmap[addr[15:10]][addr[9:0]] <= pixel;
    writes <= writes + 1;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string read_line(int y0);
    string s;
    s = "";
    for (int c = 0; c < 64; c++) begin
      logic [34:0] pat;
      logic ok;
      byte found;
      ok = 1;
      for (int r = 0; r < 8; r++)
        for (int k = 0; k < 8; k++) begin
          logic p;
          p = bitmap[y0 + 2*r][16*c + 2*k];
          if (bitmap[y0 + 2*r + 1][16*c + 2*k] != p || bitmap[y0 + 2*r][16*c + 2*k + 1] != p
              || bitmap[y0 + 2*r + 1][16*c + 2*k + 1] != p) ok = 0;
          if (r < 7 && k < 5) pat[34 - 5*r - k] = p;
          else if (p) ok = 0;
        end
      found = "?";
      if (ok) for (int q = 127; q >= 32; q--) if (font_tab[q] == pat) found = byte'(q);
      s = {s, string'(found)};
    end
    return s;
  endfunction

  task automatic expect_text(string what, string line0, string line1);
    string got0, got1;
    int prev;
    // two sweeps: the first may have latched the old values
    prev = writes;
    @(posedge sweep_done); @(posedge sweep_done);
    @(negedge clk);
    got0 = read_line(4);
    got1 = read_line(30);
    checks += 2;
    if (got0 != line0) begin failures++; $display("%s line 0:\n  got  '%s'\n  want '%s'", what, got0, line0); end
    if (got1 != line1) begin failures++; $display("%s line 1:\n  got  '%s'\n  want '%s'", what, got1, line1); end
    checks++;
    if (writes - prev < 2 * 1024 * TEXT_ROWS - 1) begin failures++; $display("%s: only %0d writes", what, writes - prev); end
  endtask

  function automatic string pad9(string s);
    while (s.len() < 9) s = {s, " "};
    return s;
  endfunction

  function automatic string volts(int code, bit att);
    int mv;
    mv = att ? code * 50000 / 4096 : code * 1000 / 4096;
    return pad9($sformatf("%02d.%03dV", mv / 1000, mv % 1000));
  endfunction

  initial begin
    writes = 0;
    for (int q = 0; q < 128; q++)
      for (int r = 0; r < 7; r++) begin
        fch = 8'(q); frow = 3'(r); #1;
        font_tab[q][34 - 5*r -: 5] = fbits;
      end
    // blank cell must not be mistaken for a glyph
    timescale = 0; voltage_scale = 5; threshold_mv = 500; channel_select = 0; attenuated = 0;
    average = 2048; maximum = 4095; minimum = 0; rms = 1000;
    repeat (3) @(negedge clk);
    rst = 0;

    expect_text("defaults",
      {" ", pad9("500mV/d"), pad9("CH TRIG"), pad9("AVERAGE"), pad9("MAXIMUM"), pad9("MINIMUM"), pad9("RMS"), pad9("")},
      {" ", pad9("100uS/d"), pad9("500mV"), volts(2048, 0), volts(4095, 0), volts(0, 0), volts(1000, 0), pad9("CH A")});

    @(negedge clk);
    timescale = 2; voltage_scale = 0; threshold_mv = 6; channel_select = 1; attenuated = 1;
    average = 1234; maximum = 3999; minimum = 17; rms = 2222;
    expect_text("attenuated channel B",
      {" ", pad9("850mV/d"), pad9("CH TRIG"), pad9("AVERAGE"), pad9("MAXIMUM"), pad9("MINIMUM"), pad9("RMS"), pad9("")},
      {" ", pad9("10mS/d"), pad9("6mV"), volts(1234, 1), volts(3999, 1), volts(17, 1), volts(2222, 1), pad9("CH B")});

    @(negedge clk);
    timescale = 4; voltage_scale = 7; threshold_mv = 998; attenuated = 0;
    expect_text("slowest timescale",
      {" ", pad9("1000mV/d"), pad9("CH TRIG"), pad9("AVERAGE"), pad9("MAXIMUM"), pad9("MINIMUM"), pad9("RMS"), pad9("")},
      {" ", pad9("1S/d"), pad9("998mV"), volts(1234, 0), volts(3999, 0), volts(17, 0), volts(2222, 0), pad9("CH B")});

    // sweep spacing
    begin
      int t0, t1;
      @(posedge sweep_done); t0 = $time;
      @(posedge sweep_done); t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != 1024 * TEXT_ROWS) begin failures++; $display("sweep period %0d", (t1 - t0) / 10); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
