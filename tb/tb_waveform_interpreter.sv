// tb_waveform_interpreter: N = 20, one channel from samples to trace rows and
// measurements. Random samples stream in; the trigger is raised at a chosen sample. When
// frame_done pulses, the rows written must be those of the N samples centred on the
// trigger (N/2 before it), scaled at voltage setting 2 (divide by 6) from ground row 288,
// and the measurements must be those of the same N samples. Also checks that `hold`
// delays the measurement pass and that a second capture follows.
module tb_waveform_interpreter;
  localparam int N = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] sample, average, minimum, maximum, rms;
  logic        sample_ready, trigger, hold, pix_we, frame_done, capturing;
  logic [4:0]  pix_addr;
  logic [9:0]  pix_row;

  waveform_interpreter #(.N(N)) dut (.clk, .rst, .sample, .sample_ready, .trigger,
    .voltage_scale(3'd2), .offset(10'd288), .hold, .pix_we, .pix_addr, .pix_row,
    .frame_done, .capturing, .average, .minimum, .maximum, .rms);

  int rows[N];
  always @(posedge clk) if (pix_we) rows[pix_addr] = int'(pix_row);

  int hist[$];
  task automatic feed(bit trig);
    @(negedge clk);
    sample = 12'($urandom);
    sample_ready = 1; trigger = trig;
    if (capturing) hist.push_back(int'(sample));
    @(negedge clk);
    sample_ready = 0; trigger = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int trig_idx, first, s, mn, mx, waited;
  longint sum, sq;
  initial begin
    sample = 0; sample_ready = 0; trigger = 0; hold = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cap = 0; cap < 3; cap++) begin
      hist.delete();
      for (int i = 0; i < N/2 + 4 + cap; i++) feed(0);
      trig_idx = hist.size();
      feed(1);
      hold = (cap == 1);
      while (capturing) feed(0);
      waited = 0;
      while (!frame_done && waited < 2000) begin
        @(negedge clk); waited++;
        if (waited == 200 && hold) begin
          checks++;
          if (pix_we || frame_done) begin failures++; $display("pass ran while held"); end
          hold = 0;
        end
      end
      checks++;
      if (!frame_done) begin failures++; $display("no frame"); end
      first = trig_idx - N/2;
      sum = 0; sq = 0; mn = 4095; mx = 0;
      for (int i = 0; i < N; i++) begin
        s = hist[first + i];
        sum += s; sq += longint'(s) * s;
        if (s < mn) mn = s;
        if (s > mx) mx = s;
        checks++;
        if (rows[i] != ((s / 6 + 8 > 288) ? 1023 : 288 - s / 6)) begin
          failures++; $display("cap %0d col %0d row %0d sample %0d", cap, i, rows[i], s);
        end
      end
      checks++;
      if (longint'(average) != sum / N || int'(minimum) != mn || int'(maximum) != mx ||
          longint'(rms) * rms > sq / N || (longint'(rms) + 1) * (rms + 1) <= sq / N) begin
        failures++; $display("measurements %0d %0d %0d %0d", average, minimum, maximum, rms);
      end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
