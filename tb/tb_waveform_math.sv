// tb_waveform_math: N = 16, a testbench RAM with one clock of read latency holds random
// samples. For each of the eight voltage settings and random ground rows and start
// addresses, checks every trace row written (ground - sample/scaler from the
// description's table, or all ones above the top grid line at row 8), that each column
// is written once, and the average (sum/N), minimum, maximum and RMS
// (floor(sqrt(sum of squares / N))) against values computed here.
module tb_waveform_math;
  localparam int N = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        begin_frame, hold, pix_we, conversion_done;
  logic [3:0]  start_addr, rd_addr, pix_addr;
  logic [2:0]  voltage_scale;
  logic [9:0]  offset, pix_row;
  logic [11:0] rd_data, average, minimum, maximum, rms;
  logic [11:0] ram [N];
  int scalers[8] = '{1, 3, 6, 12, 17, 29, 44, 59};

  waveform_math #(.N(N)) dut (.clk, .rst, .begin_frame, .hold, .start_addr, .voltage_scale,
    .offset, .rd_addr, .rd_data, .pix_we, .pix_addr, .pix_row, .conversion_done,
    .average, .minimum, .maximum, .rms);

  always @(posedge clk) rd_data <= ram[rd_addr];

  int rows[N], written[N];
  always @(posedge clk) if (pix_we) begin
    rows[pix_addr] = int'(pix_row);
    written[pix_addr]++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] start_addr_q;
  always @(posedge clk) if (!begin_frame) start_addr_q <= rd_addr;
  longint sum, sq;
  int s;
  int mn, mx, q, exp_row, cycles;
  initial begin
    begin_frame = 0; hold = 0; start_addr = 0; voltage_scale = 0; offset = 288;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 24; run++) begin
      for (int i = 0; i < N; i++) begin
        ram[i] = (run == 0) ? 12'(4095 - i) : 12'($urandom);
        written[i] = 0;
      end
      voltage_scale = 3'(run % 8);
      offset = 10'(8 + 10 * $urandom_range(0, 70));
      start_addr = 4'($urandom);
      // hold keeps the pass from starting
      hold = 1;
      @(negedge clk); begin_frame = 1;
      repeat (5) @(negedge clk);
      checks++;
      if (rd_addr != start_addr_q || pix_we) begin failures++; $display("started while held"); end
      hold = 0;
      cycles = 0;
      while (!conversion_done && cycles < 5000) begin @(negedge clk); cycles++; end
      begin_frame = 0;
      sum = 0; sq = 0; mn = 4095; mx = 0;
      for (int i = 0; i < N; i++) begin
        s = int'(ram[(int'(start_addr) + i) % N]);
        sum += s; sq += longint'(s) * s;
        if (s < mn) mn = s;
        if (s > mx) mx = s;
        q = s / scalers[voltage_scale];
        exp_row = (q + 8 > int'(offset)) ? 1023 : int'(offset) - q;
        checks++;
        if (rows[i] != exp_row || written[i] != 1) begin
          failures++;
          $display("run %0d col %0d: row %0d (x%0d) expected %0d", run, i, rows[i], written[i], exp_row);
        end
      end
      checks += 4;
      if (longint'(average) != sum / N) begin failures++; $display("average %0d vs %0d", average, sum / N); end
      if (int'(minimum) != mn || int'(maximum) != mx) begin failures++; $display("min/max"); end
      if (longint'(rms) * rms > sq / N || (longint'(rms) + 1) * (rms + 1) <= sq / N) begin
        failures++; $display("rms %0d for mean square %0d", rms, sq / N);
      end
      if (cycles > N * 20 + 100) begin failures++; $display("pass took %0d clocks", cycles); end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
