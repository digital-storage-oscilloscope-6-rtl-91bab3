// tb_pixel_frame_buffer: N = 16. Writes a frame of rows, pulses frame_done and keeps
// the video-side window flag low: the display RAM (read on a 65 MHz clock) must keep the
// old frame and busy must stay high. Raising the flag must copy the frame in N+1 clocks,
// drop busy and pulse copy_done; the new rows must then read back on the video port.
module tb_pixel_frame_buffer;
  localparam int N = 16;
  logic clk = 0, clk_video = 0, rst = 1;
  always #5 clk = ~clk;
  always #7.692 clk_video = ~clk_video;
  int checks = 0, failures = 0;

  logic       pix_we, frame_done, safe_65, busy, copy_done;
  logic [3:0] pix_addr, rd_addr;
  logic [9:0] pix_row, rd_row;

  pixel_frame_buffer #(.N(N)) dut (.clk, .rst, .pix_we, .pix_addr, .pix_row, .frame_done,
    .safe_65, .busy, .copy_done, .clk_video, .rd_addr, .rd_row);

  int frame[2][N];
  int copies = 0;
  always @(posedge clk) if (copy_done) copies++;

  task automatic write_frame(int f);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      frame[f][i] = $urandom_range(0, 1023);
      pix_we = 1; pix_addr = 4'(i); pix_row = 10'(frame[f][i]);
    end
    @(negedge clk); pix_we = 0;
    @(negedge clk); frame_done = 1;
    @(negedge clk); frame_done = 0;
  endtask

  task automatic check_display(int f, string what);
    for (int i = 0; i < N; i++) begin
      @(negedge clk_video); rd_addr = 4'(i);
      @(negedge clk_video);
      checks++;
      if (int'(rd_row) != frame[f][i]) begin failures++; $display("%s col %0d: %0d vs %0d", what, i, rd_row, frame[f][i]); end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t;
  initial begin
    pix_we = 0; pix_addr = 0; pix_row = 0; frame_done = 0; safe_65 = 0; rd_addr = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) frame[0][i] = 0;
    write_frame(1);
    repeat (50) @(negedge clk);
    checks++;
    if (!busy || copies != 0) begin failures++; $display("copied without the window"); end
    check_display(0, "old frame");
    @(negedge clk_video); safe_65 = 1;
    t = 0;
    while (busy && t < 200) begin @(negedge clk); t++; end
    @(negedge clk_video); safe_65 = 0;
    checks++;
    if (copies != 1 || t > N + 6) begin failures++; $display("copy: %0d copies, %0d clocks", copies, t); end
    check_display(1, "new frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
