// tb_circular_buffer_manager: N = 20. Samples carry their sequence number. For several
// captures with the trigger raised at a chosen sample, the testbench keeps its own copy
// of the RAM from the write port and checks, once frame_ready rises, that the N words
// from start_addr (wrapping) are the N/2 samples before the triggering one, the
// triggering one and the N/2-1 after it, in order; that no write happens while
// frame_ready is high; and that conversion_done starts a fresh capture.
module tb_circular_buffer_manager;
  localparam int N = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] sample, wr_data;
  logic        sample_ready, trigger, conversion_done, wr_en, frame_ready;
  logic [4:0]  wr_addr, start_addr;
  logic [11:0] ram [N];

  circular_buffer_manager #(.N(N)) dut (.clk, .rst, .sample, .sample_ready, .trigger,
    .conversion_done, .wr_en, .wr_addr, .wr_data, .frame_ready, .start_addr);

  // the last sample's write is issued together with frame_ready; any later one is wrong
  logic frame_ready_d = 0;
  always @(posedge clk) begin
    frame_ready_d <= frame_ready;
    if (wr_en) begin
      ram[wr_addr] <= wr_data;
      if (frame_ready && frame_ready_d) begin failures++; $display("write while frame held"); end
    end
  end

  int seq = 0;
  task automatic feed(bit trig);
    @(negedge clk);
    sample = 12'(seq); sample_ready = 1; trigger = trig;
    @(negedge clk);
    sample_ready = 0; trigger = 0;
    seq++;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int trig_seq, pre;
  initial begin
    sample = 0; sample_ready = 0; trigger = 0; conversion_done = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cap = 0; cap < 6; cap++) begin
      pre = (cap == 0) ? 0 : $urandom_range(0, 15);
      // a trigger offered during the first N/2 samples is ignored
      for (int i = 0; i < N/2; i++) feed(i == 3);
      for (int i = 0; i < pre; i++) feed(0);
      trig_seq = seq;
      feed(1);
      while (!frame_ready) feed($urandom_range(0, 1));
      @(negedge clk);
      checks++;
      if (seq != trig_seq + N/2) begin failures++; $display("frame after %0d samples past trigger", seq - trig_seq); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(ram[(int'(start_addr) + i) % N]) != trig_seq - N/2 + i) begin
          failures++;
          $display("cap %0d word %0d: %0d expected %0d", cap, i, ram[(int'(start_addr) + i) % N], trig_seq - N/2 + i);
        end
      end
      // samples offered now are dropped
      feed(1); feed(0);
      @(negedge clk); conversion_done = 1;
      @(negedge clk); conversion_done = 0;
      checks++;
      if (frame_ready) begin failures++; $display("frame_ready stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
