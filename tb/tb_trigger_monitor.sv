// tb_trigger_monitor: feeds random walks and steps around a threshold and compares the
// trigger output, after every sample, with a reference evaluation of the three-sample
// rule (middle sample within +/-5 codes of the threshold; newest above oldest for a
// rising edge, below for a falling edge). Also checks that a clean rising ramp fires
// only on the rising setting.
module tb_trigger_monitor;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [11:0] threshold, sample;
  logic        new_sample, edge_falling, triggered;
  int checks = 0, failures = 0;

  trigger_monitor dut (.clk, .rst, .threshold, .sample, .new_sample, .edge_falling, .triggered);

  int hist[$];
  int fired_rise = 0, fired_fall = 0;

  function automatic bit expect_fire(int thr, bit fall);
    int n, m, o;
    if (hist.size() < 3) return 0;
    n = hist[hist.size()-1]; m = hist[hist.size()-2]; o = hist[hist.size()-3];
    if (m < thr - 5 || m > thr + 5) return 0;
    return fall ? (n < o) : (n > o);
  endfunction

  task automatic push(int v);
    @(negedge clk);
    sample = 12'(v);
    new_sample = 1;
    @(negedge clk);   // the window has shifted
    new_sample = 0;
    hist.push_back(v);
    @(negedge clk);   // triggered reflects the new window
    checks++;
    if (triggered !== expect_fire(int'(threshold), edge_falling)) begin
      failures++;
      $display("sample %0d thr %0d fall %0d: got %0d", v, threshold, edge_falling, triggered);
    end
    if (triggered && !edge_falling) fired_rise++;
    if (triggered && edge_falling) fired_fall++;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int v;
  initial begin
    threshold = 12'd2048; sample = 0; new_sample = 0; edge_falling = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    // a rising ramp in steps of 3 through the threshold
    for (int i = 0; i < 20; i++) push(2020 + 3*i);
    checks++;
    if (fired_rise == 0) begin failures++; $display("ramp never fired"); end
    // random walks near a random threshold, both edge settings
    for (int run = 0; run < 40; run++) begin
      threshold = 12'($urandom_range(10, 4085));
      edge_falling = run[0];
      v = int'(threshold) + $urandom_range(0, 40) - 20;
      for (int i = 0; i < 30; i++) begin
        v = v + $urandom_range(0, 8) - 4;
        if (v < 0) v = 0;
        if (v > 4095) v = 4095;
        push(v);
      end
    end
    checks++;
    if (fired_fall == 0) begin failures++; $display("falling never fired"); end
    $display("fired rising %0d falling %0d", fired_rise, fired_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
