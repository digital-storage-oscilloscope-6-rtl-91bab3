// tb_xadc_handler: drives the DRP reader with the ADC model. At full rate every
// conversion must yield one sample pair equal to the converted codes, read from
// registers 0x13 and 0x1B; at timescale 1 only every 11th conversion is passed on.
module tb_xadc_handler;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0]  timescale;
  logic [6:0]  drp_addr;
  logic        drp_en, drp_ready, eoc;
  logic [15:0] drp_do;
  logic [11:0] sample_a, sample_b, code_a, code_b;
  logic        sample_valid;
  int unsigned conversions;
  int checks = 0, failures = 0;

  xadc_model #(.PERIOD(100), .LATENCY(4)) u_model (
    .clk, .rst, .code_a, .code_b, .daddr(drp_addr), .den(drp_en),
    .dout(drp_do), .drdy(drp_ready), .eoc, .conversions);

  xadc_handler dut (.clk, .rst, .timescale, .drp_addr, .drp_en, .drp_do, .drp_ready, .eoc,
                    .sample_a, .sample_b, .sample_valid);

  // codes follow the conversion count so each pair is identifiable
  always_comb begin
    code_a = 12'(conversions * 7 + 100);
    code_b = 12'(4000 - conversions * 5);
  end

  logic [11:0] exp_a, exp_b;
  int valid_count = 0;
  always @(posedge clk) if (!rst && eoc) begin
    exp_a <= 12'(conversions * 7 + 100 - 7);
    exp_b <= 12'(4000 - (conversions - 1) * 5);
  end

  // the addresses read
  int reads_a = 0, reads_b = 0;
  always @(posedge clk) if (drp_en) begin
    if (drp_addr == 7'h13) reads_a++;
    else if (drp_addr == 7'h1B) reads_b++;
  end

  always @(posedge clk) if (sample_valid) begin
    valid_count++;
    checks++;
    if (sample_a !== exp_a || sample_b !== exp_b) begin
      failures++;
      $display("mismatch: got %0d/%0d expected %0d/%0d", sample_a, sample_b, exp_a, exp_b);
    end
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c0, v0;
  initial begin
    timescale = 3'd0;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (100 * 50) @(posedge clk);
    checks++;
    if (valid_count < 48 || valid_count > 50) begin failures++; $display("rate 0: %0d", valid_count); end
    checks++;
    if (reads_a != reads_b || reads_a < 48) begin failures++; $display("reads %0d %0d", reads_a, reads_b); end
    // decimation: keep one, skip ten
    timescale = 3'd1;
    repeat (100 * 30) @(posedge clk);
    c0 = conversions; v0 = valid_count;
    repeat (100 * 110) @(posedge clk);
    checks++;
    if (valid_count - v0 != 10) begin
      failures++; $display("decimated count %0d in %0d conversions", valid_count - v0, conversions - c0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
