// tb_interfacing_handler: with short debounce counts (buttons 40, knob lines 6), turns
// the four knobs by random amounts in both directions (with contact bounce on the
// lines), presses the knob buttons and flips switches, and keeps its own copy of every
// setting to compare against: voltage scale 0..7, timescale 0..4, ground rows in steps
// of 10 within 8..708 for the channel chosen by sw[2], threshold codes 0..4088 in steps of
// 8 (0..998 mV), the threshold in mV (code*1000/4096, rounded down), the switch-driven flags, the
// manual trigger button and the LEDs.
module tb_interfacing_handler;
  import dso_pkg::*;
  localparam int BTN_DB = 40, ENC_DB = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] sw = 0, led;
  logic btnu = 0;
  logic [3:0] enc_a = 0, enc_b = 0, enc_btn = 4'hF;
  settings_t settings;

  interfacing_handler #(.BUTTON_DEBOUNCE(BTN_DB), .ENCODER_DEBOUNCE(ENC_DB)) dut (
    .clk, .rst, .sw, .btnu, .enc_a, .enc_b, .enc_btn, .settings, .led);

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  int m_vs = 0, m_ts = 0, m_offa = 288, m_offb = 498, m_thr = 2048;

  task automatic settle(int n); repeat (n) @(negedge clk); endtask

  task automatic line_bounce(int k, bit is_a, logic v);
    // a few short glitches to the new level, then the level itself
    repeat ($urandom_range(0, 2)) begin
      if (is_a) enc_a[k] = v; else enc_b[k] = v;
      settle($urandom_range(1, ENC_DB - 2));
      if (is_a) enc_a[k] = !v; else enc_b[k] = !v;
      settle($urandom_range(1, 3));
    end
    if (is_a) enc_a[k] = v; else enc_b[k] = v;
    settle(ENC_DB + 6);
  endtask

  task automatic turn(int k, bit cw);
    if (cw) begin line_bounce(k, 1, 1); line_bounce(k, 0, 1); line_bounce(k, 1, 0); line_bounce(k, 0, 0); end
    else    begin line_bounce(k, 0, 1); line_bounce(k, 1, 1); line_bounce(k, 0, 0); line_bounce(k, 1, 0); end
    // model update
    case (k)
      0: m_vs = cw ? (m_vs < 7 ? m_vs + 1 : 7) : (m_vs > 0 ? m_vs - 1 : 0);
      1: if (!sw[2]) m_offa = cw ? (m_offa >= 18 ? m_offa - 10 : m_offa) : (m_offa + 10 <= 708 ? m_offa + 10 : m_offa);
         else        m_offb = cw ? (m_offb >= 18 ? m_offb - 10 : m_offb) : (m_offb + 10 <= 708 ? m_offb + 10 : m_offb);
      2: m_thr = cw ? (m_thr < 4088 ? m_thr + 8 : m_thr) : (m_thr > 0 ? m_thr - 8 : 0);
      default: m_ts = cw ? (m_ts < 4 ? m_ts + 1 : 4) : (m_ts > 0 ? m_ts - 1 : 0);
    endcase
  endtask

  task automatic press(int k);
    enc_btn[k] = 0;
    settle(BTN_DB + 6);
    enc_btn[k] = 1;
    settle(BTN_DB + 6);
    case (k)
      0: m_vs = 0;
      1: if (!sw[2]) m_offa = 288; else m_offb = 498;
      2: m_thr = 2048;
      default: m_ts = 0;
    endcase
  endtask

  task automatic compare(string what);
    int code;
    checks++;
    code = int'(settings.threshold_code);
    if (int'(settings.voltage_scale) != m_vs || int'(settings.timescale) != m_ts ||
        int'(settings.offset_a) != m_offa || int'(settings.offset_b) != m_offb ||
        code != m_thr || int'(settings.threshold_mv) != m_thr * 1000 / 4096 || settings.edge_falling != sw[3] ||
        settings.channel_select != sw[1] || settings.run_mode != sw[15] ||
        settings.filter_enable != sw[0] || settings.ac_coupling != sw[13] ||
        settings.atten_a != sw[14] || settings.atten_b != sw[14] ||
        led != {sw[15:8], sw[3], sw[1], 3'(m_vs), 3'(m_ts)}) begin
      failures++;
      $display("%s: vs %0d/%0d ts %0d/%0d offa %0d/%0d offb %0d/%0d thr %0d/%0d code %0d led %h",
               what, settings.voltage_scale, m_vs, settings.timescale, m_ts, settings.offset_a, m_offa,
               settings.offset_b, m_offb, settings.threshold_mv, m_thr, code, led);
    end
  endtask

  initial begin
    settle(4);
    rst = 0;
    settle(BTN_DB + 10);
    compare("after reset");
    for (int step = 0; step < 400; step++) begin
      int what;
      what = $urandom_range(0, 9);
      if (what < 6) begin
        int k, n;
        bit cw;
        k = $urandom_range(0, 3);
        cw = $urandom_range(1);
        n = $urandom_range(1, (k == 1) ? 80 : (k == 2) ? 300 : 6);
        repeat (n) turn(k, cw);
        compare($sformatf("step %0d knob %0d %s x%0d", step, k + 1, cw ? "cw" : "ccw", n));
      end else if (what < 8) begin
        press($urandom_range(0, 3));
        compare($sformatf("step %0d button", step));
      end else begin
        sw = 16'($urandom());
        settle(4);
        compare($sformatf("step %0d switches %h", step, sw));
      end
    end
    // manual trigger: follows btnu after debouncing, ignores short glitches
    btnu = 1; settle(BTN_DB / 2); btnu = 0; settle(BTN_DB + 6);
    checks++;
    if (settings.manual_trigger) begin failures++; $display("btnu glitch passed"); end
    btnu = 1; settle(BTN_DB + 6);
    checks++;
    if (!settings.manual_trigger) begin failures++; $display("btnu press lost"); end
    btnu = 0; settle(BTN_DB + 6);
    checks++;
    if (settings.manual_trigger) begin failures++; $display("btnu release lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
