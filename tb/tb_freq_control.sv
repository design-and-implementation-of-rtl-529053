// tb_freq_control: self-checking test of keyboard entry and control-word
// conversion.
//
// Types frequencies as key strobes and checks, on the clock edge of ENTER,
// fcw = round(f * 2^32 / 48 MHz) worked out here in 64-bit integer
// arithmetic, freq_hz and the displayed digits. Covers: plain entry, entry
// above 160 kHz (clamped and 160000 shown), a seventh digit (ignored), CLEAR
// (entry zeroed, frequency kept), a new entry after ENTER, 0 Hz, the 5 Hz
// step (adjacent 5 Hz steps give distinct control words) and 2000 random
// frequencies in range.
module tb_freq_control;

  localparam int unsigned DIGITS  = 6;
  localparam longint      FCLK    = 48_000_000;
  localparam int unsigned F_MAX   = 160_000;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               key_valid = 1'b0;
  dds_pkg::key_code_t key_code = dds_pkg::KEY_0;
  logic [31:0]        fcw;
  logic [17:0]        freq_hz;
  dds_pkg::bcd_t      disp_bcd [DIGITS];

  int checks = 0, failures = 0;
  int n_clamp = 0;

  freq_control dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned fcw_ref(longint unsigned f);
    return (f * 64'd8589934592 + FCLK) / (2 * FCLK);   // round(f*2^32/FCLK)
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic press(dds_pkg::key_code_t k);
    @(negedge clk);
    key_valid = 1'b1;
    key_code  = k;
    @(negedge clk);
    key_valid = 1'b0;
    repeat ($urandom_range(2)) @(negedge clk);
  endtask

  // type the decimal digits of v (no leading zeros, "0" for 0)
  task automatic type_number(longint unsigned v);
    string s;
    s.itoa(v);
    for (int i = 0; i < s.len(); i++) press(dds_pkg::key_code_t'(s[i] - "0"));
  endtask

  task automatic check_display(longint unsigned v);
    for (int i = 0; i < DIGITS; i++) begin
      check($sformatf("display digit %0d", i), longint'(disp_bcd[i]), longint'(v % 10));
      v = v / 10;
    end
  endtask

  // enter v and check the applied word and frequency
  task automatic enter(longint unsigned v);
    longint unsigned f;
    logic [31:0] fcw_before;
    f = (v > F_MAX) ? F_MAX : v;
    if (v > F_MAX) n_clamp++;
    type_number(v);
    fcw_before = fcw;
    @(negedge clk);
    key_valid = 1'b1;
    key_code  = dds_pkg::KEY_ENTER;
    // nothing applied before the edge
    #1 check("fcw before ENTER edge", longint'(fcw), longint'(fcw_before));
    @(posedge clk);
    #1;
    check($sformatf("fcw for %0d Hz", f), longint'(fcw), longint'(fcw_ref(f)));
    check("freq_hz", longint'(freq_hz), longint'(f));
    @(negedge clk);
    key_valid = 1'b0;
    check_display(f);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check("fcw after reset", longint'(fcw), 0);
    check_display(0);

    // the 10 kHz tone used as the design's simulation example
    enter(10_000);
    check("10 kHz word", longint'(fcw), 894785);

    // a new entry after ENTER starts over
    enter(150_000);
    enter(160_000);
    check("160 kHz word", longint'(fcw), 14316558);

    // above the range: clamped
    enter(999_999);
    enter(160_001);

    // seven digits: the seventh is ignored
    type_number(1_234_567);
    check_display(123_456);
    press(dds_pkg::KEY_CLEAR);
    check_display(0);
    check("CLEAR keeps frequency", longint'(freq_hz), 160_000);
    type_number(12);
    check_display(12);
    press(dds_pkg::KEY_CLEAR);
    enter(12_345);

    // 0 Hz and the smallest steps
    enter(0);
    enter(5);
    enter(1);

    // 5 Hz step gives distinct control words all over the range
    for (int f = 0; f < 160_000; f += 4_995) begin
      logic [31:0] w1;
      enter(longint'(f));
      w1 = fcw;
      enter(longint'(f + 5));
      checks++;
      if (fcw == w1) begin failures++; $display("FAIL 5 Hz step not resolved at %0d", f); end
    end

    // random frequencies
    for (int n = 0; n < 2000; n++) enter(longint'($urandom_range(F_MAX)));

    check("clamps seen", longint'(n_clamp > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
