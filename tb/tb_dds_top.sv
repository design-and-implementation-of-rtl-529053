// tb_dds_top: end-to-end test of the DDS at its default parameters
// (48 MHz clock, 32-bit accumulator, 8-bit samples).
//
// Keys are typed into the design as a user would; a reference model in the
// testbench follows the same key presses: it converts the entered frequency
// to a control word (64-bit integer arithmetic), accumulates the phase in a
// single 32-bit step, and looks the sample up in a real-valued sine. Every
// clock the 8-bit DAC sample must equal the model's sample 4 clocks earlier
// in the phase (3 clocks of slice alignment + 1 of ROM read), and cycle_done
// must match the model's overflows. The LED segments are checked after each
// entry.
// Operation: reset (0 Hz), then 10 kHz for two output periods (9600 clocks),
// a switch to 160 kHz typed as 999999 (clamped), a CLEAR while the tone runs,
// a seven-digit entry (seventh ignored), 12.345 kHz, 5 Hz, and back to 0 Hz.
// The count of each mechanism (digit entry, ENTER, clamp, CLEAR, ignored
// digit, accumulator overflow, frequency switch) must be non-zero.
module tb_dds_top;

  localparam longint FCLK  = 48_000_000;
  localparam int     F_MAX = 160_000;
  localparam int     LAT   = 4;      // phase -> sample delay after the accumulator add
  localparam real    PI    = 3.14159265358979323846;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               key_valid = 1'b0;
  dds_pkg::key_code_t key_code = dds_pkg::KEY_0;
  logic [7:0]         dac_data;
  logic [6:0]         seg [6];
  logic [31:0]        fcw;
  logic [17:0]        freq_hz;
  logic               cycle_done;

  dds_top dut (.*);

  always #10.417 clk = ~clk;   // about 48 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_digit = 0, n_enter = 0, n_clamp = 0, n_clear = 0, n_ignored = 0;
  int n_wrap = 0, n_switch = 0;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // ---------------- reference model ----------------
  logic [31:0] m_fcw = '0;            // control word in use
  logic [31:0] m_acc = '0;            // accumulator after each edge
  logic [31:0] m_hist [16];           // accumulator history
  logic        m_cy   [16];           // overflow that produced it
  int unsigned m_k = 0;               // edges since reset
  // entry state of the model
  longint      m_entry = 0;
  int          m_ndig = 0;
  bit          m_fresh = 0;
  logic [31:0] m_fcw_next;
  bit          m_apply = 0;

  function automatic int sine_ref(int a);
    return int'($floor(127.5 + 127.5 * $sin(2.0 * PI * a / 256.0) + 0.5));
  endfunction

  function automatic logic [31:0] fcw_ref(longint f);
    return 32'((f * 64'd8589934592 + FCLK) / (2 * FCLK));
  endfunction

  // model the key the design sees on this clock edge
  task automatic model_key(dds_pkg::key_code_t k);
    if (k <= dds_pkg::KEY_9) begin
      n_digit++;
      if (m_fresh) begin m_entry = k; m_ndig = 1; m_fresh = 0; end
      else if (m_ndig < 6) begin m_entry = m_entry * 10 + k; m_ndig++; end
      else n_ignored++;
    end else if (k == dds_pkg::KEY_ENTER) begin
      n_enter++;
      if (m_entry > F_MAX) begin n_clamp++; m_entry = F_MAX; end
      m_fcw_next = fcw_ref(m_entry);
      m_apply = 1;
      m_fresh = 1;
    end else if (k == dds_pkg::KEY_CLEAR) begin
      n_clear++;
      m_entry = 0; m_ndig = 0; m_fresh = 0;
    end
  endtask

  // step the model and compare, just after each rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      logic [32:0] s;
      if (key_valid) model_key(key_code);
      s = {1'b0, m_acc} + {1'b0, m_fcw};
      m_acc = s[31:0];
      m_k++;
      m_hist[m_k % 16] = m_acc;
      m_cy[m_k % 16]   = s[32];
      if (m_apply) begin
        if (m_fcw_next != m_fcw && m_k > 1) n_switch++;
        m_fcw = m_fcw_next;
        m_apply = 0;
      end
      #1;
      check("fcw", longint'(fcw), longint'(m_fcw));
      if (m_k > LAT) begin
        check("dac_data", longint'(dac_data), longint'(sine_ref(int'(m_hist[(m_k - LAT) % 16][31:24]))));
        check("cycle_done", longint'(cycle_done), longint'(m_cy[(m_k - 3) % 16]));
        if (cycle_done) n_wrap++;
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic press(dds_pkg::key_code_t k);
    @(negedge clk);
    key_valid = 1'b1;
    key_code  = k;
    @(negedge clk);
    key_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic type_number(longint v);
    string s;
    s.itoa(v);
    for (int i = 0; i < s.len(); i++) press(dds_pkg::key_code_t'(s[i] - "0"));
  endtask

  function automatic logic [6:0] seg_ref(int d);
    case (d)
      0: return 7'h3F; 1: return 7'h06; 2: return 7'h5B; 3: return 7'h4F; 4: return 7'h66;
      5: return 7'h6D; 6: return 7'h7D; 7: return 7'h07; 8: return 7'h7F; 9: return 7'h6F;
      default: return 7'h00;
    endcase
  endfunction

  task automatic check_leds(longint v);
    for (int i = 0; i < 6; i++) begin
      check($sformatf("led digit %0d", i), longint'(seg[i]), longint'(seg_ref(int'(v % 10))));
      v = v / 10;
    end
  endtask

  task automatic set_freq(longint v);
    type_number(v);
    press(dds_pkg::KEY_ENTER);
    check("freq_hz", longint'(freq_hz), (v > F_MAX) ? F_MAX : v);
    check_leds((v > F_MAX) ? F_MAX : v);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // 0 Hz: the output sits at phase 0
    repeat (20) @(negedge clk);
    check("idle sample", longint'(dac_data), 128);

    // 10 kHz: 4800 clocks per period, run two periods
    set_freq(10_000);
    begin
      int w0;
      w0 = n_wrap;
      repeat (9600) @(negedge clk);
      check("10 kHz periods", longint'(n_wrap - w0), 2);
    end

    // switch to the top of the range, typed too large
    set_freq(999_999);
    begin
      int w0;
      w0 = n_wrap;
      repeat (3000) @(negedge clk);
      // a period is 2^32/14316558 = 300.00001 clocks: 9 or 10 overflows
      check("160 kHz periods in 3000 clocks", longint'((n_wrap - w0) inside {9, 10}), 1);
    end

    // CLEAR while the tone runs, then a seven-digit entry
    press(dds_pkg::KEY_CLEAR);
    check_leds(0);
    check("CLEAR keeps frequency", longint'(freq_hz), F_MAX);
    type_number(1_234_567);
    check_leds(123_456);
    press(dds_pkg::KEY_CLEAR);

    set_freq(12_345);
    repeat (4000) @(negedge clk);
    set_freq(5);
    repeat (500) @(negedge clk);
    set_freq(0);
    repeat (50) @(negedge clk);

    // every mechanism must have happened
    check("digit entries", longint'(n_digit > 0), 1);
    check("ENTER", longint'(n_enter > 0), 1);
    check("clamp", longint'(n_clamp > 0), 1);
    check("CLEAR", longint'(n_clear > 0), 1);
    check("ignored digit", longint'(n_ignored > 0), 1);
    check("accumulator overflow", longint'(n_wrap > 0), 1);
    check("frequency switch", longint'(n_switch > 0), 1);
    $display("mechanisms: digits=%0d enter=%0d clamp=%0d clear=%0d ignored=%0d overflow=%0d switch=%0d",
             n_digit, n_enter, n_clamp, n_clear, n_ignored, n_wrap, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
