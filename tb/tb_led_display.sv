// tb_led_display: self-checking test of the seven-segment decoder.
//
// The expected patterns are built here from the list of lit segments of each
// numeral (a = top, b = upper right, c = lower right, d = bottom, e = lower
// left, f = upper left, g = middle), independently of the decoder's table.
// Every code 0..15 is applied to every digit position, alone and together
// with random codes on the other positions.
module tb_led_display;

  localparam int unsigned DIGITS = 6;

  dds_pkg::bcd_t bcd [DIGITS];
  logic [6:0]    seg [DIGITS];

  int checks = 0, failures = 0;

  led_display #(.DIGITS(DIGITS)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] mask(string lit);
    logic [6:0] m = '0;
    for (int i = 0; i < lit.len(); i++) m[lit[i] - "a"] = 1'b1;
    return m;
  endfunction

  function automatic logic [6:0] expected(int d);
    case (d)
      0: return mask("abcdef");
      1: return mask("bc");
      2: return mask("abdeg");
      3: return mask("abcdg");
      4: return mask("bcfg");
      5: return mask("acdfg");
      6: return mask("acdefg");
      7: return mask("abc");
      8: return mask("abcdefg");
      9: return mask("abcdfg");
      default: return '0;
    endcase
  endfunction

  initial begin
    int code [DIGITS];
    for (int rep = 0; rep < 50; rep++) begin
      for (int pos = 0; pos < DIGITS; pos++) begin
        for (int d = 0; d < 16; d++) begin
          for (int i = 0; i < DIGITS; i++) code[i] = (rep == 0) ? 0 : $urandom_range(15);
          code[pos] = d;
          for (int i = 0; i < DIGITS; i++) bcd[i] = 4'(code[i]);
          #1;
          for (int i = 0; i < DIGITS; i++) begin
            checks++;
            if (seg[i] !== expected(code[i])) begin
              failures++;
              if (failures < 10) $display("FAIL digit %0d code %0d: got %b expected %b",
                                          i, code[i], seg[i], expected(code[i]));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
