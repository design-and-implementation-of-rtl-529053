// freq_control: input and display control of the DDS.
//
// Turns keyboard entry of an output frequency into the phase accumulator's
// frequency control word and hands the frequency to the LED display. The
// design specifies only that function; the key set and the entry procedure
// are this design's own:
//   * digit keys 0-9 shift a decimal digit in from the right (at most DIGITS
//     digits, further digits are ignored); the first digit after ENTER starts
//     a new entry;
//   * ENTER applies the entry: it is clamped to F_MAX_HZ (160 kHz), the
//     clamped value is shown, and the control word
//         fcw = round(f * 2^N / FCLK_HZ)
//     is registered, so the new frequency reaches the accumulator on the
//     clock after the key strobe;
//   * CLEAR zeroes the entry shown; the frequency in use is unchanged.
// The division by the clock frequency is a multiplication by the constant
// M = round(2^(N+S)/FCLK_HZ) with S = 40 fraction bits, which is exact
// rounding for every frequency below 2^FREQ_W at the 48 MHz default clock.
// Interface: key_valid is a one-clock strobe qualifying key_code (decoded by
// the keyboard interface outside this block). Asynchronous active-low reset
// (a choice of this design) sets the entry, freq_hz and fcw to 0.
// Since freq_hz never exceeds 160 kHz (checked by an assertion), the top
// bits of fcw are always 0 at the default clock; they are kept so that the
// word width matches the accumulator. The assertion samples rst_n through
// `disable iff`, which lint reports as rst_n used both synchronously and
// asynchronously; that use is simulation-only and adds no flip-flop.
module freq_control #(
  parameter int unsigned FCLK_HZ  = dds_pkg::FCLK_HZ,
  parameter int unsigned N        = dds_pkg::PHASE_W,
  parameter int unsigned F_MAX_HZ = dds_pkg::F_MAX_HZ,
  parameter int unsigned FREQ_W   = dds_pkg::FREQ_W,
  parameter int unsigned DIGITS   = dds_pkg::DISP_DIGITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              key_valid,
  input  dds_pkg::key_code_t key_code,
  output logic [N-1:0]      fcw,
  output logic [FREQ_W-1:0] freq_hz,
  output dds_pkg::bcd_t     disp_bcd [DIGITS]
);

  // Binary value of a full DIGITS-digit entry needs this many bits.
  localparam int unsigned ENTRY_W = $clog2(10 ** DIGITS);
  localparam int unsigned FRAC    = 40;
  localparam int unsigned PROD_W  = FREQ_W + N + FRAC;
  localparam logic [PROD_W-1:0] MULT =
      ((PROD_W'(1) << (N + FRAC)) + PROD_W'(FCLK_HZ / 2)) / PROD_W'(FCLK_HZ);

  initial assert (F_MAX_HZ < 2 ** FREQ_W && F_MAX_HZ < 10 ** DIGITS)
    else $error("F_MAX_HZ does not fit FREQ_W bits or DIGITS digits");

  // Decimal digits of F_MAX_HZ, shown when an entry is clamped.
  function automatic dds_pkg::bcd_t max_digit(int unsigned pos);
    return dds_pkg::bcd_t'((F_MAX_HZ / (10 ** pos)) % 10);
  endfunction

  dds_pkg::bcd_t                entry_bcd [DIGITS];
  logic [ENTRY_W-1:0]  entry_bin;
  logic [$clog2(DIGITS+1)-1:0] n_digits;
  logic                fresh;      // last key was ENTER: next digit restarts

  logic                is_digit;
  logic [FREQ_W-1:0]   f_applied;
  logic                clamp;
  logic [PROD_W-1:0]   prod;
  logic [N-1:0]        fcw_next;

  assign is_digit  = (key_code <= dds_pkg::KEY_9);
  assign clamp     = (entry_bin > ENTRY_W'(F_MAX_HZ));
  assign f_applied = clamp ? FREQ_W'(F_MAX_HZ) : FREQ_W'(entry_bin);
  // Rounded product; bits below FRAC are the discarded fraction and the top
  // FREQ_W bits are zero for any frequency in range.
  assign prod      = PROD_W'(f_applied) * MULT + (PROD_W'(1) << (FRAC - 1));
  assign fcw_next  = prod[FRAC +: N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIGITS; i++) entry_bcd[i] <= '0;
      entry_bin <= '0;
      n_digits  <= '0;
      fresh     <= 1'b0;
      freq_hz   <= '0;
      fcw       <= '0;
    end else if (key_valid) begin
      if (is_digit) begin
        if (fresh) begin
          // start a new entry with this digit
          entry_bcd[0] <= key_code;
          for (int i = 1; i < DIGITS; i++) entry_bcd[i] <= '0;
          entry_bin <= ENTRY_W'(key_code);
          n_digits  <= 1;
          fresh     <= 1'b0;
        end else if (32'(n_digits) < DIGITS) begin
          entry_bcd[0] <= key_code;
          for (int i = 1; i < DIGITS; i++) entry_bcd[i] <= entry_bcd[i-1];
          entry_bin <= ENTRY_W'(entry_bin * 10 + ENTRY_W'(key_code));
          n_digits  <= n_digits + 1'b1;
        end
      end else if (key_code == dds_pkg::KEY_ENTER) begin
        freq_hz <= f_applied;
        fcw     <= fcw_next;
        fresh   <= 1'b1;
        if (clamp) begin
          for (int i = 0; i < DIGITS; i++) entry_bcd[i] <= max_digit(i);
          entry_bin <= ENTRY_W'(F_MAX_HZ);
        end
      end else if (key_code == dds_pkg::KEY_CLEAR) begin
        for (int i = 0; i < DIGITS; i++) entry_bcd[i] <= '0;
        entry_bin <= '0;
        n_digits  <= '0;
        fresh     <= 1'b0;
      end
    end
  end

  assign disp_bcd = entry_bcd;

  // The applied frequency never leaves the specified range.
  a_freq_in_range: assert property (@(posedge clk) disable iff (!rst_n) freq_hz <= FREQ_W'(F_MAX_HZ))
    else $error("applied frequency %0d above %0d Hz", freq_hz, F_MAX_HZ);

endmodule
