// dds_top: FPGA direct digital synthesizer producing a sine wave of
// keyboard-selected frequency (0..160 kHz, resolution 48 MHz/2^32 = 0.011 Hz).
//
// Data path, all on the one system clock clk (48 MHz):
//   keyboard keys -> freq_control -> fcw (32 bit) -> phase_accumulator
//   -> phase[31:24] -> sine_rom -> dac_data (8 bit) -> external D/A converter
//   and low-pass filter;   freq_control -> led_display -> seg (LED digits).
// The output frequency is f_out = FCLK_HZ * fcw / 2^N. The block structure,
// the 48 MHz clock, the 32-bit four-slice pipelined accumulator, the 8-bit ROM
// address and the 8-bit amplitude follow the design's specification; the key
// encoding, the seven-segment display and the reset are this design's own.
//
// Interface: key_valid/key_code carry decoded key presses (see dds_pkg).
// dac_data is a new offset-binary sample every clock; cycle_done pulses when
// the accumulator overflows, i.e. once per output period, a clock ahead of the
// ROM sample read at the wrapped phase. fcw and freq_hz show the control word and
// the frequency (Hz) in use.
// Timing: a frequency applied by ENTER is registered on that clock edge and
// reaches dac_data 5 clocks later (1 accumulator add + 3 pipeline alignment
// + 1 ROM read); the phase stays continuous across a frequency change.
module dds_top #(
  parameter int unsigned FCLK_HZ = dds_pkg::FCLK_HZ,
  parameter int unsigned N       = dds_pkg::PHASE_W,
  parameter int unsigned DW      = dds_pkg::SAMPLE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               key_valid,
  input  dds_pkg::key_code_t key_code,
  output logic [DW-1:0]      dac_data,
  output logic [6:0]         seg [dds_pkg::DISP_DIGITS],
  output logic [N-1:0]       fcw,
  output logic [dds_pkg::FREQ_W-1:0] freq_hz,
  output logic               cycle_done
);

  localparam int unsigned AW = dds_pkg::ROM_AW;

  logic [N-1:0]                  phase;
  dds_pkg::bcd_t                 disp_bcd [dds_pkg::DISP_DIGITS];

  freq_control #(
    .FCLK_HZ (FCLK_HZ),
    .N       (N)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .key_valid(key_valid),
    .key_code (key_code),
    .fcw      (fcw),
    .freq_hz  (freq_hz),
    .disp_bcd (disp_bcd)
  );

  led_display u_led (
    .bcd(disp_bcd),
    .seg(seg)
  );

  phase_accumulator #(
    .N      (N),
    .SLICE_W(dds_pkg::SLICE_W)
  ) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .fcw  (fcw),
    .phase(phase),
    .wrap (cycle_done)
  );

  sine_rom #(
    .AW(AW),
    .DW(DW)
  ) u_rom (
    .clk (clk),
    .addr(phase[N-1 -: AW]),
    .data(dac_data)
  );

endmodule
