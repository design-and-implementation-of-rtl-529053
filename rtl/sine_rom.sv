// sine_rom: phase-to-amplitude lookup table of the DDS.
//
// A ROM holding one period of a sine wave sampled at 2^AW points, addressed
// by the top AW bits of the phase accumulator. Amplitudes are offset binary,
// 0 .. 2^DW-1 (00000000..11111111 for the 8-bit default):
//     data[k] = round((2^DW-1)/2 * (1 + sin(2*pi*k/2^AW)))
// The table is computed at elaboration by a constant function, so synthesis
// infers an initialised ROM and no data file is needed. The 8-bit address and
// 8-bit amplitude follow the design's specification; the one-clock registered
// read (address in, data out on the next rising edge, as an FPGA block ROM)
// is this design's choice.
module sine_rom #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  localparam int unsigned DEPTH = 2 ** AW;
  localparam real         PI    = 3.14159265358979323846;

  typedef logic [DW-1:0] table_t [DEPTH];

  function automatic table_t sine_table();
    table_t tab;
    for (int k = 0; k < DEPTH; k++) begin
      real s;
      s = $sin(2.0 * PI * real'(k) / real'(DEPTH));
      tab[k] = DW'($rtoi(((2.0 ** DW - 1.0) / 2.0) * (1.0 + s) + 0.5));
    end
    return tab;
  endfunction

  localparam table_t ROM = sine_table();

  always_ff @(posedge clk) begin
    data <= ROM[addr];
  end

endmodule
