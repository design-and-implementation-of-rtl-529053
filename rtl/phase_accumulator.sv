// phase_accumulator: pipelined N-bit phase accumulator of a DDS.
//
// Every clock the frequency control word X (fcw) is added to the accumulated
// phase, so the phase advances by X/2^N of a period per clock and the output
// frequency is f_clk*X/2^N. To keep the carry chain short the N-bit sum is
// split into N/SLICE_W slices (four 8-bit slices by default), one per
// pipeline level, as the design specifies: each slice is an 8-bit adder with
// an 8-bit sum register and a 1-bit carry register that feeds the next slice
// one clock later. Slice i therefore works i clocks behind slice 0. A
// triangle of registers in front delays byte i of X by i clocks, and a
// triangle behind delays sum byte i by (LEVELS-1-i) clocks, so all bytes of
// `phase` belong to the same accumulation step.
//
// Timing: phase equals the value of an ordinary (unpipelined) accumulator
// LEVELS-1 clocks earlier (3 clocks for 32/8). A change of fcw is therefore
// seen at the output LEVELS clocks after it is applied, and the phase stays
// continuous across it. wrap is the carry out of the top slice (the
// accumulator overflowed: one output period is complete), aligned with phase.
// Reset (asynchronous, active low; a choice of this design) clears every
// register, so phase starts at 0.
module phase_accumulator #(
  parameter int unsigned N       = 32,
  parameter int unsigned SLICE_W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fcw,
  output logic [N-1:0] phase,
  output logic         wrap
);

  localparam int unsigned LEVELS = N / SLICE_W;

  initial assert (N % SLICE_W == 0 && LEVELS >= 1)
    else $error("N must be a multiple of SLICE_W");

  typedef logic [SLICE_W-1:0] slice_t;

  // Carry register of every slice; carry[i] feeds slice i+1.
  logic [LEVELS-1:0] carry;
  // Sum register of every slice.
  slice_t            acc [LEVELS];

  for (genvar i = 0; i < LEVELS; i++) begin : g_level
    // ---- input skew: byte i of X delayed by i clocks ----
    slice_t x_skew;
    if (i == 0) begin : g_noskew
      assign x_skew = fcw[SLICE_W-1:0];
    end else begin : g_skew
      slice_t xd [i];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < i; k++) xd[k] <= '0;
        end else begin
          xd[0] <= fcw[i*SLICE_W +: SLICE_W];
          for (int k = 1; k < i; k++) xd[k] <= xd[k-1];
        end
      end
      assign x_skew = xd[i-1];
    end

    // ---- slice adder: 8-bit full adder, 8-bit sum latch, 1-bit carry latch ----
    logic cin;
    if (i == 0) begin : g_cin0
      assign cin = 1'b0;
    end else begin : g_cin
      assign cin = carry[i-1];
    end

    logic [SLICE_W:0] sum;
    assign sum = {1'b0, acc[i]} + {1'b0, x_skew} + {{SLICE_W{1'b0}}, cin};

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[i]   <= '0;
        carry[i] <= 1'b0;
      end else begin
        acc[i]   <= sum[SLICE_W-1:0];
        carry[i] <= sum[SLICE_W];
      end
    end

    // ---- output deskew: sum byte i delayed by LEVELS-1-i clocks ----
    localparam int unsigned DLY = LEVELS - 1 - i;
    if (DLY == 0) begin : g_nodeskew
      assign phase[i*SLICE_W +: SLICE_W] = acc[i];
    end else begin : g_deskew
      slice_t yd [DLY];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < DLY; k++) yd[k] <= '0;
        end else begin
          yd[0] <= acc[i];
          for (int k = 1; k < DLY; k++) yd[k] <= yd[k-1];
        end
      end
      assign phase[i*SLICE_W +: SLICE_W] = yd[DLY-1];
    end
  end

  assign wrap = carry[LEVELS-1];

endmodule
