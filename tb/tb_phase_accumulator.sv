// tb_phase_accumulator: self-checking test of the pipelined phase accumulator.
//
// A reference accumulator in the testbench adds the same control word every
// clock in one 32-bit step; the pipelined block must show that value exactly
// LEVELS-1 = 3 clocks later, with wrap set on the step that overflowed.
// Phases: (1) control word 7 from reset, where the output must run
// 0, 7, 14, ..., 126 on consecutive clocks; (2) control words that carry
// through every slice (0xFFFFFFFF, 0x00FFFFFF + ...); (3) random words
// changed at random moments, to check that a change stays phase continuous.
// Inputs are driven on the falling edge and outputs checked just after the
// rising edge.
module tb_phase_accumulator;

  localparam int unsigned N      = 32;
  localparam int unsigned LAT    = 3;     // pipeline alignment delay
  localparam int unsigned HIST   = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] fcw = '0;
  logic [N-1:0] phase;
  logic         wrap;

  int checks = 0, failures = 0;
  int wraps_seen = 0;

  phase_accumulator #(.N(N), .SLICE_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic [N-1:0] ref_acc;
  logic [N-1:0] acc_hist [HIST];
  logic         wrap_hist [HIST];
  int unsigned  k;   // number of clock edges since reset

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at edge %0d: got %h expected %h", what, k, got, exp);
    end
  endtask

  // one clock: drive fcw, advance model, compare
  task automatic step(logic [N-1:0] x);
    logic [N:0] s;
    @(negedge clk);
    fcw = x;
    @(posedge clk);
    #1;
    s = {1'b0, ref_acc} + {1'b0, x};
    ref_acc = s[N-1:0];
    k++;
    acc_hist[k % HIST]  = ref_acc;
    wrap_hist[k % HIST] = s[N];
    if (k >= LAT) begin
      check("phase", phase, acc_hist[(k - LAT) % HIST]);
      check("wrap", N'(wrap), N'(wrap_hist[(k - LAT) % HIST]));
    end else begin
      check("phase during fill", phase, '0);
    end
    if (wrap) wraps_seen++;
  endtask

  initial begin
    ref_acc = '0;
    k = 0;
    for (int i = 0; i < HIST; i++) begin acc_hist[i] = '0; wrap_hist[i] = 1'b0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // (1) control word 7: the output must count 0, 7, ..., 126 on
    // consecutive clocks once the pipeline has filled.
    begin
      logic [N-1:0] seen [$];
      for (int i = 0; i < 22; i++) begin
        step(32'd7);
        seen.push_back(phase);
      end
      // the first LAT outputs are the fill; value 0 appears at edge LAT
      for (int j = 0; j <= 18; j++) check("count by 7", seen[LAT - 1 + j], N'(7 * j));
    end

    // (2) carries through all slices
    repeat (40) step(32'hFFFF_FFFF);
    repeat (40) step(32'h00FF_FFFF);
    repeat (40) step(32'h8000_0001);
    repeat (40) step(32'h0000_0100);

    // (3) random words, changed every 1..20 clocks
    for (int n = 0; n < 3000; n++) begin
      logic [N-1:0] x;
      int len;
      x   = $urandom();
      len = 1 + $urandom_range(19);
      if ($urandom_range(3) == 0) x = x >> $urandom_range(31);
      repeat (len) step(x);
    end

    checks++;
    if (wraps_seen < 100) begin
      failures++;
      $display("FAIL too few overflows seen: %0d", wraps_seen);
    end
    $display("overflows seen: %0d", wraps_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
