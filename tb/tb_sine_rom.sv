// tb_sine_rom: self-checking test of the sine lookup table.
//
// Reads every address in order and then in random order, and compares the
// registered output one clock later with round(127.5 * (1 + sin(2*pi*k/256)))
// computed here in real arithmetic. Also checks the read latency: the output
// must not change prev the clock edge that follows the address, and must
// hold the extremes 0 and 255 at the quarter points.
module tb_sine_rom;

  localparam int unsigned AW = 8;
  localparam int unsigned DW = 8;
  localparam real PI = 3.14159265358979323846;

  logic          clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] data;

  int checks = 0, failures = 0;

  sine_rom #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sine_ref(int a);
    real v;
    v = 127.5 + 127.5 * $sin(2.0 * PI * a / 256.0);
    return int'($floor(v + 0.5));
  endfunction

  task automatic read_check(int a);
    logic [DW-1:0] prev;
    @(negedge clk);
    addr   = AW'(a);
    prev = data;
    #1;
    checks++;
    if (data !== prev) begin
      failures++;
      $display("FAIL output changed prev the clock edge at address %0d", a);
    end
    @(posedge clk);
    #1;
    checks++;
    if (int'(data) != sine_ref(a)) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d: got %0d expected %0d", a, data, sine_ref(a));
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) read_check(a);
    for (int n = 0; n < 2000; n++) read_check($urandom_range(255));
    // extremes
    read_check(64);
    checks++; if (data != 8'd255) begin failures++; $display("FAIL peak not 255"); end
    read_check(192);
    checks++; if (data != 8'd0) begin failures++; $display("FAIL trough not 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
