// phase_accumulator_tb: self-checking test of the DDS phase accumulator.
//
// A reference phase, kept as an integer modulo 2^16, follows the same tuning
// words; after every edge the test compares the phase, the 12-bit ROM address
// (phase / 16) and the overflow flag. It then checks the output period the
// frequency formula predicts: with M = 8192 the phase must wrap every
// 65536 / 8192 = 8 clocks, and with M = 1 every 65536 clocks.
module phase_accumulator_tb;
  localparam int unsigned PHASE_W = 16;
  localparam int unsigned ADDR_W  = 12;

  logic               clk = 1'b0;
  logic               rst;
  logic [PHASE_W-1:0] ftw, phase;
  logic [ADDR_W-1:0]  addr;
  logic               wrap;
  int unsigned        ref_phase;
  bit                 ref_wrap;
  int                 checks = 0, failures = 0;

  phase_accumulator #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    int unsigned sum;
    @(posedge clk);
    sum       = ref_phase + int'(ftw);
    ref_wrap  = (sum >= 65536);
    ref_phase = sum % 65536;
    #1;
    checks++;
    if (phase != PHASE_W'(ref_phase) || addr != ADDR_W'(ref_phase / 16) || wrap != ref_wrap) begin
      failures++;
      $display("FAIL M=%0d: phase %0d addr %0d wrap %0b, expected %0d %0d %0b",
               ftw, phase, addr, wrap, ref_phase, ref_phase / 16, ref_wrap);
    end
  endtask

  // Count clocks between two wraps with a fixed M and compare with 2^16 / M.
  task automatic check_period(input int unsigned m);
    int unsigned n;
    ftw = PHASE_W'(m);
    do step_and_check(); while (!wrap);
    n = 0;
    do begin step_and_check(); n++; end while (!wrap);
    checks++;
    if (n != 65536 / m) begin
      failures++;
      $display("FAIL period for M=%0d: %0d clocks, expected %0d", m, n, 65536 / m);
    end
  endtask

  initial begin
    rst = 1'b1; ftw = 16'd1234;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (phase != '0 || wrap) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    ref_phase = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i % 50 == 0) ftw = PHASE_W'($urandom);
      step_and_check();
    end
    check_period(8192);
    check_period(16384);
    check_period(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
