// sine_rom_tb: self-checking test of the 4096 x 16 sine table.
//
// Reads every address, one per clock, and compares the word returned one clock
// later with round(32768 + 32767 * sin(2*pi*k/4096)). It also checks two
// properties that do not depend on that formula: half a period apart the
// samples sum to 65536 (odd symmetry about mid-scale), and the first quarter
// never falls on the way to the peak at k = 1024
// (and rises strictly over its steep first half).
module sine_rom_tb;
  localparam int unsigned ADDR_W   = 12;
  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned DEPTH    = 1 << ADDR_W;

  logic                clk = 1'b0;
  logic [ADDR_W-1:0]   addr;
  logic [SAMPLE_W-1:0] sample;
  int unsigned         got [DEPTH];
  int                  checks = 0, failures = 0;

  sine_rom #(.ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W), .BANK_ADDR_W(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned expected(int unsigned k);
    real x;
    x = 32768.0 + 32767.0 * $sin(2.0 * 3.14159265358979323846 * real'(k) / 4096.0);
    return int'($floor(x + 0.5));
  endfunction

  initial begin
    // one address per clock; its word is valid right after the next edge
    for (int unsigned k = 0; k < DEPTH; k++) begin
      addr = ADDR_W'(k);
      @(posedge clk);
      #1;
      got[k] = 32'(sample);
    end

    for (int unsigned k = 0; k < DEPTH; k++) begin
      checks++;
      if (got[k] != expected(k)) begin
        failures++;
        if (failures < 10) $display("FAIL rom[%0d] = %0d expected %0d", k, got[k], expected(k));
      end
    end
    for (int unsigned k = 0; k < DEPTH / 2; k++) begin
      checks++;
      if (got[k] + got[k + DEPTH/2] != 65536) begin
        failures++;
        if (failures < 10) $display("FAIL symmetry at %0d", k);
      end
    end
    for (int unsigned k = 0; k < DEPTH / 4; k++) begin
      checks++;
      if (got[k+1] < got[k] || (k < DEPTH / 8 && got[k+1] == got[k])) begin
        failures++;
        if (failures < 10) $display("FAIL not rising at %0d", k);
      end
    end
    checks++;
    if (got[1024] != 65535 || got[0] != 32768 || got[3072] != 1) begin
      failures++;
      $display("FAIL extremes %0d %0d %0d", got[0], got[1024], got[3072]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
