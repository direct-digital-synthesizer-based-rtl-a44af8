// dds_sweep_tb: frequency-tuning-word sweep of the DDS at its default sizes.
//
// Steps M through the powers of two from 1 to 16384 at full amplitude, the
// sweep the synthesizer's frequency and amplitude characteristics are taken
// over. For each M it checks, over whole periods of the output:
//   - the number of periods, against f_out = M * f_clk / 2^16 (one period every
//     65536 / M clocks);
//   - the number of samples that make up one period, 65536 / M clocks, of
//     which min(4096, 65536 / M) are different ROM addresses (M >= 2048 leaves
//     32 samples or fewer per period, M < 16 repeats each address 16 / M times);
//   - the peak-to-peak DAC swing, which must stay within a few codes of full
//     scale (16383) for every M down to 4 samples per period, since the
//     samples then land on 0, 90, 180 and 270 degrees.
// A watchdog stops a hung run.
module dds_sweep_tb;

  logic        clk = 1'b0;
  logic        rst;
  logic        ftw_load, atw_load;
  logic [15:0] ftw_in, atw_in;
  logic [13:0] dac_data;
  int          checks = 0, failures = 0;

  dds_top dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [15:0] m, input logic [15:0] a);
    @(negedge clk);
    ftw_in = m; ftw_load = 1'b1; atw_in = a; atw_load = 1'b1;
    @(negedge clk);
    ftw_load = 1'b0; atw_load = 1'b0;
  endtask

  initial begin
    rst = 1'b1; ftw_load = 1'b0; atw_load = 1'b0; ftw_in = '0; atw_in = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k <= 14; k++) begin
      int unsigned m, period, n_periods, window, crossings, lo, hi, distinct;
      bit          seen [4096];
      logic [13:0] prev;
      m        = 1 << k;
      period   = 65536 / m;
      n_periods = (k < 4) ? 2 : 16;
      window   = period * n_periods;
      load(16'(m), 16'hFFFF);
      repeat (6) @(negedge clk);
      foreach (seen[i]) seen[i] = 1'b0;
      crossings = 0; lo = 16383; hi = 0; distinct = 0;
      prev = dac_data;
      repeat (window) begin
        @(negedge clk);
        if (prev < 14'd8191 && dac_data >= 14'd8191) crossings++;
        prev = dac_data;
        if (32'(dac_data) < lo) lo = 32'(dac_data);
        if (32'(dac_data) > hi) hi = 32'(dac_data);
        if (!seen[dut.rom_addr]) begin seen[dut.rom_addr] = 1'b1; distinct++; end
      end
      checks++;
      if (crossings != n_periods) begin
        failures++;
        $display("FAIL M=%0d: %0d periods in %0d clocks, expected %0d", m, crossings, window, n_periods);
      end
      checks++;
      if (distinct != ((period < 4096) ? period : 4096)) begin
        failures++;
        $display("FAIL M=%0d: %0d distinct samples per period", m, distinct);
      end
      checks++;
      if (hi - lo < 16380) begin
        failures++;
        $display("FAIL M=%0d: swing %0d codes", m, hi - lo);
      end
      $display("M=%5d: f_out = %9.3f kHz, %0d clocks and %0d distinct samples per period, swing %0d codes",
               m, real'(m) * 125.0e3 / 65536.0, period, distinct, hi - lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
