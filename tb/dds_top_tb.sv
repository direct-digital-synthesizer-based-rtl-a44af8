// dds_top_tb: end-to-end test of the DDS at its default sizes.
//
// A cycle-level reference model (tuning words, 16-bit phase, sine computed
// here with $sin, 16 x 16 multiply, top 14 bits) runs beside the design and
// every DAC word is compared with it. On top of that the test measures what
// the synthesizer is for:
//   - output frequency: rising mid-level crossings of the DAC word over a
//     window must match M * window / 2^16 (M = 8192 gives 15.6 MHz at
//     125 MHz, M = 16384 gives 31.25 MHz, M = 26214 gives 50 MHz, M = 1 the
//     lowest frequency, 1.9 kHz);
//   - amplitude: the peak-to-peak DAC swing over one period must be linear in
//     the amplitude tuning word, 16383 * atw / 65535 within a few codes;
//   - latency: after a new M is loaded into a stopped synthesizer, the DAC
//     word first moves three clocks after the load edge.
// It counts each mechanism of the design (phase overflow, fractional phase
// that repeats samples, sample skipping, frequency and amplitude word changes)
// and fails if one never happened. A watchdog stops a hung run.
module dds_top_tb;

  logic        clk = 1'b0;
  logic        rst;
  logic        ftw_load, atw_load;
  logic [15:0] ftw_in, atw_in;
  logic [13:0] dac_data;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_repeat = 0, n_skip = 0, n_ftw_change = 0, n_atw_change = 0;

  dds_top dut (.*);

  always #4 clk = ~clk;   // one clock = 8 time units, 8 ns at 125 MHz

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic int unsigned sine_ref(int unsigned k);
    real x;
    x = 32768.0 + 32767.0 * $sin(2.0 * 3.14159265358979323846 * real'(k) / 4096.0);
    return int'($floor(x + 0.5));
  endfunction

  int unsigned m_ftw, m_atw, m_phase, m_rom, m_dac;
  int unsigned prev_addr;
  bit          model_valid = 1'b0;

  always @(posedge clk) begin
    if (rst) begin
      m_ftw   <= 0;
      m_atw   <= 0;
      m_phase <= 0;
    end else begin
      if (ftw_load) begin m_ftw <= 32'(ftw_in); if (ftw_in != 16'(m_ftw)) n_ftw_change++; end
      if (atw_load) begin m_atw <= 32'(atw_in); if (atw_in != 16'(m_atw)) n_atw_change++; end
      m_phase <= (m_phase + m_ftw) % 65536;
      if (m_phase + m_ftw >= 65536) n_wrap++;
      // fractional phase: the address stays while the phase moves
      if (m_ftw != 0 && ((m_phase + m_ftw) % 65536) / 16 == m_phase / 16) n_repeat++;
      // the address advances by more than one sample
      if (((((m_phase + m_ftw) % 65536) / 16 - m_phase / 16) % 4096) > 1 &&
          ((m_phase + m_ftw) % 65536) / 16 != m_phase / 16) n_skip++;
    end
    m_rom <= sine_ref(m_phase / 16);
    m_dac <= (m_rom * m_atw) >> 18;
  end

  // compare every DAC word once the model is past reset
  always @(negedge clk) begin
    if (model_valid) begin
      checks++;
      if (32'(dac_data) != m_dac) begin
        failures++;
        if (failures < 20)
          $display("FAIL t=%0t dac %0d expected %0d (M=%0d atw=%0d)", $time, dac_data, m_dac, m_ftw, m_atw);
      end
    end
  end

  // ---------------- stimulus helpers ----------------
  task automatic load_ftw(input int unsigned m);
    @(negedge clk);
    ftw_in = 16'(m); ftw_load = 1'b1;
    @(negedge clk);
    ftw_load = 1'b0;
  endtask

  task automatic load_atw(input int unsigned a);
    @(negedge clk);
    atw_in = 16'(a); atw_load = 1'b1;
    @(negedge clk);
    atw_load = 1'b0;
  endtask

  // Count rising crossings of mid-level over `window` clocks.
  task automatic measure_freq(input int unsigned m, input int unsigned window);
    int unsigned mid, crossings;
    longint unsigned expect_x;
    logic [13:0] prev;
    repeat (8) @(negedge clk);  // let the new M reach the output
    mid = (32768 * m_atw) >> 18;
    crossings = 0;
    prev = dac_data;
    repeat (window) begin
      @(negedge clk);
      if (32'(prev) < mid && 32'(dac_data) >= mid) crossings++;
      prev = dac_data;
    end
    expect_x = (longint'(m) * window) / 65536;
    checks++;
    if (longint'(crossings) < expect_x - 1 || longint'(crossings) > expect_x + 1) begin
      failures++;
      $display("FAIL frequency M=%0d: %0d periods in %0d clocks, expected %0d", m, crossings, window, expect_x);
    end else
      $display("M=%0d: %0d periods in %0d clocks -> f_out = %0.1f kHz (formula %0.1f kHz)",
               m, crossings, window, real'(crossings) * 125.0e3 / real'(window),
               real'(m) * 125.0e3 / 65536.0);
  endtask

  // Peak-to-peak swing over one full period of M = 64 (1024 clocks).
  task automatic measure_swing(input int unsigned a);
    int unsigned lo, hi, expect_pp;
    load_atw(a);
    repeat (4) @(negedge clk);
    lo = 16383; hi = 0;
    repeat (1100) begin
      @(negedge clk);
      if (32'(dac_data) < lo) lo = 32'(dac_data);
      if (32'(dac_data) > hi) hi = 32'(dac_data);
    end
    expect_pp = (16383 * a) / 65535;
    checks++;
    if (hi - lo + 2 < expect_pp || hi - lo > expect_pp + 2) begin
      failures++;
      $display("FAIL swing atw=%0d: %0d codes, expected %0d", a, hi - lo, expect_pp);
    end
  endtask

  // ---------------- test sequence ----------------
  initial begin
    int unsigned t_load, t_move;
    rst = 1'b1; ftw_load = 1'b0; atw_load = 1'b0; ftw_in = '0; atw_in = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    model_valid = 1'b1;
    checks++;
    if (dac_data != 0) begin failures++; $display("FAIL dac not 0 after reset"); end

    // full amplitude, then latency of a new M from a standing phase of 0
    load_atw(65535);
    repeat (4) @(negedge clk);
    @(negedge clk);
    ftw_in = 16'd4096; ftw_load = 1'b1;
    @(posedge clk);
    t_load = 0;
    @(negedge clk);
    ftw_load = 1'b0;
    t_move = 0;
    begin
      logic [13:0] first;
      first = dac_data;
      for (int i = 1; i <= 10 && t_move == 0; i++) begin
        @(posedge clk); #1;
        if (dac_data != first) t_move = i;
      end
    end
    checks++;
    if (t_move != 3) begin
      failures++;
      $display("FAIL latency: DAC word moved %0d clocks after the load edge, expected 3", t_move);
    end

    // frequencies the design is measured at
    load_ftw(8192);  measure_freq(8192, 4096);    // 15.6 MHz
    load_ftw(16384); measure_freq(16384, 4096);   // 31.25 MHz
    load_ftw(26214); measure_freq(26214, 4096);   // 50 MHz, the top frequency
    load_ftw(2048);  measure_freq(2048, 4096);    // 32 samples per period
    load_ftw(7);     measure_freq(7, 65536);      // fractional phase
    load_ftw(1);     measure_freq(1, 131072);     // lowest frequency, 1.9 kHz

    // amplitude tuning word sweep at M = 64 (4 addresses per clock, 1024 clocks per period)
    load_ftw(64);
    for (int k = 0; k <= 10; k++) measure_swing((65535 * k) / 10);
    measure_swing(1);
    measure_swing(65535);

    // mechanisms
    checks++; if (n_wrap == 0)       begin failures++; $display("FAIL no phase overflow"); end
    checks++; if (n_repeat == 0)     begin failures++; $display("FAIL no repeated samples"); end
    checks++; if (n_skip == 0)       begin failures++; $display("FAIL no skipped samples"); end
    checks++; if (n_ftw_change == 0) begin failures++; $display("FAIL no frequency change"); end
    checks++; if (n_atw_change == 0) begin failures++; $display("FAIL no amplitude change"); end
    $display("mechanisms: phase overflows %0d, repeated-sample clocks %0d, skipped-sample clocks %0d, M changes %0d, amplitude changes %0d",
             n_wrap, n_repeat, n_skip, n_ftw_change, n_atw_change);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
