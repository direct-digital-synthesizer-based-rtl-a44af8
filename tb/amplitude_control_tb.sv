// amplitude_control_tb: self-checking test of the amplitude scaling multiplier.
//
// Applies corner and random sample / amplitude-word pairs, one per clock, and
// checks that one clock later the DAC word is the top 14 bits of the 32-bit
// product, i.e. (sample * atw) / 2^18 rounded down. Full scale (0xFFFF x
// 0xFFFF) must give 16383 and a zero amplitude word must give 0.
module amplitude_control_tb;
  logic        clk = 1'b0;
  logic [15:0] sample, atw;
  logic [13:0] dac;
  longint unsigned exp_q;
  int          checks = 0, failures = 0;

  amplitude_control #(.SAMPLE_W(16), .ATW_W(16), .DAC_W(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] s, input logic [15:0] a);
    sample = s; atw = a;
    exp_q  = (longint'(s) * longint'(a)) / 262144;
    @(posedge clk);
    #1;
    checks++;
    if (longint'(dac) != exp_q) begin
      failures++;
      $display("FAIL %0d * %0d: dac %0d expected %0d", s, a, dac, exp_q);
    end
  endtask

  initial begin
    apply(16'hFFFF, 16'hFFFF);
    if (dac != 14'd16383) begin failures++; $display("FAIL full scale %0d", dac); end
    apply(16'hFFFF, 16'h0000);
    apply(16'h0000, 16'hFFFF);
    apply(16'h8000, 16'h8000);
    apply(16'd32768, 16'd65535);
    apply(16'd1, 16'd65535);
    for (int i = 0; i < 3000; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
