// tuning_register_tb: self-checking test of the tuning-word input register.
//
// Drives random load strobes and words and checks, one clock after each edge,
// that each stored word equals the last value loaded (or the reset value), so
// it also checks the one-clock load latency and that the two words are
// independent. A watchdog ends the run with a failure if it hangs.
module tuning_register_tb;
  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         rst;
  logic         ftw_load, atw_load;
  logic [W-1:0] ftw_in, atw_in, ftw, atw;
  logic [W-1:0] ftw_exp, atw_exp;
  int           checks = 0, failures = 0;

  tuning_register #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; ftw_load = 1'b0; atw_load = 1'b0; ftw_in = '1; atw_in = '1;
    repeat (2) @(posedge clk);
    #1;
    check(ftw, '0, "ftw after reset");
    check(atw, '0, "atw after reset");
    rst = 1'b0;
    ftw_exp = '0; atw_exp = '0;
    for (int i = 0; i < 2000; i++) begin
      ftw_load = ($urandom_range(3) == 0);
      atw_load = ($urandom_range(3) == 0);
      ftw_in   = W'($urandom);
      atw_in   = W'($urandom);
      @(posedge clk);
      if (ftw_load) ftw_exp = ftw_in;
      if (atw_load) atw_exp = atw_in;
      #1;
      check(ftw, ftw_exp, "ftw");
      check(atw, atw_exp, "atw");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
