// tb_step_counter: self-checking test of the step counter.
// Drives random reset and pause for 2000 cycles and compares the count with a
// reference model kept in the testbench (pause holds, else reset clears,
// else count up with wrap-around). Also checks the power-on reset value and
// that a full run without reset or pause visits 0..7 in order and wraps.
module tb_step_counter;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       reset, pause;
  logic [2:0] count;
  int unsigned checks = 0, failures = 0;
  int unsigned expected;

  step_counter #(.WIDTH(3)) dut (.clk, .rst_n, .reset, .pause, .count);

  always #5 clk = ~clk;

  task automatic check(input int unsigned exp, input string what);
    checks++;
    if (count !== 3'(exp)) begin
      failures++;
      $display("FAIL %s: count=%0d expected %0d", what, count, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b0; pause = 1'b0; rst_n = 1'b0;
    #12 check(0, "power-on reset");
    rst_n = 1'b1;
    expected = 0;
    // free run: 0,1,...,7,0,1
    for (int i = 1; i <= 10; i++) begin
      @(posedge clk); #1;
      check(i % 8, "free run");
    end
    expected = 10 % 8;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      reset = ($urandom_range(0, 3) == 0);
      pause = ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (pause)      expected = expected;
      else if (reset) expected = 0;
      else            expected = (expected + 1) % 8;
      check(expected, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
