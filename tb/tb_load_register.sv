// tb_load_register: self-checking test of the load-enable register.
// Checks the reset value, then 1000 random cycles of load/hold against a
// copy kept in the testbench.
module tb_load_register;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        ld;
  logic [15:0] data, q, model;
  int unsigned checks = 0, failures = 0;

  load_register #(.WIDTH(16), .RESET_VALUE(16'h3000)) dut (.clk, .rst_n, .ld, .data, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ld = 1'b0; data = '0;
    #12;
    checks++;
    if (q !== 16'h3000) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1'b1;
    model = 16'h3000;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld   = $urandom_range(0, 1) == 1;
      data = 16'($urandom);
      @(posedge clk); #1;
      if (ld) model = data;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h expected %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
