// tb_reset_logic: exhaustive test of RESET = INST-DONE | !BEN & BR-RESET.
module tb_reset_logic;
  logic inst_done, br_reset, ben, reset;
  int unsigned checks = 0, failures = 0;
  // index {inst_done, br_reset, ben}: 000 001 010 011 100 101 110 111
  localparam logic [7:0] TRUTH = 8'b1111_0100;

  reset_logic dut (.inst_done, .br_reset, .ben, .reset);

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {inst_done, br_reset, ben} = 3'(i);
      #1;
      checks++;
      if (reset !== TRUTH[i]) begin
        failures++;
        $display("FAIL done=%b br_reset=%b ben=%b reset=%b", inst_done, br_reset, ben, reset);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
