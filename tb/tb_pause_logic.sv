// tb_pause_logic: exhaustive test of PAUSE = !R & WAIT-MEM.
module tb_pause_logic;
  logic mem_ready, wait_mem, pause;
  int unsigned checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b0010;  // index {mem_ready, wait_mem}

  pause_logic dut (.mem_ready, .wait_mem, .pause);

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {mem_ready, wait_mem} = 2'(i);
      #1;
      checks++;
      if (pause !== TRUTH[i]) begin
        failures++;
        $display("FAIL R=%b wait_mem=%b pause=%b", mem_ready, wait_mem, pause);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
