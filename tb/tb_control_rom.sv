// tb_control_rom: self-checking test of the 2^7 x 29-bit control ROM.
// For each opcode it walks the execute steps as the counter would (BEN = 1,
// memory always ready) and checks the number of execute states, the number
// of states that wait for memory, and that the three fetch words are the
// same for every opcode. It also compares a set of words with values written
// out field by field from the LC-3 register-transfer sequences.
module tb_control_rom;
  import lc3_ctrl_pkg::*;
  logic [2:0] step;
  logic [3:0] opcode;
  ctrl_word_t ctrl, w, ref0, ref1, ref2;
  int unsigned checks = 0, failures = 0;

  // Expected execute-state count and memory-wait states per opcode 0..15
  // (BR taken: 2 states).
  //                                  BR ADD LD ST JSR AND LDR STR RTI NOT LDI STI JMP RES LEA TRAP
  localparam int EXEC_LEN [16] = '{2, 1,  3, 3, 1,  1,  3,  3,  1,  1,  5,  5,  1,  1,  1,  3};
  localparam int WAITS    [16] = '{0, 0,  1, 1, 0,  0,  1,  1,  0,  0,  2,  2,  0,  0,  0,  1};

  control_rom dut (.step, .opcode, .ctrl);

  task automatic expect_word(input logic [2:0] s, input logic [3:0] op, input ctrl_word_t exp, input string what);
    step = s; opcode = op; #1;
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s: step %0d opcode %b got %h expected %h", what, s, op, ctrl, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fetch words
    ref0 = '0; ref0.ld_mar = 1; ref0.gate_pc = 1; ref0.ld_pc = 1; ref0.pcmux = PCMUX_PC1;
    ref1 = '0; ref1.ld_mdr = 1; ref1.mio_en = 1; ref1.r_w = RW_READ; ref1.wait_mem = 1;
    ref2 = '0; ref2.gate_mdr = 1; ref2.ld_ir = 1; ref2.ld_ben = 1;
    for (int op = 0; op < 16; op++) begin
      expect_word(3'd0, 4'(op), ref0, "fetch 1");
      expect_word(3'd1, 4'(op), ref1, "fetch 2");
      expect_word(3'd2, 4'(op), ref2, "fetch 3");
    end

    // sequence lengths and memory waits
    for (int op = 0; op < 16; op++) begin
      int len, waits;
      bit done;
      len = 0; waits = 0; done = 0;
      for (int s = 3; s < 8 && !done; s++) begin
        step = 3'(s); opcode = 4'(op); #1;
        len++;
        if (ctrl.wait_mem) waits++;
        // BR-RESET with BEN = 1 does not end the instruction
        if (ctrl.inst_done) done = 1;
      end
      checks++;
      if (len != EXEC_LEN[op] || waits != WAITS[op] || !done) begin
        failures++;
        $display("FAIL opcode %b: %0d states (%0d waits, done=%0d), expected %0d (%0d)",
                 op, len, waits, done, EXEC_LEN[op], WAITS[op]);
      end
    end

    // individual words
    w = '0; w.sr1mux = SR1MUX_IR8_6; w.drmux = DRMUX_IR11_9; w.aluk = ALUK_ADD;
    w.gate_alu = 1; w.ld_reg = 1; w.ld_cc = 1; w.inst_done = 1;
    expect_word(3'd3, OP_ADD, w, "ADD");
    w.aluk = ALUK_AND; expect_word(3'd3, OP_AND, w, "AND");
    w.aluk = ALUK_NOT; expect_word(3'd3, OP_NOT, w, "NOT");

    w = '0; w.br_reset = 1;
    expect_word(3'd3, OP_BR, w, "BR test");
    w = '0; w.addr1mux = ADDR1MUX_PC; w.addr2mux = ADDR2MUX_OFF9; w.pcmux = PCMUX_ADDER;
    w.ld_pc = 1; w.inst_done = 1;
    expect_word(3'd4, OP_BR, w, "BR taken");

    w = '0; w.gate_pc = 1; w.drmux = DRMUX_R7; w.ld_reg = 1; w.addr1mux = ADDR1MUX_PC;
    w.addr2mux = ADDR2MUX_OFF11; w.sr1mux = SR1MUX_IR8_6; w.ir11_pcmux = 1; w.ld_pc = 1;
    w.inst_done = 1;
    expect_word(3'd3, OP_JSR, w, "JSR(R)");

    w = '0; w.sr1mux = SR1MUX_IR8_6; w.addr1mux = ADDR1MUX_BASER; w.addr2mux = ADDR2MUX_ZERO;
    w.pcmux = PCMUX_ADDER; w.ld_pc = 1; w.inst_done = 1;
    expect_word(3'd3, OP_JMP, w, "JMP");

    w = '0; w.ld_mar = 1; w.gate_marmux = 1; w.marmux = MARMUX_ADDER;
    w.addr1mux = ADDR1MUX_BASER; w.addr2mux = ADDR2MUX_OFF6; w.sr1mux = SR1MUX_IR8_6;
    expect_word(3'd3, OP_LDR, w, "LDR address");
    w = '0; w.gate_mdr = 1; w.ld_mar = 1;
    expect_word(3'd5, OP_LDI, w, "LDI MAR<-MDR");
    expect_word(3'd5, OP_STI, w, "STI MAR<-MDR");
    w = '0; w.sr1mux = SR1MUX_IR11_9; w.aluk = ALUK_PASSA; w.gate_alu = 1; w.ld_mdr = 1;
    expect_word(3'd6, OP_STI, w, "STI MDR<-SR");
    expect_word(3'd4, OP_ST, w, "ST MDR<-SR");
    w = '0; w.mio_en = 1; w.r_w = RW_WRITE; w.wait_mem = 1; w.inst_done = 1;
    expect_word(3'd7, OP_STI, w, "STI write");
    expect_word(3'd5, OP_STR, w, "STR write");
    w = '0; w.gate_mdr = 1; w.drmux = DRMUX_IR11_9; w.ld_reg = 1; w.ld_cc = 1; w.inst_done = 1;
    expect_word(3'd7, OP_LDI, w, "LDI load DR");
    expect_word(3'd5, OP_LD, w, "LD load DR");
    w = '0; w.addr1mux = ADDR1MUX_PC; w.addr2mux = ADDR2MUX_OFF9; w.marmux = MARMUX_ADDER;
    w.gate_marmux = 1; w.drmux = DRMUX_IR11_9; w.ld_reg = 1; w.inst_done = 1;
    expect_word(3'd3, OP_LEA, w, "LEA");
    w = '0; w.marmux = MARMUX_ZEXT8; w.gate_marmux = 1; w.ld_mar = 1;
    expect_word(3'd3, OP_TRAP, w, "TRAP vector");
    w = '0; w.ld_mdr = 1; w.mio_en = 1; w.wait_mem = 1; w.gate_pc = 1; w.drmux = DRMUX_R7;
    w.ld_reg = 1;
    expect_word(3'd4, OP_TRAP, w, "TRAP read, R7<-PC");
    w = '0; w.gate_mdr = 1; w.pcmux = PCMUX_BUS; w.ld_pc = 1; w.inst_done = 1;
    expect_word(3'd5, OP_TRAP, w, "TRAP PC<-MDR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
