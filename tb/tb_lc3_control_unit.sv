// tb_lc3_control_unit: end-to-end test of the LC-3 hardwired control unit at
// its default parameters.
//
// The control unit drives a behavioural LC-3 datapath and a memory with a
// random latency of 0..3 extra cycles. A program built here, in memory at
// x3000, uses every opcode: a counted loop (taken and untaken branches),
// loads and stores of every addressing mode, LDI and STI (five execute
// states), JSR and JSRR, JMP, a TRAP through the vector table, LEA, NOT,
// RTI and the reserved opcode (both no-ops here). It ends on BRnzp #-1.
//
// An instruction-level reference interpreter (lc3_isa_ref_pkg)
// runs the same program one instruction at a time in lockstep: when the
// control unit finishes an instruction, the registers, condition codes and
// PC are compared, and at the end the whole memory. Each instruction's
// length in cycles is checked against 3 fetch states + its execute states +
// the cycles the memory was not ready. The test counts how often each
// mechanism happened (memory pause, RESET by INST-DONE, RESET by an untaken
// branch, taken branch, JSR through the adder, JSRR through the SR1 input of
// the PCMUX, a five-state LDI/STI, a TRAP) and fails any that never did.
module tb_lc3_control_unit;
  import lc3_ctrl_pkg::*;
  import lc3_isa_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  ctrl_word_t  ctrl;
  logic [15:0] ir, pc, bus, adder, sr1, mem_rdata, mar, mdr;
  logic [15:0] regs [8];
  logic [2:0]  nzp, step;
  logic        ben, mem_ready, pause, reset;
  int unsigned stall_cycles;

  lc3_control_unit dut (
    .clk, .rst_n, .bus, .adder, .sr1, .mem_ready, .ben,
    .ctrl, .ir, .pc, .step, .pause, .reset
  );

  lc3_datapath_model dp (
    .clk, .rst_n, .ctrl, .ir, .pc, .mem_rdata, .bus, .adder, .sr1, .ben,
    .mar, .mdr, .regs, .nzp
  );

  lc3_memory_model #(.MAX_LAT(3)) mem (
    .clk, .rst_n, .mio_en(ctrl.mio_en), .r_w(ctrl.r_w == RW_WRITE), .addr(mar),
    .wdata(mdr), .rdata(mem_rdata), .ready(mem_ready), .stall_cycles
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  logic [15:0] image [65536];
  logic [15:0] here;

  function automatic logic [15:0] off(input logic [15:0] target, input logic [15:0] at);
    return target - (at + 16'd1);
  endfunction

  task automatic emit(input logic [15:0] w);
    image[here] = w;
    here++;
  endtask

  localparam logic [15:0] START = 16'h3000;
  localparam logic [15:0] DATA  = 16'h3040;  // 5, -, 7, ptr, ptr2
  localparam logic [15:0] SUB1  = 16'h3060;
  localparam logic [15:0] SUB2  = 16'h3068;
  localparam logic [15:0] TRAPH = 16'h3070;
  localparam logic [15:0] CELL1 = 16'h3050;  // LDI source
  localparam logic [15:0] CELL2 = 16'h3052;  // STI target
  localparam logic [15:0] HALT  = 16'h0FFF;  // BRnzp #-1

  task automatic build_program();
    logic [15:0] loop;
    for (int i = 0; i < 65536; i++) image[i] = '0;
    image[DATA + 0] = 16'd5;
    image[DATA + 2] = 16'd7;
    image[DATA + 3] = CELL1;
    image[DATA + 4] = CELL2;
    image[CELL1]    = 16'hBEEF;
    image[16'h0020] = TRAPH;                                        // trap vector x20
    here = START;
    emit({4'b1110, 3'd0, 9'(off(DATA, here))});                     // LEA  R0, DATA
    emit({4'b0110, 3'd1, 3'd0, 6'd0});                              // LDR  R1, R0, #0
    emit({4'b0010, 3'd2, 9'(off(DATA + 2, here))});                 // LD   R2, DATA+2
    emit({4'b0101, 3'd3, 3'd3, 1'b1, 5'd0});                        // AND  R3, R3, #0
    loop = here;
    emit({4'b0001, 3'd3, 3'd3, 1'b0, 2'b00, 3'd2});                 // ADD  R3, R3, R2
    emit({4'b0001, 3'd1, 3'd1, 1'b1, 5'h1F});                       // ADD  R1, R1, #-1
    emit({4'b0000, 3'b001, 9'(off(loop, here))});                   // BRp  loop
    emit({4'b0011, 3'd3, 9'(off(DATA + 1, here))});                 // ST   R3, DATA+1
    emit({4'b1001, 3'd4, 3'd3, 6'h3F});                             // NOT  R4, R3
    emit({4'b0001, 3'd4, 3'd4, 1'b1, 5'd1});                        // ADD  R4, R4, #1
    emit({4'b0111, 3'd4, 3'd0, 6'd5});                              // STR  R4, R0, #5
    emit({4'b1010, 3'd5, 9'(off(DATA + 3, here))});                 // LDI  R5, DATA+3
    emit({4'b1011, 3'd3, 9'(off(DATA + 4, here))});                 // STI  R3, DATA+4
    emit({4'b0100, 1'b1, 11'(off(SUB1, here))});                    // JSR  SUB1
    emit({4'b1110, 3'd6, 9'(off(SUB2, here))});                     // LEA  R6, SUB2
    emit({4'b0100, 3'b000, 3'd6, 6'd0});                            // JSRR R6
    emit({4'b1111, 4'd0, 8'h20});                                   // TRAP x20
    emit({4'b0101, 3'd5, 3'd5, 1'b1, 5'h0F});                       // AND  R5, R5, #15
    emit({4'b0000, 3'b010, 9'd1});                                  // BRz  +1 (not taken)
    emit({4'b0001, 3'd0, 3'd1, 1'b0, 2'b00, 3'd2});                 // ADD  R0, R1, R2
    emit(16'h8000);                                                 // RTI  (no-op)
    emit(16'hD000);                                                 // reserved (no-op)
    emit({4'b0000, 3'b111, 9'd1});                                  // BRnzp +1 (taken)
    emit({4'b0001, 3'd0, 3'd0, 1'b1, 5'd1});                        // ADD  R0, R0, #1 (skipped)
    emit({4'b0000, 3'b000, 9'd0});                                  // BR never (nop)
    emit(HALT);
    // SUB1: R1 <- R1 + 3, return
    here = SUB1;
    emit({4'b0001, 3'd1, 3'd1, 1'b1, 5'd3});
    emit({4'b1100, 3'd0, 3'd7, 6'd0});                              // RET
    // SUB2: R2 <- NOT R2, return
    here = SUB2;
    emit({4'b1001, 3'd2, 3'd2, 6'h3F});
    emit({4'b1100, 3'd0, 3'd7, 6'd0});
    // trap handler: R4 <- R4 AND R2, return
    here = TRAPH;
    emit({4'b0101, 3'd4, 3'd4, 1'b0, 2'b00, 3'd2});
    emit({4'b1100, 3'd0, 3'd7, 6'd0});
  endtask

  // --------------------------------------------------- mechanism counters
  int unsigned n_pause, n_done_reset, n_br_reset, n_br_taken, n_jsr, n_jsrr;
  int unsigned n_five_state, n_trap, n_inst;
  int unsigned op_seen [16];
  int unsigned cyc, stalls_at_start, exp_states;
  bit          finished;

  always @(posedge clk) begin
    if (rst_n && !finished) begin
      cyc++;
      if (pause) n_pause++;
      if (step == 3'd3 && ir[15:12] == 4'b0100 && !pause) begin
        if (ir[11]) begin
          n_jsr++;
          check(ctrl.pcmux == PCMUX_ADDER, "JSR selects the adder");
        end else begin
          n_jsrr++;
          check(ctrl.pcmux == PCMUX_SR1, "JSRR selects SR1");
        end
      end
      if (step == 3'd4 && ir[15:12] == 4'b0000) n_br_taken++;
      if (step == 3'd7 && !pause) n_five_state++;
      if (!pause && (reset || step == 3'd7)) begin
        // the instruction ends at this edge
        if (ctrl.br_reset && !ben) n_br_reset++;
        else if (ctrl.inst_done)   n_done_reset++;
        if (ir[15:12] == 4'b1111) n_trap++;
        op_seen[ir[15:12]]++;
        n_inst++;
        exp_states = ref_step();
        // cycles include this one; the memory counter is sampled before
        // this edge's update, which adds nothing as the access ended (ready)
        check(cyc == 3 + exp_states + (stall_cycles - stalls_at_start),
              $sformatf("cycle count of %h at %h: %0d, expected %0d", ir, pc, cyc,
                        3 + exp_states + (stall_cycles - stalls_at_start)));
        cyc = 0;
        stalls_at_start = stall_cycles;
        #1;
        for (int r = 0; r < 8; r++)
          check(regs[r] == rreg[r], $sformatf("R%0d = %h, expected %h after %h", r, regs[r], rreg[r], ir));
        check(pc == rpc, $sformatf("PC = %h, expected %h after %h", pc, rpc, ir));
        check(nzp == rnzp, $sformatf("NZP = %b, expected %b after %h", nzp, rnzp, ir));
        if (rmem[rpc] == HALT) finished = 1;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_pause = 0; n_done_reset = 0; n_br_reset = 0; n_br_taken = 0; n_jsr = 0; n_jsrr = 0;
    n_five_state = 0; n_trap = 0; n_inst = 0; cyc = 0; stalls_at_start = 0; finished = 0;
    for (int i = 0; i < 16; i++) op_seen[i] = 0;
    build_program();
    for (int i = 0; i < 65536; i++) begin
      mem.m[i] = image[i];
      rmem[i]  = image[i];
    end
    ref_reset(START);
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    check(pc == START && step == 3'd0, "reset state");
    wait (finished);
    @(negedge clk);
    for (int i = 0; i < 65536; i++)
      if (mem.m[i] != rmem[i]) check(0, $sformatf("memory %h = %h, expected %h", i, mem.m[i], rmem[i]));
    check(rreg[3] == 16'd35 && rmem[DATA + 1] == 16'd35 && rmem[CELL2] == 16'd35,
          "program result (loop sum 5*7 stored by ST and STI)");
    $display("instructions %0d: pause %0d, INST-DONE resets %0d, untaken-branch resets %0d, taken branches %0d, JSR %0d, JSRR %0d, five-state %0d, TRAP %0d",
             n_inst, n_pause, n_done_reset, n_br_reset, n_br_taken, n_jsr, n_jsrr, n_five_state, n_trap);
    check(n_pause > 0,      "memory pause happened");
    check(n_done_reset > 0, "INST-DONE reset happened");
    check(n_br_reset > 0,   "untaken-branch reset happened");
    check(n_br_taken > 0,   "taken branch happened");
    check(n_jsr > 0,        "JSR happened");
    check(n_jsrr > 0,       "JSRR happened");
    check(n_five_state > 0, "five-state instruction happened");
    check(n_trap > 0,       "TRAP happened");
    for (int i = 0; i < 16; i++)
      check(op_seen[i] > 0, $sformatf("opcode %b executed", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
