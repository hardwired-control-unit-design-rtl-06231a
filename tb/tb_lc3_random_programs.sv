// tb_lc3_random_programs: the LC-3 control unit running random programs.
//
// Each of NPROG programs is NGROUPS random instruction groups at x3100,
// reached by a branch at the reset address x3000, followed by BRnzp #-1. Groups are: an ALU operation (ADD/AND register or
// immediate, NOT), LD or LDI, ST or STI, LEA R6 followed by LDR/STR through
// R6, a forward BR with a random n/z/p mask, a forward JSR, LEA R6 followed
// by JSRR R6 or JMP R6, a TRAP with a random vector (every vector points to a
// handler that returns with JMP R7), and RTI or the reserved opcode. Control
// flow only goes forward, to the start of a later group, so every program
// ends. Stores only reach the data area x3080..x30FF; the pointer area
// x3001..x307F holds addresses inside the data area for LDI and STI.
//
// The design is reset before each program. The reference interpreter
// (lc3_isa_ref_pkg) runs in lockstep: registers, condition codes and PC are
// compared after every instruction, memory after every program, and every
// instruction's cycle count is checked against 3 fetch states + its execute
// states + the memory stall cycles (memory latency is random, 0..3 cycles).
module tb_lc3_random_programs;
  import lc3_ctrl_pkg::*;
  import lc3_isa_ref_pkg::*;

  localparam int NPROG   = 200;
  localparam int NGROUPS = 80;

  localparam logic [15:0] CODE    = 16'h3100;
  localparam logic [15:0] START   = 16'h3000;  // reset PC; holds BRnzp to CODE
  localparam logic [15:0] PTRS    = 16'h3001;
  localparam logic [15:0] DAREA   = 16'h3080;
  localparam logic [15:0] DEND    = 16'h30FF;
  localparam logic [15:0] HANDLER = 16'h2F00;
  localparam logic [15:0] HALT    = 16'h0FFF;

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
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ generator
  logic [15:0] image [65536];
  logic [15:0] here;
  logic [15:0] gaddr [NGROUPS + 1];
  // patches: address of the word, kind (0 BR off9, 1 JSR off11, 2 LEA off9), target group
  logic [15:0] p_addr [2 * NGROUPS];
  int          p_kind [2 * NGROUPS];
  int          p_grp  [2 * NGROUPS];
  int          npatch;

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  task automatic emit(input logic [15:0] w);
    image[here] = w;
    here++;
  endtask

  // A random address in [lo, hi] that PC-relative off9 reaches from 'here'.
  function automatic logic [15:0] reach(input logic [15:0] lo, input logic [15:0] hi);
    int l;
    l = int'(here) + 1 - 256;
    if (l < int'(lo)) l = int'(lo);
    if (l > int'(hi)) l = int'(hi);
    return 16'(rnd(l, int'(hi)));
  endfunction

  function automatic logic [8:0] off9(input logic [15:0] target);
    return 9'(target - (here + 16'd1));
  endfunction

  task automatic add_patch(input int kind);
    p_addr[npatch] = here;
    p_kind[npatch] = kind;
    p_grp[npatch]  = 0;  // set by the caller
    npatch++;
  endtask

  task automatic build_program();
    logic [15:0] t, x;
    int          k, off6;
    for (int i = 0; i < 65536; i++) image[i] = '0;
    for (int i = 0; i < 256; i++) image[i] = HANDLER;
    image[HANDLER] = {4'b1100, 3'd0, 3'd7, 6'd0};                   // JMP R7
    for (int i = int'(PTRS); i < int'(DAREA); i++) image[i] = 16'(rnd(int'(DAREA), int'(DEND)));
    for (int i = int'(DAREA); i <= int'(DEND); i++) image[i] = 16'($urandom);
    image[START] = {4'b0000, 3'b111, 9'(CODE - START - 16'd1)};
    here   = CODE;
    npatch = 0;
    for (int g = 0; g < NGROUPS; g++) begin
      gaddr[g] = here;
      k = rnd(0, 19);
      if (k < 6) begin                                             // ALU
        case (rnd(0, 2))
          0: emit({4'b0001, 3'(rnd(0, 7)), 3'(rnd(0, 7)), 1'b0, 2'b00, 3'(rnd(0, 7))});
          1: emit({4'b0101, 3'(rnd(0, 7)), 3'(rnd(0, 7)), 1'b1, 5'($urandom)});
          default: begin
            if (rnd(0, 1) == 1) emit({4'b0001, 3'(rnd(0, 7)), 3'(rnd(0, 7)), 1'b1, 5'($urandom)});
            else                emit({4'b1001, 3'(rnd(0, 7)), 3'(rnd(0, 7)), 6'h3F});
          end
        endcase
      end else if (k < 8) begin                                    // LD / LDI
        if (rnd(0, 1) == 1 && int'(here) + 1 - 256 <= int'(DAREA) - 1) begin
          t = reach(PTRS, DAREA - 1);
          emit({4'b1010, 3'(rnd(0, 7)), off9(t)});
        end else begin
          t = reach(PTRS, DEND);
          emit({4'b0010, 3'(rnd(0, 7)), off9(t)});
        end
      end else if (k < 10) begin                                   // ST / STI
        if (rnd(0, 1) == 1 && int'(here) + 1 - 256 <= int'(DAREA) - 1) begin
          t = reach(PTRS, DAREA - 1);
          emit({4'b1011, 3'(rnd(0, 7)), off9(t)});
        end else begin
          t = reach(DAREA, DEND);
          emit({4'b0011, 3'(rnd(0, 7)), off9(t)});
        end
      end else if (k < 12) begin                                   // LEA R6; LDR/STR via R6
        t    = reach(DAREA, DEND);
        off6 = rnd(-32, 31);
        if (int'(t) - off6 < int'(DAREA) || int'(t) - off6 > int'(DEND)) off6 = 0;
        x = 16'(int'(t) - off6);
        emit({4'b1110, 3'd6, off9(x)});
        if (rnd(0, 1) == 1) emit({4'b0110, 3'(rnd(0, 7)), 3'd6, 6'(off6)});
        else                emit({4'b0111, 3'(rnd(0, 7)), 3'd6, 6'(off6)});
      end else if (k < 15) begin                                   // forward BR
        add_patch(0); p_grp[npatch-1] = g + rnd(1, 3);
        emit({4'b0000, 3'(rnd(0, 7)), 9'd0});
      end else if (k < 16) begin                                   // JSR
        add_patch(1); p_grp[npatch-1] = g + rnd(1, 3);
        emit({4'b0100, 1'b1, 11'd0});
      end else if (k < 18) begin                                   // LEA R6; JSRR/JMP R6
        add_patch(2); p_grp[npatch-1] = g + rnd(1, 3);
        emit({4'b1110, 3'd6, 9'd0});
        if (rnd(0, 1) == 1) emit({4'b0100, 3'b000, 3'd6, 6'd0});
        else                emit({4'b1100, 3'b000, 3'd6, 6'd0});
      end else if (k < 19) begin                                   // TRAP
        emit({4'b1111, 4'd0, 8'($urandom)});
      end else begin                                               // RTI / reserved
        emit(rnd(0, 1) == 1 ? 16'h8000 : 16'hD000);
      end
    end
    gaddr[NGROUPS] = here;
    emit(HALT);
    for (int i = 0; i < npatch; i++) begin
      if (p_grp[i] > NGROUPS) p_grp[i] = NGROUPS;
      t = gaddr[p_grp[i]] - (p_addr[i] + 16'd1);
      case (p_kind[i])
        1:       image[p_addr[i]][10:0] = t[10:0];
        default: image[p_addr[i]][8:0]  = t[8:0];
      endcase
    end
  endtask

  // ------------------------------------------------------------- monitor
  int unsigned n_pause, n_done_reset, n_br_reset, n_br_taken, n_jsr, n_jsrr;
  int unsigned n_five_state, n_trap, n_inst;
  int unsigned op_seen [16];
  int unsigned cyc, stalls_at_start, exp_states;
  bit          running;

  always @(posedge clk) begin
    if (rst_n && running) begin
      cyc++;
      if (pause) n_pause++;
      if (step == 3'd3 && ir[15:12] == 4'b0100 && !pause) begin
        if (ir[11]) n_jsr++; else n_jsrr++;
      end
      if (step == 3'd4 && ir[15:12] == 4'b0000) n_br_taken++;
      if (step == 3'd7 && !pause) n_five_state++;
      if (!pause && (reset || step == 3'd7)) begin
        if (ctrl.br_reset && !ben) n_br_reset++;
        else if (ctrl.inst_done)   n_done_reset++;
        if (ir[15:12] == 4'b1111) n_trap++;
        op_seen[ir[15:12]]++;
        n_inst++;
        exp_states = ref_step();
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
        if (rmem[rpc] == HALT) running = 0;
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_pause = 0; n_done_reset = 0; n_br_reset = 0; n_br_taken = 0; n_jsr = 0; n_jsrr = 0;
    n_five_state = 0; n_trap = 0; n_inst = 0; running = 0;
    for (int i = 0; i < 16; i++) op_seen[i] = 0;
    rst_n = 1'b0;
    for (int p = 0; p < NPROG; p++) begin
      @(negedge clk);
      rst_n = 1'b0;
      build_program();
      for (int i = 0; i < 65536; i++) begin
        mem.m[i] = image[i];
        rmem[i]  = image[i];
      end
      ref_reset(START);
      cyc = 0;
      stalls_at_start = 0;
      @(negedge clk);
      rst_n = 1'b1;
      running = 1;
      wait (!running);
      @(negedge clk);
      for (int i = 0; i < 65536; i++)
        if (mem.m[i] != rmem[i])
          check(0, $sformatf("program %0d: memory %h = %h, expected %h", p, i, mem.m[i], rmem[i]));
      checks++;
    end
    $display("programs %0d, instructions %0d: pause %0d, INST-DONE resets %0d, untaken-branch resets %0d, taken branches %0d, JSR %0d, JSRR %0d, five-state %0d, TRAP %0d",
             NPROG, n_inst, n_pause, n_done_reset, n_br_reset, n_br_taken, n_jsr, n_jsrr, n_five_state, n_trap);
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
