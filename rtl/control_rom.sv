// control_rom: the control logic of the LC-3 multi-cycle hardwired control
// unit, held as a 2^7 x 29-bit read-only memory (3,712 bits).
//
// The 7-bit address is {step counter, IR[15:12]}; the word read is the
// control word (lc3_ctrl_pkg::ctrl_word_t) for that state. Memory ready R,
// the branch enable BEN and IR[11] are not part of the address: the
// PAUSE, RESET and PCMUX logic outside the ROM combine them with the
// wait_mem, br_reset, inst_done and ir11_pcmux bits of the word.
//
// Contents. Steps 0..2 fetch the instruction and are the same for every
// opcode:
//   0: MAR <- PC, PC <- PC + 1
//   1: MDR <- M[MAR]                  (waits for memory)
//   2: IR <- MDR, load BEN
// Steps 3..7 execute it (RTL of the LC-3 state sequences):
//   ADD/AND/NOT  3: DR <- result, set CC, done
//   BR           3: br_reset (back to fetch if BEN = 0)
//                4: PC <- PC + off9, done
//   JMP          3: PC <- BaseR, done
//   JSR/JSRR     3: R7 <- PC, PC <- PC + off11 or BaseR by IR[11], done
//   LD/LDR       3: MAR <- PC + off9 / BaseR + off6
//                4: MDR <- M[MAR] (wait)   5: DR <- MDR, set CC, done
//   LDI          3: MAR <- PC + off9   4: MDR <- M (wait)   5: MAR <- MDR
//                6: MDR <- M (wait)    7: DR <- MDR, set CC, done
//   ST/STR       3: MAR <- PC + off9 / BaseR + off6
//                4: MDR <- SR   5: M[MAR] <- MDR (wait), done
//   STI          3: MAR <- PC + off9   4: MDR <- M (wait)   5: MAR <- MDR
//                6: MDR <- SR          7: M[MAR] <- MDR (wait), done
//   LEA          3: DR <- PC + off9, done (condition codes unchanged)
//   TRAP         3: MAR <- ZEXT(trapvect8)
//                4: MDR <- M (wait), R7 <- PC   5: PC <- MDR, done
//   RTI, 1101    3: done (no privilege or stack support)
// Every step not listed is an all-zero word with inst_done set. The ROM is
// built at elaboration time from the function ctrl_word below, which is the
// formula behind the table. The output is combinational from the address.
// The ROM organisation (7-bit address, 29-bit word, the four added bits)
// follows the original architecture; the state contents are the standard
// LC-3 sequences re-timed onto the counter steps, and the treatment of RTI,
// the reserved opcode and unused steps is this design's own choice.
module control_rom
  import lc3_ctrl_pkg::*;
#(
  parameter int unsigned ADDR_BITS = ROM_ABITS,  // 7
  parameter int unsigned WORD_BITS = CTRL_BITS   // 29
) (
  input  logic [STEP_BITS-1:0] step,
  input  logic [OPC_BITS-1:0]  opcode,
  output ctrl_word_t           ctrl
);

  localparam int unsigned DEPTH = 1 << ADDR_BITS;

  // Control word for one (step, opcode) address.
  function automatic ctrl_word_t ctrl_word(logic [STEP_BITS-1:0] s, logic [OPC_BITS-1:0] op);
    ctrl_word_t w;
    w = CTRL_NOP;
    if (s == STEP_FETCH1) begin
      w.ld_mar = 1'b1; w.gate_pc = 1'b1;                         // MAR <- PC
      w.ld_pc  = 1'b1; w.pcmux = PCMUX_PC1;                       // PC <- PC + 1
    end else if (s == STEP_FETCH2) begin
      w.ld_mdr = 1'b1; w.mio_en = 1'b1; w.r_w = RW_READ; w.wait_mem = 1'b1;
    end else if (s == STEP_FETCH3) begin
      w.gate_mdr = 1'b1; w.ld_ir = 1'b1; w.ld_ben = 1'b1;
    end else begin
      unique case (opcode_e'(op))
        OP_ADD, OP_AND, OP_NOT: begin
          if (s == STEP_EXEC1) begin
            w.sr1mux = SR1MUX_IR8_6; w.drmux = DRMUX_IR11_9;
            w.aluk = (op == OP_ADD) ? ALUK_ADD : (op == OP_AND) ? ALUK_AND : ALUK_NOT;
            w.gate_alu = 1'b1; w.ld_reg = 1'b1; w.ld_cc = 1'b1;
          end
          w.inst_done = 1'b1;
        end
        OP_BR: begin
          if (s == STEP_EXEC1) w.br_reset = 1'b1;
          else begin
            if (s == STEP_EXEC2) begin
              w.addr1mux = ADDR1MUX_PC; w.addr2mux = ADDR2MUX_OFF9;
              w.pcmux = PCMUX_ADDER; w.ld_pc = 1'b1;
            end
            w.inst_done = 1'b1;
          end
        end
        OP_JMP: begin
          if (s == STEP_EXEC1) begin
            w.sr1mux = SR1MUX_IR8_6; w.addr1mux = ADDR1MUX_BASER;
            w.addr2mux = ADDR2MUX_ZERO; w.pcmux = PCMUX_ADDER; w.ld_pc = 1'b1;
          end
          w.inst_done = 1'b1;
        end
        OP_JSR: begin
          if (s == STEP_EXEC1) begin
            w.gate_pc = 1'b1; w.drmux = DRMUX_R7; w.ld_reg = 1'b1;   // R7 <- PC
            w.addr1mux = ADDR1MUX_PC; w.addr2mux = ADDR2MUX_OFF11;   // JSR target
            w.sr1mux = SR1MUX_IR8_6;                                  // JSRR BaseR
            w.ir11_pcmux = 1'b1; w.ld_pc = 1'b1;
          end
          w.inst_done = 1'b1;
        end
        OP_LD, OP_LDR: begin
          if (s == STEP_EXEC1) begin
            w.ld_mar = 1'b1; w.gate_marmux = 1'b1; w.marmux = MARMUX_ADDER;
            if (op == OP_LD) begin
              w.addr1mux = ADDR1MUX_PC; w.addr2mux = ADDR2MUX_OFF9;
            end else begin
              w.addr1mux = ADDR1MUX_BASER; w.addr2mux = ADDR2MUX_OFF6;
              w.sr1mux = SR1MUX_IR8_6;
            end
          end else if (s == STEP_EXEC2) begin
            w.ld_mdr = 1'b1; w.mio_en = 1'b1; w.r_w = RW_READ; w.wait_mem = 1'b1;
          end else begin
            if (s == STEP_EXEC3) begin
              w.gate_mdr = 1'b1; w.drmux = DRMUX_IR11_9; w.ld_reg = 1'b1; w.ld_cc = 1'b1;
            end
            w.inst_done = 1'b1;
          end
        end
        OP_LDI, OP_STI: begin
          unique case (s)
            STEP_EXEC1: begin
              w.ld_mar = 1'b1; w.gate_marmux = 1'b1; w.marmux = MARMUX_ADDER;
              w.addr1mux = ADDR1MUX_PC; w.addr2mux = ADDR2MUX_OFF9;
            end
            STEP_EXEC2: begin
              w.ld_mdr = 1'b1; w.mio_en = 1'b1; w.r_w = RW_READ; w.wait_mem = 1'b1;
            end
            STEP_EXEC3: begin
              w.gate_mdr = 1'b1; w.ld_mar = 1'b1;                     // MAR <- MDR
            end
            STEP_EXEC4: begin
              if (op == OP_LDI) begin
                w.ld_mdr = 1'b1; w.mio_en = 1'b1; w.r_w = RW_READ; w.wait_mem = 1'b1;
              end else begin
                w.sr1mux = SR1MUX_IR11_9; w.aluk = ALUK_PASSA;
                w.gate_alu = 1'b1; w.ld_mdr = 1'b1;                   // MDR <- SR
              end
            end
            default: begin                                            // STEP_EXEC5
              if (op == OP_LDI) begin
                w.gate_mdr = 1'b1; w.drmux = DRMUX_IR11_9; w.ld_reg = 1'b1; w.ld_cc = 1'b1;
              end else begin
                w.mio_en = 1'b1; w.r_w = RW_WRITE; w.wait_mem = 1'b1;
              end
              w.inst_done = 1'b1;
            end
          endcase
        end
        OP_ST, OP_STR: begin
          if (s == STEP_EXEC1) begin
            w.ld_mar = 1'b1; w.gate_marmux = 1'b1; w.marmux = MARMUX_ADDER;
            if (op == OP_ST) begin
              w.addr1mux = ADDR1MUX_PC; w.addr2mux = ADDR2MUX_OFF9;
            end else begin
              w.addr1mux = ADDR1MUX_BASER; w.addr2mux = ADDR2MUX_OFF6;
              w.sr1mux = SR1MUX_IR8_6;
            end
          end else if (s == STEP_EXEC2) begin
            w.sr1mux = SR1MUX_IR11_9; w.aluk = ALUK_PASSA;
            w.gate_alu = 1'b1; w.ld_mdr = 1'b1;
          end else begin
            if (s == STEP_EXEC3) begin
              w.mio_en = 1'b1; w.r_w = RW_WRITE; w.wait_mem = 1'b1;
            end
            w.inst_done = 1'b1;
          end
        end
        OP_LEA: begin
          if (s == STEP_EXEC1) begin
            w.addr1mux = ADDR1MUX_PC; w.addr2mux = ADDR2MUX_OFF9;
            w.marmux = MARMUX_ADDER; w.gate_marmux = 1'b1;
            w.drmux = DRMUX_IR11_9; w.ld_reg = 1'b1;
          end
          w.inst_done = 1'b1;
        end
        OP_TRAP: begin
          if (s == STEP_EXEC1) begin
            w.marmux = MARMUX_ZEXT8; w.gate_marmux = 1'b1; w.ld_mar = 1'b1;
          end else if (s == STEP_EXEC2) begin
            w.ld_mdr = 1'b1; w.mio_en = 1'b1; w.r_w = RW_READ; w.wait_mem = 1'b1;
            w.gate_pc = 1'b1; w.drmux = DRMUX_R7; w.ld_reg = 1'b1;   // R7 <- PC
          end else begin
            if (s == STEP_EXEC3) begin
              w.gate_mdr = 1'b1; w.pcmux = PCMUX_BUS; w.ld_pc = 1'b1;
            end
            w.inst_done = 1'b1;
          end
        end
        default: w.inst_done = 1'b1;                                  // RTI, reserved
      endcase
    end
    return w;
  endfunction

  ctrl_word_t rom [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    localparam logic [ADDR_BITS-1:0] A = ADDR_BITS'(a);
    assign rom[a] = ctrl_word(A[ADDR_BITS-1 -: STEP_BITS], A[OPC_BITS-1:0]);
  end

  assign ctrl = rom[{step, opcode}];

  initial begin
    assert (WORD_BITS == $bits(ctrl_word_t))
      else $error("WORD_BITS must equal the control word width");
    assert (ADDR_BITS == STEP_BITS + OPC_BITS)
      else $error("ADDR_BITS must equal step plus opcode bits");
  end

endmodule
