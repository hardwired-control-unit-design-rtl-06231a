// lc3_control_unit: multi-cycle hardwired control unit for the LC-3.
//
// A 3-bit step counter counts through the states of the instruction cycle
// (0..2 fetch, 3..7 execute). The control logic is a 2^7 x 29-bit ROM
// addressed by {counter, IR[15:12]}; no decode state is needed because the
// ROM reads the opcode straight from IR once fetch has loaded it. Three small
// pieces of logic sit outside the ROM so that its address stays at 7 bits:
//   PAUSE = !R & WAIT-MEM             holds the counter during a slow memory
//                                      access (R = memory ready)
//   RESET = INST-DONE | !BEN & BR-RESET  starts the next fetch after the
//                                      last state, or after an untaken branch
//   PCMUX select from IR[11] in the single JSR/JSRR state (adder for JSR,
//                                      SR1 = BaseR for JSRR)
// The unit holds IR and PC itself. IR loads from the bus; PC loads from the
// PCMUX, whose inputs are PC + 1, the bus, the address adder and SR1.
//
// Interface: the datapath (register file, ALU, address adder, MAR, MDR,
// condition codes, BEN register, memory interface) connects through ports.
// It receives ctrl, ir and pc, and returns bus, adder, sr1, ben and
// mem_ready. ctrl is the ROM word with its pcmux field replaced by the
// select actually used. Everything is combinational from the counter, IR and
// the status inputs, so the datapath sees the control word in the same cycle;
// the counter, IR and PC change at the rising clock edge. rst_n is an
// asynchronous power-on reset that starts fetching at PC_RESET; reset value
// and its default (x3000) are this design's choice.
module lc3_control_unit
  import lc3_ctrl_pkg::*;
#(
  parameter logic [15:0] PC_RESET = 16'h3000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [15:0]          bus,
  input  logic [15:0]          adder,
  input  logic [15:0]          sr1,
  input  logic                 mem_ready,
  input  logic                 ben,
  output ctrl_word_t           ctrl,
  output logic [15:0]          ir,
  output logic [15:0]          pc,
  output logic [STEP_BITS-1:0] step,
  output logic                 pause,
  output logic                 reset
);

  ctrl_word_t  rom_word;
  pcmux_e      pcmux_eff;
  logic [15:0] pc_next;

  step_counter #(.WIDTH(STEP_BITS)) u_counter (
    .clk, .rst_n, .reset, .pause, .count(step)
  );

  load_register #(.WIDTH(16), .RESET_VALUE(16'h0000)) u_ir (
    .clk, .rst_n, .ld(rom_word.ld_ir), .data(bus), .q(ir)
  );

  load_register #(.WIDTH(16), .RESET_VALUE(PC_RESET)) u_pc (
    .clk, .rst_n, .ld(rom_word.ld_pc), .data(pc_next), .q(pc)
  );

  control_rom u_rom (
    .step, .opcode(ir[15:12]), .ctrl(rom_word)
  );

  pause_logic u_pause (
    .mem_ready, .wait_mem(rom_word.wait_mem), .pause
  );

  reset_logic u_reset (
    .inst_done(rom_word.inst_done), .br_reset(rom_word.br_reset), .ben, .reset
  );

  pc_mux u_pcmux (
    .pc, .bus, .adder, .sr1,
    .pcmux(rom_word.pcmux), .ir11_sel(rom_word.ir11_pcmux), .ir11(ir[11]),
    .pc_next, .pcmux_eff
  );

  always_comb begin
    ctrl       = rom_word;
    ctrl.pcmux = pcmux_eff;
  end

endmodule
