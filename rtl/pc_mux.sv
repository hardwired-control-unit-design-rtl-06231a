// pc_mux: the four-input PCMUX that chooses the next PC, with the IR[11]
// select logic for JSR/JSRR.
//
// Inputs: PC + 1 (incremented here), the bus, the address generation adder
// and the SR1 register output (BaseR). The select normally comes from the
// control word's pcmux field. In the single JSR/JSRR execute state the
// control word sets ir11_sel instead, and IR[11] picks the input directly:
// IR[11] = 1 (JSR) takes the adder (PC + offset11), IR[11] = 0 (JSRR) takes
// SR1. This keeps IR[11] out of the control ROM address. pcmux_eff is the
// select actually used. The encodings follow the usual LC-3 PCMUX with the
// SR1 input as code 3. Purely combinational.
module pc_mux
  import lc3_ctrl_pkg::*;
(
  input  logic [15:0] pc,
  input  logic [15:0] bus,
  input  logic [15:0] adder,
  input  logic [15:0] sr1,
  input  pcmux_e      pcmux,
  input  logic        ir11_sel,
  input  logic        ir11,
  output logic [15:0] pc_next,
  output pcmux_e      pcmux_eff
);

  always_comb begin
    if (ir11_sel) pcmux_eff = ir11 ? PCMUX_ADDER : PCMUX_SR1;
    else          pcmux_eff = pcmux;
    unique case (pcmux_eff)
      PCMUX_PC1:   pc_next = pc + 16'd1;
      PCMUX_BUS:   pc_next = bus;
      PCMUX_ADDER: pc_next = adder;
      PCMUX_SR1:   pc_next = sr1;
    endcase
  end

endmodule
