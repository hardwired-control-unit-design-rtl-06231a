// lc3_datapath_model: behavioural model of the classic LC-3 datapath, used
// only to exercise the control unit in simulation.
//
// It holds the register file R0..R7, the condition codes N/Z/P, MAR, MDR and
// the branch-enable register BEN, and forms the bus from the four gates
// (GatePC, GateMDR, GateALU, GateMARMUX). SR1 is picked by SR1MUX, SR2 by
// IR[5] (register or imm5), the ALU does ADD/AND/NOT/PASSA, the address adder
// adds ADDR1MUX (PC or SR1) and ADDR2MUX (0, offset6, PCoffset9,
// PCoffset11), and MARMUX picks the adder or the zero-extended trap vector.
// MDR loads memory data when MIO.EN is set, otherwise the bus. BEN is loaded
// in the same fetch state as IR, so it is computed from the instruction on
// the bus: BEN = IR[11]&N | IR[10]&Z | IR[9]&P. Condition codes reset to Z.
// All registers load at the rising clock edge.
module lc3_datapath_model
  import lc3_ctrl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_word_t  ctrl,
  input  logic [15:0] ir,
  input  logic [15:0] pc,
  input  logic [15:0] mem_rdata,
  output logic [15:0] bus,
  output logic [15:0] adder,
  output logic [15:0] sr1,
  output logic        ben,
  output logic [15:0] mar,
  output logic [15:0] mdr,
  output logic [15:0] regs [8],
  output logic [2:0]  nzp
);

  logic [15:0] sr2, op2, alu, addr1, addr2, marmux_out;
  logic [2:0]  sr1_sel, dr_sel;

  always_comb begin
    unique case (ctrl.sr1mux)
      SR1MUX_IR11_9: sr1_sel = ir[11:9];
      SR1MUX_IR8_6:  sr1_sel = ir[8:6];
      default:       sr1_sel = 3'd6;
    endcase
    unique case (ctrl.drmux)
      DRMUX_IR11_9: dr_sel = ir[11:9];
      DRMUX_R7:     dr_sel = 3'd7;
      default:      dr_sel = 3'd6;
    endcase
    sr1 = regs[sr1_sel];
    sr2 = regs[ir[2:0]];
    op2 = ir[5] ? {{11{ir[4]}}, ir[4:0]} : sr2;
    unique case (ctrl.aluk)
      ALUK_ADD:   alu = sr1 + op2;
      ALUK_AND:   alu = sr1 & op2;
      ALUK_NOT:   alu = ~sr1;
      ALUK_PASSA: alu = sr1;
    endcase
    addr1 = (ctrl.addr1mux == ADDR1MUX_BASER) ? sr1 : pc;
    unique case (ctrl.addr2mux)
      ADDR2MUX_ZERO:  addr2 = 16'd0;
      ADDR2MUX_OFF6:  addr2 = {{10{ir[5]}}, ir[5:0]};
      ADDR2MUX_OFF9:  addr2 = {{7{ir[8]}}, ir[8:0]};
      ADDR2MUX_OFF11: addr2 = {{5{ir[10]}}, ir[10:0]};
    endcase
    adder      = addr1 + addr2;
    marmux_out = (ctrl.marmux == MARMUX_ADDER) ? adder : {8'd0, ir[7:0]};
    bus = 16'd0;
    if (ctrl.gate_pc)     bus = pc;
    if (ctrl.gate_mdr)    bus = mdr;
    if (ctrl.gate_alu)    bus = alu;
    if (ctrl.gate_marmux) bus = marmux_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
      nzp <= 3'b010;
      mar <= '0;
      mdr <= '0;
      ben <= 1'b0;
    end else begin
      if (ctrl.ld_reg) regs[dr_sel] <= bus;
      if (ctrl.ld_cc)  nzp <= bus[15] ? 3'b100 : (bus == 16'd0) ? 3'b010 : 3'b001;
      if (ctrl.ld_mar) mar <= bus;
      if (ctrl.ld_mdr) mdr <= ctrl.mio_en ? mem_rdata : bus;
      if (ctrl.ld_ben) ben <= |(bus[11:9] & nzp);
    end
  end

  // Only one gate may drive the bus.
  always_ff @(posedge clk)
    if (rst_n)
      assert ($countones({ctrl.gate_pc, ctrl.gate_mdr, ctrl.gate_alu, ctrl.gate_marmux}) <= 1)
        else $error("bus conflict");

endmodule
