// lc3_ctrl_pkg: types and constants shared by the LC-3 multi-cycle hardwired
// control unit and its testbenches.
//
// The control word is 29 bits wide. Its first 25 bits are the control signals
// of the classic LC-3 datapath without interrupt support (load enables, bus
// gates, multiplexer selects, ALU function, memory enable and read/write).
// The last four are the signals this control unit adds so that the control
// ROM needs only the 3-bit step counter and the 4-bit opcode as its address:
//   wait_mem   - the state waits for memory; PAUSE = !R & wait_mem
//   br_reset   - first branch state; the counter resets if BEN is 0
//   inst_done  - last state of an instruction; the counter resets
//   ir11_pcmux - JSR/JSRR state; IR[11] picks the PCMUX input
// The multiplexer encodings follow the usual LC-3 convention; PCMUX code 3
// (the SR1 register output) is the input added for JSRR. The bit order of the
// word is this design's own choice.
package lc3_ctrl_pkg;

  localparam int unsigned STEP_BITS = 3;   // 3 fetch + at most 5 execute states
  localparam int unsigned OPC_BITS  = 4;   // IR[15:12]
  localparam int unsigned ROM_ABITS = STEP_BITS + OPC_BITS;  // 7
  localparam int unsigned CTRL_BITS = 29;

  // Counter values: 0..2 fetch, 3..7 execute.
  localparam logic [STEP_BITS-1:0] STEP_FETCH1 = 3'd0;
  localparam logic [STEP_BITS-1:0] STEP_FETCH2 = 3'd1;
  localparam logic [STEP_BITS-1:0] STEP_FETCH3 = 3'd2;
  localparam logic [STEP_BITS-1:0] STEP_EXEC1  = 3'd3;
  localparam logic [STEP_BITS-1:0] STEP_EXEC2  = 3'd4;
  localparam logic [STEP_BITS-1:0] STEP_EXEC3  = 3'd5;
  localparam logic [STEP_BITS-1:0] STEP_EXEC4  = 3'd6;
  localparam logic [STEP_BITS-1:0] STEP_EXEC5  = 3'd7;

  typedef enum logic [3:0] {
    OP_BR   = 4'b0000,
    OP_ADD  = 4'b0001,
    OP_LD   = 4'b0010,
    OP_ST   = 4'b0011,
    OP_JSR  = 4'b0100,
    OP_AND  = 4'b0101,
    OP_LDR  = 4'b0110,
    OP_STR  = 4'b0111,
    OP_RTI  = 4'b1000,
    OP_NOT  = 4'b1001,
    OP_LDI  = 4'b1010,
    OP_STI  = 4'b1011,
    OP_JMP  = 4'b1100,
    OP_RES  = 4'b1101,
    OP_LEA  = 4'b1110,
    OP_TRAP = 4'b1111
  } opcode_e;

  typedef enum logic [1:0] {
    PCMUX_PC1   = 2'b00,  // PC + 1
    PCMUX_BUS   = 2'b01,
    PCMUX_ADDER = 2'b10,  // address generation adder
    PCMUX_SR1   = 2'b11   // SR1 output (BaseR), the added fourth input
  } pcmux_e;

  typedef enum logic [1:0] {
    DRMUX_IR11_9 = 2'b00,
    DRMUX_R7     = 2'b01,
    DRMUX_R6     = 2'b10
  } drmux_e;

  typedef enum logic [1:0] {
    SR1MUX_IR11_9 = 2'b00,
    SR1MUX_IR8_6  = 2'b01,
    SR1MUX_R6     = 2'b10
  } sr1mux_e;

  typedef enum logic {
    ADDR1MUX_PC    = 1'b0,
    ADDR1MUX_BASER = 1'b1
  } addr1mux_e;

  typedef enum logic [1:0] {
    ADDR2MUX_ZERO  = 2'b00,
    ADDR2MUX_OFF6  = 2'b01,
    ADDR2MUX_OFF9  = 2'b10,
    ADDR2MUX_OFF11 = 2'b11
  } addr2mux_e;

  typedef enum logic {
    MARMUX_ZEXT8 = 1'b0,  // zero-extended IR[7:0] (trap vector)
    MARMUX_ADDER = 1'b1
  } marmux_e;

  typedef enum logic [1:0] {
    ALUK_ADD   = 2'b00,
    ALUK_AND   = 2'b01,
    ALUK_NOT   = 2'b10,
    ALUK_PASSA = 2'b11
  } aluk_e;

  typedef enum logic {
    RW_READ  = 1'b0,
    RW_WRITE = 1'b1
  } rw_e;

  typedef struct packed {
    // 25 datapath control signals
    logic      ld_mar;
    logic      ld_mdr;
    logic      ld_ir;
    logic      ld_ben;
    logic      ld_reg;
    logic      ld_cc;
    logic      ld_pc;
    logic      gate_pc;
    logic      gate_mdr;
    logic      gate_alu;
    logic      gate_marmux;
    pcmux_e    pcmux;
    drmux_e    drmux;
    sr1mux_e   sr1mux;
    addr1mux_e addr1mux;
    addr2mux_e addr2mux;
    marmux_e   marmux;
    aluk_e     aluk;
    logic      mio_en;
    rw_e       r_w;
    // signals added to shrink the control ROM
    logic      wait_mem;
    logic      br_reset;
    logic      inst_done;
    logic      ir11_pcmux;
  } ctrl_word_t;

  localparam ctrl_word_t CTRL_NOP = '0;

endpackage
