// load_register: a register with a load enable, used for the instruction
// register (IR) and the program counter (PC) of the control unit.
//
// When ld is high at a rising clock edge the register takes data; otherwise
// it keeps its value. rst_n is an asynchronous power-on reset to
// RESET_VALUE. In the control unit, IR is loaded from the bus in the third
// fetch state and PC from the PCMUX output; both feed the control logic and
// the datapath. The reset and its value are this design's additions.
module load_register #(
  parameter int unsigned      WIDTH       = 16,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (ld) q <= data;
  end

endmodule
