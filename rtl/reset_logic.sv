// reset_logic: computes the counter's RESET input outside the control ROM.
//
//   reset = inst_done | (!ben & br_reset)
// inst_done is set by the last execute state of every instruction;
// br_reset is set by the first branch execute state, so the counter returns
// to fetch there when the branch enable BEN is 0 (branch not taken) and the
// PC is left alone. Moving this term out of the ROM takes BEN out of the ROM
// address. Purely combinational.
module reset_logic (
  input  logic inst_done,
  input  logic br_reset,
  input  logic ben,
  output logic reset
);

  assign reset = inst_done | (~ben & br_reset);

endmodule
