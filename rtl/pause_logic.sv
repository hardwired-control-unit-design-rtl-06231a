// pause_logic: computes the counter's PAUSE input outside the control ROM.
//
// A state that must wait for memory sets the control signal wait_mem. The
// counter is then held while the memory ready signal R (mem_ready) is low:
//   pause = !mem_ready & wait_mem
// Moving this term out of the ROM takes R out of the ROM address. Purely
// combinational.
module pause_logic (
  input  logic mem_ready,
  input  logic wait_mem,
  output logic pause
);

  assign pause = ~mem_ready & wait_mem;

endmodule
