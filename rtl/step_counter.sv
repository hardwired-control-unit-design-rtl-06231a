// step_counter: the N-cycle binary counter that sequences the control unit.
//
// Each value of the counter is one state of the instruction cycle: with the
// default 3 bits, values 0..2 are the three fetch states and 3..7 the up to
// five execute states. The counter normally advances by one per clock and
// wraps from the last value back to 0. Two control inputs change that:
//   reset - the next value is 0, which starts the fetch of the next
//           instruction (an instruction that needs fewer than five execute
//           states ends early this way);
//   pause - the value is held, so a state that waits for memory repeats.
// Both act at the next rising clock edge. pause has priority over reset,
// because the last state of a store both waits for memory and ends the
// instruction; that priority is this design's choice. rst_n is an
// asynchronous power-on reset to 0, also this design's addition.
module step_counter #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reset,
  input  logic             pause,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (pause) count <= count;
    else if (reset) count <= '0;
    else            count <= count + 1'b1;
  end

endmodule
