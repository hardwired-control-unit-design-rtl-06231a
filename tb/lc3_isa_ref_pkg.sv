// lc3_isa_ref_pkg: instruction-level LC-3 reference interpreter for the
// testbenches. It keeps its own memory, registers, PC and condition codes and
// executes one instruction per call of ref_step, returning the number of
// execute states the multi-cycle control unit is expected to spend on it
// (BR: 1 if not taken, 2 if taken). RTI and the reserved opcode are no-ops;
// TRAP jumps through the vector table and saves the return address in R7;
// LEA leaves the condition codes alone.
package lc3_isa_ref_pkg;

  logic [15:0] rmem [65536];
  logic [15:0] rreg [8];
  logic [15:0] rpc;
  logic [2:0]  rnzp;

  function automatic logic [15:0] sext(input logic [15:0] v, input int bits);
    logic [15:0] m;
    m = 16'hFFFF << bits;
    return v[bits-1] ? (v | m) : (v & ~m);
  endfunction

  function automatic logic [2:0] cc_of(input logic [15:0] v);
    return v[15] ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
  endfunction

  function automatic void ref_reset(input logic [15:0] start);
    for (int r = 0; r < 8; r++) rreg[r] = '0;
    rpc  = start;
    rnzp = 3'b010;
  endfunction

  function automatic int ref_step();
    logic [15:0] inst, a, b, t;
    logic [2:0]  dr, s1, s2;
    int          states;
    inst = rmem[rpc];
    rpc  = rpc + 1;
    dr   = inst[11:9];
    s1   = inst[8:6];
    s2   = inst[2:0];
    b    = inst[5] ? sext(inst, 5) : rreg[s2];
    states = 1;
    case (inst[15:12])
      4'b0001: begin rreg[dr] = rreg[s1] + b; rnzp = cc_of(rreg[dr]); end
      4'b0101: begin rreg[dr] = rreg[s1] & b; rnzp = cc_of(rreg[dr]); end
      4'b1001: begin rreg[dr] = ~rreg[s1];    rnzp = cc_of(rreg[dr]); end
      4'b0000: if (|(inst[11:9] & rnzp)) begin rpc = rpc + sext(inst, 9); states = 2; end
      4'b1100: rpc = rreg[s1];
      4'b0100: begin
        t = rpc;
        if (inst[11]) rpc = rpc + sext(inst, 11);
        else          rpc = rreg[s1];
        rreg[7] = t;
      end
      4'b0010: begin rreg[dr] = rmem[rpc + sext(inst, 9)]; rnzp = cc_of(rreg[dr]); states = 3; end
      4'b0110: begin rreg[dr] = rmem[rreg[s1] + sext(inst, 6)]; rnzp = cc_of(rreg[dr]); states = 3; end
      4'b1010: begin a = rmem[rpc + sext(inst, 9)]; rreg[dr] = rmem[a]; rnzp = cc_of(rreg[dr]); states = 5; end
      4'b0011: begin rmem[rpc + sext(inst, 9)] = rreg[dr]; states = 3; end
      4'b0111: begin rmem[rreg[s1] + sext(inst, 6)] = rreg[dr]; states = 3; end
      4'b1011: begin a = rmem[rpc + sext(inst, 9)]; rmem[a] = rreg[dr]; states = 5; end
      4'b1110: rreg[dr] = rpc + sext(inst, 9);
      4'b1111: begin rreg[7] = rpc; rpc = rmem[{8'd0, inst[7:0]}]; states = 3; end
      default: ;
    endcase
    return states;
  endfunction

endpackage
