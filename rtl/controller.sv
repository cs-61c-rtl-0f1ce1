// controller: main control unit of the single-cycle and pipelined processors.
//
// A two-level implementation: ctrl_and_logic turns opcode and func into one
// line per instruction (add, sub, ori, lw, sw, beq, jump) and ctrl_or_logic
// combines those lines into the control signals RegDst, ALUSrc, MemtoReg,
// RegWrite, MemWrite, nPCsel, Jump, ExtOp and the 2-bit ALUctr. This split
// is the lecture's; it is combinational, with no state and no clock.
module controller
  import mips_pkg::*;
(
  input  logic [5:0] opcode,  // instruction bits 31:26
  input  logic [5:0] func,    // instruction bits 5:0
  output ctrl_t      ctrl
);

  dec_t dec;

  ctrl_and_logic u_and (.opcode(opcode), .func(func), .dec(dec));
  ctrl_or_logic  u_or  (.dec(dec), .ctrl(ctrl));

endmodule
