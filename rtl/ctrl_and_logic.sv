// ctrl_and_logic: the AND plane of the main controller.
//
// Each output line is one product term over the opcode bits (instruction
// bits 31:26) and, for the R-type instructions, the func bits (instruction
// bits 5:0). Exactly one line is high for a recognised instruction; for any
// other encoding (a nop, for instance) all lines are low, so the OR plane
// then asserts no control signal. Purely combinational.
//
// The product terms and encodings follow the lecture's controller equations;
// the packaging of the lines as a struct is this design's choice.
module ctrl_and_logic
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] func,
  output dec_t       dec
);

  logic rtype;

  always_comb begin
    rtype    = (opcode == OP_RTYPE);
    dec.ori  = (opcode == OP_ORI);
    dec.lw   = (opcode == OP_LW);
    dec.sw   = (opcode == OP_SW);
    dec.beq  = (opcode == OP_BEQ);
    dec.jump = (opcode == OP_J);
    dec.add  = rtype && (func == FN_ADD);
    dec.sub  = rtype && (func == FN_SUB);
  end

endmodule
