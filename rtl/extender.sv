// extender: widens the 16-bit immediate to 32 bits.
//
// ExtOp = 0 fills the upper half with zeros (ori), ExtOp = 1 copies bit 15
// into it (lw, sw). Combinational. Function and encoding follow the
// lecture's control-signal table.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);

  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
