// alu: the datapath's arithmetic-logic unit.
//
// Computes a+b, a-b or a|b as selected by the 2-bit ALUctr (00 ADD, 01 SUB,
// 10 OR) and raises Zero when the result is all zeros; beq subtracts and
// branches on Zero. The unused code 11 yields 0. There is no overflow
// detection. Combinational. The operations and the Zero output are the
// lecture's; the encoding of code 11 is this design's choice.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctr_e         alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
