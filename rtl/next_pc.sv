// next_pc: next-instruction-address logic of the single-cycle processor.
//
// The default successor is PC + 4. The branch target is PC + 4 + (sign-extended imm16 << 2);
// it is taken when nPCsel (beq) and the ALU's Zero are both high. Jump
// replaces the PC with {PC+4[31:28], target, 00}. Combinational.
//
// The +4 adder, the shift-left-2 branch adder and the AND of Branch with Zero
// are drawn in the lecture's datapath. The branch offset is always
// sign-extended here, independent of ExtOp, and the jump-target rule is the
// usual MIPS one; both are this design's reading.
module next_pc (
  input  logic [31:0] pc,
  input  logic [15:0] imm16,
  input  logic [25:0] target,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        jump,
  output logic [31:0] npc
);

  logic [31:0] pc_plus4, br_target;

  always_comb begin
    pc_plus4  = pc + 32'd4;
    br_target = pc_plus4 + {{14{imm16[15]}}, imm16, 2'b00};
    if (jump)                 npc = {pc_plus4[31:28], target, 2'b00};
    else if (npc_sel && zero) npc = br_target;
    else                      npc = pc_plus4;
  end

endmodule
