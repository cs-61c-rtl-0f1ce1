// ctrl_or_logic: the OR plane of the main controller.
//
// Every control signal is the OR of the decoded-instruction lines that need
// it asserted, exactly as in the lecture's controller equations:
//   RegDst = add+sub, ALUSrc = ori+lw+sw, MemtoReg = lw,
//   RegWrite = add+sub+ori+lw, MemWrite = sw, nPCsel = beq, Jump = jump,
//   ExtOp = lw+sw, ALUctr[0] = sub+beq, ALUctr[1] = ori.
// Table entries marked "don't care" therefore take whatever these sums give.
// Purely combinational.
module ctrl_or_logic
  import mips_pkg::*;
(
  input  dec_t  dec,
  output ctrl_t ctrl
);

  always_comb begin
    ctrl.reg_dst    = dec.add | dec.sub;
    ctrl.alu_src    = dec.ori | dec.lw | dec.sw;
    ctrl.mem_to_reg = dec.lw;
    ctrl.reg_write  = dec.add | dec.sub | dec.ori | dec.lw;
    ctrl.mem_write  = dec.sw;
    ctrl.npc_sel    = dec.beq;
    ctrl.jump       = dec.jump;
    ctrl.ext_op     = dec.lw | dec.sw;
    ctrl.alu_ctr    = alu_ctr_e'({dec.ori, dec.sub | dec.beq});
  end

endmodule
