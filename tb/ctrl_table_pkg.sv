// ctrl_table_pkg: expected control signals per instruction, transcribed
// from the control-signal summary table. Don't-care entries are filled with
// the value the Boolean controller equations give for them.
package ctrl_table_pkg;
  import mips_pkg::*;

  // index: 0 add, 1 sub, 2 ori, 3 lw, 4 sw, 5 beq, 6 jump, 7 none (nop)
  function automatic ctrl_t expected(int k);
    ctrl_t c;
    //                     RegDst ALUSrc MemtoReg RegWr MemWr nPCsel Jump ExtOp ALUctr
    case (k)
      0: c = '{reg_dst:1, alu_src:0, mem_to_reg:0, reg_write:1, mem_write:0, npc_sel:0, jump:0, ext_op:0, alu_ctr:ALU_ADD};
      1: c = '{reg_dst:1, alu_src:0, mem_to_reg:0, reg_write:1, mem_write:0, npc_sel:0, jump:0, ext_op:0, alu_ctr:ALU_SUB};
      2: c = '{reg_dst:0, alu_src:1, mem_to_reg:0, reg_write:1, mem_write:0, npc_sel:0, jump:0, ext_op:0, alu_ctr:ALU_OR};
      3: c = '{reg_dst:0, alu_src:1, mem_to_reg:1, reg_write:1, mem_write:0, npc_sel:0, jump:0, ext_op:1, alu_ctr:ALU_ADD};
      4: c = '{reg_dst:0, alu_src:1, mem_to_reg:0, reg_write:0, mem_write:1, npc_sel:0, jump:0, ext_op:1, alu_ctr:ALU_ADD};
      5: c = '{reg_dst:0, alu_src:0, mem_to_reg:0, reg_write:0, mem_write:0, npc_sel:1, jump:0, ext_op:0, alu_ctr:ALU_SUB};
      6: c = '{reg_dst:0, alu_src:0, mem_to_reg:0, reg_write:0, mem_write:0, npc_sel:0, jump:1, ext_op:0, alu_ctr:ALU_ADD};
      default: c = '{reg_dst:0, alu_src:0, mem_to_reg:0, reg_write:0, mem_write:0, npc_sel:0, jump:0, ext_op:0, alu_ctr:ALU_ADD};
    endcase
    return c;
  endfunction
endpackage
