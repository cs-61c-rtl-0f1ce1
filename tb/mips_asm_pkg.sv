// mips_asm_pkg: testbench helpers for the MIPS-subset processors.
//
// Encoders for the seven instructions (add, sub, ori, lw, sw, beq, j) and a
// nop, and a reference instruction-set model (iss_*) that executes a
// program one instruction at a time, written from the register-transfer
// definitions and independent of the RTL. The model stores R[rt] on sw and
// branches to PC+4+(offset<<2) on beq, as the processors do.
package mips_asm_pkg;

  localparam int unsigned IMEM_WORDS = 256;
  localparam int unsigned DMEM_WORDS = 256;

  function automatic logic [31:0] enc_r(int rs, int rt, int rd, logic [5:0] fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] a_add(int rd, int rs, int rt); return enc_r(rs, rt, rd, 6'h20); endfunction
  function automatic logic [31:0] a_sub(int rd, int rs, int rt); return enc_r(rs, rt, rd, 6'h22); endfunction
  function automatic logic [31:0] a_ori(int rt, int rs, int imm); return enc_i(6'h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] a_lw (int rt, int off, int rs); return enc_i(6'h23, rs, rt, off); endfunction
  function automatic logic [31:0] a_sw (int rt, int off, int rs); return enc_i(6'h2b, rs, rt, off); endfunction
  function automatic logic [31:0] a_beq(int rs, int rt, int off); return enc_i(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] a_j  (int word_addr);           return {6'h02, 26'(word_addr)}; endfunction
  function automatic logic [31:0] a_nop();                        return 32'h0000_0000; endfunction

  // Reference model state
  typedef struct {
    logic [31:0] pc;
    logic [31:0] r   [32];
    logic [31:0] m   [DMEM_WORDS];
  } iss_t;

  // Processor reset: PC and registers cleared. Data memory is not reset;
  // clear_mem models its power-up state (all zeros).
  function automatic void iss_reset(ref iss_t s, input bit clear_mem);
    s.pc = 0;
    foreach (s.r[i]) s.r[i] = 0;
    if (clear_mem) foreach (s.m[i]) s.m[i] = 0;
  endfunction

  // Execute one instruction. Returns a code: 0 other, 1 add, 2 sub, 3 ori,
  // 4 lw, 5 sw, 6 beq taken, 7 beq not taken, 8 j.
  function automatic int iss_step(ref iss_t s, input logic [31:0] ins);
    logic [5:0]  op  = ins[31:26];
    logic [5:0]  fn  = ins[5:0];
    int          rs  = int'(ins[25:21]);
    int          rt  = int'(ins[20:16]);
    int          rd  = int'(ins[15:11]);
    logic [31:0] sx  = {{16{ins[15]}}, ins[15:0]};
    logic [31:0] zx  = {16'd0, ins[15:0]};
    logic [31:0] nxt = s.pc + 4;
    logic [31:0] ea;
    int          code = 0;
    case (op)
      6'h00: if (fn == 6'h20) begin if (rd != 0) s.r[rd] = s.r[rs] + s.r[rt]; code = 1; end
             else if (fn == 6'h22) begin if (rd != 0) s.r[rd] = s.r[rs] - s.r[rt]; code = 2; end
      6'h0d: begin if (rt != 0) s.r[rt] = s.r[rs] | zx; code = 3; end
      6'h23: begin ea = s.r[rs] + sx; if (rt != 0) s.r[rt] = s.m[ea[9:2]]; code = 4; end
      6'h2b: begin ea = s.r[rs] + sx; s.m[ea[9:2]] = s.r[rt]; code = 5; end
      6'h04: if (s.r[rs] == s.r[rt]) begin nxt = s.pc + 4 + (sx << 2); code = 6; end
             else code = 7;
      6'h02: begin nxt = {nxt[31:28], ins[25:0], 2'b00}; code = 8; end
      default: ;
    endcase
    s.pc = nxt;
    return code;
  endfunction

endpackage
