// pipelined_cpu: 5-stage pipelined processor for the same MIPS subset
// (add, sub, ori, lw, sw, beq, j).
//
// Stages and what each does:
//   IF  - fetch the instruction at PC, compute PC+4            -> IF/ID
//   ID  - decode (main controller), read rs and rt, extend the
//         immediate                                             -> ID/EX
//   EX  - ALU on register A and register B or the immediate;
//         branch target = PC+4 + (offset << 2); jump target;
//         choose the write register (rt or rd)                  -> EX/MEM
//   MEM - load or store; a taken beq (Zero) or a j redirects
//         the PC from here                                      -> MEM/WB
//   WB  - write the ALU result or the loaded word to the
//         register whose number came down the pipeline
// The write-register number travels with the instruction through ID/EX,
// EX/MEM and MEM/WB, so the write in WB goes to the instruction's own
// destination and not to a field of whatever instruction is in ID.
//
// Timing: one instruction enters per cycle and each takes five cycles, so a
// program of N instructions finishes in N+4 cycles. The pipeline has no
// hazard handling at all: no forwarding, no stall, no flush. A result can be
// read by the fourth instruction after its producer (the register file is
// written at the edge ending WB), and the three instructions after a taken
// beq or a j are executed. Software must place independent instructions or
// nops there. rst is synchronous: PC = 0 and all pipeline registers hold nops.
//
// The stages, pipeline registers and the carried write-register number
// follow the lecture. Decoding in ID with the single-cycle controller,
// resolving j in MEM like beq, and the load/debug ports are this design's
// choices.
module pipelined_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  word_t                         imem_wdata,
  output word_t                         pc,
  input  reg_addr_t                     dbg_reg_addr,
  output word_t                         dbg_reg_data,
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_mem_addr,
  output word_t                         dbg_mem_data,
  output logic                          wb_valid   // an instruction writes a register this cycle
);

  if_id_t  if_d,  if_q;
  id_ex_t  id_d,  id_q;
  ex_mem_t ex_d,  ex_q;
  mem_wb_t mem_d, mem_q;

  // ---------------- IF ----------------
  word_t instr_if, pc_next;
  logic  redirect;

  inst_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .instr(instr_if),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  always_comb begin
    if_d.pc_plus4 = pc + 32'd4;
    if_d.instr    = instr_if;
    redirect      = ex_q.ctrl.jump || (ex_q.ctrl.npc_sel && ex_q.zero);
    if (ex_q.ctrl.jump)  pc_next = ex_q.jump_target;
    else if (redirect)   pc_next = ex_q.branch_target;
    else                 pc_next = if_d.pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

  pipe_reg #(.T(if_id_t)) u_if_id (.clk, .rst, .d(if_d), .q(if_q));

  // ---------------- ID ----------------
  word_t wb_data;

  controller u_ctrl (.opcode(if_q.instr[31:26]), .func(if_q.instr[5:0]), .ctrl(id_d.ctrl));

  regfile u_rf (
    .clk, .rst,
    .ra1(if_q.instr[25:21]), .ra2(if_q.instr[20:16]), .rd1(id_d.rd1), .rd2(id_d.rd2),
    .we(mem_q.ctrl.reg_write), .wa(mem_q.write_reg), .wd(wb_data),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  extender u_ext (.imm16(if_q.instr[15:0]), .ext_op(id_d.ctrl.ext_op), .imm32(id_d.imm32));

  always_comb begin
    id_d.pc_plus4 = if_q.pc_plus4;
    id_d.imm16    = if_q.instr[15:0];
    id_d.target   = if_q.instr[25:0];
    id_d.rt       = if_q.instr[20:16];
    id_d.rd       = if_q.instr[15:11];
  end

  pipe_reg #(.T(id_ex_t)) u_id_ex (.clk, .rst, .d(id_d), .q(id_q));

  // ---------------- EX ----------------
  word_t alu_b;

  always_comb alu_b = id_q.ctrl.alu_src ? id_q.imm32 : id_q.rd2;

  alu u_alu (.a(id_q.rd1), .b(alu_b), .alu_ctr(id_q.ctrl.alu_ctr),
             .result(ex_d.alu_result), .zero(ex_d.zero));

  always_comb begin
    ex_d.ctrl          = id_q.ctrl;
    ex_d.branch_target = id_q.pc_plus4 + {{14{id_q.imm16[15]}}, id_q.imm16, 2'b00};
    ex_d.jump_target   = {id_q.pc_plus4[31:28], id_q.target, 2'b00};
    ex_d.store_data    = id_q.rd2;
    ex_d.write_reg     = id_q.ctrl.reg_dst ? id_q.rd : id_q.rt;
  end

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (.clk, .rst, .d(ex_d), .q(ex_q));

  // ---------------- MEM ----------------
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(ex_q.alu_result), .wd(ex_q.store_data), .we(ex_q.ctrl.mem_write),
    .rd(mem_d.mem_data), .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  always_comb begin
    mem_d.ctrl       = ex_q.ctrl;
    mem_d.alu_result = ex_q.alu_result;
    mem_d.write_reg  = ex_q.write_reg;
  end

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (.clk, .rst, .d(mem_d), .q(mem_q));

  // ---------------- WB ----------------
  always_comb begin
    wb_data  = mem_q.ctrl.mem_to_reg ? mem_q.mem_data : mem_q.alu_result;
    wb_valid = mem_q.ctrl.reg_write;
  end

endmodule
