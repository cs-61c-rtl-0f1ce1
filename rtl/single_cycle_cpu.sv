// single_cycle_cpu: single-cycle processor for a MIPS subset.
//
// Every instruction (add, sub, ori, lw, sw, beq, j) is fetched, decoded,
// executed, given its memory access and written back within one clock
// cycle; the PC register is the only state besides the register file and
// the memories. Datapath: PC -> instruction memory -> controller and
// register file; the ALUSrc mux picks register B or the extended immediate;
// the ALU result addresses data memory; the MemtoReg mux selects what is
// written to the register chosen by the RegDst mux (rt or rd); next_pc picks
// PC+4, the branch target or the jump target.
//
// Timing: the PC and all writes update on the rising clock edge; everything
// else is combinational, so one instruction retires per cycle. rst is
// synchronous and sets the PC to 0. The imem_* port loads the program while
// the processor is held in reset; the dbg_* ports read the register file and
// data memory.
//
// The datapath and control follow the lecture. Its register transfer for sw
// stores R[rs], but its datapath figure wires register rt to the memory's
// write data, which is what is done here. The branch target adds the offset
// to PC+4, as in the datapath figure.
module single_cycle_cpu
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
  output word_t                         dbg_mem_data
);

  word_t     instr, pc_next;
  ctrl_t     ctrl;
  word_t     bus_a, bus_b, imm32, alu_b, alu_out, mem_out, wb_data;
  logic      zero;
  reg_addr_t write_reg;

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

  inst_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .instr,
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  controller u_ctrl (.opcode(instr[31:26]), .func(instr[5:0]), .ctrl);

  always_comb write_reg = ctrl.reg_dst ? instr[15:11] : instr[20:16];

  regfile u_rf (
    .clk, .rst,
    .ra1(instr[25:21]), .ra2(instr[20:16]), .rd1(bus_a), .rd2(bus_b),
    .we(ctrl.reg_write), .wa(write_reg), .wd(wb_data),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  extender u_ext (.imm16(instr[15:0]), .ext_op(ctrl.ext_op), .imm32);

  always_comb alu_b = ctrl.alu_src ? imm32 : bus_b;

  alu u_alu (.a(bus_a), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .result(alu_out), .zero);

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(alu_out), .wd(bus_b), .we(ctrl.mem_write), .rd(mem_out),
    .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  always_comb wb_data = ctrl.mem_to_reg ? mem_out : alu_out;

  next_pc u_npc (
    .pc, .imm16(instr[15:0]), .target(instr[25:0]),
    .npc_sel(ctrl.npc_sel), .zero, .jump(ctrl.jump),
    .npc(pc_next)
  );

endmodule
