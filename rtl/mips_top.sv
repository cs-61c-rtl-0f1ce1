// mips_top: the two processors of the design, side by side.
//
// sc_* is the single-cycle processor, which completes one instruction per
// (long) clock cycle; pl_* is the 5-stage pipelined processor, which starts
// one instruction per (short) cycle and completes each after five. Both
// execute the same instruction subset from their own instruction memory and
// have their own register file and data memory; they share only the clock.
// Each brings out its reset, its program-load port, its PC and debug read
// ports for registers and data memory. See the two processors for timing.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic                          clk,
  // single-cycle processor
  input  logic                          sc_rst,
  input  logic                          sc_imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] sc_imem_waddr,
  input  word_t                         sc_imem_wdata,
  output word_t                         sc_pc,
  input  reg_addr_t                     sc_dbg_reg_addr,
  output word_t                         sc_dbg_reg_data,
  input  logic [$clog2(DMEM_WORDS)-1:0] sc_dbg_mem_addr,
  output word_t                         sc_dbg_mem_data,
  // pipelined processor
  input  logic                          pl_rst,
  input  logic                          pl_imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] pl_imem_waddr,
  input  word_t                         pl_imem_wdata,
  output word_t                         pl_pc,
  input  reg_addr_t                     pl_dbg_reg_addr,
  output word_t                         pl_dbg_reg_data,
  input  logic [$clog2(DMEM_WORDS)-1:0] pl_dbg_mem_addr,
  output word_t                         pl_dbg_mem_data,
  output logic                          pl_wb_valid
);

  single_cycle_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_sc (
    .clk, .rst(sc_rst),
    .imem_we(sc_imem_we), .imem_waddr(sc_imem_waddr), .imem_wdata(sc_imem_wdata),
    .pc(sc_pc),
    .dbg_reg_addr(sc_dbg_reg_addr), .dbg_reg_data(sc_dbg_reg_data),
    .dbg_mem_addr(sc_dbg_mem_addr), .dbg_mem_data(sc_dbg_mem_data)
  );

  pipelined_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_pl (
    .clk, .rst(pl_rst),
    .imem_we(pl_imem_we), .imem_waddr(pl_imem_waddr), .imem_wdata(pl_imem_wdata),
    .pc(pl_pc),
    .dbg_reg_addr(pl_dbg_reg_addr), .dbg_reg_data(pl_dbg_reg_data),
    .dbg_mem_addr(pl_dbg_mem_addr), .dbg_mem_data(pl_dbg_mem_data),
    .wb_valid(pl_wb_valid)
  );

endmodule
