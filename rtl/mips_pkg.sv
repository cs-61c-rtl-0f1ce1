// mips_pkg: types and constants shared by the MIPS-subset processors.
//
// The processors execute seven instructions: add, sub (R-type), ori, lw, sw,
// beq (I-type) and j (J-type). Field positions follow the MIPS formats:
// op in bits 31:26, rs 25:21, rt 20:16, rd 15:11, shamt 10:6, funct 5:0,
// immediate 15:0, jump target 25:0. Opcode and funct values are the MIPS ones.
//
// The controller's outputs are gathered in ctrl_t. ALUctr is two bits wide
// (00 ADD, 01 SUB, 10 OR), which is what the controller's OR-plane equations
// produce. The pipeline-register contents for the 5-stage processor are also
// defined here, one struct per stage boundary.
package mips_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_addr_t;

  // Opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;
  // Function codes (instruction bits 5:0) of the R-type instructions
  localparam logic [5:0] FN_ADD   = 6'b10_0000;
  localparam logic [5:0] FN_SUB   = 6'b10_0010;

  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // Outputs of the AND plane: one line per recognised instruction.
  typedef struct packed {
    logic add;
    logic sub;
    logic ori;
    logic lw;
    logic sw;
    logic beq;
    logic jump;
  } dec_t;

  // Outputs of the OR plane: the datapath control signals.
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: register B, 1: immediate
    logic     mem_to_reg; // 0: ALU result, 1: memory data
    logic     reg_write;
    logic     mem_write;
    logic     npc_sel;    // branch (taken when the ALU result is zero)
    logic     jump;
    logic     ext_op;     // 0: zero-extend, 1: sign-extend
    alu_ctr_e alu_ctr;
  } ctrl_t;

  // Pipeline register contents
  typedef struct packed {
    word_t pc_plus4;
    word_t instr;
  } if_id_t;

  typedef struct packed {
    ctrl_t       ctrl;
    word_t       pc_plus4;
    word_t       rd1;
    word_t       rd2;
    word_t       imm32;
    logic [15:0] imm16;
    logic [25:0] target;
    reg_addr_t   rt;
    reg_addr_t   rd;
  } id_ex_t;

  typedef struct packed {
    ctrl_t     ctrl;
    word_t     branch_target;
    word_t     jump_target;
    logic      zero;
    word_t     alu_result;
    word_t     store_data;
    reg_addr_t write_reg;
  } ex_mem_t;

  typedef struct packed {
    ctrl_t     ctrl;
    word_t     mem_data;
    word_t     alu_result;
    reg_addr_t write_reg;
  } mem_wb_t;

endpackage
