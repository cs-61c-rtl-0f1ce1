// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// Reads are combinational (Read register 1/2 -> Read data 1/2). A write of
// wd to register wa happens on the rising clock edge when we (RegWrite) is
// high; a read of the same register in that cycle still returns the old
// value. Register 0 always reads as zero and ignores writes, as in MIPS.
// A synchronous reset clears all registers. The dbg port is a third read
// port used only to observe state from outside.
//
// Port set follows the lecture's datapath figures; the $0 rule, the reset
// and the debug port are this design's choices.
module regfile
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [WIDTH-1:0]         rd1,
  output logic [WIDTH-1:0]         rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [WIDTH-1:0]         wd,
  input  logic [$clog2(NREGS)-1:0] dbg_addr,
  output logic [WIDTH-1:0]         dbg_data
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1      = (ra1 == '0) ? '0 : regs[ra1];
    rd2      = (ra2 == '0) ? '0 : regs[ra2];
    dbg_data = (dbg_addr == '0) ? '0 : regs[dbg_addr];
  end

endmodule
