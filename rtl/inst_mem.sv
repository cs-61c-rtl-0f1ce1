// inst_mem: instruction memory, WORDS x 32 bits, word addressed.
//
// The fetch port takes the byte address held in the PC, drops bits 1:0 and
// returns the instruction combinationally; addresses past the end wrap.
// A synchronous write port (we/waddr/wdata, waddr a word index) loads the
// program before the processor is released from reset. The memory is not
// reset; it starts out all zeros, which decodes as a nop.
//
// The read port is the lecture's; the depth and the load port are this
// design's choices.
module inst_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  output logic [31:0]              instr,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb instr = mem[addr[$clog2(WORDS)+1:2]];

endmodule
