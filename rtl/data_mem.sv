// data_mem: data memory, WORDS x 32 bits, word addressed.
//
// The byte address from the ALU is used with bits 1:0 dropped; addresses past
// the end wrap. Reads are combinational; a write of wd happens on the rising
// clock edge when we (MemWr) is high. A second read port (dbg) lets the
// outside observe memory contents. The memory starts out all zeros.
//
// The Address / Write data / Read data ports are the lecture's; the depth,
// the always-enabled read and the debug port are this design's choices.
module data_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  input  logic [31:0]              wd,
  input  logic                     we,
  output logic [31:0]              rd,
  input  logic [$clog2(WORDS)-1:0] dbg_addr,
  output logic [31:0]              dbg_data
);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr[$clog2(WORDS)+1:2]] <= wd;
  end

  always_comb begin
    rd       = mem[addr[$clog2(WORDS)+1:2]];
    dbg_data = mem[dbg_addr];
  end

endmodule
