// pipe_reg: one pipeline register between two stages of the 5-stage processor.
//
// On every rising clock edge it captures what the earlier stage produced
// (d) and presents it to the later stage (q) for the whole next cycle.
// A synchronous reset clears it to all zeros, which holds no control signal
// and so acts as a nop. The payload type T is a parameter; the processor
// instantiates it four times with the IF/ID, ID/EX, EX/MEM and MEM/WB structs.
// The registers themselves are the lecture's; the reset value and the single
// parameterised module are this design's choices. There is no enable and no
// flush, because the processor does not stall.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
