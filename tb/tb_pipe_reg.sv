// tb_pipe_reg: instantiates the pipeline register with the ID/EX struct,
// feeds a new random value every cycle and checks that each value appears at
// q exactly one cycle later and that reset clears q to zero.
module tb_pipe_reg;
  import mips_pkg::*;
  logic   clk = 0, rst;
  id_ex_t d, q, prev;
  int checks = 0, failures = 0;

  pipe_reg #(.T(id_ex_t)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic id_ex_t rnd();
    logic [$bits(id_ex_t)-1:0] v;
    for (int i = 0; i < $bits(id_ex_t); i += 32) v = (v << 32) | $bits(id_ex_t)'($urandom);
    return id_ex_t'(v);
  endfunction

  initial begin
    rst = 1; d = rnd();
    @(posedge clk); #1;
    checks++; if (q !== '0) failures++;
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      d = rnd(); prev = d;
      @(posedge clk); #1;
      checks++;
      if (q !== prev) begin failures++; if (failures < 10) $display("n=%0d mismatch", n); end
      d = rnd();  // must not reach q before the next edge
      #1; checks++; if (q !== prev) failures++;
    end
    rst = 1; @(posedge clk); #1;
    checks++; if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
