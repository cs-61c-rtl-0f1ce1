// tb_alu: random and corner operands for ADD, SUB and OR; checks result and
// Zero against expressions computed in the testbench.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, result, exp_r;
  alu_ctr_e    alu_ctr;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_ctr, .result, .zero);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = $urandom; b = (i % 5 == 0) ? a : $urandom;
      if (i % 11 == 0) b = 32'hffff_ffff;
      case (i % 3)
        0: begin alu_ctr = ALU_ADD; exp_r = a + b; end
        1: begin alu_ctr = ALU_SUB; exp_r = a - b; end
        default: begin alu_ctr = ALU_OR; exp_r = a | b; end
      endcase
      #1;
      checks++;
      if (result !== exp_r || zero !== (exp_r == 0)) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h ctr=%0d r=%h exp=%h z=%b", a, b, alu_ctr, result, exp_r, zero);
      end
    end
    // beq: a - a gives Zero
    a = 32'h1234_5678; b = a; alu_ctr = ALU_SUB; #1;
    checks++; if (!zero) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
