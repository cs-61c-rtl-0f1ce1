// tb_extender: every 16-bit immediate with ExtOp 0 (zero-extend) and
// ExtOp 1 (sign-extend).
module tb_extender;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32, exp_v;
  int checks = 0, failures = 0;

  extender dut (.imm16, .ext_op, .imm32);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v += 3) begin
      for (int e = 0; e < 2; e++) begin
        imm16 = 16'(v); ext_op = e[0];
        #1;
        exp_v = ext_op ? 32'(signed'(imm16)) : {16'h0, imm16};
        checks++;
        if (imm32 !== exp_v) begin
          failures++;
          if (failures < 10) $display("imm=%h ext=%b got=%h exp=%h", imm16, ext_op, imm32, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
