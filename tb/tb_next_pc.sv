// tb_next_pc: random PCs, offsets and targets; checks PC+4, taken and
// not-taken beq (positive and negative offsets) and j.
module tb_next_pc;
  logic [31:0] pc, npc, exp_v, p4;
  logic [15:0] imm16;
  logic [25:0] target;
  logic        npc_sel, zero, jump;
  int checks = 0, failures = 0;

  next_pc dut (.pc, .imm16, .target, .npc_sel, .zero, .jump, .npc);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      pc = {$urandom} & ~32'h3; imm16 = 16'($urandom); target = 26'($urandom);
      npc_sel = 1'($urandom); zero = 1'($urandom); jump = (n % 7 == 0);
      p4 = pc + 4;
      if (jump)                 exp_v = {p4[31:28], target, 2'b00};
      else if (npc_sel && zero) exp_v = pc + 4 + (32'(signed'(imm16)) <<< 2);
      else                      exp_v = pc + 4;
      #1; checks++;
      if (npc !== exp_v) begin
        failures++;
        if (failures < 10) $display("pc=%h imm=%h sel=%b z=%b j=%b got=%h exp=%h", pc, imm16, npc_sel, zero, jump, npc, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
