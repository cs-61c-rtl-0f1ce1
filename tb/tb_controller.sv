// tb_controller: drives the full controller with the opcode/func of each of
// the seven instructions and with several unrecognised encodings, and
// compares the control signals with the control-signal summary table.
module tb_controller;
  import mips_pkg::*;
  import ctrl_table_pkg::*;
  logic [5:0] opcode, func;
  ctrl_t ctrl, exp_c;
  int checks = 0, failures = 0;

  controller dut (.opcode, .func, .ctrl);

  task automatic check(input logic [5:0] o, input logic [5:0] f, input int k);
    opcode = o; func = f;
    #1;
    exp_c = expected(k);
    checks++;
    if (ctrl !== exp_c) begin
      failures++;
      $display("op=%h fn=%h ctrl=%b exp=%b", o, f, ctrl, exp_c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(6'h00, 6'h20, 0);
    check(6'h00, 6'h22, 1);
    for (int f = 0; f < 64; f += 7) check(6'h0d, 6'(f), 2);  // func ignored for I-type
    check(6'h23, 6'h00, 3);
    check(6'h2b, 6'h3f, 4);
    check(6'h04, 6'h00, 5);
    check(6'h02, 6'h15, 6);
    check(6'h00, 6'h00, 7);  // nop (sll)
    check(6'h00, 6'h21, 7);  // addu: not in the subset
    check(6'h08, 6'h00, 7);  // addi: not in the subset
    check(6'h3f, 6'h3f, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
