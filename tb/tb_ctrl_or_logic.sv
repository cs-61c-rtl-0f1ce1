// tb_ctrl_or_logic: applies each single decoded-instruction line and the
// all-zero vector to the OR plane and compares every control signal with
// the control-signal summary table.
module tb_ctrl_or_logic;
  import mips_pkg::*;
  import ctrl_table_pkg::*;
  dec_t  dec;
  ctrl_t ctrl, exp_c;
  int checks = 0, failures = 0;

  ctrl_or_logic dut (.dec, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      // dec bit order (msb first): add sub ori lw sw beq jump
      dec = (k < 7) ? dec_t'(7'b100_0000 >> k) : dec_t'(7'd0);
      #1;
      exp_c = expected(k);
      checks++;
      if (ctrl !== exp_c) begin
        failures++;
        $display("k=%0d ctrl=%b exp=%b", k, ctrl, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
