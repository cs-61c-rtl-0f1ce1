// tb_ctrl_and_logic: exhaustive test of the controller's AND plane.
// All 4096 opcode/func pairs are applied; the expected line for each pair is
// taken from the opcode/func table (add 000000/100000, sub 000000/100010,
// ori 001101, lw 100011, sw 101011, beq 000100, jump 000010).
module tb_ctrl_and_logic;
  import mips_pkg::*;
  logic [5:0] opcode, func;
  dec_t dec, exp_dec;
  int checks = 0, failures = 0;

  ctrl_and_logic dut (.opcode, .func, .dec);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        opcode = 6'(o); func = 6'(f);
        #1;
        exp_dec = '0;
        case (o)
          'h00: begin exp_dec.add = (f == 'h20); exp_dec.sub = (f == 'h22); end
          'h0d: exp_dec.ori  = 1'b1;
          'h23: exp_dec.lw   = 1'b1;
          'h2b: exp_dec.sw   = 1'b1;
          'h04: exp_dec.beq  = 1'b1;
          'h02: exp_dec.jump = 1'b1;
          default: ;
        endcase
        checks++;
        if (dec !== exp_dec) begin
          failures++;
          if (failures < 10) $display("op=%h fn=%h dec=%b exp=%b", opcode, func, dec, exp_dec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
