// tb_regfile: random reads and writes against a reference array.
// Checks: writes land on the rising edge (a same-cycle read returns the old
// value), RegWrite=0 writes nothing, register 0 stays zero, both read ports
// and the debug port return the stored values, and reset clears everything.
module tb_regfile;
  logic        clk = 0, rst, we;
  logic [4:0]  ra1, ra2, wa, dbg_addr;
  logic [31:0] rd1, rd2, wd, dbg_data;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; dbg_addr = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin dbg_addr = 5'(i); #1 chk(dbg_data, 0, "after reset"); end
    for (int n = 0; n < 2000; n++) begin
      we = ($urandom % 4) != 0; wa = 5'($urandom); wd = $urandom;
      ra1 = (n % 3 == 0) ? wa : 5'($urandom); ra2 = 5'($urandom); dbg_addr = 5'($urandom);
      #1;
      chk(rd1, model[ra1], "rd1");        // old value before the edge
      chk(rd2, model[ra2], "rd2");
      chk(dbg_data, model[dbg_addr], "dbg");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
      chk(rd1, model[ra1], "rd1 after edge");
    end
    we = 0; rst = 1; @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin ra1 = 5'(i); #1 chk(rd1, 0, "after 2nd reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
