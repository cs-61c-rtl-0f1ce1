// tb_data_mem: random stores and loads against a reference array. A store
// lands on the rising edge only when MemWr is high; loads and the debug port
// read combinationally.
module tb_data_mem;
  localparam int W = 256;
  logic        clk = 0, we;
  logic [31:0] addr, wd, rd, dbg_data;
  logic [7:0]  dbg_addr;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(W)) dut (.clk, .addr, .wd, .we, .rd, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  initial begin
    #500000;
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
    we = 0; addr = 0; wd = 0; dbg_addr = 0;
    foreach (model[i]) model[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0; addr = {22'($urandom), 8'($urandom % 32), 2'b00}; wd = $urandom;
      dbg_addr = 8'($urandom % 32);
      #1;
      chk(rd, model[addr[9:2]], "rd");
      chk(dbg_data, model[dbg_addr], "dbg");
      @(posedge clk);
      if (we) model[addr[9:2]] = wd;
      #1 chk(rd, model[addr[9:2]], "rd after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
