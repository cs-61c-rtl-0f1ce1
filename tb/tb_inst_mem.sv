// tb_inst_mem: loads random words through the load port and reads them back
// through the fetch port at byte addresses; checks that bits 1:0 of the
// address are ignored and that an unwritten word reads as zero (a nop).
module tb_inst_mem;
  localparam int W = 256;
  logic        clk = 0, we;
  logic [31:0] addr, instr, wdata;
  logic [7:0]  waddr;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  inst_mem #(.WORDS(W)) dut (.clk, .addr, .instr, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; addr = 0;
    foreach (model[i]) model[i] = 0;
    #1;
    addr = 32'h40; #1; checks++; if (instr !== 0) failures++;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 1; waddr = 8'($urandom); wdata = $urandom;
      @(posedge clk); model[waddr] = wdata;
      #1 we = 0;
    end
    for (int n = 0; n < 1000; n++) begin
      addr = {22'($urandom), 8'($urandom), 2'($urandom)};
      #1; checks++;
      if (instr !== model[addr[9:2]]) begin
        failures++;
        if (failures < 10) $display("addr=%h got=%h exp=%h", addr, instr, model[addr[9:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
