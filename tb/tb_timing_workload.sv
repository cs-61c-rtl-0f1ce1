// tb_timing_workload: the four instruction classes of the single-cycle
// timing comparison (lw, sw, an R-format add, beq) run back to back on both
// processors of the top level.
// The single-cycle processor must retire them in 4 cycles. In the pipelined
// processor the instruction fetched in cycle k writes back in cycle k+4, so
// lw's register write must show after cycle 4, sw's memory write after
// cycle 4 (its MEM stage is cycle 4), add's register write after cycle 6,
// and the group leaves the pipeline after 8 cycles (N+4). The testbench
// prints the time for both at the clock periods the stage times give: the
// slowest instruction (lw) takes 800 ps, the slowest stage 200 ps.
module tb_timing_workload;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic        clk = 0;
  logic        sc_rst, sc_imem_we, pl_rst, pl_imem_we, pl_wb_valid;
  logic [7:0]  sc_imem_waddr, pl_imem_waddr, sc_dbg_mem_addr, pl_dbg_mem_addr;
  logic [31:0] sc_imem_wdata, pl_imem_wdata, sc_pc, pl_pc;
  logic [4:0]  sc_dbg_reg_addr, pl_dbg_reg_addr;
  logic [31:0] sc_dbg_reg_data, pl_dbg_reg_data, sc_dbg_mem_data, pl_dbg_mem_data;
  int checks = 0, failures = 0;
  logic [31:0] prog [IMEM_WORDS];
  int plen, k0;

  mips_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("%s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  initial begin
    int sc_cycles, pl_cycles;
    sc_rst = 1; pl_rst = 1; sc_imem_we = 0; pl_imem_we = 0;
    sc_imem_waddr = 0; pl_imem_waddr = 0; sc_imem_wdata = 0; pl_imem_wdata = 0;
    sc_dbg_mem_addr = 8'd1; pl_dbg_mem_addr = 8'd1; sc_dbg_reg_addr = 5'd1;
    plen = 0;
    // set-up, spaced so that no value is read before it is written back
    prog[plen++] = a_ori(2, 0, 'h22);
    prog[plen++] = a_ori(4, 0, 4);
    prog[plen++] = a_ori(5, 0, 5);
    repeat (3) prog[plen++] = a_nop();
    prog[plen++] = a_sw(2, 0, 0);          // mem[0] = 0x22
    repeat (3) prog[plen++] = a_nop();
    // the measured group
    k0 = plen;
    prog[plen++] = a_lw(1, 0, 0);          // r1 = 0x22
    prog[plen++] = a_sw(5, 4, 0);          // mem[1] = 5
    prog[plen++] = a_add(3, 4, 5);         // r3 = 9
    prog[plen++] = a_beq(0, 0, 0);         // taken, to the next instruction
    prog[plen] = a_j(plen); plen++;        // halt
    repeat (3) prog[plen++] = a_nop();
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk);
      sc_imem_we = 1; sc_imem_waddr = 8'(i); sc_imem_wdata = (i < plen) ? prog[i] : a_nop();
      pl_imem_we = 1; pl_imem_waddr = 8'(i); pl_imem_wdata = sc_imem_wdata;
    end
    @(negedge clk); sc_imem_we = 0; pl_imem_we = 0;
    @(posedge clk); #1 sc_rst = 0; pl_rst = 0;

    // run to the start of the group (both processors reach it together,
    // because the set-up code has no branches)
    while (pl_pc != 32'(4 * k0)) begin @(posedge clk); #1; end
    chk(sc_pc, 32'(4 * k0), "both processors at the group");
    // cycle c of the group: c = 0 is lw's fetch
    sc_cycles = -1;
    for (int c = 0; c <= 8; c++) begin
      if (sc_pc == 32'(4 * (k0 + 4)) && sc_cycles < 0) sc_cycles = c;
      pl_dbg_reg_addr = 5'd1; #1;
      chk(32'(pl_dbg_reg_data == 32'h22), 32'(c >= 5), $sformatf("pl r1 at cycle %0d", c));
      chk(32'(pl_dbg_mem_data == 32'd5),  32'(c >= 5), $sformatf("pl mem[1] at cycle %0d", c));
      pl_dbg_reg_addr = 5'd3; #1;
      chk(32'(pl_dbg_reg_data == 32'd9),  32'(c >= 7), $sformatf("pl r3 at cycle %0d", c));
      @(posedge clk); #1;
    end
    pl_cycles = 8;   // last of the four (beq) is in WB in cycle 7
    chk(32'(sc_cycles), 32'd4, "single-cycle cycles for the group");
    sc_dbg_reg_addr = 5'd3; #1 chk(sc_dbg_reg_data, 32'd9, "sc r3");
    sc_dbg_reg_addr = 5'd1; #1 chk(sc_dbg_reg_data, 32'h22, "sc r1");
    chk(sc_dbg_mem_data, 32'd5, "sc mem[1]");
    $display("single-cycle: %0d cycles x 800 ps = %0d ps; pipelined: %0d cycles x 200 ps = %0d ps",
             sc_cycles, sc_cycles * 800, pl_cycles, pl_cycles * 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
