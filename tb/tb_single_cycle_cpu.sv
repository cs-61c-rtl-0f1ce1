// tb_single_cycle_cpu: runs programs on the single-cycle processor and on
// the reference model in lock-step. Every cycle the processor's PC must
// equal the model's (one instruction per clock); at the end all 32
// registers and the used part of data memory must match.
// Program 1 is directed: every instruction, a loop closed by a backward
// beq, a forward taken beq, a not-taken beq and a jump. Programs 2..N are
// random straight-line code with forward branches and jumps.
module tb_single_cycle_cpu;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic        clk = 0, rst, imem_we;
  logic [7:0]  imem_waddr, dbg_mem_addr;
  logic [31:0] imem_wdata, pc, dbg_reg_data, dbg_mem_data;
  logic [4:0]  dbg_reg_addr;
  int checks = 0, failures = 0;
  int seen [9];
  logic [31:0] prog [IMEM_WORDS];
  int plen;
  iss_t ref_s;
  bit   first = 1;

  single_cycle_cpu dut (.clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .pc,
                        .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("%s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  task automatic load_and_run(input int cycles);
    rst = 1;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(i); imem_wdata = (i < plen) ? prog[i] : a_nop();
    end
    @(negedge clk); imem_we = 0;
    @(negedge clk); rst = 0;
    iss_reset(ref_s, first);
    first = 0;
    for (int c = 0; c < cycles; c++) begin
      chk(pc, ref_s.pc, "pc");
      seen[iss_step(ref_s, prog[ref_s.pc[9:2]])]++;
      @(negedge clk);
    end
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r); #1 chk(dbg_reg_data, ref_s.r[r], $sformatf("r%0d", r));
    end
    for (int m = 0; m < 64; m++) begin
      dbg_mem_addr = 8'(m); #1 chk(dbg_mem_data, ref_s.m[m], $sformatf("mem[%0d]", m));
    end
  endtask

  function automatic void directed();
    int i = 0;
    prog[i++] = a_ori(1, 0, 5);          // r1 = 5 (loop counter)
    prog[i++] = a_ori(2, 0, 1);          // r2 = 1
    prog[i++] = a_ori(3, 0, 'hff00);   // r3 = 0x0000ff00 (zero-extended)
    prog[i++] = a_add(4, 4, 3);          // loop: r4 += r3
    prog[i++] = a_sub(1, 1, 2);          //       r1 -= 1
    prog[i++] = a_sw(4, 8, 1);           //       mem[r1*?+8]: address r1+8 (word aligned when r1%4==0)
    prog[i++] = a_beq(1, 0, 1);          //       exit when r1 == 0 (skip the jump)
    prog[i++] = a_j(3);                  //       back to loop
    prog[i++] = a_sw(4, 'hfffc, 7);    // r7 = 0: store to address -4 -> wraps
    prog[i++] = a_lw(5, 8, 0);           // r5 = mem[8]
    prog[i++] = a_beq(5, 4, 'hfffe);   // not taken (r5 != r4 unless...)
    prog[i++] = a_ori(6, 5, 'h8001);   // r6 = r5 | 0x8001
    prog[i++] = a_sub(8, 0, 6);          // r8 = -r6
    prog[i++] = a_add(0, 6, 6);          // write to r0 is ignored
    prog[i++] = a_beq(0, 0, 2);          // taken forward
    prog[i++] = a_ori(9, 0, 'hdead);   // skipped
    prog[i++] = a_ori(9, 0, 'hbeef);   // skipped
    prog[i++] = a_lw(10, 'hfffc, 0);   // r10 = mem[-4] (wraps to the last word)
    prog[i++] = a_j(i);                  // halt: jump to itself
    plen = i;
  endfunction

  function automatic void random_prog(int len);
    int i;
    for (i = 0; i < len - 1; i++) begin
      int rs = $urandom % 8, rt = $urandom % 8, rd = $urandom % 8;
      case ($urandom % 8)
        0: prog[i] = a_add(rd, rs, rt);
        1: prog[i] = a_sub(rd, rs, rt);
        2, 3: prog[i] = a_ori(rt, rs, int'($urandom % 65536));
        4: prog[i] = a_lw(rt, int'(($urandom % 32) * 4), 0);
        5: prog[i] = a_sw(rt, int'(($urandom % 32) * 4), 0);
        6: prog[i] = a_beq(rs, rt, int'($urandom % 3));
        default: prog[i] = (i + 3 < len) ? a_j(i + 1 + int'($urandom % 3)) : a_nop();
      endcase
    end
    prog[i++] = a_j(i - 1);
    plen = i;
  endfunction

  initial begin
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; dbg_reg_addr = 0; dbg_mem_addr = 0; rst = 1;
    foreach (seen[k]) seen[k] = 0;
    directed();
    load_and_run(60);
    chk(ref_s.r[1], 0, "model loop ran to zero");
    for (int p = 0; p < 20; p++) begin
      random_prog(60);
      load_and_run(70);
    end
    for (int k = 1; k <= 8; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("instruction kind %0d never executed", k); end
    end
    $display("executed: add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d j=%0d",
             seen[1], seen[2], seen[3], seen[4], seen[5], seen[6], seen[7], seen[8]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
