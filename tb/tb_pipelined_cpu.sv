// tb_pipelined_cpu: tests the 5-stage pipelined processor.
//  1. Timing: a dense program of eight instructions without dependences
//     (six ori, a sw, a lw) is started from reset. The register writes must
//     appear in the WB stage exactly four cycles after each instruction is
//     fetched, one per cycle (latency 5, throughput 1 per cycle), and the
//     program must be done after N+4 = 12 cycles. The lw writes back while a
//     different instruction sits in ID, so its result must reach its own
//     destination register (the write-register number travels down the
//     pipeline).
//  2. No hazard handling: a consumer fetched 1, 2 or 3 slots behind its
//     producer must read the old, old and new value respectively, and the
//     three instructions after a taken beq must execute.
//  3. Random programs with every instruction followed by three nops, compared
//     at the end with the reference model (all registers, data memory).
module tb_pipelined_cpu;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic        clk = 0, rst, imem_we, wb_valid;
  logic [7:0]  imem_waddr, dbg_mem_addr;
  logic [31:0] imem_wdata, pc, dbg_reg_data, dbg_mem_data;
  logic [4:0]  dbg_reg_addr;
  int checks = 0, failures = 0;
  int seen [9];
  logic [31:0] prog [IMEM_WORDS];
  int plen;
  iss_t ref_s;
  bit   first = 1;

  pipelined_cpu dut (.clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .pc,
                     .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data, .wb_valid);

  always #5 clk = ~clk;

  initial begin
    #5000000;
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


  task automatic read_reg(input int r, output logic [31:0] v);
    dbg_reg_addr = 5'(r); #1 v = dbg_reg_data;
  endtask

  // Load prog[0..plen-1] (rest nops) while in reset; returns at the negedge
  // just before the first fetch cycle.
  task automatic load();
    rst = 1;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(i); imem_wdata = (i < plen) ? prog[i] : a_nop();
    end
    @(negedge clk); imem_we = 0;
    @(posedge clk); #1 rst = 0;   // the next edge ends fetch cycle 0
  endtask

  task automatic timing_test();
    logic [31:0] v;
    bit exp_wb [12] = '{1, 1, 1, 1, 0, 1, 1, 1, 0, 0, 0, 0};
    plen = 0;
    prog[plen++] = a_ori(1, 0, 'h11);
    prog[plen++] = a_ori(2, 0, 'h22);
    prog[plen++] = a_ori(3, 0, 'h33);
    prog[plen++] = a_ori(4, 0, 'h44);
    prog[plen++] = a_sw(1, 40, 0);       // reads r1 in ID the cycle after it is written
    prog[plen++] = a_lw(5, 40, 0);       // reads the word the sw stored one cycle earlier
    prog[plen++] = a_ori(6, 0, 'h66);
    prog[plen++] = a_ori(7, 0, 'h77);
    load();
    // cycle c: instruction c is in IF, instruction c-4 in WB
    for (int c = 0; c < 12; c++) begin
      #1;
      checks++;
      if (wb_valid !== ((c >= 4) ? exp_wb[c-4] : 1'b0)) begin
        failures++; $display("cycle %0d: wb_valid=%b", c, wb_valid);
      end
      @(posedge clk);
    end
    #1;
    read_reg(1, v); chk(v, 32'h11, "t r1");
    read_reg(4, v); chk(v, 32'h44, "t r4");
    read_reg(5, v); chk(v, 32'h11, "t r5 (lw)");
    read_reg(6, v); chk(v, 32'h66, "t r6");
    read_reg(7, v); chk(v, 32'h77, "t r7");
    read_reg(0, v); chk(v, 32'h0, "t r0");
    dbg_mem_addr = 8'd10; #1 chk(dbg_mem_data, 32'h11, "t mem[10]");
  endtask

  task automatic hazard_test();
    logic [31:0] v;
    plen = 0;
    prog[plen++] = a_ori(1, 0, 7);
    prog[plen++] = a_add(2, 1, 1);       // 0 slots behind: reads old r1 (0)
    prog[plen++] = a_add(3, 1, 1);       // 1 slot behind: old
    prog[plen++] = a_add(4, 1, 1);       // 2 slots behind: old
    prog[plen++] = a_add(5, 1, 1);       // 3 slots behind: new (14)
    prog[plen++] = a_beq(0, 0, 8);       // taken, resolved in MEM
    prog[plen++] = a_ori(10, 0, 1);      // executed (in the pipeline behind beq)
    prog[plen++] = a_ori(11, 0, 2);      // executed
    prog[plen++] = a_ori(12, 0, 3);      // executed
    prog[plen++] = a_ori(13, 0, 4);      // skipped
    for (int k = 0; k < 4; k++) prog[plen++] = a_nop();
    prog[plen++] = a_ori(14, 0, 5);      // branch target (5 + 1 + 8 = 14)
    load();
    repeat (30) @(posedge clk);
    #1;
    read_reg(2, v); chk(v, 0, "h r2 old");
    read_reg(3, v); chk(v, 0, "h r3 old");
    read_reg(4, v); chk(v, 0, "h r4 old");
    read_reg(5, v); chk(v, 14, "h r5 new");
    read_reg(10, v); chk(v, 1, "h r10 shadow");
    read_reg(11, v); chk(v, 2, "h r11 shadow");
    read_reg(12, v); chk(v, 3, "h r12 shadow");
    read_reg(13, v); chk(v, 0, "h r13 skipped");
    read_reg(14, v); chk(v, 5, "h r14 target");
  endtask

  // Random logical program of len instructions, each followed by 3 nops.
  function automatic void random_spaced(int len);
    int k;
    plen = 0;
    for (k = 0; k < len - 1; k++) begin
      int rs = $urandom % 8, rt = $urandom % 8, rd = $urandom % 8;
      int off = $urandom % 3;      // logical instructions to skip
      case ($urandom % 8)
        0: prog[plen] = a_add(rd, rs, rt);
        1: prog[plen] = a_sub(rd, rs, rt);
        2, 3: prog[plen] = a_ori(rt, rs, int'($urandom % 65536));
        4: prog[plen] = a_lw(rt, int'(($urandom % 32) * 4), 0);
        5: prog[plen] = a_sw(rt, int'(($urandom % 32) * 4), 0);
        6: prog[plen] = (k + off < len - 1) ? a_beq(rs, rt, off * 4 + 3) : a_nop();
        default: prog[plen] = (k + off < len - 1) ? a_j(4 * (k + 1 + off)) : a_nop();
      endcase
      plen++;
      repeat (3) prog[plen++] = a_nop();
    end
    prog[plen] = a_j(plen);             // halt
    plen++;
    repeat (3) prog[plen++] = a_nop();
  endfunction

  task automatic random_test(int len);
    logic [31:0] v;
    random_spaced(len);
    load();
    iss_reset(ref_s, first);
    first = 0;
    for (int s = 0; s < 4 * len + 4; s++) seen[iss_step(ref_s, prog[ref_s.pc[9:2]])]++;
    repeat (4 * len + 12) @(posedge clk);
    #1;
    for (int r = 0; r < 32; r++) begin read_reg(r, v); chk(v, ref_s.r[r], $sformatf("r%0d", r)); end
    for (int m = 0; m < 64; m++) begin
      dbg_mem_addr = 8'(m); #1 chk(dbg_mem_data, ref_s.m[m], $sformatf("mem[%0d]", m));
    end
  endtask

  initial begin
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; dbg_reg_addr = 0; dbg_mem_addr = 0; rst = 1;
    foreach (seen[k]) seen[k] = 0;
    timing_test();
    hazard_test();
    // the memory keeps what the two directed tests stored
    iss_reset(ref_s, 1);
    ref_s.m[10] = 32'h11;
    first = 0;
    for (int p = 0; p < 20; p++) random_test(40);
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
