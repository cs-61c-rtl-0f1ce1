// tb_mips_top: end-to-end test of both processors in the top level, at the
// top's default sizes.
// The same programs are loaded into both processors. Each program is built
// from logical instructions, each followed by three nops so that the
// pipelined processor, which has no hazard handling, computes the same
// result as the single-cycle one. After each run, all registers and the
// first 64 data-memory words of both processors are compared with the
// reference model. A dense dependence-free program is also run on both to
// compare cycle counts: N cycles single-cycle against N+4 pipelined.
// Mechanisms counted (each must happen at least once): every instruction
// kind, beq taken and not taken, j, a PC redirect from the pipeline's MEM
// stage, back-to-back write-backs in the pipeline, and a load written back
// to its own destination while a different instruction is in decode.
module tb_mips_top;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic        clk = 0;
  logic        sc_rst, sc_imem_we, pl_rst, pl_imem_we, pl_wb_valid;
  logic [7:0]  sc_imem_waddr, pl_imem_waddr, sc_dbg_mem_addr, pl_dbg_mem_addr;
  logic [31:0] sc_imem_wdata, pl_imem_wdata, sc_pc, pl_pc;
  logic [4:0]  sc_dbg_reg_addr, pl_dbg_reg_addr;
  logic [31:0] sc_dbg_reg_data, pl_dbg_reg_data, sc_dbg_mem_data, pl_dbg_mem_data;
  int checks = 0, failures = 0;
  int seen [9];
  int n_redirect = 0, n_b2b_wb = 0, n_load_own_reg = 0;
  logic [31:0] prog [IMEM_WORDS];
  int plen;
  iss_t ref_s;
  bit   first = 1;

  mips_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors on the pipelined processor
  logic [31:0] pl_pc_prev;
  logic        wb_prev;
  always @(posedge clk) begin
    if (!pl_rst) begin
      if (pl_pc != pl_pc_prev + 4 && pl_pc != pl_pc_prev) n_redirect++;
      if (pl_wb_valid && wb_prev) n_b2b_wb++;
      // load in WB writing a register different from the rt field of the
      // instruction currently in decode
      if (dut.u_pl.mem_q.ctrl.mem_to_reg && dut.u_pl.mem_q.ctrl.reg_write &&
          dut.u_pl.mem_q.write_reg != dut.u_pl.if_q.instr[20:16]) n_load_own_reg++;
    end
    pl_pc_prev <= pl_pc;
    wb_prev    <= pl_wb_valid;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("%s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  task automatic load();
    sc_rst = 1; pl_rst = 1;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk);
      sc_imem_we = 1; sc_imem_waddr = 8'(i); sc_imem_wdata = (i < plen) ? prog[i] : a_nop();
      pl_imem_we = 1; pl_imem_waddr = 8'(i); pl_imem_wdata = sc_imem_wdata;
    end
    @(negedge clk); sc_imem_we = 0; pl_imem_we = 0;
    @(posedge clk); #1 sc_rst = 0; pl_rst = 0;
  endtask

  task automatic compare_state(input string tag);
    for (int r = 0; r < 32; r++) begin
      sc_dbg_reg_addr = 5'(r); pl_dbg_reg_addr = 5'(r); #1;
      chk(sc_dbg_reg_data, ref_s.r[r], $sformatf("%s sc r%0d", tag, r));
      chk(pl_dbg_reg_data, ref_s.r[r], $sformatf("%s pl r%0d", tag, r));
    end
    for (int m = 0; m < 64; m++) begin
      sc_dbg_mem_addr = 8'(m); pl_dbg_mem_addr = 8'(m); #1;
      chk(sc_dbg_mem_data, ref_s.m[m], $sformatf("%s sc mem[%0d]", tag, m));
      chk(pl_dbg_mem_data, ref_s.m[m], $sformatf("%s pl mem[%0d]", tag, m));
    end
  endtask

  function automatic void add_spaced(logic [31:0] ins);
    prog[plen++] = ins;
    repeat (3) prog[plen++] = a_nop();
  endfunction

  // Directed program: sums 1..6 in a loop, stores the running sums, loads
  // them back, and uses every instruction.
  function automatic void directed();
    plen = 0;
    add_spaced(a_ori(1, 0, 6));           // 0  r1 = 6 (counter)
    add_spaced(a_ori(2, 0, 1));           // 1  r2 = 1
    add_spaced(a_ori(9, 0, 32));          // 2  r9 = 32 (store pointer)
    add_spaced(a_add(3, 3, 1));           // 3  loop: r3 += r1
    add_spaced(a_sw(3, 0, 9));            // 4  mem[r9] = r3
    add_spaced(a_ori(4, 0, 4));           // 5
    add_spaced(a_add(9, 9, 4));           // 6  r9 += 4
    add_spaced(a_sub(1, 1, 2));           // 7  r1 -= 1
    add_spaced(a_beq(1, 0, 4 + 3));       // 8  exit loop when r1 == 0 (to 10)
    add_spaced(a_j(4 * 3));               // 9  back to loop
    add_spaced(a_lw(5, 32, 0));           // 10 r5 = mem[32] = 6
    add_spaced(a_lw(6, 52, 0));           // 11 r6 = mem[52] = 21
    add_spaced(a_beq(5, 6, 4 * 1 + 3));   // 12 not taken
    add_spaced(a_sub(7, 5, 6));           // 13 r7 = -15
    add_spaced(a_ori(8, 7, 'hf000));    // 14
    prog[plen] = a_j(plen); plen++;       // halt
    repeat (3) prog[plen++] = a_nop();
  endfunction

  function automatic void random_spaced(int len);
    for (int k = 0; k < len - 1; k++) begin
      int rs = $urandom % 8, rt = $urandom % 8, rd = $urandom % 8;
      int off = $urandom % 3;
      case ($urandom % 8)
        0: add_spaced(a_add(rd, rs, rt));
        1: add_spaced(a_sub(rd, rs, rt));
        2, 3: add_spaced(a_ori(rt, rs, int'($urandom % 65536)));
        4: add_spaced(a_lw(rt, int'(($urandom % 32) * 4), 0));
        5: add_spaced(a_sw(rt, int'(($urandom % 32) * 4), 0));
        6: add_spaced((k + off < len - 1) ? a_beq(rs, rt, off * 4 + 3) : a_nop());
        default: add_spaced((k + off < len - 1) ? a_j(4 * (k + 1 + off)) : a_nop());
      endcase
    end
    prog[plen] = a_j(plen); plen++;
    repeat (3) prog[plen++] = a_nop();
  endfunction

  task automatic run(input string tag, input int steps);
    load();
    iss_reset(ref_s, first);
    first = 0;
    for (int s = 0; s < steps; s++) seen[iss_step(ref_s, prog[ref_s.pc[9:2]])]++;
    repeat (steps + 8) @(posedge clk);
    #1 compare_state(tag);
  endtask

  // Dense program: both processors, count cycles until the last write.
  task automatic throughput_test();
    int n = 16, sc_done = -1, pl_done = -1;
    logic [31:0] v;
    plen = 0;
    for (int i = 0; i < n; i++) prog[plen++] = a_ori(i + 10 > 31 ? 31 : i + 10, 0, 100 + i);
    load();
    for (int c = 0; c < n + 8; c++) begin
      // single-cycle: instruction c completes in cycle c
      if (sc_pc == 32'(4 * n) && sc_done < 0) sc_done = c;
      if (pl_wb_valid) pl_done = c + 1;
      @(posedge clk); #1;
    end
    chk(32'(sc_done), 32'(n), "single-cycle cycles for 16 instructions");
    chk(32'(pl_done), 32'(n + 4), "pipelined cycles for 16 instructions");
    pl_dbg_reg_addr = 5'd25; sc_dbg_reg_addr = 5'd25; #1;
    chk(pl_dbg_reg_data, 32'd115, "pl r25");
    chk(sc_dbg_reg_data, 32'd115, "sc r25");
  endtask

  initial begin
    sc_rst = 1; pl_rst = 1; sc_imem_we = 0; pl_imem_we = 0;
    sc_imem_waddr = 0; pl_imem_waddr = 0; sc_imem_wdata = 0; pl_imem_wdata = 0;
    sc_dbg_reg_addr = 0; pl_dbg_reg_addr = 0; sc_dbg_mem_addr = 0; pl_dbg_mem_addr = 0;
    pl_pc_prev = 0; wb_prev = 0;
    foreach (seen[k]) seen[k] = 0;
    directed();
    run("directed", 300);
    chk(ref_s.r[3], 21, "model sum");
    for (int p = 0; p < 10; p++) begin
      plen = 0;
      random_spaced(50);
      run($sformatf("random%0d", p), 4 * 50 + 4);
    end
    throughput_test();
    for (int k = 1; k <= 8; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("instruction kind %0d never executed", k); end
    end
    checks += 3;
    if (n_redirect == 0)     begin failures++; $display("no PC redirect seen"); end
    if (n_b2b_wb == 0)       begin failures++; $display("no back-to-back write-back seen"); end
    if (n_load_own_reg == 0) begin failures++; $display("no load write-back beside a different decode"); end
    $display("executed: add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d j=%0d",
             seen[1], seen[2], seen[3], seen[4], seen[5], seen[6], seen[7], seen[8]);
    $display("pipeline: redirects=%0d back_to_back_wb=%0d load_wb_own_reg=%0d",
             n_redirect, n_b2b_wb, n_load_own_reg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
