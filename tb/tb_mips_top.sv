// tb_mips_top - end-to-end test of the seven processors in mips_top at
// their default sizes.
//
// The same program is loaded into all memories: it sums an 8-word array in a
// loop (lw, add, addi, beq taken and not taken, j), stores the sum (sw),
// runs sub/and/or/slt on the result, then executes an overflowing add and
// an undefined opcode. The multi-cycle processors trap on both: the handler
// at 0x80000180 counts the exceptions in r13 and jumps back to the
// instruction after the faulting one. The single-cycle processor has no
// exceptions, so its add wraps and the unknown opcode does nothing.
// Checked: the stored sum and result registers, the overflow behaviour of
// each processor, EPC and Cause, that both single-cycle controllers and all
// five multi-cycle controllers behave cycle for cycle alike, and the cycle counts to reach the final loop
// (62 cycles single-cycle at CPI 1; 259 cycles multi-cycle from the
// per-instruction step counts). Each mechanism (loop branch taken and not
// taken, jump, each memory access, R-type, addi, both exceptions) is counted
// and must occur.
module tb_mips_top;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic        sc_imem_ld_en = 0, sc_dmem_ld_en = 0, mh_ld_en = 0, mu_ld_en = 0, mn_ld_en = 0, mv_ld_en = 0, mo_ld_en = 0;
  logic [31:0] ld_addr = 0, ld_data = 0;
  logic [31:0] sc_pc, sr_pc, mh_pc, mu_pc, mn_pc, mh_epc, mh_cause, mu_epc, mu_cause, mn_epc, mn_cause, mv_pc, mv_epc, mv_cause, mo_pc, mo_epc, mo_cause;
  logic [3:0]  mh_state, mu_state, mn_state, mv_state, mo_state;

  mips_top dut (
    .clk(clk), .rst_n(rst_n),
    .sc_imem_ld_en(sc_imem_ld_en), .sc_imem_ld_addr(ld_addr), .sc_imem_ld_data(ld_data),
    .sc_dmem_ld_en(sc_dmem_ld_en), .sc_dmem_ld_addr(ld_addr), .sc_dmem_ld_data(ld_data),
    .sc_pc(sc_pc),
    .sr_imem_ld_en(sc_imem_ld_en), .sr_imem_ld_addr(ld_addr), .sr_imem_ld_data(ld_data),
    .sr_dmem_ld_en(sc_dmem_ld_en), .sr_dmem_ld_addr(ld_addr), .sr_dmem_ld_data(ld_data),
    .sr_pc(sr_pc),
    .mh_ld_en(mh_ld_en), .mh_ld_addr(ld_addr), .mh_ld_data(ld_data),
    .mh_pc(mh_pc), .mh_state(mh_state), .mh_epc(mh_epc), .mh_cause(mh_cause),
    .mu_ld_en(mu_ld_en), .mu_ld_addr(ld_addr), .mu_ld_data(ld_data),
    .mu_pc(mu_pc), .mu_state(mu_state), .mu_epc(mu_epc), .mu_cause(mu_cause),
    .mv_ld_en(mv_ld_en), .mv_ld_addr(ld_addr), .mv_ld_data(ld_data),
    .mv_pc(mv_pc), .mv_state(mv_state), .mv_epc(mv_epc), .mv_cause(mv_cause),
    .mo_ld_en(mo_ld_en), .mo_ld_addr(ld_addr), .mo_ld_data(ld_data),
    .mo_pc(mo_pc), .mo_state(mo_state), .mo_epc(mo_epc), .mo_cause(mo_cause),
    .mn_ld_en(mn_ld_en), .mn_ld_addr(ld_addr), .mn_ld_data(ld_data),
    .mn_pc(mn_pc), .mn_state(mn_state), .mn_epc(mn_epc), .mn_cause(mn_cause)
  );
  always #5 clk = ~clk;

  function automatic logic [31:0] r_t(input int rs, input int rt, input int rd, input logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_t(input logic [5:0] op, input int rs, input int rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_t(input int word);
    return {6'h02, 26'(word)};
  endfunction

  logic [31:0] prog [128];
  logic [31:0] arr [8];

  task automatic put(input bit to_sc_i, input bit to_sc_d, input int w, input logic [31:0] d);
    @(negedge clk);
    sc_imem_ld_en = to_sc_i; sc_dmem_ld_en = to_sc_d; mh_ld_en = 1; mu_ld_en = 1; mn_ld_en = 1; mv_ld_en = 1; mo_ld_en = 1;
    ld_addr = 32'(w * 4); ld_data = d;
    @(negedge clk);
    sc_imem_ld_en = 0; sc_dmem_ld_en = 0; mh_ld_en = 0; mu_ld_en = 0; mn_ld_en = 0; mv_ld_en = 0; mo_ld_en = 0;
  endtask

  int n_mh [16], n_mu [16], n_mn [16], n_mv [16], n_mo [16];
  int sc_taken, sc_not_taken, mh_taken, mh_not_taken, sc_cycles, mc_cycles;
  bit sc_done, mh_done;

  initial begin
    logic [31:0] sum, last;
    foreach (prog[i]) prog[i] = 32'h0;
    prog[0]  = i_t(6'h08, 0, 1, 32'h200);   // addi r1, r0, 0x200   pointer
    prog[1]  = i_t(6'h08, 0, 2, 8);         // addi r2, r0, 8       count
    prog[2]  = i_t(6'h08, 0, 3, 0);         // addi r3, r0, 0       sum
    prog[3]  = i_t(6'h08, 0, 14, 1);        // addi r14, r0, 1
    prog[4]  = i_t(6'h04, 2, 0, 6);         // loop: beq r2, r0, done (word 11)
    prog[5]  = i_t(6'h23, 1, 5, 0);         // lw r5, 0(r1)
    prog[6]  = r_t(3, 5, 3, 6'h20);         // add r3, r3, r5
    prog[7]  = i_t(6'h08, 1, 1, 4);         // addi r1, r1, 4
    prog[8]  = i_t(6'h08, 2, 2, -1);        // addi r2, r2, -1
    prog[9]  = j_t(4);                      // j loop
    prog[10] = i_t(6'h08, 0, 9, 99);        // addi r9, r0, 99 (skipped)
    prog[11] = i_t(6'h2B, 0, 3, 32'h300);   // done: sw r3, 0x300(r0)
    prog[12] = r_t(3, 5, 6, 6'h22);         // sub r6, r3, r5
    prog[13] = r_t(3, 5, 7, 6'h24);         // and r7, r3, r5
    prog[14] = r_t(3, 5, 8, 6'h25);         // or  r8, r3, r5
    prog[15] = r_t(5, 3, 10, 6'h2A);        // slt r10, r5, r3
    prog[16] = i_t(6'h23, 0, 11, 32'h304);  // lw r11, 0x304(r0)
    prog[17] = r_t(11, 11, 12, 6'h20);      // add r12, r11, r11  (overflow)
    prog[18] = 32'hFC00_0000;               // undefined opcode
    prog[19] = i_t(6'h2B, 0, 12, 32'h308);  // sw r12, 0x308(r0)
    prog[20] = j_t(20);                     // halt: j halt
    prog[96] = i_t(6'h08, 13, 13, 1);       // handler: addi r13, r13, 1
    prog[97] = i_t(6'h04, 13, 14, 1);       // beq r13, r14, +1 (word 99)
    prog[98] = j_t(19);                     // second exception: resume at 19
    prog[99] = j_t(18);                     // first exception: resume at 18
    for (int i = 0; i < 8; i++) arr[i] = 32'(i * 37 + 11);
    for (int w = 0; w < 128; w++) put(1'b1, 1'b0, w, prog[w]);
    for (int i = 0; i < 8; i++) put(1'b0, 1'b1, 128 + i, arr[i]);
    put(1'b0, 1'b1, 193, 32'h7FFF_FFFF);     // word 0x304
    put(1'b0, 1'b1, 194, 32'h0);             // word 0x308
    sum = 0; foreach (arr[i]) sum += arr[i];
    last = arr[7];

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sc_cycles = 0; mc_cycles = 0; sc_done = 0; mh_done = 0; sc_taken = 0; sc_not_taken = 0; mh_taken = 0; mh_not_taken = 0;
    for (int c = 0; c < 2000 && !(sc_done && mh_done); c++) begin
      @(negedge clk);
      if (!sc_done && sc_pc == 32'h50) sc_done = 1;
      if (!mh_done && mh_pc == 32'h8000_0050 && mh_state == 0) mh_done = 1;
      if (!sc_done) sc_cycles++;
      if (!mh_done) mc_cycles++;
      n_mh[mh_state]++; n_mu[mu_state]++; n_mn[mn_state]++; n_mv[mv_state]++; n_mo[mo_state]++;
      checks++; if (mh_state !== mu_state || mh_pc !== mu_pc || mh_state !== mn_state || mh_pc !== mn_pc || mh_state !== mv_state || mh_pc !== mv_pc || mh_state !== mo_state || mh_pc !== mo_pc) begin failures++; $display("multi-cycle controllers diverge at cycle %0d", c); end
      checks++; if (sc_pc !== sr_pc) begin failures++; $display("single-cycle controllers diverge at cycle %0d", c); end
      if (mh_state == 4'd12) begin
        if (dut.u_mh.alu_zero) mh_taken++; else mh_not_taken++;
      end
      if (!sc_done && dut.u_sc.ctrl.branch) begin
        if (dut.u_sc.alu_zero) sc_taken++; else sc_not_taken++;
      end
    end
    // single-cycle results
    checks++; if (!sc_done || sc_cycles != 62) begin failures++; $display("single-cycle reached halt after %0d cycles, exp 62", sc_cycles); end
    checks++; if (dut.u_sr_dmem.mem[192] !== sum || dut.u_sr_dmem.mem[194] !== 32'hFFFF_FFFE ||
                  dut.u_sr.u_rf.regs[6] !== sum - last) begin failures++; $display("sc (ROM control) results wrong"); end
    checks++; if (dut.u_sc_dmem.mem[192] !== sum) begin failures++; $display("sc sum %h exp %h", dut.u_sc_dmem.mem[192], sum); end
    checks++; if (dut.u_sc_dmem.mem[194] !== 32'hFFFF_FFFE) begin failures++; $display("sc wrapped add %h", dut.u_sc_dmem.mem[194]); end
    checks++; if (dut.u_sc.u_rf.regs[6] !== sum - last || dut.u_sc.u_rf.regs[7] !== (sum & last) ||
                  dut.u_sc.u_rf.regs[8] !== (sum | last) || dut.u_sc.u_rf.regs[10] !== 32'd1 ||
                  dut.u_sc.u_rf.regs[9] !== 32'd0) begin failures++; $display("sc R-type results wrong"); end
    // multi-cycle results, all controllers
    checks++; if (!mh_done || mc_cycles != 259) begin failures++; $display("multi-cycle reached halt after %0d cycles, exp 259", mc_cycles); end
    checks++; if (dut.u_mh_mem.mem[192] !== sum || dut.u_mu_mem.mem[192] !== sum || dut.u_mn_mem.mem[192] !== sum || dut.u_mv_mem.mem[192] !== sum || dut.u_mo_mem.mem[192] !== sum) begin failures++; $display("mc sum wrong"); end
    checks++; if (dut.u_mh_mem.mem[194] !== 32'h0 || dut.u_mu_mem.mem[194] !== 32'h0 || dut.u_mn_mem.mem[194] !== 32'h0 || dut.u_mv_mem.mem[194] !== 32'h0 || dut.u_mo_mem.mem[194] !== 32'h0) begin failures++; $display("mc overflowing add wrote its result"); end
    checks++; if (dut.u_mh.u_rf.regs[13] !== 32'd2 || dut.u_mu.u_rf.regs[13] !== 32'd2 || dut.u_mn.u_rf.regs[13] !== 32'd2 || dut.u_mv.u_rf.regs[13] !== 32'd2 || dut.u_mo.u_rf.regs[13] !== 32'd2) begin failures++; $display("handler count wrong"); end
    checks++; if (mh_epc !== 32'h8000_0048 || mu_epc !== 32'h8000_0048 || mn_epc !== 32'h8000_0048 || mv_epc !== 32'h8000_0048 || mo_epc !== 32'h8000_0048) begin failures++; $display("EPC %h %h", mh_epc, mu_epc); end
    checks++; if (mh_cause !== 32'd0 || mu_cause !== 32'd0 || mn_cause !== 32'd0 || mv_cause !== 32'd0 || mo_cause !== 32'd0) begin failures++; $display("Cause %h %h", mh_cause, mu_cause); end
    checks++; if (dut.u_mh.u_rf.regs[6] !== sum - last || dut.u_mu.u_rf.regs[10] !== 32'd1 || dut.u_mn.u_rf.regs[8] !== (sum | last) || dut.u_mv.u_rf.regs[7] !== (sum & last) || dut.u_mo.u_rf.regs[10] !== 32'd1) begin failures++; $display("mc R-type results wrong"); end
    // mechanisms (state visits of the hard-wired core; the microprogrammed cores must match)
    begin
      string names [12] = '{"fetch", "decode", "mem_addr", "lw_read", "lw_writeback", "sw_write",
                            "rtype_exec", "rtype_writeback", "?", "addi_exec", "addi_writeback", "?"};
      for (int s = 0; s < 16; s++) begin
        if (s == 8 || s == 11) continue;
        checks++;
        if (n_mh[s] == 0 || n_mh[s] != n_mu[s] || n_mh[s] != n_mn[s] || n_mh[s] != n_mv[s] || n_mh[s] != n_mo[s]) begin failures++; $display("state %0d visits %0d/%0d", s, n_mh[s], n_mu[s]); end
        $display("  state %2d %-16s %0d", s, s < 12 ? names[s] : (s == 12 ? "branch" : s == 13 ? "jump" : s == 14 ? "exc_undefined" : "exc_overflow"), n_mh[s]);
      end
    end
    $display("  branches taken/not taken: single-cycle %0d/%0d, multi-cycle %0d/%0d", sc_taken, sc_not_taken, mh_taken, mh_not_taken);
    checks++; if (sc_taken == 0 || sc_not_taken == 0 || mh_taken == 0 || mh_not_taken == 0) begin failures++; $display("a branch outcome never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
