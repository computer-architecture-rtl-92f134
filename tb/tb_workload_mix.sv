// tb_workload_mix - runs the load/store/add part of the instruction mix used
// for the single-cycle versus multi-cycle performance comparison
// (30% load, 10% store, 50% add, 10% multiply) on all seven processors of
// mips_top at its default sizes.
//
// There is no multiply instruction, so the 10% multiplications are left out
// and the rest keeps its 3 : 1 : 5 ratio: 36 lw, 12 sw and 60 add in a
// shuffled straight-line program of 108 instructions, followed by a jump to
// itself. Loads read words 128..191, stores write words 192..203. While
// generating the program the testbench executes it in its own model; an add
// whose result would overflow is replaced by a register copy (add rd, rs, r0)
// so that no exception occurs. Checked: the final registers and stored
// words of every processor against the model, 108 cycles for the
// single-cycle processors (CPI 1) and 36 x 5 + 12 x 4 + 60 x 4 = 468 cycles
// for the multi-cycle ones, and the number of visits of the load, store and
// R-type states. The measured CPI is printed.
module tb_workload_mix;
  localparam int N_LW = 36, N_SW = 12, N_ADD = 60;
  localparam int N = N_LW + N_SW + N_ADD;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic        i_en = 0, d_en = 0, m_en = 0;
  logic [31:0] ld_addr = 0, ld_data = 0;
  logic [31:0] sc_pc, sr_pc, mh_pc, mu_pc, mn_pc, mh_epc, mh_cause, mu_epc, mu_cause, mn_epc, mn_cause, mv_pc, mv_epc, mv_cause, mo_pc, mo_epc, mo_cause;
  logic [3:0]  mh_state, mu_state, mn_state, mv_state, mo_state;

  mips_top dut (
    .clk(clk), .rst_n(rst_n),
    .sc_imem_ld_en(i_en), .sc_imem_ld_addr(ld_addr), .sc_imem_ld_data(ld_data),
    .sc_dmem_ld_en(d_en), .sc_dmem_ld_addr(ld_addr), .sc_dmem_ld_data(ld_data),
    .sc_pc(sc_pc),
    .sr_imem_ld_en(i_en), .sr_imem_ld_addr(ld_addr), .sr_imem_ld_data(ld_data),
    .sr_dmem_ld_en(d_en), .sr_dmem_ld_addr(ld_addr), .sr_dmem_ld_data(ld_data),
    .sr_pc(sr_pc),
    .mh_ld_en(m_en), .mh_ld_addr(ld_addr), .mh_ld_data(ld_data),
    .mh_pc(mh_pc), .mh_state(mh_state), .mh_epc(mh_epc), .mh_cause(mh_cause),
    .mu_ld_en(m_en), .mu_ld_addr(ld_addr), .mu_ld_data(ld_data),
    .mu_pc(mu_pc), .mu_state(mu_state), .mu_epc(mu_epc), .mu_cause(mu_cause),
    .mv_ld_en(m_en), .mv_ld_addr(ld_addr), .mv_ld_data(ld_data),
    .mv_pc(mv_pc), .mv_state(mv_state), .mv_epc(mv_epc), .mv_cause(mv_cause),
    .mo_ld_en(m_en), .mo_ld_addr(ld_addr), .mo_ld_data(ld_data),
    .mo_pc(mo_pc), .mo_state(mo_state), .mo_epc(mo_epc), .mo_cause(mo_cause),
    .mn_ld_en(m_en), .mn_ld_addr(ld_addr), .mn_ld_data(ld_data),
    .mn_pc(mn_pc), .mn_state(mn_state), .mn_epc(mn_epc), .mn_cause(mn_cause)
  );
  always #5 clk = ~clk;

  logic [31:0] prog [N + 1];
  logic [31:0] m_mem [256];
  logic [31:0] m_reg [16];

  task automatic put(input bit to_i, input bit to_d, input bit to_m, input int w, input logic [31:0] d);
    @(negedge clk);
    i_en = to_i; d_en = to_d; m_en = to_m; ld_addr = 32'(w * 4); ld_data = d;
    @(negedge clk);
    i_en = 0; d_en = 0; m_en = 0;
  endtask

  // Builds the shuffled program and runs it in the model at the same time.
  task automatic build();
    int kind [N];
    int k = 0;
    for (int i = 0; i < N_LW; i++) kind[k++] = 0;
    for (int i = 0; i < N_SW; i++) kind[k++] = 1;
    for (int i = 0; i < N_ADD; i++) kind[k++] = 2;
    for (int i = N - 1; i > 0; i--) begin
      int j = $urandom_range(i); int t = kind[i]; kind[i] = kind[j]; kind[j] = t;
    end
    foreach (m_reg[i]) m_reg[i] = 0;
    for (int w = 128; w < 192; w++) m_mem[w] = $urandom & 32'h000F_FFFF;
    for (int w = 192; w < 256; w++) m_mem[w] = 0;
    for (int i = 0; i < N; i++) begin
      int rs = $urandom_range(15), rt = $urandom_range(1, 15), rd = $urandom_range(1, 15);
      case (kind[i])
        0: begin   // lw rt, off(r0)
          int w = $urandom_range(128, 191);
          prog[i] = {6'h23, 5'd0, 5'(rt), 16'(w * 4)};
          m_reg[rt] = m_mem[w];
        end
        1: begin   // sw rt, off(r0)
          int w = 192 + $urandom_range(N_SW - 1);
          prog[i] = {6'h2B, 5'd0, 5'(rt), 16'(w * 4)};
          m_mem[w] = m_reg[rt];
        end
        default: begin   // add rd, rs, rt (or a copy if it would overflow)
          logic [31:0] a, b, s;
          a = m_reg[rs]; b = m_reg[rt]; s = a + b;
          if (a[31] == b[31] && s[31] != a[31]) begin rt = 0; s = a; end
          prog[i] = {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h20};
          m_reg[rd] = s;
        end
      endcase
      m_reg[0] = 0;
    end
    prog[N] = {6'h02, 26'(N)};   // halt: j halt
  endtask

  int n_state [16];
  int sc_cycles, mc_cycles;
  bit sc_done, mc_done;

  initial begin
    logic [31:0] data_init [256];
    build();
    // memory images: program in words 0..N, data as the model started it
    for (int w = 0; w < 256; w++) data_init[w] = 0;
    for (int w = 128; w < 192; w++) data_init[w] = m_mem[w];
    for (int w = 0; w <= N; w++) put(1'b1, 1'b0, 1'b1, w, prog[w]);
    for (int w = N + 1; w < 256; w++) put(1'b0, 1'b1, 1'b1, w, data_init[w]);
    for (int w = 0; w <= N; w++) put(1'b0, 1'b1, 1'b0, w, 32'h0);   // single-cycle data memory only

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sc_cycles = 0; mc_cycles = 0; sc_done = 0; mc_done = 0;
    for (int c = 0; c < 2000 && !(sc_done && mc_done); c++) begin
      @(negedge clk);
      if (!sc_done && sc_pc == 32'(N * 4)) sc_done = 1;
      if (!mc_done && mh_pc == 32'(N * 4) && mh_state == 0) mc_done = 1;
      if (!sc_done) sc_cycles++;
      if (!mc_done) begin mc_cycles++; n_state[mh_state]++; end
      checks++;
      if (sc_pc !== sr_pc || mh_pc !== mu_pc || mh_pc !== mn_pc || mh_state !== mu_state || mh_state !== mn_state || mh_pc !== mv_pc || mh_state !== mv_state || mh_pc !== mo_pc || mh_state !== mo_state) begin
        failures++; $display("variants diverge at cycle %0d", c);
      end
    end
    checks++; if (!sc_done || sc_cycles != N) begin failures++; $display("single-cycle took %0d cycles, exp %0d", sc_cycles, N); end
    checks++; if (!mc_done || mc_cycles != N_LW * 5 + N_SW * 4 + N_ADD * 4) begin
      failures++; $display("multi-cycle took %0d cycles, exp %0d", mc_cycles, N_LW * 5 + N_SW * 4 + N_ADD * 4);
    end
    checks++; if (n_state[3] != N_LW || n_state[5] != N_SW || n_state[6] != N_ADD || n_state[14] != 0 || n_state[15] != 0) begin
      failures++; $display("state visits lw %0d sw %0d R %0d exc %0d/%0d", n_state[3], n_state[5], n_state[6], n_state[14], n_state[15]);
    end
    for (int r = 1; r < 16; r++) begin
      checks++;
      if (dut.u_sc.u_rf.regs[r] !== m_reg[r] || dut.u_sr.u_rf.regs[r] !== m_reg[r] ||
          dut.u_mh.u_rf.regs[r] !== m_reg[r] || dut.u_mu.u_rf.regs[r] !== m_reg[r] ||
          dut.u_mn.u_rf.regs[r] !== m_reg[r] || dut.u_mv.u_rf.regs[r] !== m_reg[r] || dut.u_mo.u_rf.regs[r] !== m_reg[r]) begin failures++; $display("register %0d differs", r); end
    end
    for (int w = 192; w < 192 + N_SW; w++) begin
      checks++;
      if (dut.u_sc_dmem.mem[w] !== m_mem[w] || dut.u_sr_dmem.mem[w] !== m_mem[w] || dut.u_mh_mem.mem[w] !== m_mem[w] ||
          dut.u_mu_mem.mem[w] !== m_mem[w] || dut.u_mn_mem.mem[w] !== m_mem[w] || dut.u_mv_mem.mem[w] !== m_mem[w] || dut.u_mo_mem.mem[w] !== m_mem[w]) begin failures++; $display("word %0d differs", w); end
    end
    $display("  mix %0d lw / %0d sw / %0d add: single-cycle %0d cycles (CPI 1), multi-cycle %0d cycles (CPI %0.2f)",
             N_LW, N_SW, N_ADD, sc_cycles, mc_cycles, real'(mc_cycles) / N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
