// tb_sc_cpu - checks the single-cycle processor, with the logic-based and
// with the ROM-based controller, against an instruction-level reference
// model.
//
// Each processor runs random programs from its own instruction memory with a
// separate data memory. The testbench executes one instruction of its own
// model per clock cycle (CPI = 1) and compares PC and all registers after
// every cycle, and the data memory at the end of each program. The programs
// mix R-type add/sub/and/or/slt, addi, lw, sw, taken and untaken beq and j;
// each must occur at least once. The single-cycle design has no
// exceptions: overflowing arithmetic wraps and unknown opcodes do nothing.
module tb_sc_cpu;
  import mips_pkg::*;
  localparam int WORDS = 256;
  localparam int PROG  = 64;        // program words 0..63
  localparam int NINSN = 700;    // instructions per program
  localparam int NPROGS = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ld_en = 0; logic [31:0] ld_addr = 0, ld_data = 0;

  logic [31:0] iaddr, insn, daddr, drdata, dwdata, pc;
  logic        dwe;
  logic        ild_en = 0;
  logic [31:0] iaddr2, insn2, daddr2, drdata2, dwdata2, pc2;
  logic        dwe2;

  sc_cpu dut (.clk(clk), .rst_n(rst_n), .imem_addr(iaddr), .imem_rdata(insn),
    .dmem_addr(daddr), .dmem_rdata(drdata), .dmem_we(dwe), .dmem_wdata(dwdata), .pc(pc));
  word_mem #(.WORDS(WORDS)) imem (.clk(clk), .addr(iaddr), .rdata(insn), .we(1'b0), .wdata(32'd0),
    .ld_en(ild_en), .ld_addr(ld_addr), .ld_data(ld_data));
  word_mem #(.WORDS(WORDS)) dmem (.clk(clk), .addr(daddr), .rdata(drdata), .we(dwe), .wdata(dwdata),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));
  // second copy with the ROM-based controller
  sc_cpu #(.ROM_CTRL(1'b1)) dut_rom (.clk(clk), .rst_n(rst_n), .imem_addr(iaddr2), .imem_rdata(insn2),
    .dmem_addr(daddr2), .dmem_rdata(drdata2), .dmem_we(dwe2), .dmem_wdata(dwdata2), .pc(pc2));
  word_mem #(.WORDS(WORDS)) imem2 (.clk(clk), .addr(iaddr2), .rdata(insn2), .we(1'b0), .wdata(32'd0),
    .ld_en(ild_en), .ld_addr(ld_addr), .ld_data(ld_data));
  word_mem #(.WORDS(WORDS)) dmem2 (.clk(clk), .addr(daddr2), .rdata(drdata2), .we(dwe2), .wdata(dwdata2),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [31:0] m_imem [WORDS];
  logic [31:0] m_dmem [WORDS];
  logic [31:0] m_reg [32];
  logic [31:0] m_pc;
  int n_kind [string];

  function automatic logic [31:0] sx(input logic [15:0] v); return {{16{v[15]}}, v}; endfunction

  // executes one instruction
  function automatic void model_step();
    logic [31:0] insn, pc4, a, b, r, ea;
    logic [5:0] op, fn; logic [4:0] rs, rt, rd;
    insn = m_imem[m_pc[9:2]];
    op = insn[31:26]; rs = insn[25:21]; rt = insn[20:16]; rd = insn[15:11]; fn = insn[5:0];
    pc4 = m_pc + 4; a = m_reg[rs]; b = m_reg[rt];
    m_pc = pc4;
    case (op)
      6'h00: begin
        case (fn)
          6'h22: r = a - b;
          6'h24: r = a & b;
          6'h25: r = a | b;
          6'h2A: r = ($signed(a) < $signed(b)) ? 1 : 0;
          default: r = a + b;
        endcase
        if (rd != 0) m_reg[rd] = r;
        n_kind["rtype"]++;
        if (fn inside {6'h20, 6'h22} && ((fn == 6'h20) ? (a[31] == b[31]) : (a[31] != b[31])) && r[31] != a[31])
          n_kind["wrapping_overflow"]++;
      end
      6'h08: begin r = a + sx(insn[15:0]); if (rt != 0) m_reg[rt] = r; n_kind["addi"]++; end
      6'h23: begin ea = a + sx(insn[15:0]); if (rt != 0) m_reg[rt] = m_dmem[ea[9:2]]; n_kind["lw"]++; end
      6'h2B: begin ea = a + sx(insn[15:0]); m_dmem[ea[9:2]] = b; n_kind["sw"]++; end
      6'h04: begin
        if (a == b) begin m_pc = pc4 + (sx(insn[15:0]) << 2); n_kind["beq_taken"]++; end
        else n_kind["beq_not_taken"]++;
      end
      6'h02: begin m_pc = {pc4[31:28], insn[25:0], 2'b00}; n_kind["j"]++; end
      default: n_kind["unknown_opcode"]++;
    endcase
  endfunction

  // ---------------- program generator ----------------
  function automatic logic [4:0] rreg(); return 5'($urandom_range(1, 12)); endfunction
  function automatic logic [31:0] gen_insn(input int idx);
    int k; logic [5:0] fns [5] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2A};
    logic [4:0] rs, rt; int tgt;
    k = $urandom_range(99);
    rs = rreg(); rt = rreg();
    if (k < 30) return {6'h00, rs, rt, rreg(), 5'd0, fns[$urandom_range(4)]};
    if (k < 42) return {6'h08, rs, rt, 16'($urandom)};
    if (k < 57) return {6'h23, 5'd0, rt, 16'(32'h200 + 4 * $urandom_range(127))};
    if (k < 67) return {6'h2B, 5'd0, rt, 16'(32'h200 + 4 * $urandom_range(127))};
    if (k < 85) begin
      tgt = ($urandom_range(3) == 0) ? $urandom_range(PROG - 1) : $urandom_range(PROG - 1, idx + 1);
      if ($urandom_range(2) == 0) rt = rs;
      return {6'h04, rs, rt, 16'(tgt - (idx + 1))};
    end
    if (k < 94) return {6'h02, 26'(($urandom_range(3) == 0) ? $urandom_range(PROG - 1) : $urandom_range(PROG - 1, idx + 1))};
    return {6'h3F - 6'($urandom_range(3)), 26'($urandom)};   // unknown opcode
  endfunction

  task automatic load_words(input int w, input logic [31:0] di, input logic [31:0] dd);
    @(negedge clk); ild_en = 1; ld_en = 1; ld_addr = 32'(w * 4);
    ld_data = di; m_imem[w] = di; m_dmem[w] = dd;
    // instruction and data memory share the load address; data goes in a second cycle
    @(negedge clk); ild_en = 0; ld_data = dd;
  endtask

  initial begin
    int ninsn;
    string kinds [8] = '{"rtype", "addi", "lw", "sw", "beq_taken", "beq_not_taken", "j", "wrapping_overflow"};
    for (int p = 0; p < NPROGS; p++) begin
      rst_n = 0;
      for (int w = 0; w < WORDS; w++) begin
        logic [31:0] di, dd;
        if (w == 0) di = {6'h23, 5'd0, 5'd1, 16'h0200};                   // lw r1, 0x200(r0)
        else if (w == 1) di = {6'h00, 5'd1, 5'd1, 5'd2, 5'd0, 6'h20};     // add r2, r1, r1
        else if (w < PROG - 1) di = gen_insn(w);
        else if (w == PROG - 1) di = {6'h02, 26'd0};                      // j 0
        else di = $urandom;
        dd = (w == 128) ? 32'h7FFF_FFF0 :
             (w % 3 == 0) ? 32'h7FFF_0000 + 32'($urandom_range(65535)) : $urandom;
        load_words(w, di, dd);
      end
      @(negedge clk); ld_en = 0; ild_en = 0;
      foreach (m_reg[i]) m_reg[i] = 0;
      m_pc = 0;
      repeat (2) @(posedge clk);
      @(posedge clk); #1 rst_n = 1;
      ninsn = 0;
      while (ninsn < NINSN) begin
        logic ok;
        @(negedge clk);
        ok = (pc === m_pc) && (pc2 === m_pc);
        for (int r = 1; r < 32; r++) if (dut.u_rf.regs[r] !== m_reg[r] || dut_rom.u_rf.regs[r] !== m_reg[r]) ok = 0;
        checks++; if (!ok) begin failures++; if (failures < 10) $display("state differs at insn %0d: pc=%h exp %h", ninsn, pc, m_pc); end
        model_step();
        ninsn++;
      end
      for (int w = 0; w < WORDS; w++) begin
        checks++;
        if (dmem.mem[w] !== m_dmem[w] || dmem2.mem[w] !== m_dmem[w]) begin failures++; $display("data word %0d differs", w); end
      end
    end
    foreach (kinds[i]) begin
      checks++; if (n_kind[kinds[i]] == 0) begin failures++; $display("never happened: %s", kinds[i]); end
    end
    foreach (n_kind[k]) $display("  %-18s %0d", k, n_kind[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
