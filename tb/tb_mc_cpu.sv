// tb_mc_cpu - checks the multi-cycle processor with all five controllers
// against an instruction-level reference model.
//
// Five processors (hard-wired binary and one-hot FSM, horizontal
// microprogram, vertical microprogram and nano-programmed controller), each
// with
// its own 256-word memory, run the same random program. The testbench keeps
// its own model of the architectural state (registers, PC, memory, EPC,
// Cause) and executes one instruction in it whenever a processor returns
// to the fetch state. At every instruction boundary it compares PC, all
// registers, EPC and Cause of all processors with the model, and the
// number of cycles the previous instruction took with the expected count
// (beq/j/undefined 3, R-type/addi/sw/overflow 4, lw 5). At the end the
// memories are compared. The program mixes all instructions, taken and
// untaken branches, undefined opcodes and overflowing add/sub/addi; each of
// these must occur at least once.
module tb_mc_cpu;
  import mips_pkg::*;
  localparam int WORDS = 256;
  localparam int PROG  = 64;        // program words 0..63
  localparam int HANDLER = 96;      // 0x80000180 aliases word 96
  localparam int NINSN = 700;    // instructions per program
  localparam int NPROGS = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ld_en = 0; logic [31:0] ld_addr = 0, ld_data = 0;

  logic [31:0] addr [5], rdata [5], wdata [5], pc [5], epc [5], cause [5];
  logic        we [5];
  logic [3:0]  state [5];

  mc_cpu #(.CTRL(CTRL_FSM)) dut0 (.clk(clk), .rst_n(rst_n), .mem_addr(addr[0]), .mem_rdata(rdata[0]),
    .mem_we(we[0]), .mem_wdata(wdata[0]), .pc(pc[0]), .state(state[0]), .epc(epc[0]), .cause(cause[0]));
  mc_cpu #(.CTRL(CTRL_MICRO)) dut1 (.clk(clk), .rst_n(rst_n), .mem_addr(addr[1]), .mem_rdata(rdata[1]),
    .mem_we(we[1]), .mem_wdata(wdata[1]), .pc(pc[1]), .state(state[1]), .epc(epc[1]), .cause(cause[1]));
  mc_cpu #(.CTRL(CTRL_NANO)) dut2 (.clk(clk), .rst_n(rst_n), .mem_addr(addr[2]), .mem_rdata(rdata[2]),
    .mem_we(we[2]), .mem_wdata(wdata[2]), .pc(pc[2]), .state(state[2]), .epc(epc[2]), .cause(cause[2]));
  mc_cpu #(.CTRL(CTRL_VERT)) dut3 (.clk(clk), .rst_n(rst_n), .mem_addr(addr[3]), .mem_rdata(rdata[3]),
    .mem_we(we[3]), .mem_wdata(wdata[3]), .pc(pc[3]), .state(state[3]), .epc(epc[3]), .cause(cause[3]));
  mc_cpu #(.CTRL(CTRL_ONEHOT)) dut4 (.clk(clk), .rst_n(rst_n), .mem_addr(addr[4]), .mem_rdata(rdata[4]),
    .mem_we(we[4]), .mem_wdata(wdata[4]), .pc(pc[4]), .state(state[4]), .epc(epc[4]), .cause(cause[4]));
  word_mem #(.WORDS(WORDS)) mem0 (.clk(clk), .addr(addr[0]), .rdata(rdata[0]), .we(we[0]), .wdata(wdata[0]),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));
  word_mem #(.WORDS(WORDS)) mem1 (.clk(clk), .addr(addr[1]), .rdata(rdata[1]), .we(we[1]), .wdata(wdata[1]),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));
  word_mem #(.WORDS(WORDS)) mem2 (.clk(clk), .addr(addr[2]), .rdata(rdata[2]), .we(we[2]), .wdata(wdata[2]),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));
  word_mem #(.WORDS(WORDS)) mem3 (.clk(clk), .addr(addr[3]), .rdata(rdata[3]), .we(we[3]), .wdata(wdata[3]),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));
  word_mem #(.WORDS(WORDS)) mem4 (.clk(clk), .addr(addr[4]), .rdata(rdata[4]), .we(we[4]), .wdata(wdata[4]),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [31:0] m_mem [WORDS];
  logic [31:0] m_reg [32];
  logic [31:0] m_pc, m_epc, m_cause;
  int n_kind [string];

  function automatic logic [31:0] sx(input logic [15:0] v); return {{16{v[15]}}, v}; endfunction

  // executes one instruction, returns its expected cycle count
  function automatic int model_step();
    logic [31:0] insn, pc4, a, b, r, ea;
    logic [5:0] op, fn; logic [4:0] rs, rt, rd;
    logic ovf; int cyc; int exc;
    insn = m_mem[m_pc[9:2]];
    op = insn[31:26]; rs = insn[25:21]; rt = insn[20:16]; rd = insn[15:11]; fn = insn[5:0];
    pc4 = m_pc + 4; a = m_reg[rs]; b = m_reg[rt];
    exc = -1; cyc = 0; ovf = 0;
    case (op)
      6'h00: begin
        case (fn)
          6'h22: begin r = a - b; ovf = (a[31] != b[31]) && (r[31] != a[31]); end
          6'h24: r = a & b;
          6'h25: r = a | b;
          6'h2A: r = ($signed(a) < $signed(b)) ? 1 : 0;
          default: begin r = a + b; ovf = (a[31] == b[31]) && (r[31] != a[31]); end
        endcase
        if (ovf) exc = 1; else begin if (rd != 0) m_reg[rd] = r; m_pc = pc4; cyc = 4; n_kind["rtype"]++; end
      end
      6'h08: begin
        r = a + sx(insn[15:0]); ovf = (a[31] == insn[15]) && (r[31] != a[31]);
        if (ovf) exc = 1; else begin if (rt != 0) m_reg[rt] = r; m_pc = pc4; cyc = 4; n_kind["addi"]++; end
      end
      6'h23: begin ea = a + sx(insn[15:0]); if (rt != 0) m_reg[rt] = m_mem[ea[9:2]]; m_pc = pc4; cyc = 5; n_kind["lw"]++; end
      6'h2B: begin ea = a + sx(insn[15:0]); m_mem[ea[9:2]] = b; m_pc = pc4; cyc = 4; n_kind["sw"]++; end
      6'h04: begin
        if (a == b) begin m_pc = pc4 + (sx(insn[15:0]) << 2); n_kind["beq_taken"]++; end
        else begin m_pc = pc4; n_kind["beq_not_taken"]++; end
        cyc = 3;
      end
      6'h02: begin m_pc = {pc4[31:28], insn[25:0], 2'b00}; cyc = 3; n_kind["j"]++; end
      default: exc = 0;
    endcase
    if (exc >= 0) begin
      m_epc = m_pc; m_cause = 32'(exc); m_pc = 32'h8000_0180;
      cyc = (exc == 0) ? 3 : 4;
      n_kind[exc == 0 ? "exc_undefined" : "exc_overflow"]++;
    end
    return cyc;
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
    return {6'h3F - 6'($urandom_range(3)), 26'($urandom)};
  endfunction

  task automatic load_word(input int w, input logic [31:0] d);
    @(negedge clk); ld_en = 1; ld_addr = 32'(w * 4); ld_data = d; m_mem[w] = d;
  endtask

  initial begin
    int cycles, exp_cyc, ninsn;
    string kinds [8] = '{"rtype", "addi", "lw", "sw", "beq_taken", "beq_not_taken", "j", "exc_undefined"};
    for (int p = 0; p < NPROGS; p++) begin
    rst_n = 0;
    for (int w = 0; w < WORDS; w++) begin
      logic [31:0] d;
      if (w == 0) d = {6'h23, 5'd0, 5'd1, 16'h0200};  // lw r1, 0x200(r0)
      else if (w == 1) d = {6'h00, 5'd1, 5'd1, 5'd2, 5'd0, 6'h20};  // add r2, r1, r1
      else if (w == 128) d = 32'h7FFF_FFF0;
      else if (w < PROG - 1) d = gen_insn(w);
      else if (w == PROG - 1)    d = {6'h02, 26'd0};                      // j 0
      else if (w == HANDLER)     d = {6'h08, 5'd13, 5'd13, 16'd1};       // addi r13, r13, 1
      else if (w == HANDLER + 1) d = {6'h02, 26'($urandom_range(PROG - 1))};
      else d = (w % 3 == 0) ? 32'h7FFF_0000 + 32'($urandom_range(65535)) : $urandom;
      load_word(w, d);
    end
    @(negedge clk); ld_en = 0;
    foreach (m_reg[i]) m_reg[i] = 0;
    m_pc = 0; m_epc = 0; m_cause = 0;
    repeat (2) @(posedge clk);
    @(posedge clk); #1 rst_n = 1;
    cycles = 0; exp_cyc = -1; ninsn = 0;
    while (ninsn < NINSN) begin
      @(negedge clk);
      cycles++;
      checks++; if (state[0] !== state[1] || state[0] !== state[2] || state[0] !== state[3] || state[0] !== state[4]) begin failures++; $display("controllers differ: %0d %0d %0d %0d %0d", state[0], state[1], state[2], state[3], state[4]); end
      if (state[0] == 4'd0) begin
        if (exp_cyc >= 0) begin
          checks++; if (cycles != exp_cyc) begin failures++; $display("insn %0d took %0d cycles exp %0d", ninsn, cycles, exp_cyc); end
        end
        for (int d = 0; d < 5; d++) begin
          logic ok;
          ok = (pc[d] === m_pc) && (epc[d] === m_epc) && (cause[d] === m_cause);
          for (int r = 0; r < 32; r++) begin
            logic [31:0] v;
            v = (d == 0) ? dut0.u_rf.regs[r] : (d == 1) ? dut1.u_rf.regs[r] : (d == 2) ? dut2.u_rf.regs[r] : (d == 3) ? dut3.u_rf.regs[r] : dut4.u_rf.regs[r];
                if (r != 0 && v !== m_reg[r]) ok = 0;
          end
          checks++; if (!ok) begin failures++; if (failures < 10) $display("cpu%0d state differs at insn %0d: pc=%h exp %h", d, ninsn, pc[d], m_pc); end
        end
        exp_cyc = model_step();
        cycles = 0;
        ninsn++;
      end
    end
    for (int w = 0; w < WORDS; w++) begin
      checks++;
      if (mem0.mem[w] !== m_mem[w] || mem1.mem[w] !== m_mem[w] || mem2.mem[w] !== m_mem[w] || mem3.mem[w] !== m_mem[w] || mem4.mem[w] !== m_mem[w]) begin failures++; $display("mem word %0d differs", w); end
    end
    end
    foreach (kinds[i]) begin
      checks++; if (n_kind[kinds[i]] == 0) begin failures++; $display("never happened: %s", kinds[i]); end
    end
    checks++; if (n_kind["exc_overflow"] == 0) begin failures++; $display("never happened: exc_overflow"); end
    foreach (n_kind[k]) $display("  %-14s %0d", k, n_kind[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
