// sc_cpu - single-cycle implementation of the simplified MIPS ISA.
//
// Every instruction completes in one clock cycle (CPI = 1). During the cycle
// the PC addresses the instruction memory, the opcode is decoded by the
// controller (sc_control, logic-based, or sc_control_rom, ROM-based, chosen
// by ROM_CTRL), the register file is read, the ALU computes, the data memory
// is read for lw, and at the rising edge the register file, the data memory
// and the PC are written together. Instruction and data memories are
// separate (Harvard) and sit outside this module.
// Supported: R-type add/sub/and/or/slt, addi, lw, sw, beq, j.
// Next PC: PC + 4; for a taken beq PC + 4 + (SignExt(imm) << 2); for j
// {PC+4[31:28], target, 00}. Two extra adders (PC + 4 and branch target)
// sit beside the ALU. All multiplexers are mux_onehot instances.
// Interface: imem_addr/imem_rdata to the instruction memory,
// dmem_addr/dmem_rdata/dmem_we/dmem_wdata to the data memory, pc for
// observation. rst_n (active low, synchronous) sets PC to RESET_PC and clears
// the registers; the reset value is an own choice.
module sc_cpu
  import mips_pkg::*;
#(
  parameter bit          ROM_CTRL = 1'b0,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  input  logic [31:0] dmem_rdata,
  output logic        dmem_we,
  output logic [31:0] dmem_wdata,
  output logic [31:0] pc
);
  logic [31:0] insn;
  sc_ctrl_t    ctrl;
  logic [31:0] pc_plus4, imm_ext, imm_sh, br_target, jmp_target, pc_next;
  logic [31:0] rs_val, rt_val, alu_b, alu_y, wb_data;
  logic [4:0]  wr_reg;
  logic        alu_zero, alu_ovf;
  alu_fn_t     alu_fn;

  assign imem_addr = pc;
  assign insn      = imem_rdata;

  // PC register
  always_ff @(posedge clk) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_next;
  end

  // Controller: logic-based (default) or ROM-based; both give the same
  // control signals.
  if (ROM_CTRL) begin : g_rom
    sc_control_rom u_ctrl (.opcode(insn[31:26]), .ctrl(ctrl));
  end else begin : g_logic
    sc_control u_ctrl (.opcode(insn[31:26]), .ctrl(ctrl));
  end

  // Register file; destination rd (RegDst=1) or rt
  logic [4:0] wr_sel [2];
  assign wr_sel[0] = insn[20:16];
  assign wr_sel[1] = insn[15:11];
  mux_onehot #(.SEL_BITS(1), .WIDTH(5)) u_mux_dst (.s(ctrl.reg_dst), .x(wr_sel), .y(wr_reg));

  regfile u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra1(insn[25:21]), .ra2(insn[20:16]), .rd1(rs_val), .rd2(rt_val),
    .we(ctrl.reg_write), .wa(wr_reg), .wd(wb_data)
  );

  sign_extend u_sext (.x(insn[15:0]), .y(imm_ext));

  // ALU with second operand register (ALUSrc=1) or immediate
  logic [31:0] b_sel [2];
  assign b_sel[0] = imm_ext;
  assign b_sel[1] = rt_val;
  mux_onehot #(.SEL_BITS(1), .WIDTH(32)) u_mux_alub (.s(ctrl.alu_src), .x(b_sel), .y(alu_b));

  alu_control u_aluc (.alu_op(ctrl.alu_op), .funct(insn[5:0]), .op(alu_fn));
  alu u_alu (.a(rs_val), .b(alu_b), .op(alu_fn), .y(alu_y), .zero(alu_zero), .overflow(alu_ovf));

  // Data memory
  assign dmem_addr  = alu_y;
  assign dmem_wdata = rt_val;
  assign dmem_we    = ctrl.mem_write;

  logic [31:0] wb_sel [2];
  assign wb_sel[0] = alu_y;
  assign wb_sel[1] = dmem_rdata;
  mux_onehot #(.SEL_BITS(1), .WIDTH(32)) u_mux_wb (.s(ctrl.mem_to_reg), .x(wb_sel), .y(wb_data));

  // Next PC
  adder u_pc4 (.a(pc), .b(32'd4), .sum(pc_plus4));
  shift_left2 u_sl2_br (.x(imm_ext), .y(imm_sh));
  adder u_bradd (.a(pc_plus4), .b(imm_sh), .sum(br_target));

  logic [31:0] tgt_sh;
  shift_left2 u_sl2_j (.x({6'd0, insn[25:0]}), .y(tgt_sh));
  assign jmp_target = {pc_plus4[31:28], tgt_sh[27:0]};

  logic [1:0]  pc_sel;
  logic [31:0] pc_cand [4];
  assign pc_sel     = {ctrl.jump, ctrl.branch & alu_zero};
  assign pc_cand[0] = pc_plus4;
  assign pc_cand[1] = br_target;
  assign pc_cand[2] = jmp_target;
  assign pc_cand[3] = jmp_target;
  mux_onehot #(.SEL_BITS(2), .WIDTH(32)) u_mux_pc (.s(pc_sel), .x(pc_cand), .y(pc_next));

  // The single-cycle datapath has no exceptions: overflow has no effect here.
  logic unused_ok;
  assign unused_ok = &{1'b0, alu_ovf};
endmodule
