// mc_cpu - multi-cycle implementation of the simplified MIPS ISA.
//
// An instruction is split into steps of one short clock cycle each, so
// simple instructions finish early: beq and j take 3 cycles, R-type, addi
// and sw 4, lw 5. One memory holds instructions and data. Latch registers
// keep the results of one step for the next: IR (instruction), A and B
// (register operands), ALUOut (ALU result), DR (data read from memory).
// A single ALU also does the PC increment and the branch-target addition.
//   step 1: IR <- Mem[PC]; PC <- PC + 4
//   step 2: A <- Reg[rs]; B <- Reg[rt]; ALUOut <- PC + (SignExt(imm) << 2)
//   step 3: beq: if A == B then PC <- ALUOut;  j: PC <- {PC[31:28], target, 00}
//           R-type: ALUOut <- A funct B;  addi: ALUOut <- A + SignExt(imm)
//           lw/sw: ALUOut <- A + SignExt(imm)
//   step 4: R-type: Reg[rd] <- ALUOut;  addi: Reg[rt] <- ALUOut
//           sw: Mem[ALUOut] <- B;  lw: DR <- Mem[ALUOut]
//   step 5: lw: Reg[rt] <- DR
// Exceptions: an unknown opcode (undefined instruction) or a signed
// overflow of add, sub or addi stops the instruction before it writes
// anything, stores the address of the instruction (PC - 4) in EPC and the
// cause (0 undefined instruction, 1 overflow) in Cause, and jumps to the
// single handler address EXC_VECTOR.
// CTRL selects the controller: CTRL_FSM the hard-wired state machine with a
// binary state register (mc_control_fsm), CTRL_ONEHOT the hard-wired state
// machine with one flip-flop per state (mc_control_onehot), CTRL_MICRO the microprogrammed sequencer with horizontal
// microinstructions (mc_control_useq), CTRL_VERT the same sequencer with
// vertical, field-encoded microinstructions (mc_control_vert), CTRL_NANO the
// sequencer with a nano-programmed control store (mc_control_nano); all
// five give the same cycle-by-cycle behaviour.
// Interface: mem_addr/mem_rdata/mem_we/mem_wdata to the external unified
// memory, which must read combinationally and write at the clock edge.
// pc, state, epc and cause are brought out for observation.
// rst_n (active low, synchronous) sets PC to RESET_PC, clears the registers
// and enters the fetch state. Own choices: EXC_VECTOR (the MIPS value),
// RESET_PC, the Cause encoding, the overflow state number 15.
module mc_cpu
  import mips_pkg::*;
#(
  parameter mc_ctrl_style_t CTRL   = CTRL_FSM,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter logic [31:0] EXC_VECTOR = 32'h8000_0180
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] mem_addr,
  input  logic [31:0] mem_rdata,
  output logic        mem_we,
  output logic [31:0] mem_wdata,
  output logic [31:0] pc,
  output logic [3:0]  state,
  output logic [31:0] epc,
  output logic [31:0] cause
);
  mc_ctrl_t    ctrl;
  logic [31:0] ir, a_q, b_q, aluout_q, dr_q;
  logic [31:0] rs_val, rt_val, imm_ext, imm_sh, alu_a, alu_b, alu_y, pc_next, wb_data;
  logic [31:0] jmp_target, tgt_sh;
  logic [4:0]  wr_reg;
  logic        alu_zero, alu_ovf, pc_en;
  alu_fn_t     alu_fn;

  // Controller
  if (CTRL == CTRL_MICRO) begin : g_useq
    mc_control_useq u_ctrl (.clk(clk), .rst_n(rst_n), .opcode(ir[31:26]),
                            .overflow(alu_ovf), .ctrl(ctrl), .state(state));
  end else if (CTRL == CTRL_ONEHOT) begin : g_onehot
    mc_control_onehot u_ctrl (.clk(clk), .rst_n(rst_n), .opcode(ir[31:26]),
                              .overflow(alu_ovf), .ctrl(ctrl), .state(state));
  end else if (CTRL == CTRL_VERT) begin : g_vert
    mc_control_vert u_ctrl (.clk(clk), .rst_n(rst_n), .opcode(ir[31:26]),
                            .overflow(alu_ovf), .ctrl(ctrl), .state(state));
  end else if (CTRL == CTRL_NANO) begin : g_nano
    mc_control_nano u_ctrl (.clk(clk), .rst_n(rst_n), .opcode(ir[31:26]),
                            .overflow(alu_ovf), .ctrl(ctrl), .state(state));
  end else begin : g_fsm
    mc_control_fsm  u_ctrl (.clk(clk), .rst_n(rst_n), .opcode(ir[31:26]),
                            .overflow(alu_ovf), .ctrl(ctrl), .state(state));
  end

  // Memory address: PC for instruction fetch, ALUOut for data (IorD)
  logic [31:0] addr_sel [2];
  assign addr_sel[0] = pc;
  assign addr_sel[1] = aluout_q;
  mux_onehot #(.SEL_BITS(1), .WIDTH(32)) u_mux_addr (.s(ctrl.iord), .x(addr_sel), .y(mem_addr));
  assign mem_we    = ctrl.mem_write;
  assign mem_wdata = b_q;

  // Latch registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir       <= '0;
      a_q      <= '0;
      b_q      <= '0;
      aluout_q <= '0;
      dr_q     <= '0;
    end else begin
      if (ctrl.ir_write) ir <= mem_rdata;
      if (ctrl.mem_read) dr_q <= mem_rdata;
      a_q      <= rs_val;
      b_q      <= rt_val;
      aluout_q <= alu_y;
    end
  end

  // Register file
  logic [4:0] dst_sel [2];
  assign dst_sel[0] = ir[20:16];
  assign dst_sel[1] = ir[15:11];
  mux_onehot #(.SEL_BITS(1), .WIDTH(5)) u_mux_dst (.s(ctrl.reg_dst), .x(dst_sel), .y(wr_reg));

  logic [31:0] wb_sel [2];
  assign wb_sel[0] = aluout_q;
  assign wb_sel[1] = dr_q;
  mux_onehot #(.SEL_BITS(1), .WIDTH(32)) u_mux_wb (.s(ctrl.mem_to_reg), .x(wb_sel), .y(wb_data));

  regfile u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra1(ir[25:21]), .ra2(ir[20:16]), .rd1(rs_val), .rd2(rt_val),
    .we(ctrl.reg_write), .wa(wr_reg), .wd(wb_data)
  );

  // ALU operands
  sign_extend u_sext (.x(ir[15:0]), .y(imm_ext));
  shift_left2 u_sl2  (.x(imm_ext), .y(imm_sh));

  logic [31:0] a_sel [2];
  assign a_sel[0] = pc;
  assign a_sel[1] = a_q;
  mux_onehot #(.SEL_BITS(1), .WIDTH(32)) u_mux_a (.s(ctrl.alu_src_a), .x(a_sel), .y(alu_a));

  logic [31:0] b_sel [4];
  assign b_sel[0] = b_q;
  assign b_sel[1] = 32'd4;
  assign b_sel[2] = imm_ext;
  assign b_sel[3] = imm_sh;
  mux_onehot #(.SEL_BITS(2), .WIDTH(32)) u_mux_b (.s(ctrl.alu_src_b), .x(b_sel), .y(alu_b));

  alu_control u_aluc (.alu_op(ctrl.alu_op), .funct(ir[5:0]), .op(alu_fn));
  alu u_alu (.a(alu_a), .b(alu_b), .op(alu_fn), .y(alu_y), .zero(alu_zero), .overflow(alu_ovf));

  // Next PC
  shift_left2 u_sl2_j (.x({6'd0, ir[25:0]}), .y(tgt_sh));
  assign jmp_target = {pc[31:28], tgt_sh[27:0]};

  logic [31:0] pc_sel [4];
  assign pc_sel[0] = alu_y;
  assign pc_sel[1] = aluout_q;
  assign pc_sel[2] = jmp_target;
  assign pc_sel[3] = EXC_VECTOR;
  mux_onehot #(.SEL_BITS(2), .WIDTH(32)) u_mux_pc (.s(ctrl.pc_source), .x(pc_sel), .y(pc_next));

  assign pc_en = ctrl.pc_write | (ctrl.pc_write_cond & alu_zero);

  // PC, EPC and Cause
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc    <= RESET_PC;
      epc   <= '0;
      cause <= '0;
    end else begin
      if (pc_en)            pc    <= pc_next;
      if (ctrl.epc_write)   epc   <= alu_y;
      if (ctrl.cause_write) cause <= {31'd0, ctrl.int_cause};
    end
  end
endmodule
