// sc_control - combinational controller of the single-cycle processor.
//
// The opcode is decoded into one line per instruction (R-type "add", addi,
// lw, beq, sw, j) and each control signal is the OR of the lines for which
// the control table holds a 1:
//   Jump = j, MemWrite = sw, Branch = beq, MemToReg = lw, RegDst = add,
//   RegWrite = add | addi | lw, ALUSrc = add | beq,
//   ALUOp = subtract for beq, "funct" for R-type, add otherwise.
// ALUSrc = 1 selects the register operand, 0 the sign-extended immediate,
// as in the control table. The table's don't-care entries are driven 0, and
// an unknown opcode asserts nothing, so it writes neither registers nor
// memory. Using the funct field for R-type ALU operations (instead of the
// table's fixed "add") follows the remark that ALUOp can be taken from the
// funct bits; the opcode values are the standard MIPS ones.
module sc_control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output sc_ctrl_t   ctrl
);
  logic is_r, is_addi, is_lw, is_sw, is_beq, is_j;

  assign is_r    = (opcode == OP_RTYPE);
  assign is_addi = (opcode == OP_ADDI);
  assign is_lw   = (opcode == OP_LW);
  assign is_sw   = (opcode == OP_SW);
  assign is_beq  = (opcode == OP_BEQ);
  assign is_j    = (opcode == OP_J);

  always_comb begin
    ctrl.jump       = is_j;
    ctrl.mem_write  = is_sw;
    ctrl.branch     = is_beq;
    ctrl.mem_to_reg = is_lw;
    ctrl.reg_dst    = is_r;
    ctrl.reg_write  = is_r | is_addi | is_lw;
    ctrl.alu_src    = is_r | is_beq;
    ctrl.alu_op     = is_beq ? ALUOP_SUB : (is_r ? ALUOP_FUNCT : ALUOP_ADD);
  end
endmodule
