// alu_control - turns the controller's ALUOp and the funct field into an
// ALU operation.
//
// ALUOp 00 means add (address calculation, PC increment, addi), 01 means
// subtract (beq compare, EPC = PC - 4), 10 means the R-type funct field
// chooses: add 0x20, sub 0x22, and 0x24, or 0x25, slt 0x2A. This follows the
// idea that ALUOp can be taken from the funct bits of R-type instructions;
// the funct values are the standard MIPS ones. A funct code outside those
// five selects add (own choice; undefined-instruction detection looks at the
// opcode only). Purely combinational.
module alu_control
  import mips_pkg::*;
(
  input  logic [1:0] alu_op,
  input  logic [5:0] funct,
  output alu_fn_t    op
);
  always_comb begin
    case (funct)
      FN_ADD:  op = ALU_ADD;
      FN_SUB:  op = ALU_SUB;
      FN_AND:  op = ALU_AND;
      FN_OR:   op = ALU_OR;
      FN_SLT:  op = ALU_SLT;
      default: op = ALU_ADD;
    endcase
    if (alu_op == ALUOP_ADD)      op = ALU_ADD;
    else if (alu_op == ALUOP_SUB) op = ALU_SUB;
  end
endmodule
