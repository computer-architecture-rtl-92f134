// sc_control_rom - ROM-based controller of the single-cycle processor.
//
// The alternative to the logic-based sc_control: the control signals are
// stored in a read-only memory of 64 words addressed by the opcode, each
// word holding all control signals (Jump, Branch, RegDst, RegWrite,
// MemWrite, MemToReg, ALUOp, ALUSrc) of one instruction. The six
// instructions' words follow the control table (don't-care entries 0, R-type
// ALUOp "use funct"); every other word is 0, so an unknown opcode does
// nothing. The ROM is a constant 64-entry array filled by a combinational block.
// Output is combinational from the opcode, like a ROM read without a clock;
// outputs are identical to sc_control for every opcode.
module sc_control_rom
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output sc_ctrl_t   ctrl
);
  sc_ctrl_t rom [64];

  always_comb begin
    for (int a = 0; a < 64; a++) rom[a] = '0;
    //              jump  branch regdst regwr memwr mem2reg alu_op       alu_src
    rom[OP_RTYPE] = '{1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, ALUOP_FUNCT, 1'b1};
    rom[OP_ADDI]  = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, ALUOP_ADD,   1'b0};
    rom[OP_LW]    = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, ALUOP_ADD,   1'b0};
    rom[OP_SW]    = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, ALUOP_ADD,   1'b0};
    rom[OP_BEQ]   = '{1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, ALUOP_SUB,   1'b1};
    rom[OP_J]     = '{1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, ALUOP_ADD,   1'b0};
  end

  assign ctrl = rom[opcode];
endmodule
