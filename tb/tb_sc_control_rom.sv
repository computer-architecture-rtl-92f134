// tb_sc_control_rom - checks the ROM-based single-cycle controller against
// the control table (Jump, Branch, RegDst, RegWrite, MemWrite, MemToReg,
// ALUOp, ALUSrc) for the six instructions, with don't-care entries skipped,
// checks that every other opcode writes neither registers nor memory, and
// that all 64 ROM words equal the output of the logic-based sc_control.
module tb_sc_control_rom;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] opcode; sc_ctrl_t c;
  sc_control_rom dut (.opcode(opcode), .ctrl(c));
  sc_ctrl_t c_logic;
  sc_control ref_ctrl (.opcode(opcode), .ctrl(c_logic));
  // expected row: jump branch regdst regwrite memwrite memtoreg aluop alusrc ; -1 = don't care
  task automatic row(input logic [5:0] op, input int j, input int br, input int rd, input int rw,
                     input int mw, input int m2r, input int aop, input int src);
    int exp_v [8]; int got [8];
    opcode = op; #1;
    exp_v = '{j, br, rd, rw, mw, m2r, aop, src};
    got   = '{int'(c.jump), int'(c.branch), int'(c.reg_dst), int'(c.reg_write),
              int'(c.mem_write), int'(c.mem_to_reg), int'(c.alu_op), int'(c.alu_src)};
    for (int k = 0; k < 8; k++)
      if (exp_v[k] >= 0) begin
        checks++;
        if (got[k] != exp_v[k]) begin failures++; $display("op=%h column %0d = %0d exp %0d", op, k, got[k], exp_v[k]); end
      end
  endtask
  initial begin
    //          J  Br RD RW MW M2R ALUOp   Src
    row(6'h00,  0, 0, 1, 1, 0, 0, 2,      1);   // add (R-type): funct decides
    row(6'h08,  0, 0, 0, 1, 0, 0, 0,      0);   // addi
    row(6'h23,  0, 0, 0, 1, 0, 1, 0,      0);   // lw
    row(6'h2B,  0, 0, -1, 0, 1, -1, 0,    0);   // sw
    row(6'h04,  0, 1, -1, 0, 0, -1, 1,    1);   // beq
    row(6'h02,  1, -1, -1, 0, 0, -1, -1, -1);   // j
    for (int o = 0; o < 64; o++) begin
      if (o inside {0, 2, 4, 8, 35, 43}) continue;
      opcode = 6'(o); #1;
      checks++; if (c.reg_write || c.mem_write || c.jump || c.branch) begin failures++; $display("unknown op %h acts", o); end
    end
    for (int o = 0; o < 64; o++) begin
      opcode = 6'(o); #1;
      checks++; if (c !== c_logic) begin failures++; $display("op %h: ROM %h logic %h", o, c, c_logic); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
