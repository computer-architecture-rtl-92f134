// tb_alu_control - checks the ALUOp/funct to ALU operation mapping:
// 00 always add, 01 always subtract, 10 by funct (add, sub, and, or, slt;
// anything else add), for every funct value.
module tb_alu_control;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] alu_op; logic [5:0] funct; alu_fn_t op, e;
  alu_control dut (.alu_op(alu_op), .funct(funct), .op(op));
  initial begin
    for (int o = 0; o < 3; o++)
      for (int f = 0; f < 64; f++) begin
        alu_op = 2'(o); funct = 6'(f); #1;
        if (o == 0) e = ALU_ADD;
        else if (o == 1) e = ALU_SUB;
        else case (f)
          32: e = ALU_ADD; 34: e = ALU_SUB; 36: e = ALU_AND; 37: e = ALU_OR; 42: e = ALU_SLT;
          default: e = ALU_ADD;
        endcase
        checks++; if (op !== e) begin failures++; $display("aluop=%0d funct=%h op=%s exp %s", o, f, op.name(), e.name()); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
