// tb_alu - checks every ALU operation, the zero flag and the signed
// overflow flag against 64-bit signed reference arithmetic.
module tb_alu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y; alu_fn_t op; logic zero, ovf;
  alu dut (.a(a), .b(b), .op(op), .y(y), .zero(zero), .overflow(ovf));
  task automatic chk(input logic [31:0] va, input logic [31:0] vb, input alu_fn_t vop);
    longint signed wide; logic [31:0] ey; logic eovf;
    a = va; b = vb; op = vop; #1;
    eovf = 1'b0;
    case (vop)
      ALU_ADD: begin wide = longint'($signed(va)) + longint'($signed(vb)); ey = wide[31:0];
                     eovf = (wide > 64'sd2147483647) || (wide < -64'sd2147483648); end
      ALU_SUB: begin wide = longint'($signed(va)) - longint'($signed(vb)); ey = wide[31:0];
                     eovf = (wide > 64'sd2147483647) || (wide < -64'sd2147483648); end
      ALU_AND: ey = va & vb;
      ALU_OR:  ey = va | vb;
      default: ey = (longint'($signed(va)) < longint'($signed(vb))) ? 32'd1 : 32'd0;
    endcase
    checks++; if (y !== ey)            begin failures++; $display("op=%s %h %h y=%h exp %h", vop.name(), va, vb, y, ey); end
    checks++; if (zero !== (ey == 0))  begin failures++; $display("zero op=%s", vop.name()); end
    checks++; if (ovf !== eovf)        begin failures++; $display("ovf op=%s %h %h", vop.name(), va, vb); end
  endtask
  initial begin
    alu_fn_t ops [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    foreach (ops[k]) begin
      chk(32'h7FFF_FFFF, 32'd1, ops[k]);
      chk(32'h8000_0000, 32'd1, ops[k]);
      chk(32'h8000_0000, 32'hFFFF_FFFF, ops[k]);
      chk(32'd5, 32'd5, ops[k]);
      chk(32'hFFFF_FFFE, 32'd3, ops[k]);
      for (int n = 0; n < 100; n++) chk($urandom, $urandom, ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
