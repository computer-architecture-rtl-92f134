// tb_regfile - checks the register file against a reference array: random
// writes and reads on both ports, reset to zero, register 0 stays 0, and
// a write becomes visible only after the clock edge.
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra1, ra2, wa; logic [31:0] rd1, rd2, wd;
  logic [31:0] ref_regs [32];
  regfile dut (.*);
  always #5 clk = ~clk;
  initial begin
    ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (ref_regs[i]) ref_regs[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      checks++; if (rd1 !== 0 || rd2 !== 0) begin failures++; $display("reset value r%0d", i); end
    end
    for (int n = 0; n < 500; n++) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = wa; ra2 = 5'($urandom);
      #1;
      // before the edge the old value is read
      checks++; if (rd1 !== ref_regs[wa]) begin failures++; $display("pre-edge r%0d", wa); end
      @(posedge clk);
      if (we && wa != 0) ref_regs[wa] = wd;
      #1;
      checks++; if (rd1 !== ref_regs[ra1]) begin failures++; $display("rd1 r%0d=%h exp %h", ra1, rd1, ref_regs[ra1]); end
      checks++; if (rd2 !== ref_regs[ra2]) begin failures++; $display("rd2 r%0d=%h exp %h", ra2, rd2, ref_regs[ra2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
