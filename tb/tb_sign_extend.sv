// tb_sign_extend - checks 16 to 32 bit sign extension on edge values and
// random values against $signed arithmetic.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [15:0] x; logic [31:0] y;
  sign_extend dut (.x(x), .y(y));
  task automatic chk(input logic [15:0] v);
    int signed e;
    x = v; #1;
    e = int'($signed(v));
    checks++; if (y !== 32'(e)) begin failures++; $display("x=%h y=%h", v, y); end
  endtask
  initial begin
    chk(16'h0000); chk(16'h7FFF); chk(16'h8000); chk(16'hFFFF); chk(16'h0001);
    for (int n = 0; n < 200; n++) chk(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
