// tb_adder - checks the 32-bit adder against 64-bit arithmetic truncated to
// 32 bits, including carries out of bit 31.
module tb_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b, s;
  adder #(.WIDTH(32)) dut (.a(a), .b(b), .sum(s));
  initial begin
    for (int n = 0; n < 300; n++) begin
      a = $urandom; b = (n % 3 == 0) ? 32'd4 : $urandom;
      if (n == 0) begin a = 32'hFFFF_FFFC; b = 32'd4; end
      #1;
      checks++; if (64'(s) !== ((64'(a) + 64'(b)) & 64'hFFFF_FFFF)) begin failures++; $display("%h+%h=%h", a, b, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
