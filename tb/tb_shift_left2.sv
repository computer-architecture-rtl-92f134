// tb_shift_left2 - checks the shift left by 2 as multiplication by 4
// modulo 2**32.
module tb_shift_left2;
  int checks = 0, failures = 0;
  logic [31:0] x, y;
  shift_left2 dut (.x(x), .y(y));
  initial begin
    for (int n = 0; n < 300; n++) begin
      x = (n < 4) ? (32'h1 << (n * 10)) | 32'hC000_0001 : $urandom; #1;
      checks++; if (y !== x * 32'd4) begin failures++; $display("x=%h y=%h", x, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
