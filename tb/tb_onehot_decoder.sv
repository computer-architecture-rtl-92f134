// tb_onehot_decoder - checks the binary to 1-hot decoder for N=2 against
// the four-row truth table and for N=4 against 1 << b for every input.
module tb_onehot_decoder;
  int checks = 0, failures = 0;
  logic [1:0] b2;  logic [3:0]  h2;
  logic [3:0] b4;  logic [15:0] h4;
  onehot_decoder #(.N(2)) dut2 (.b(b2), .h(h2));
  onehot_decoder #(.N(4)) dut4 (.b(b4), .h(h4));
  logic [3:0] table2 [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};
  initial begin
    for (int i = 0; i < 4; i++) begin
      b2 = 2'(i); #1;
      checks++; if (h2 !== table2[i]) begin failures++; $display("N=2 b=%0d h=%b", i, h2); end
    end
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i); #1;
      checks++; if (h4 !== 16'(1 << i)) begin failures++; $display("N=4 b=%0d h=%b", i, h4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
