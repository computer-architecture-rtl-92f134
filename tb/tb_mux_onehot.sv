// tb_mux_onehot - checks y = x[s] of the one-hot multiplexer for the
// 4-input 1-bit case (all 64 input combinations) and for random 32-bit
// inputs of a 4-input and a 2-input mux.
module tb_mux_onehot;
  int checks = 0, failures = 0;
  logic [1:0]  s1;  logic [0:0]  x1 [4];  logic [0:0]  y1;
  logic [1:0]  s4;  logic [31:0] x4 [4];  logic [31:0] y4;
  logic [0:0]  s2;  logic [31:0] x2 [2];  logic [31:0] y2;
  mux_onehot #(.SEL_BITS(2), .WIDTH(1))  d1 (.s(s1), .x(x1), .y(y1));
  mux_onehot #(.SEL_BITS(2), .WIDTH(32)) d4 (.s(s4), .x(x4), .y(y4));
  mux_onehot #(.SEL_BITS(1), .WIDTH(32)) d2 (.s(s2), .x(x2), .y(y2));
  initial begin
    for (int v = 0; v < 64; v++) begin
      {x1[3], x1[2], x1[1], x1[0], s1} = 6'(v); #1;
      checks++; if (y1 !== x1[s1]) begin failures++; $display("1-bit v=%0d y=%b", v, y1); end
    end
    for (int n = 0; n < 200; n++) begin
      foreach (x4[i]) x4[i] = $urandom;
      foreach (x2[i]) x2[i] = $urandom;
      s4 = 2'($urandom); s2 = 1'($urandom); #1;
      checks++; if (y4 !== x4[s4]) begin failures++; $display("32-bit 4:1 s=%0d y=%h", s4, y4); end
      checks++; if (y2 !== x2[s2]) begin failures++; $display("32-bit 2:1 s=%0d y=%h", s2, y2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
