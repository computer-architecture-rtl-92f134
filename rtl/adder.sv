// adder - WIDTH-bit binary adder, sum = a + b modulo 2**WIDTH.
//
// The datapaths use it for PC + 4 and for the branch target
// PC + 4 + (offset << 2); no carry out is needed there.
// Purely combinational.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  assign sum = a + b;
endmodule
