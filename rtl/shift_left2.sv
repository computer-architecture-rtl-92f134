// shift_left2 - 32-bit shift left logical by 2.
//
// Turns a word offset into a byte offset: y[31:2] = x[29:0] and the two low
// bits are 0; x[31:30] are dropped. Used on the sign-extended branch
// displacement and, with the 26-bit target zero-extended, on the jump
// target. It is only wiring. Purely combinational.
module shift_left2 (
  input  logic [31:0] x,
  output logic [31:0] y
);
  assign y = {x[29:0], 2'b00};
endmodule
