// sign_extend - 16 to 32 bit sign extension of the immediate field.
//
// Bits 15..0 pass straight through and bit 15 is copied into bits 31..16,
// so a negative 16-bit displacement or constant stays negative.
// Purely combinational.
module sign_extend (
  input  logic [15:0] x,
  output logic [31:0] y
);
  assign y = {{16{x[15]}}, x};
endmodule
