// alu - 32-bit arithmetic and logic unit of the MIPS datapaths.
//
// Operations: add, subtract, and, or and set-on-less-than (signed). The zero
// output (y == 0) lets the branch test A == B by subtracting. The overflow
// output reports two's complement overflow of add and subtract and is 0
// for the other operations; the multi-cycle controller turns it into the
// arithmetic overflow exception.
// The operation set beyond add and subtract is the usual MIPS subset, an
// own choice. Purely combinational.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_fn_t     op,
  output logic [31:0] y,
  output logic        zero,
  output logic        overflow
);
  logic [31:0] sum, diff;

  assign sum  = a + b;
  assign diff = a - b;

  always_comb begin
    overflow = 1'b0;
    case (op)
      ALU_ADD: begin
        y = sum;
        overflow = (a[31] == b[31]) && (sum[31] != a[31]);
      end
      ALU_SUB: begin
        y = diff;
        overflow = (a[31] != b[31]) && (diff[31] != a[31]);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SLT: y = {31'd0, $signed(a) < $signed(b)};
      default: y = sum;
    endcase
  end

  assign zero = (y == 32'd0);
endmodule
