// mux_onehot - 2**SEL_BITS-input multiplexer, y = x[s].
//
// Built the way the description builds a multiplexer: the selector goes
// through a binary to 1-hot decoder, each data input is ANDed with its
// one-hot line, and the AND results are ORed into the output. The
// description draws the 4-input 1-bit case; here every one of the WIDTH
// bits gets the same AND-OR structure. Purely combinational.
module mux_onehot #(
  parameter int unsigned SEL_BITS = 2,
  parameter int unsigned WIDTH    = 32
) (
  input  logic [SEL_BITS-1:0] s,
  input  logic [WIDTH-1:0]    x [1<<SEL_BITS],
  output logic [WIDTH-1:0]    y
);
  logic [(1<<SEL_BITS)-1:0] hot;

  onehot_decoder #(.N(SEL_BITS)) u_dec (.b(s), .h(hot));

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < (1 << SEL_BITS); i++)
      y = y | (x[i] & {WIDTH{hot[i]}});
  end
endmodule
