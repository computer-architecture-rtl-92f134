// onehot_decoder - binary to 1-hot decoder.
//
// An N-bit binary number b activates exactly one of the 2**N outputs: h[b]
// is 1 and every other output is 0. For N=2 this is the four-output truth
// table of the description (b=00 -> h0, 01 -> h1, 10 -> h2, 11 -> h3). Each
// output is the AND of the input bits, taken true or inverted according to
// the bits of its own index, which is the gate structure the description
// shows for N=2; here it is generated for any N.
// Purely combinational; no clock.
module onehot_decoder #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0]      b,
  output logic [(1<<N)-1:0] h
);
  always_comb begin
    for (int unsigned k = 0; k < (1 << N); k++) begin
      logic term;
      term = 1'b1;
      for (int unsigned j = 0; j < N; j++)
        term = term & (k[j] ? b[j] : ~b[j]);
      h[k] = term;
    end
  end
endmodule
