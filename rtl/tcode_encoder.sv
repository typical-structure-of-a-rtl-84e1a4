// Encoder of the weighted-transitions sum code T(m, k), k = m - 1.
//
// The code gives the transition between neighbouring data bits f_i and
// f_(i+1) the weight 2^(i-1) and stores the binary sum W of the weights of all
// active transitions (f_i != f_(i+1)) as the check vector. Since every weight
// is a distinct power of two, bit i of W is simply the activity of transition
// i, so the encoder is a row of m-1 two-input XOR gates:
//   h[i] = f[i] ^ f[i+1],  i = 0 .. M-2.
// The code detects every error in f except the one that inverts all M bits,
// which leaves every transition unchanged.
//
// Interface: f is the M-bit data vector (f[0] = f1), h the M-1 check bits
// (h[0] = h1, weight 2^0). Purely combinational, no clock.
// The structure and the default M = 5 of the worked example follow the
// construction rules of the code; nothing here is a free choice.
module tcode_encoder #(
  parameter int unsigned M = 5
) (
  input  logic [M-1:0] f,
  output logic [M-2:0] h
);

  always_comb begin
    for (int i = 0; i < M - 1; i++) begin
      h[i] = f[i] ^ f[i+1];
    end
  end

endmodule
