// T(m, k) check of the controlled copy of the device.
//
// The check bits of the controlled copy's outputs are recomputed with the
// T-code encoder (M-1 XOR gates) and compared bit by bit with the check bits
// that the prediction block H(x) derives straight from the inputs (another
// M-1 XOR gates). Any disagreement is collected by one (M-1)-input OR gate
// into the error signal u. u = 1 means that the controlled copy, or H(x),
// has produced a wrong value on this input set; an error that inverts all M
// outputs of the copy at once is the only one it cannot see.
//
// Interface: f = controlled copy's outputs, h = predicted check bits,
// u = check error. Purely combinational.
// The gate-level structure follows the T-structure; a single-rail OR output
// (rather than a self-checking two-rail checker) is this design's choice.
module tcode_checker #(
  parameter int unsigned M = 5
) (
  input  logic [M-1:0] f,
  input  logic [M-2:0] h,
  output logic         u
);

  logic [M-2:0] h_actual;   // check bits of the copy's actual outputs
  logic [M-2:0] h_diff;     // per-bit mismatch with the prediction

  tcode_encoder #(.M(M)) u_enc (
    .f(f),
    .h(h_actual)
  );

  always_comb begin
    h_diff = h_actual ^ h;
    u      = |h_diff;
  end

endmodule
