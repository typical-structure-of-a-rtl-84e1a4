// Correction circuit of the duplication structure.
//
// Each disagreement flag e[i] passes through an AND gate whose second input
// is the inverted check error u; the result is XORed onto output i of the
// unchecked copy F1:
//   f[i] = f1[i] ^ (e[i] & ~u)
// While the check finds the controlled copy F2 sound (u = 0), every output on
// which F1 disagrees with F2 is inverted, so f equals F2's value and any error
// of F1 is corrected. When the check flags F2 (u = 1) nothing is inverted and
// f is F1's value, so an error of F2 is never copied to the outputs.
//
// Interface: f1 = unchecked copy's outputs, e = disagreement flags,
// u = check error of the controlled copy, f = corrected outputs.
// Purely combinational. The gate structure follows the duplication structure
// with correction; which copy is XORed onto is read from the way the check
// signal is used (the corrected copy is the one the check does not watch).
module correction_circuit #(
  parameter int unsigned M = 5
) (
  input  logic [M-1:0] f1,
  input  logic [M-1:0] e,
  input  logic         u,
  output logic [M-1:0] f
);

  logic [M-1:0] flip;   // outputs of the AND gates with inverted input

  always_comb begin
    flip = e & {M{~u}};
    f    = f1 ^ flip;
  end

endmodule
