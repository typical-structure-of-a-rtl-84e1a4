// Correction and control logic of the T-structure for a device with M outputs.
//
// The device F(x) is duplicated. Copy F2 is watched by the weighted-
// transitions sum code T(M, M-1): a prediction block H(x), supplied from
// outside, gives the expected check bits, and tcode_checker raises u when
// F2's outputs do not match them. Copy F1 is not checked. The output
// comparator flags the outputs where F1 and F2 disagree, and the correction
// circuit inverts those outputs of F1 unless u is set. The result:
//   u = 0: f = F2 (corrects any error of F1)
//   u = 1: f = F1 (hides a detected error of F2 or of H)
// A single faulty block of the three is therefore always masked, except an
// error of F2 that inverts all M outputs at once, which the code cannot see.
//
// Gate count for M outputs: 4M-2 two-input XOR (M-1 encoder, M-1 check
// comparison, M output comparison, M correction), M AND with one inverted
// input and one (M-1)-input OR; for M = 5 that is 18 XOR, 5 AND and one
// 4-input OR.
//
// Interface: f1, f2 = outputs of the two copies, h = predicted check bits;
// f = corrected outputs, e = disagreement flags, u = check error.
// Purely combinational, no clock or reset. Structure as the T-structure
// describes it; the default M = 5 is that of the worked example.
module t_corrector #(
  parameter int unsigned M = 5
) (
  input  logic [M-1:0] f1,
  input  logic [M-1:0] f2,
  input  logic [M-2:0] h,
  output logic [M-1:0] f,
  output logic [M-1:0] e,
  output logic         u
);

  tcode_checker #(.M(M)) u_check (
    .f(f2),
    .h(h),
    .u(u)
  );

  output_comparator #(.M(M)) u_cmp (
    .f1(f1),
    .f2(f2),
    .e (e)
  );

  correction_circuit #(.M(M)) u_corr (
    .f1(f1),
    .e (e),
    .u (u),
    .f (f)
  );

endmodule
