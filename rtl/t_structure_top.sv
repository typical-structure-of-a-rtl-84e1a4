// T-structure for the worked example device: duplication with correction and
// control of the calculations by the weighted-transitions sum code.
//
// Two copies of the 4-input, 5-output device F(x) compute the same outputs.
// Copy F2 is checked: the prediction block H(x) gives the T(5, 4) check bits
// it should produce, and the checker compares them with the check bits of
// F2's actual outputs. If they agree (u = 0), the outputs are taken from F2,
// by inverting every output of F1 that disagrees with F2; if they do not
// (u = 1), the outputs of F1 pass unchanged. So a wrong value of any one of
// F1, F2 and H(x) never reaches f, except an error of F2 that inverts all five
// of its outputs at once.
//
// The three fault_* inputs are an addition of this design for testing: each
// is an error mask XORed onto the outputs of one block, so a fault of any
// multiplicity can be placed on any block from outside. Tie them to zero in
// service. e and u are brought out for diagnosis.
//
// Interface: x = inputs x4..x1; f = corrected outputs f5..f1; e = per-output
// disagreement of the copies; u = T-code check error. Purely combinational:
// f is valid one propagation delay after x, with no clock, reset or latency.
module t_structure_top
  import tstruct_pkg::*;
(
  input  ex_x_t x,
  input  ex_f_t fault_f1,
  input  ex_f_t fault_f2,
  input  ex_h_t fault_h,
  output ex_f_t f,
  output ex_f_t e,
  output logic  u
);

  ex_f_t f1_raw, f2_raw, f1, f2;
  ex_h_t h_raw, h;

  example_f u_f1 (.x(x), .f(f1_raw));
  example_f u_f2 (.x(x), .f(f2_raw));
  example_h u_h  (.x(x), .h(h_raw));

  always_comb begin
    f1 = f1_raw ^ fault_f1;
    f2 = f2_raw ^ fault_f2;
    h  = h_raw  ^ fault_h;
  end

  t_corrector #(.M(EX_M)) u_corr (
    .f1(f1),
    .f2(f2),
    .h (h),
    .f (f),
    .e (e),
    .u (u)
  );

endmodule
