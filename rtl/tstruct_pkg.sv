// Shared sizes and types of the T-structure example.
//
// The T-structure protects a combinational device F(x) with m outputs by
// duplicating it and checking one copy with the weighted-transitions sum code
// T(m, k), k = m - 1. The worked example device has N = 4 inputs and M = 5
// outputs, so it carries K = 4 check bits. Bit 0 of every vector is the
// lowest-numbered signal (x1, f1, h1), bit M-1 the highest (f5).
package tstruct_pkg;

  localparam int unsigned EX_N = 4;          // inputs of the example device
  localparam int unsigned EX_M = 5;          // outputs of the example device
  localparam int unsigned EX_K = EX_M - 1;   // T(m, k) check bits

  typedef logic [EX_N-1:0] ex_x_t;   // x4..x1
  typedef logic [EX_M-1:0] ex_f_t;   // f5..f1
  typedef logic [EX_K-1:0] ex_h_t;   // h4..h1

endpackage
