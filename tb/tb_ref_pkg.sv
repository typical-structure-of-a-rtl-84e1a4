// Reference data and functions shared by the testbenches of the example.
//
// F_REF holds the truth table of the example device F(x), indexed by
// x4..x1 with outputs f5..f1. weight_sum() computes the weighted-transitions
// sum W = sum over i of 2^(i-1) * (f_i xor f_(i+1)) with integer arithmetic,
// which is the T(m, m-1) check vector of f.
package tb_ref_pkg;

  localparam logic [4:0] F_REF [16] = '{
    5'b01101, 5'b01110, 5'b10111, 5'b00010,
    5'b10110, 5'b00100, 5'b11001, 5'b11001,
    5'b11000, 5'b10100, 5'b11010, 5'b01011,
    5'b00111, 5'b11111, 5'b01000, 5'b00110
  };

  function automatic int unsigned weight_sum(input logic [31:0] v, input int m);
    int unsigned w = 0;
    for (int i = 0; i < m - 1; i++) begin
      if (v[i] != v[i+1]) w += (1 << i);
    end
    return w;
  endfunction

endpackage
