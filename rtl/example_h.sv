// Check-bit prediction block H(x) of the example device.
//
// H(x) computes, straight from the inputs, the T(5, 4) check bits that the
// fault-free device F(x) would produce: W is the sum of the weights
// 2^(i-1) of the active transitions f_i != f_(i+1), written as h4..h1.
// It is a separate function of x, synthesised independently of F(x), so that
// a fault inside F(x) cannot also corrupt the prediction the same way.
//
// Table (x4..x1 -> W -> h4..h1). For x = 1011, F(x) = 01011 has the active
// transitions t3,2, t4,3 and t5,4, so W = 2 + 4 + 8 = 14 (1110); that value is
// used here, so that the prediction matches the encoding rule.
//
// Interface: x = inputs (x[0] = x1), h = check bits (h[0] = h1).
// Purely combinational lookup.
module example_h
  import tstruct_pkg::*;
(
  input  ex_x_t x,
  output ex_h_t h
);

  always_comb begin
    unique case (x)
      4'b0000: h = 4'd11;
      4'b0001: h = 4'd9;
      4'b0010: h = 4'd12;
      4'b0011: h = 4'd3;
      4'b0100: h = 4'd13;
      4'b0101: h = 4'd6;
      4'b0110: h = 4'd5;
      4'b0111: h = 4'd5;
      4'b1000: h = 4'd4;
      4'b1001: h = 4'd14;
      4'b1010: h = 4'd7;
      4'b1011: h = 4'd14;
      4'b1100: h = 4'd4;
      4'b1101: h = 4'd0;
      4'b1110: h = 4'd12;
      4'b1111: h = 4'd5;
      default: h = '0;
    endcase
  end

endmodule
