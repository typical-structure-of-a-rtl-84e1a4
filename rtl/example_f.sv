// Example source device F(x): 4 inputs x4..x1, 5 outputs f5..f1.
//
// The device is given only by its truth table (below, one line per input
// set, output bits written f5..f1), so it is written as a combinational
// lookup. Two identical copies of it form the duplicated pair of the
// T-structure example.
//
// Interface: x = inputs (x[0] = x1), f = outputs (f[0] = f1).
// Purely combinational. The table is the worked example's; writing it as a
// case statement rather than an optimised gate network is this design's choice.
module example_f
  import tstruct_pkg::*;
(
  input  ex_x_t x,
  output ex_f_t f
);

  always_comb begin
    unique case (x)
      4'b0000: f = 5'b01101;
      4'b0001: f = 5'b01110;
      4'b0010: f = 5'b10111;
      4'b0011: f = 5'b00010;
      4'b0100: f = 5'b10110;
      4'b0101: f = 5'b00100;
      4'b0110: f = 5'b11001;
      4'b0111: f = 5'b11001;
      4'b1000: f = 5'b11000;
      4'b1001: f = 5'b10100;
      4'b1010: f = 5'b11010;
      4'b1011: f = 5'b01011;
      4'b1100: f = 5'b00111;
      4'b1101: f = 5'b11111;
      4'b1110: f = 5'b01000;
      4'b1111: f = 5'b00110;
      default: f = '0;
    endcase
  end

endmodule
