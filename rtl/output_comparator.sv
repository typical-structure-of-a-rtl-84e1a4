// Output comparator of the two copies of the device.
//
// One two-input XOR gate per output: e[i] = 1 where copy 1 and copy 2
// disagree on output i. These flags tell the correction circuit which outputs
// it would have to invert to turn copy 1's value into copy 2's.
//
// Interface: f1, f2 = outputs of the two copies, e = disagreement flags.
// Purely combinational. Follows the duplication structure exactly.
module output_comparator #(
  parameter int unsigned M = 5
) (
  input  logic [M-1:0] f1,
  input  logic [M-1:0] f2,
  output logic [M-1:0] e
);

  always_comb e = f1 ^ f2;

endmodule
