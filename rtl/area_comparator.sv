// area_comparator: the 10-bit comparator of the defuzzifier.
//
// Compares half of the total area with the area accumulated so far by the
// lower adder. The output is high while the half area is larger, which lets
// the lower program counter step; it is low once the lower area has reached
// the half area. Combinational.
//
// Interface: half_i, area_i (W bits, unsigned); gt_o = half_i > area_i.
module area_comparator #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] half_i,
  input  logic [W-1:0] area_i,
  output logic         gt_o
);
  always_comb gt_o = (half_i > area_i);
endmodule
