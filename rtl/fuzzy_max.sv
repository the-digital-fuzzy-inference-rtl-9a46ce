// fuzzy_max: fuzzy OR (maximum) of two membership grades.
//
// Built like fuzzy_min, as in the published 4-bit MAX circuit: a
// neural_comparator compares the two words and steers the transmission-gate
// pair (here a 2:1 multiplexer) so that the larger word reaches the output.
//
// Interface: a_i, b_i (WIDTH bits); max_o = max(a_i, b_i). Combinational.
module fuzzy_max #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output logic [WIDTH-1:0] max_o
);
  logic a_ge_b;

  neural_comparator #(.WIDTH(WIDTH)) u_cmp (
    .a_i     (a_i),
    .b_i     (b_i),
    .a_ge_b_o(a_ge_b)
  );

  always_comb max_o = a_ge_b ? a_i : b_i;
endmodule
