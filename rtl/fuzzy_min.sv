// fuzzy_min: fuzzy AND (minimum) of two membership grades.
//
// As in the published 4-bit MIN circuit, a neural_comparator decides which
// input is smaller and its output, through an inverter, steers a pair of
// transmission gates per bit so that exactly one input word reaches the
// output. Here the transmission-gate pair is a 2:1 multiplexer: when the
// comparator says A < B the output is A, otherwise it is B.
//
// Interface: a_i, b_i (WIDTH bits); min_o = min(a_i, b_i). Combinational.
module fuzzy_min #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output logic [WIDTH-1:0] min_o
);
  logic a_ge_b;

  neural_comparator #(.WIDTH(WIDTH)) u_cmp (
    .a_i     (a_i),
    .b_i     (b_i),
    .a_ge_b_o(a_ge_b)
  );

  always_comb min_o = a_ge_b ? b_i : a_i;
endmodule
