// neural_comparator: magnitude comparator of two unsigned words.
//
// The published circuit is a voltage-mode "neural" comparator: the bits of A
// drive equally sized PMOS transistors pulling a summing node up, the bits of
// B drive equally sized NMOS transistors pulling it down, and two CMOS
// inverters act as the neuron that turns the node voltage into a logic level.
// This module keeps only the logic function the circuit is used for: the
// output is low when A is smaller than B and high otherwise (A >= B). Treating
// equal inputs as "high" is this design's choice; both MIN and MAX give the
// same result for equal inputs either way.
//
// Interface: a_i, b_i (WIDTH bits, unsigned); a_ge_b_o. Purely combinational.
// WIDTH defaults to the 4 bits of the published comparator.
module neural_comparator #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output logic             a_ge_b_o
);
  always_comb a_ge_b_o = (a_i >= b_i);
endmodule
