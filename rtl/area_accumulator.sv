// area_accumulator: the "ADD" stage of the defuzzifier with its feedback.
//
// An adder sums the incoming membership grade and the accumulated area held
// in a register; the sum is fed back through a gate controlled by LOAD. With
// LOAD low the fed-back value is forced to zero, which clears the area; with
// LOAD high and add_i high the register takes the adder output.
//
// Interface and timing:
//   clk, rst_n   clock, asynchronous active-low reset.
//   load_i       high: run; low: area cleared at the next edge.
//   add_i        accumulate data_i at this edge.
//   data_i       DW-bit grade (zero-extended).
//   sum_o        adder output, acc_o + data_i (combinational).
//   acc_o        registered area.
// The adder width (10 bits) follows the published design; the sum wraps if it
// ever exceeds 2**AW-1, which the default RAM depth rules out.
module area_accumulator #(
  parameter int unsigned DW = 4,
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_i,
  input  logic          add_i,
  input  logic [DW-1:0] data_i,
  output logic [AW-1:0] sum_o,
  output logic [AW-1:0] acc_o
);
  always_comb sum_o = acc_o + AW'(data_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc_o <= '0;
    else if (!load_i) acc_o <= '0;
    else if (add_i)   acc_o <= sum_o;
  end
endmodule
