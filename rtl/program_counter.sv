// program_counter: the "P.C." address counter of the defuzzifier.
//
// Counts up by one on each rising clock edge where inc_i is high; clr_i
// (synchronous) returns it to zero and wins over inc_i. The count wraps
// modulo 2**W. The published design counts only; the clear input is this
// design's choice so that a new defuzzification can start from address 0.
//
// Interface: clk, rst_n (asynchronous, active low), clr_i, inc_i;
// cnt_o is the registered count.
module program_counter #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr_i,
  input  logic         inc_i,
  output logic [W-1:0] cnt_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt_o <= '0;
    else if (clr_i) cnt_o <= '0;
    else if (inc_i) cnt_o <= cnt_o + 1'b1;
  end
endmodule
