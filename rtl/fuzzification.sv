// fuzzification: rule evaluation and aggregation for N_RULES fuzzy rules
// (max-min inference).
//
// Each rule row follows the published block diagram:
//   1. MIN of the input grade and the rule's antecedent grade at the current
//      point of the input universe;
//   2. MAX of that with the row's 4-bit feedback register, written back every
//      clock, so that over a sweep of the input universe the register holds
//      the sup-min match, i.e. the firing strength of the rule;
//   3. a "T" register that takes the firing strength when LOADW is high;
//   4. MIN of the latched strength and the rule's consequent grade (clipping).
// A final MAX over all rows gives the inferred membership grade mu_o at the
// current point of the output universe.
//
// Interface and timing:
//   clk, rst_n     clock; asynchronous active-low reset of all registers.
//   rreset_n       synchronous active-low clear of the feedback (match)
//                  registers, to start a new input sweep.
//   loadw          when high at a clock edge, each T register takes its
//                  row's match register.
//   in_mu_i[k]     input grade for rule k at the current point (one point
//                  per clock; repeating a point is harmless since MAX is
//                  idempotent).
//   ante_mu_i[k]   antecedent grade of rule k at the same point.
//   cons_mu_i[k]   consequent grade of rule k at the current output point.
//   strength_o[k]  latched firing strength of rule k (T register output).
//   mu_o           max_k min(strength_o[k], cons_mu_i[k]); combinational
//                  from strength_o and cons_mu_i.
// Seven rules and 4-bit grades follow the published design. The clocking of
// the feedback and T registers, their clear, and one separate input grade per
// rule row are this design's choices.
module fuzzification
  import fuzzy_pkg::*;
#(
  parameter int unsigned NR = N_RULES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rreset_n,
  input  logic loadw,
  input  mu_t  in_mu_i   [NR],
  input  mu_t  ante_mu_i [NR],
  input  mu_t  cons_mu_i [NR],
  output mu_t  strength_o[NR],
  output mu_t  mu_o
);
  mu_t match_q  [NR];
  mu_t match_d  [NR];
  mu_t pair_min [NR];
  mu_t clipped  [NR];
  mu_t agg      [NR];   // running MAX across the rows

  for (genvar k = 0; k < NR; k++) begin : g_rule
    fuzzy_min #(.WIDTH(MU_W)) u_min_in (
      .a_i  (in_mu_i[k]),
      .b_i  (ante_mu_i[k]),
      .min_o(pair_min[k])
    );

    fuzzy_max #(.WIDTH(MU_W)) u_max_acc (
      .a_i  (pair_min[k]),
      .b_i  (match_q[k]),
      .max_o(match_d[k])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)         match_q[k] <= '0;
      else if (!rreset_n) match_q[k] <= '0;
      else                match_q[k] <= match_d[k];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     strength_o[k] <= '0;
      else if (loadw) strength_o[k] <= match_q[k];
    end

    fuzzy_min #(.WIDTH(MU_W)) u_min_out (
      .a_i  (strength_o[k]),
      .b_i  (cons_mu_i[k]),
      .min_o(clipped[k])
    );

    if (k == 0) begin : g_first
      always_comb agg[k] = clipped[k];
    end else begin : g_next
      fuzzy_max #(.WIDTH(MU_W)) u_max_out (
        .a_i  (clipped[k]),
        .b_i  (agg[k-1]),
        .max_o(agg[k])
      );
    end
  end

  always_comb mu_o = agg[NR-1];
endmodule
