// fuzzy_inference_system: complete max-min fuzzy inference with
// center-of-area defuzzification.
//
// The fuzzification circuit evaluates seven rules and, point by point over
// the output universe, produces the inferred membership grade. Each grade is
// written into the defuzzifier's two membership RAMs at the address of its
// point; the defuzzifier then finds the point that splits the area under the
// inferred function in half and gives it as the crisp output.
//
// A complete inference takes three phases, all driven from outside:
//   1. Match: hold rreset_n low for one clock, then present, one point per
//      clock, the input grade and the antecedent grade of every rule on
//      in_mu_i / ante_mu_i; pulse loadw to latch the firing strengths.
//   2. Infer: for each output point x, present the consequent grades on
//      cons_mu_i and assert we_i with waddr_i = x; the inferred grade mu_o
//      is written into the RAMs at that edge.
//   3. Defuzzify: raise load_i and hold it; crisp_o is valid when done_o is
//      high, between 2**ADDR_W and 2*2**ADDR_W - 1 clocks later.
// The division into fuzzification and defuzzification follows the published
// system; the phase sequencing and the RAM write port are this design's
// choices (the published board drives them from switches and counters).
module fuzzy_inference_system
  import fuzzy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // fuzzification
  input  logic              rreset_n,
  input  logic              loadw,
  input  mu_t               in_mu_i   [N_RULES],
  input  mu_t               ante_mu_i [N_RULES],
  input  mu_t               cons_mu_i [N_RULES],
  output mu_t               strength_o[N_RULES],
  output mu_t               mu_o,
  // writing the inferred function into the RAMs
  input  logic              we_i,
  input  addr_t             waddr_i,
  // defuzzification
  input  logic              load_i,
  output addr_t             crisp_o,
  output logic              done_o,
  output logic              cmp_o
);
  area_t area, half;

  fuzzification #(.NR(N_RULES)) u_fuzz (
    .clk       (clk),
    .rst_n     (rst_n),
    .rreset_n  (rreset_n),
    .loadw     (loadw),
    .in_mu_i   (in_mu_i),
    .ante_mu_i (ante_mu_i),
    .cons_mu_i (cons_mu_i),
    .strength_o(strength_o),
    .mu_o      (mu_o)
  );

  coa_defuzzifier #(.AW_ADDR(ADDR_W), .AW_AREA(AREA_W)) u_defuzz (
    .clk    (clk),
    .rst_n  (rst_n),
    .we_i   (we_i),
    .waddr_i(waddr_i),
    .wdata_i(mu_o),
    .load_i (load_i),
    .crisp_o(crisp_o),
    .done_o (done_o),
    .cmp_o  (cmp_o),
    .area_o (area),
    .half_o (half)
  );
endmodule
