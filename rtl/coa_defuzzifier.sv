// coa_defuzzifier: center-of-area defuzzifier without divider or multiplier.
//
// The crisp output is the point of the output universe at which the area
// under the inferred membership function reaches half of its total. Two
// copies of the membership function are kept, in RAM1 and RAM2.
//
//   Upper path: P.C.1 steps through RAM1 once, one address per clock, and the
//   upper ADD accumulates the grades into the total area. A right shift by one
//   bit gives half of the area summed so far.
//   Lower path: the lower ADD forms area_lo = (area accumulated so far) +
//   RAM2[P.C.2]. The 10-bit COMP tests half > area_lo. While it is high,
//   P.C.2 steps and the lower register takes area_lo. While it is low, P.C.2
//   holds and only the upper path goes on.
// The two paths run at the same time. The lower path moves at most one
// address per clock and never passes its final point; it falls behind when
// much of the area lies late in the universe (the half area then grows
// faster than it can follow) and catches up after the upper sweep. The
// result is
//   crisp = min { j : RAM[0] + ... + RAM[j] >= (RAM[0] + ... + RAM[N-1]) >> 1 }.
//
// Interface and timing:
//   clk, rst_n          clock, asynchronous active-low reset.
//   we_i/waddr_i/wdata_i  write port of both RAMs (same data in each).
//   load_i              low: both counters and both areas cleared (idle);
//                       high: run. Raise it after the RAMs are filled and keep
//                       it high until done_o.
//   crisp_o             P.C.2, the defuzzified value.
//   done_o              high once the upper sweep is complete and the
//                       comparator is low; crisp_o is then final. Counting
//                       the edges from the first one with load_i high, done_o
//                       rises after at least 2**ADDR_W and at most
//                       2*2**ADDR_W - 1 edges.
//   cmp_o, area_o, half_o  comparator output, upper area, half area (status).
// The RAM, adder, shift, comparator and counter structure and the 10-bit
// width follow the published block diagram. The RAM depth, the end of the
// upper sweep, the done flag and the use of the registered area for the half
// are this design's choices.
module coa_defuzzifier
  import fuzzy_pkg::*;
#(
  parameter int unsigned AW_ADDR = ADDR_W,
  parameter int unsigned AW_AREA = AREA_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we_i,
  input  logic [AW_ADDR-1:0] waddr_i,
  input  mu_t                wdata_i,
  input  logic               load_i,
  output logic [AW_ADDR-1:0] crisp_o,
  output logic               done_o,
  output logic               cmp_o,
  output logic [AW_AREA-1:0] area_o,
  output logic [AW_AREA-1:0] half_o
);
  logic [AW_ADDR-1:0] pc_hi, pc_lo;
  mu_t                rd_hi, rd_lo;
  logic [AW_AREA-1:0] sum_hi, sum_lo, acc_lo;
  logic               hi_done_q;
  logic               hi_step;

  // ---------------- upper path: total area ----------------
  always_comb hi_step = load_i && !hi_done_q;

  program_counter #(.W(AW_ADDR)) u_pc_hi (
    .clk  (clk),
    .rst_n(rst_n),
    .clr_i(!load_i),
    .inc_i(hi_step),
    .cnt_o(pc_hi)
  );

  mf_ram #(.AW(AW_ADDR), .DW(MU_W)) u_ram1 (
    .clk    (clk),
    .we_i   (we_i),
    .waddr_i(waddr_i),
    .wdata_i(wdata_i),
    .raddr_i(pc_hi),
    .rdata_o(rd_hi)
  );

  area_accumulator #(.DW(MU_W), .AW(AW_AREA)) u_add_hi (
    .clk   (clk),
    .rst_n (rst_n),
    .load_i(load_i),
    .add_i (hi_step),
    .data_i(rd_hi),
    .sum_o (sum_hi),
    .acc_o (area_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          hi_done_q <= 1'b0;
    else if (!load_i)                    hi_done_q <= 1'b0;
    else if (hi_step && (&pc_hi))        hi_done_q <= 1'b1;
  end

  // Shift right by one bit: half of the area.
  always_comb half_o = area_o >> 1;

  // ---------------- lower path: search for the half area ----------------
  mf_ram #(.AW(AW_ADDR), .DW(MU_W)) u_ram2 (
    .clk    (clk),
    .we_i   (we_i),
    .waddr_i(waddr_i),
    .wdata_i(wdata_i),
    .raddr_i(pc_lo),
    .rdata_o(rd_lo)
  );

  area_accumulator #(.DW(MU_W), .AW(AW_AREA)) u_add_lo (
    .clk   (clk),
    .rst_n (rst_n),
    .load_i(load_i),
    .add_i (cmp_o),
    .data_i(rd_lo),
    .sum_o (sum_lo),
    .acc_o (acc_lo)
  );

  area_comparator #(.W(AW_AREA)) u_comp (
    .half_i(half_o),
    .area_i(sum_lo),
    .gt_o  (cmp_o)
  );

  program_counter #(.W(AW_ADDR)) u_pc_lo (
    .clk  (clk),
    .rst_n(rst_n),
    .clr_i(!load_i),
    .inc_i(load_i && cmp_o),
    .cnt_o(pc_lo)
  );

  always_comb begin
    crisp_o = pc_lo;
    done_o  = load_i && hi_done_q && !cmp_o;
  end

  // The lower path never needs to step past the last address.
  a_no_wrap : assert property (@(posedge clk) disable iff (!rst_n)
                               (load_i && cmp_o) |-> !(&pc_lo));
endmodule
