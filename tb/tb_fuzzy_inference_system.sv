// tb_fuzzy_inference_system: end-to-end test of the fuzzy inference system
// at its default sizes (7 rules, 4-bit grades, 64-point output universe).
//
// A small controller is emulated: seven triangular antecedent sets over a
// 16-point input universe and seven triangular consequent sets over the
// 64-point output universe, centred at 9*k+4. For each of 40 operations a
// fuzzy input (a triangle of random centre and width) is swept through the
// match stage, the strengths are latched, the inferred function is written
// into the RAMs point by point, and the defuzzifier is run. Firing
// strengths, each inferred grade and the crisp value are compared with a
// max-min / half-area model computed here. It counts how often each
// mechanism occurred (match clear, latch, clipping of a consequent, overlap
// of two rules, lower-counter stall and resume, done) and fails if any never
// did.
module tb_fuzzy_inference_system;
  import fuzzy_pkg::*;
  localparam int NX = 16;  // input universe points
  localparam int NY = 64;  // output universe points

  logic  clk = 0, rst_n = 0, rreset_n = 1, loadw = 0, we = 0, load = 0;
  mu_t   in_mu [N_RULES], ante [N_RULES], cons [N_RULES], strength [N_RULES];
  mu_t   mu;
  addr_t waddr = 0, crisp;
  logic  done, cmp;

  int checks = 0, failures = 0, cycles = 0;
  int n_clear = 0, n_latch = 0, n_clip = 0, n_overlap = 0, n_stall = 0, n_done = 0;

  fuzzy_inference_system dut (
    .clk(clk), .rst_n(rst_n), .rreset_n(rreset_n), .loadw(loadw),
    .in_mu_i(in_mu), .ante_mu_i(ante), .cons_mu_i(cons),
    .strength_o(strength), .mu_o(mu), .we_i(we), .waddr_i(waddr),
    .load_i(load), .crisp_o(crisp), .done_o(done), .cmp_o(cmp));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int imin(int a, int b); return (a < b) ? a : b; endfunction
  function automatic int imax(int a, int b); return (a > b) ? a : b; endfunction
  // triangle of height 15 centred at c, falling by 'slope' per point
  function automatic int triangle(int x, int c, int slope);
    int d;
    d = (x > c) ? x - c : c - x;
    return imax(0, 15 - slope * d);
  endfunction
  function automatic int ante_mf(int k, int x); return triangle(2 * x, 5 * k, 3); endfunction
  function automatic int cons_mf(int k, int y); return triangle(y, 9 * k + 4, 1); endfunction

  task automatic operation(input int op, input int xc, input int xs);
    int s [N_RULES];
    int infer [NY];
    int total, pref, expc, nz, lat;
    bit stalled;
    // ---- phase 1: match ----
    @(negedge clk);
    rreset_n = 0;
    @(posedge clk);
    #1;
    begin
      bit all_zero;
      all_zero = 1;
      for (int k = 0; k < N_RULES; k++) if (dut.u_fuzz.match_q[k] != 0) all_zero = 0;
      checks++;
      if (!all_zero) begin failures++; $display("op %0d: RRESET did not clear", op); end
      if (op > 0) n_clear++;
    end
    @(negedge clk);
    rreset_n = 1;
    for (int k = 0; k < N_RULES; k++) s[k] = 0;
    for (int x = 0; x < NX; x++) begin
      for (int k = 0; k < N_RULES; k++) begin
        in_mu[k] = mu_t'(triangle(x, xc, xs));
        ante[k]  = mu_t'(ante_mf(k, x));
        s[k] = imax(s[k], imin(triangle(x, xc, xs), ante_mf(k, x)));
      end
      @(negedge clk);
    end
    loadw = 1;
    @(negedge clk);
    loadw = 0;
    n_latch++;
    for (int k = 0; k < N_RULES; k++) begin
      checks++;
      if (int'(strength[k]) != s[k]) begin
        failures++;
        $display("op %0d rule %0d: strength %0d expected %0d", op, k, strength[k], s[k]);
      end
    end
    // ---- phase 2: infer and write the RAMs ----
    for (int y = 0; y < NY; y++) begin
      infer[y] = 0;
      nz = 0;
      for (int k = 0; k < N_RULES; k++) begin
        cons[k] = mu_t'(cons_mf(k, y));
        if (cons_mf(k, y) > s[k] && s[k] > 0) n_clip++;
        if (imin(s[k], cons_mf(k, y)) > 0) nz++;
        infer[y] = imax(infer[y], imin(s[k], cons_mf(k, y)));
      end
      if (nz > 1) n_overlap++;
      we = 1;
      waddr = addr_t'(y);
      #1;
      checks++;
      if (int'(mu) != infer[y]) begin
        failures++;
        $display("op %0d point %0d: mu %0d expected %0d", op, y, mu, infer[y]);
      end
      @(negedge clk);
    end
    we = 0;
    // ---- phase 3: defuzzify ----
    total = 0;
    for (int y = 0; y < NY; y++) total += infer[y];
    pref = 0; expc = -1;
    for (int y = 0; y < NY && expc < 0; y++) begin
      pref += infer[y];
      if (pref >= (total >> 1)) expc = y;
    end
    load = 1;
    lat = 0;
    stalled = 0;
    while (!done && lat < 2 * NY + 5) begin
      @(posedge clk);
      lat++;
      #1;
      if (!dut.u_defuzz.hi_done_q && !cmp && lat > 1) stalled = 1;
      if (stalled && cmp) begin n_stall++; stalled = 0; end
    end
    checks++;
    if (!done || lat < NY || lat > 2 * NY) begin
      failures++;
      $display("op %0d: done after %0d clocks", op, lat);
    end else n_done++;
    checks++;
    if (int'(crisp) != expc) begin
      failures++;
      $display("op %0d: crisp %0d expected %0d", op, crisp, expc);
    end
    @(negedge clk);
    load = 0;
  endtask

  initial begin
    for (int k = 0; k < N_RULES; k++) begin in_mu[k] = '0; ante[k] = '0; cons[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 40; op++)
      operation(op, int'($urandom_range(0, NX - 1)), int'($urandom_range(2, 8)));
    $display("clear=%0d latch=%0d clip=%0d overlap=%0d stall=%0d done=%0d",
             n_clear, n_latch, n_clip, n_overlap, n_stall, n_done);
    checks++; if (n_clear   == 0) begin failures++; $display("no match clear");   end
    checks++; if (n_latch   == 0) begin failures++; $display("no latch");         end
    checks++; if (n_clip    == 0) begin failures++; $display("no clipping");      end
    checks++; if (n_overlap == 0) begin failures++; $display("no rule overlap");  end
    checks++; if (n_stall   == 0) begin failures++; $display("no lower stall");   end
    checks++; if (n_done    == 0) begin failures++; $display("no completed run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
