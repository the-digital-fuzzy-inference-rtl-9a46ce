// tb_coa_defuzzifier: self-checking test of the center-of-area defuzzifier.
//
// Fills both RAMs with a membership function, raises LOAD, and waits for
// done. The crisp value is compared with
//   min { j : m[0] + ... + m[j] >= (m[0] + ... + m[63]) >> 1 }
// computed here. The number of clocks from LOAD to done is compared with a
// clock-by-clock model of the two counters (upper: one address per clock;
// lower: one step per clock while half the upper area exceeds the lower
// area plus the grade at the lower address), and must lie between 64 and
// 128: the upper sweep takes 64 clocks and the lower counter can fall
// behind when most of the area lies late in the universe.
// Functions: all zero, all 15, single spikes, rising and falling ramps,
// triangles and random shapes. It counts how often the lower counter
// stalled while the upper sweep was still running and then resumed, and
// fails if that never happened.
module tb_coa_defuzzifier;
  import fuzzy_pkg::*;
  localparam int N = 64;

  logic       clk = 0, rst_n = 0, we = 0, load = 0;
  logic [5:0] waddr = 0;
  mu_t        wdata = 0;
  logic [5:0] crisp;
  logic       done, cmp;
  logic [9:0] area, half;
  int         m [N];
  int checks = 0, failures = 0, cycles = 0;
  int stall_resumes = 0, runs = 0;

  coa_defuzzifier #(.AW_ADDR(6), .AW_AREA(10)) dut (
    .clk(clk), .rst_n(rst_n), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .load_i(load), .crisp_o(crisp), .done_o(done), .cmp_o(cmp),
    .area_o(area), .half_o(half));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input string name);
    int total, halfv, pref, expc, lat, mlat, mu_up, mu_lo, p1, p2;
    bit mdone, mhd;
    bit stalled;
    // write the function into RAM1 and RAM2
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = mu_t'(m[a]);
    end
    @(negedge clk);
    we = 0;
    // reference result
    total = 0;
    for (int a = 0; a < N; a++) total += m[a];
    halfv = total >> 1;
    pref = 0; expc = -1;
    for (int a = 0; a < N && expc < 0; a++) begin
      pref += m[a];
      if (pref >= halfv) expc = a;
    end
    // clock-by-clock latency model
    mu_up = 0; mu_lo = 0; p1 = 0; p2 = 0; mhd = 0; mdone = 0; mlat = 0;
    while (!mdone) begin
      int hv;
      hv = mu_up >> 1;
      if (hv > mu_lo + m[p2]) begin mu_lo += m[p2]; p2++; end
      if (!mhd) begin mu_up += m[p1]; if (p1 == N - 1) mhd = 1; p1++; end
      mlat++;
      mdone = mhd && !((mu_up >> 1) > mu_lo + m[p2]);
    end
    // run
    load = 1;
    lat = 0;
    stalled = 0;
    while (!done && lat < 2 * N + 5) begin
      @(posedge clk);
      lat++;
      #1;
      if (!dut.hi_done_q && !cmp && lat > 1) stalled = 1;
      if (stalled && cmp) begin stall_resumes++; stalled = 0; end
    end
    runs++;
    checks++;
    if (lat != mlat || lat < N || lat > 2 * N) begin
      failures++;
      $display("%s: done after %0d clocks, model %0d", name, lat, mlat);
    end
    checks++;
    if (int'(area) != total) begin
      failures++;
      $display("%s: area %0d expected %0d", name, area, total);
    end
    checks++;
    if (int'(crisp) != expc) begin
      failures++;
      $display("%s: crisp %0d expected %0d (total %0d)", name, crisp, expc, total);
    end
    // the result must hold while LOAD stays high
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (int'(crisp) != expc || !done) begin
      failures++;
      $display("%s: result not held", name);
    end
    @(negedge clk);
    load = 0;
    @(posedge clk);
    #1;
    checks++;
    if (crisp != 0 || area != 0 || done) begin
      failures++;
      $display("%s: LOAD low did not clear", name);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < N; a++) m[a] = 0;
    run_case("zero");
    for (int a = 0; a < N; a++) m[a] = 15;
    run_case("full");
    for (int s = 0; s < N; s += 9) begin
      for (int a = 0; a < N; a++) m[a] = (a == s) ? 15 : 0;
      run_case("spike");
    end
    for (int a = 0; a < N; a++) m[a] = a / 4;
    run_case("rising");
    for (int a = 0; a < N; a++) m[a] = 15 - a / 4;
    run_case("falling");
    for (int c = 5; c < N; c += 11) begin
      for (int a = 0; a < N; a++) begin
        int d;
        d = (a > c) ? a - c : c - a;
        m[a] = (d >= 15) ? 0 : 15 - d;
      end
      run_case("triangle");
    end
    for (int r = 0; r < 200; r++) begin
      for (int a = 0; a < N; a++)
        m[a] = (r % 3 == 0) ? int'($urandom_range(0, 15))
                            : ((a >= r % 40 && a < r % 40 + 20) ? int'($urandom_range(0, 15)) : 0);
      run_case("random");
    end
    checks++;
    if (stall_resumes == 0) begin
      failures++;
      $display("lower counter never stalled and resumed");
    end
    $display("runs=%0d stall_resumes=%0d", runs, stall_resumes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
