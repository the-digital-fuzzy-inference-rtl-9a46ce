// tb_fuzzification: self-checking test of the seven-rule fuzzification
// circuit.
//
// Each of 200 rounds clears the match registers, sweeps 16 random input
// points (one per clock), and pulses LOADW. The latched firing strengths are
// compared with max over the points of min(input, antecedent), computed
// here. Then 16 random consequent vectors are applied and the inferred grade
// is compared with max over rules of min(strength, consequent). It also
// checks that the T registers hold while LOADW is low, even when the match
// registers change.
module tb_fuzzification;
  import fuzzy_pkg::*;
  localparam int NR = 7;

  logic clk = 0, rst_n = 0, rreset_n = 1, loadw = 0;
  mu_t  in_mu [NR], ante [NR], cons [NR], strength [NR];
  mu_t  mu;
  int   match_m [NR], strength_m [NR];
  int checks = 0, failures = 0, cycles = 0;

  fuzzification #(.NR(NR)) dut (
    .clk(clk), .rst_n(rst_n), .rreset_n(rreset_n), .loadw(loadw),
    .in_mu_i(in_mu), .ante_mu_i(ante), .cons_mu_i(cons),
    .strength_o(strength), .mu_o(mu));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int imin(int a, int b); return (a < b) ? a : b; endfunction
  function automatic int imax(int a, int b); return (a > b) ? a : b; endfunction

  task automatic check_strengths(input string what);
    for (int k = 0; k < NR; k++) begin
      checks++;
      if (int'(strength[k]) != strength_m[k]) begin
        failures++;
        $display("%s rule %0d: strength %0d expected %0d", what, k, strength[k], strength_m[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NR; k++) begin
      in_mu[k] = '0; ante[k] = '0; cons[k] = '0; strength_m[k] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      // clear the match registers
      @(negedge clk);
      rreset_n = 0;
      @(posedge clk);
      for (int k = 0; k < NR; k++) match_m[k] = 0;
      @(negedge clk);
      rreset_n = 1;
      // sweep the input universe; T registers must hold meanwhile
      for (int p = 0; p < 16; p++) begin
        for (int k = 0; k < NR; k++) begin
          // sparse grades so that some rules end with low strengths
          in_mu[k] = 4'($urandom_range(0, 15));
          ante[k]  = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(0, 15))
                                                  : 4'($urandom_range(0, 4));
        end
        @(posedge clk);
        for (int k = 0; k < NR; k++)
          match_m[k] = imax(match_m[k], imin(int'(in_mu[k]), int'(ante[k])));
        @(negedge clk);
        check_strengths("hold");
      end
      // latch the firing strengths
      loadw = 1;
      @(posedge clk);
      for (int k = 0; k < NR; k++) strength_m[k] = match_m[k];
      @(negedge clk);
      loadw = 0;
      check_strengths("latch");
      // inference over 16 output points
      for (int x = 0; x < 16; x++) begin
        int exp_mu;
        exp_mu = 0;
        for (int k = 0; k < NR; k++) begin
          cons[k] = 4'($urandom_range(0, 15));
          exp_mu = imax(exp_mu, imin(strength_m[k], int'(cons[k])));
        end
        #1;
        checks++;
        if (int'(mu) != exp_mu) begin
          failures++;
          $display("round %0d point %0d: mu %0d expected %0d", r, x, mu, exp_mu);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
