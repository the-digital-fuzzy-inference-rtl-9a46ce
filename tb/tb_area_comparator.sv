// tb_area_comparator: self-checking test of the 10-bit area comparator.
//
// Checks the boundary cases (equal, one apart, extremes) and 2000 random
// pairs against half > area computed here.
module tb_area_comparator;
  logic [9:0] half, area;
  logic       gt;
  int checks = 0, failures = 0;

  area_comparator #(.W(10)) dut (.half_i(half), .area_i(area), .gt_o(gt));

  task automatic check(input int h, input int a);
    half = 10'(h);
    area = 10'(a);
    #1;
    checks++;
    if (gt !== (h > a)) begin
      failures++;
      $display("mismatch half=%0d area=%0d got %0b", h, a, gt);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(1, 0); check(0, 1); check(1023, 1023);
    check(1023, 1022); check(1022, 1023); check(512, 511); check(511, 512);
    for (int n = 0; n < 2000; n++) begin
      int h, a;
      h = int'($urandom_range(0, 1023));
      a = (n % 4 == 0) ? h + int'($urandom_range(0, 2)) - 1 : int'($urandom_range(0, 1023));
      if (a < 0) a = 0;
      if (a > 1023) a = 1023;
      check(h, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
