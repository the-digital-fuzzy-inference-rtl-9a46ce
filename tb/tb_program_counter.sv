// tb_program_counter: self-checking test of the address counter.
//
// Drives random clear and increment inputs for 3000 clocks (so the 6-bit
// count wraps many times) and compares the count with a model kept here.
module tb_program_counter;
  logic       clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [5:0] cnt;
  int         model = 0;
  int checks = 0, failures = 0, cycles = 0, wraps = 0;

  program_counter #(.W(6)) dut (.clk(clk), .rst_n(rst_n), .clr_i(clr), .inc_i(inc), .cnt_o(cnt));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (cnt !== 6'd0) begin failures++; $display("not zero after reset"); end
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 99) < 2);
      inc = ($urandom_range(0, 99) < 80);
      @(posedge clk);
      if (clr) model = 0;
      else if (inc) begin
        if (model == 63) wraps++;
        model = (model + 1) % 64;
      end
      #1;
      checks++;
      if (cnt !== 6'(model)) begin
        failures++;
        $display("cycle %0d: got %0d expected %0d", n, cnt, model);
      end
    end
    if (wraps == 0) begin failures++; $display("no wrap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
