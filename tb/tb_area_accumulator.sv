// tb_area_accumulator: self-checking test of the adder with gated feedback.
//
// For 3000 clocks, drives random LOAD, add-enable and 4-bit data, and
// compares both the combinational adder output and the registered area with
// a model kept here. LOAD is held high over long stretches so that the area
// grows to several hundred before being cleared.
module tb_area_accumulator;
  logic       clk = 0, rst_n = 0, load = 0, add = 0;
  logic [3:0] data = 0;
  logic [9:0] sum, acc;
  int         model = 0;
  int checks = 0, failures = 0, cycles = 0, clears = 0;

  area_accumulator #(.DW(4), .AW(10)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .add_i(add),
    .data_i(data), .sum_o(sum), .acc_o(acc));

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
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 99) < 2) load = 0;
      else if ($urandom_range(0, 99) < 50) load = 1;
      add  = ($urandom_range(0, 99) < 70);
      data = 4'($urandom_range(0, 15));
      #1;
      checks++;
      if (sum !== 10'((model + data) % 1024)) begin
        failures++;
        $display("cycle %0d: sum %0d expected %0d", n, sum, (model + data) % 1024);
      end
      @(posedge clk);
      if (!load) begin
        if (model != 0) clears++;
        model = 0;
      end else if (add) model = (model + data) % 1024;
      #1;
      checks++;
      if (acc !== 10'(model)) begin
        failures++;
        $display("cycle %0d: acc %0d expected %0d", n, acc, model);
      end
    end
    if (clears == 0) begin failures++; $display("LOAD clear never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
