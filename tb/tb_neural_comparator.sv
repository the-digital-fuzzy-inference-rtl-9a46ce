// tb_neural_comparator: exhaustive self-checking test of neural_comparator.
//
// Applies all 256 pairs of 4-bit inputs and compares the output with
// the expected result (1 unless a < b) computed here. Prints one TB_RESULT line and finishes.
module tb_neural_comparator;
  logic [3:0] a, b;
  logic [0:0] y;
  int checks = 0, failures = 0;

  neural_comparator #(.WIDTH(4)) dut (.a_i(a), .b_i(b), .a_ge_b_o(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (y !== ((i < j) ? 1'b0 : 1'b1)) begin
          failures++;
          $display("mismatch a=%0d b=%0d got %0d", i, j, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
