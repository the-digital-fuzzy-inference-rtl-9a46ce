// tb_mf_ram: self-checking test of the membership-function RAM.
//
// Writes every address with a known pattern, reads it back, then runs 2000
// clocks of random writes and reads against a model array kept here.
module tb_mf_ram;
  logic       clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [3:0] wdata = 0, rdata;
  logic [3:0] model [64];
  int checks = 0, failures = 0, cycles = 0;

  mf_ram #(.AW(6), .DW(4)) dut (
    .clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .raddr_i(raddr), .rdata_o(rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input int a);
    raddr = 6'(a);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("addr %0d: got %0d expected %0d", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = 4'((a * 7 + 3) % 16);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < 64; a++) check_read(a);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = 6'($urandom_range(0, 63));
      wdata = 4'($urandom_range(0, 15));
      check_read(int'($urandom_range(0, 63)));
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < 64; a++) check_read(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
