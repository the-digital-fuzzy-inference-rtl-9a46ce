// mf_ram: membership-function RAM (RAM1 / RAM2 of the defuzzifier).
//
// Holds one inferred membership grade per point of the output universe. The
// published defuzzifier uses two such RAMs with the same contents, one read by
// each program counter. Depth, port style and reset are this design's
// choices: one synchronous write port, one asynchronous read port, contents
// not reset.
//
// Interface: clk; we_i, waddr_i, wdata_i write on the rising edge;
// rdata_o = mem[raddr_i] combinationally.
module mf_ram #(
  parameter int unsigned AW = 6,
  parameter int unsigned DW = 4
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [DW-1:0] wdata_i,
  input  logic [AW-1:0] raddr_i,
  output logic [DW-1:0] rdata_o
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_comb rdata_o = mem[raddr_i];
endmodule
