// svm_dp_mem: block RAM with one write port and two read ports.
// Both reads are synchronous: the word at raddr_x appears on rdata_x one clock
// later, which maps onto the FPGA's block RAM. Writes take effect at the clock
// edge; a read of the address being written returns the old word. The two read
// ports let a datapath fetch two vectors, or two matrix entries, per cycle.
// Contents are not reset: every location is written before it is read.
module svm_dp_mem #(
  parameter int DEPTH = 4096,
  parameter int W     = 32,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end

endmodule
