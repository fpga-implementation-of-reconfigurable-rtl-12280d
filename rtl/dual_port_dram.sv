// Dual-port distributed-RAM look-up table of the DA filter.
//
// One table holds the 2^AW partial inner products of one tap group:
// word a = sum of the coefficients h(pM+m) whose address bit m is set
// (address 0 holds 0, address 1 holds h(pM), address 3 holds h(pM)+h(pM+1), ...).
// The table has two asynchronous read ports, so two partial-product
// generators of two different sections can read it in the same cycle; this
// halves the number of tables compared with one table per generator.
//
// Interface and timing
//   we/waddr/wdata : synchronous write on the rising edge of clk
//   addr_a/rdata_a : combinational read (distributed-RAM style), section A
//   addr_b/rdata_b : combinational read, section B
// A read of the address being written returns the old word until the edge.
// The contents are not reset; the coefficient loader fills the table after
// reset. Sharing one table between two sections follows the filter's
// architecture; the separate write address (instead of writing through read
// port A as an FPGA dual-port primitive does) is this design's choice, so a
// reload never has to steal a read address.
module dual_port_dram #(
  parameter int AW = 4,  // address bits = taps per group (M)
  parameter int DW = 6   // word width
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic signed [DW-1:0] wdata,
  input  logic [AW-1:0]        addr_a,
  output logic signed [DW-1:0] rdata_a,
  input  logic [AW-1:0]        addr_b,
  output logic signed [DW-1:0] rdata_b
);

  logic signed [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[addr_a];
  assign rdata_b = mem[addr_b];

endmodule
