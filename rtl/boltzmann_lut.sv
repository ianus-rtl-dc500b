// boltzmann_lut: acceptance-probability table shared by two update cells.
//
// Holds one pre-computed probability min(1, exp(-beta*dE)), scaled so that
// 1.0 is 2^W - 1, for each local-energy index (number of satisfied bonds
// u = 0..6, dE = 4u - 12). It is small, so it sits in distributed RAM; two
// asynchronous read ports let a pair of update cells look up in the same cycle.
// One synchronous write port is used by the host to load the table.
// The table contents, the distributed-RAM placement and the two-read sharing
// follow the source description; the write port is this design's choice.
// Contents are not reset: the host loads them before a run.
module boltzmann_lut
  import ianus_pkg::*;
#(
  parameter int unsigned W  = RND_W,
  parameter int unsigned AW = LUT_AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr0,
  output logic [W-1:0]  rdata0,
  input  logic [AW-1:0] raddr1,
  output logic [W-1:0]  rdata1
);
  logic [W-1:0] tbl [2**AW];

  always_ff @(posedge clk) begin
    if (we) tbl[waddr] <= wdata;
  end

  assign rdata0 = tbl[raddr0];
  assign rdata1 = tbl[raddr1];
endmodule
