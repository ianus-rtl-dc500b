// plane_ram: one embedded RAM block of the SP.
//
// A simple dual-port memory: one synchronous write port and one synchronous
// read port (data appears on rdata the cycle after re). In the spin lattice a
// block holds one x column: its W-bit word is the y row and its address is the
// z coordinate. A read and a write to the same address in the same cycle
// return the old contents; the controller never issues that case.
// The description gives the block's role and its geometry; the port set and
// the read latency are this design's choice, modelled on FPGA block RAM.
// Contents are not reset (block RAM is loaded by the host before use).
module plane_ram #(
  parameter int unsigned W = 16,   // word width (y extent)
  parameter int unsigned D = 16    // depth (z extent)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(D)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  input  logic                 re,
  input  logic [$clog2(D)-1:0] raddr,
  output logic [W-1:0]         rdata
);
  logic [W-1:0] mem [D];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
