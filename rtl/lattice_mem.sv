// lattice_mem: one L x L x L bit lattice stored as L RAM blocks.
//
// Block x holds column x of the lattice: bit y of word z is site (x, y, z).
// Reading (or writing) address z on all blocks at once moves one whole xy
// plane, L*L bits, per cycle. Plane bit index is x*L + y.
// This is the storage scheme of the source description; the same structure
// holds a spin lattice or the couplings of one axis.
// Timing: synchronous read, data valid the cycle after re; writes take effect
// at the clock edge.
module lattice_mem #(
  parameter int unsigned L = 16
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(L)-1:0] waddr,
  input  logic [L*L-1:0]       wdata,
  input  logic                 re,
  input  logic [$clog2(L)-1:0] raddr,
  output logic [L*L-1:0]       rdata
);
  for (genvar x = 0; x < L; x++) begin : g_col
    plane_ram #(.W(L), .D(L)) u_ram (
      .clk   (clk),
      .we    (we),
      .waddr (waddr),
      .wdata (wdata[x*L +: L]),
      .re    (re),
      .raddr (raddr),
      .rdata (rdata[x*L +: L])
    );
  end
endmodule
