// update_array: the L x L update cells that refresh one xy plane of S per cycle.
//
// Site (x, y) of the S plane at height z (plane bit x*L + y) is updated from
// the N lattice: N(x+1,y,z), N(x-1,y,z), N(x,y+1,z), N(x,y-1,z) from plane z,
// N(x,y,z+1) from plane z+1 and N(x,y,z-1) from plane z-1, with periodic wrap
// in x and y. The couplings follow the site they start from: the bond
// (x,y,z)-(x+1,y,z) is Jx(x,y,z), so the -x bond is Jx(x-1,y,z); likewise
// for y; the +z bond is Jz(x,y,z) and the -z bond Jz(x,y,z-1) (plane jzp).
// Cells 2i and 2i+1 share one Boltzmann table through its two read ports;
// all tables are written together from the host port.
// rnd[i] is the random number used by cell i.
// Combinational from the plane inputs to s_new; the table write is clocked.
// The plane-parallel update, the neighbour planes, the coupling storage per
// axis and the table sharing follow the source description; the bond and bit
// ordering is this design's choice.
module update_array
  import ianus_pkg::*;
#(
  parameter int unsigned L = 16,
  parameter int unsigned W = RND_W
) (
  input  logic                     clk,
  input  logic [L*L-1:0]           s_plane,  // S plane z
  input  logic [L*L-1:0]           n_m,      // N plane z-1
  input  logic [L*L-1:0]           n_c,      // N plane z
  input  logic [L*L-1:0]           n_p,      // N plane z+1
  input  logic [L*L-1:0]           jx,       // Jx plane z
  input  logic [L*L-1:0]           jy,       // Jy plane z
  input  logic [L*L-1:0]           jz,       // Jz plane z
  input  logic [L*L-1:0]           jzp,      // Jz plane z-1
  input  logic [L*L-1:0][W-1:0]    rnd,
  input  logic                     lut_we,
  input  logic [LUT_AW-1:0]        lut_waddr,
  input  logic [W-1:0]             lut_wdata,
  output logic [L*L-1:0]           s_new,
  output logic [L*L-1:0]           flip
);
  localparam int unsigned N     = L * L;
  localparam int unsigned NPAIR = (N + 1) / 2;

  logic [N-1:0][LUT_AW-1:0] addr;
  logic [N-1:0][W-1:0]      prob;

  for (genvar x = 0; x < L; x++) begin : g_x
    for (genvar y = 0; y < L; y++) begin : g_y
      localparam int unsigned I  = x * L + y;
      localparam int unsigned XP = ((x + 1) % L) * L + y;
      localparam int unsigned XM = ((x + L - 1) % L) * L + y;
      localparam int unsigned YP = x * L + (y + 1) % L;
      localparam int unsigned YM = x * L + (y + L - 1) % L;
      logic [NBONDS-1:0] nb, jj;
      assign nb = {n_m[I], n_p[I], n_c[YM], n_c[YP], n_c[XM], n_c[XP]};
      assign jj = {jzp[I], jz[I],  jy[YM],  jy[I],   jx[XM],  jx[I]};
      update_cell #(.W(W)) u_uc (
        .s        (s_plane[I]),
        .nb       (nb),
        .j        (jj),
        .lut_addr (addr[I]),
        .lut_data (prob[I]),
        .rnd      (rnd[I]),
        .s_new    (s_new[I]),
        .flip     (flip[I])
      );
    end
  end

  for (genvar p = 0; p < NPAIR; p++) begin : g_pair
    localparam int unsigned I0 = 2 * p;
    localparam int unsigned I1 = (2 * p + 1 < N) ? 2 * p + 1 : 2 * p;
    logic [W-1:0] rd1;
    boltzmann_lut #(.W(W)) u_lut (
      .clk    (clk),
      .we     (lut_we),
      .waddr  (lut_waddr),
      .wdata  (lut_wdata),
      .raddr0 (addr[I0]),
      .rdata0 (prob[I0]),
      .raddr1 (addr[I1]),
      .rdata1 (rd1)
    );
    if (I1 != I0) begin : g_second
      assign prob[I1] = rd1;
    end
  end
endmodule
