// update_cell: Metropolis update of one spin.
//
// From the spin s, its six nearest neighbours nb[5:0] and the six couplings
// j[5:0] of the bonds to them it counts the satisfied bonds u (bond k is
// satisfied when s ^ nb[k] ^ j[k] is 1, i.e. J*s*s' = +1). u is the local
// energy index sent to the Boltzmann table (E = 6 - 2u, flip cost
// dE = 4u - 12). The table returns prob, the acceptance probability scaled so
// that 1.0 = 2^W - 1; the spin is flipped when rnd <= prob, so a probability
// of 1.0 always flips.
// Purely combinational: lut_addr depends on the spins, s_new on lut_data and
// rnd in the same cycle.
// The energy, the table look-up and the comparison with a 32-bit random number
// follow the source description; the bit encodings and the "<=" comparison are
// this design's choices.
module update_cell
  import ianus_pkg::*;
#(
  parameter int unsigned W = RND_W
) (
  input  logic                s,
  input  logic [NBONDS-1:0]   nb,
  input  logic [NBONDS-1:0]   j,
  output logic [LUT_AW-1:0]   lut_addr,
  input  logic [W-1:0]        lut_data,
  input  logic [W-1:0]        rnd,
  output logic                s_new,
  output logic                flip
);
  logic [NBONDS-1:0] sat;

  always_comb begin
    sat      = {NBONDS{s}} ^ nb ^ j;
    lut_addr = '0;
    for (int k = 0; k < int'(NBONDS); k++) lut_addr = lut_addr + LUT_AW'(sat[k]);
    flip  = (rnd <= lut_data);
    s_new = s ^ flip;
  end
endmodule
