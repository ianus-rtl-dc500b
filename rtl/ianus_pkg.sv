// ianus_pkg: types and constants shared by the IANUS spin-glass processor.
//
// Encodings used throughout the design (this design's choices; the source
// description gives the values +1/-1 but no bit encoding):
//   spin bit  1 = +1, 0 = -1
//   coupling  1 = +1, 0 = -1
//   a bond between spins a, b with coupling j is "satisfied" (J*sa*sb = +1)
//   exactly when a ^ b ^ j == 1.
// The local-energy index used to address the Boltzmann table is the number of
// satisfied bonds u (0..6) of a site, so E = 6 - 2u and the energy change of a
// flip is dE = 4u - 12.
package ianus_pkg;

  // Parisi-Rapuano wheel taps: I(k) = I(k-24) + I(k-55), R(k) = I(k) ^ I(k-61)
  localparam int unsigned PR_TAP_A = 24;
  localparam int unsigned PR_TAP_B = 55;
  localparam int unsigned PR_TAP_C = 61;
  localparam int unsigned PR_LEN   = 61;  // words of history the wheel keeps

  localparam int unsigned NBONDS   = 6;   // nearest neighbours on a 3D cubic grid
  localparam int unsigned LUT_AW   = 3;   // table index 0..6 (entry 7 unused)
  localparam int unsigned RND_W    = 32;  // random number / probability width

  // Which on-chip memory a configuration or read access targets.
  typedef enum logic [2:0] {
    SEL_SPIN_A = 3'd0,  // spin bank A (the S lattice at the start of a run)
    SEL_SPIN_B = 3'd1,  // spin bank B (the N lattice at the start of a run)
    SEL_JX     = 3'd2,  // couplings along x
    SEL_JY     = 3'd3,  // couplings along y
    SEL_JZ     = 3'd4,  // couplings along z
    SEL_LUT    = 3'd5,  // Boltzmann probability table (write only)
    SEL_SEED   = 3'd6   // random wheel history words (write only)
  } mem_sel_e;

  // Action the datapath performs on the RAM outputs in a given cycle.
  typedef enum logic [1:0] {
    ACT_NONE  = 2'd0,
    ACT_LOADM = 2'd1,   // N plane z-1 (and Jz plane z-1) arrives
    ACT_LOADC = 2'd2,   // N plane z arrives
    ACT_COMP  = 2'd3    // S plane z, N plane z+1, J planes z arrive: update
  } dp_act_e;

endpackage
