// pr_rng_wheel: Parisi-Rapuano shift-register random number generator.
//
// The wheel follows
//     I(k) = I(k-24) + I(k-55)        (mod 2^W)
//     R(k) = I(k) ^ I(k-61)
// and keeps the last 61 elements I(k-61) .. I(k-1) in registers. To serve many
// update cells at once the recurrence is unrolled NOUT times into a cascade:
// element n of a cycle may use elements computed earlier in the same cycle
// (for n >= 24 the I(k-24) tap comes from the cascade itself). rnd[n] is
// R(k0+n), where k0 is the index of the first element produced this cycle.
//
// Interface / timing:
//   rnd is combinational from the current history and is valid every cycle;
//   when en is high the history advances by NOUT elements at the clock edge.
//   seed_we writes history word seed_idx (0 = oldest, I(k-61); 60 = newest,
//   I(k-1)); the history is loaded externally, as the description requires.
// The recurrence, the 32-bit width and the cascade follow the source
// description; NOUT (about one hundred there) is a parameter, and the seed port
// is this design's choice. The history is not reset: it must be seeded.
module pr_rng_wheel
  import ianus_pkg::*;
#(
  parameter int unsigned W    = RND_W,
  parameter int unsigned NOUT = 128
) (
  input  logic                         clk,
  input  logic                         en,
  input  logic                         seed_we,
  input  logic [$clog2(PR_LEN)-1:0]    seed_idx,
  input  logic [W-1:0]                 seed_data,
  output logic [NOUT-1:0][W-1:0]       rnd
);
  // hist[j] = I(k0 - PR_LEN + j)
  logic [W-1:0] hist [PR_LEN];
  // ext[m]: m < PR_LEN is the history, m >= PR_LEN the elements made this cycle
  logic [W-1:0] ext [PR_LEN + NOUT];

  always_comb begin
    for (int m = 0; m < PR_LEN; m++) ext[m] = hist[m];
    for (int n = 0; n < int'(NOUT); n++) begin
      ext[PR_LEN + n] = ext[PR_LEN + n - PR_TAP_A] + ext[PR_LEN + n - PR_TAP_B];
      rnd[n]          = ext[PR_LEN + n] ^ ext[PR_LEN + n - PR_TAP_C];
    end
  end

  always_ff @(posedge clk) begin
    if (seed_we) begin
      hist[seed_idx] <= seed_data;
    end else if (en) begin
      for (int j = 0; j < PR_LEN; j++) hist[j] <= ext[NOUT + j];
    end
  end
endmodule
