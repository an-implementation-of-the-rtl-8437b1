// triple_coincidence: the first step of the Level-0 muon algorithm for one
// mu3 seed pad.
//
// A hit in the seed pad of mu3 is a seed. It is a triple coincidence when
// mu4 has a hit within +-1 column and +-1 row of the seed and mu5 has a hit
// within +-2 columns and +-1 row. The window sizes are the document's.
// Purely combinational; the window bits are already aligned on the seed
// (bit HX of each row is the seed column, row index 1 is the seed row).
module triple_coincidence
  import l0mu_pkg::*;
(
  input  logic                     seed_pad,  // mu3 pad
  input  logic [2:0][MU4_WIN-1:0]  mu4,       // rows seed-1, seed, seed+1
  input  logic [2:0][MU5_WIN-1:0]  mu5,
  output logic                     seed,
  output logic                     mu4_hit,
  output logic                     mu5_hit,
  output logic                     triple
);
  always_comb begin
    seed    = seed_pad;
    mu4_hit = |mu4;
    mu5_hit = |mu5;
    triple  = seed & mu4_hit & mu5_hit;
  end
endmodule
