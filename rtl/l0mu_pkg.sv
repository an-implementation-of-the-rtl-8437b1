// l0mu_pkg: types and constants shared by the two-stack Level-0 muon trigger.
//
// Pad index convention. All five stations are addressed on one logical
// "fine" grid: column (x, bend plane) and row (y). Because the pads are
// projective, a straight track from the interaction point crosses the same
// (column, row) in every station. Each first-stack cell owns a tile of
// TILE_W = 5 columns by 1 row in mu2..mu5 and an 11-column strip of mu1.
// The coarser x pads of mu3..mu5 are taken to be fanned out by the
// front end onto both fine columns they cover (a choice of this design).
//
// Search windows (from the trigger algorithm): mu4 +-1 x, +-1 y; mu5 +-2 x,
// +-1 y; mu2 +-2 x, row of the seed; mu1 +-8 x, row of the seed. One seed
// therefore needs 1 + 9 + 15 + 5 + 17 = 47 pad bits.
package l0mu_pkg;

  localparam int TILE_W   = 5;   // seed (mu3) columns per first-stack cell
  localparam int MU1_OWN  = 11;  // mu1 pads hardwired to one cell
  localparam int MU1_LO   = 3;   // mu1 strip starts 3 columns left of the tile
  localparam int OWN_BITS = 31;  // 11 (mu1) + 4 x 5 (mu2..mu5)

  // Search half-widths
  localparam int MU1_HX = 8;
  localparam int MU2_HX = 2;
  localparam int MU4_HX = 1;
  localparam int MU5_HX = 2;
  localparam int MU45_HY = 1;

  localparam int MU1_WIN = 2*MU1_HX + 1;  // 17
  localparam int MU2_WIN = 2*MU2_HX + 1;  // 5
  localparam int MU4_WIN = 2*MU4_HX + 1;  // 3
  localparam int MU5_WIN = 2*MU5_HX + 1;  // 5

  localparam int COL_W  = 10;  // global fine column index
  localparam int ROW_W  = 8;   // global row index
  localparam int BCID_W = 8;   // crossing number carried with every record

  // Pads read directly by one cell in one crossing (bit layout of the
  // two 16-bit input words: word 0 = {mu2, mu1}, word 1 = {0, mu5, mu4, mu3}).
  typedef struct packed {
    logic [4:0]          mu5;
    logic [4:0]          mu4;
    logic [4:0]          mu3;
    logic [4:0]          mu2;
    logic [MU1_OWN-1:0]  mu1;  // bit i = column tile_x0 - MU1_LO + i
  } own_pads_t;

  // Everything the second stack needs about one mu3 seed: the 47 pads.
  // Bit i of each window is column seed_col - H + i; mu4/mu5 rows are
  // [0] = row-1, [1] = row, [2] = row+1.
  typedef struct packed {
    logic [BCID_W-1:0]  bcid;
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;
    logic               triple;   // mu4 and mu5 confirmed
    logic [MU1_WIN-1:0] mu1;
    logic [MU2_WIN-1:0] mu2;
    logic [2:0][MU4_WIN-1:0] mu4;
    logic [2:0][MU5_WIN-1:0] mu5;
  } cand_t;

  // Result of the second stack for one seed.
  typedef struct packed {
    logic [BCID_W-1:0]  bcid;
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;      // mu3 seed column
    logic               found;    // a mu2-mu1 combination was found
    logic [4:0]         mu2_off;  // mu2 column - seed column + MU2_HX
    logic [4:0]         mu1_off;  // mu1 column - seed column + MU1_HX
    logic signed [31:0] tx_urad;  // mu1-mu2 x slope
    logic signed [31:0] ty_urad;  // mu1-mu2 y slope
    logic signed [31:0] y0_um;    // y intercept at the interaction point (z = 0)
    logic [31:0]        pt_mev;   // from the x slope change, target origin
    logic               y0_ok;    // |y0| within the cut
    logic               pt_ok;    // pt at or above the threshold
    logic               accept;   // found & y0_ok & pt_ok
  } result_t;

endpackage
