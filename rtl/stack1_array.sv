// stack1_array: the first stack, a ROWS x COLS array of stack1_cell.
//
// Cell (r, c) owns seed columns 5c .. 5c+4 of row r. Every cell sends its
// own pads to its eight nearest neighbours and takes theirs, so that each
// cell holds the full 47-pad window of each of its seeds (see stack1_cell).
// All cells run the same steps in the same clocks. Along the west, north
// and south borders there is no neighbour (strobe low, no pads). Along the
// east border the E, NE and SE neighbour words come in on east_nb_* (row by
// row) and the edge cells'
// own words go out on east_share_*, for the links to the next outer
// detector region; east_full is the FIFO FULL returned over those links.
// Candidates of all cells are brought out as arrays for the concentrator;
// `drop_any` is high for one clock when any cell lost a crossing because its
// layer queue was full.
// The eight-neighbour exchange is the document's; the plain rectangular
// array and the choice of the east border for the region boundary are this
// design's.
module stack1_array
  import l0mu_pkg::*;
#(
  parameter int ROWS      = 42,
  parameter int COLS      = 44,
  parameter int LAYERS    = 4,
  parameter int MAX_DELAY = 3,
  localparam int DW       = $clog2(MAX_DELAY + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pad_strobe,
  input  logic               pad_first,
  input  logic [15:0]        pad_word [ROWS][COLS],
  input  logic [BCID_W-1:0]  bcid_in,
  input  logic [4:0][DW-1:0] dly,
  input  logic [DW-1:0]      dly_ref,
  input  logic               triple_mode,
  // east border
  input  own_pads_t          east_nb_in     [ROWS],
  input  logic               east_nb_strobe [ROWS],
  input  logic               east_full      [ROWS],
  output own_pads_t          east_share     [ROWS],
  output logic               east_strobe    [ROWS],
  // candidates
  output cand_t              cand       [ROWS][COLS],
  output logic               cand_valid [ROWS][COLS],
  input  logic               cand_ack   [ROWS][COLS],
  // status
  output logic               drop_any,
  output logic [ROWS*COLS-1:0] drop
);
  own_pads_t shr [ROWS][COLS];
  logic      shs [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      own_pads_t [7:0] nbd;
      logic      [7:0] nbs;
      logic [15:0] ovr, ferr;
      logic unused;

      // neighbour (dr, dc) for order W, E, N, S, NW, NE, SW, SE
      localparam int DR [8] = '{0, 0, 1, -1, 1, 1, -1, -1};
      localparam int DC [8] = '{-1, 1, 0, 0, -1, 1, -1, 1};

      for (genvar k = 0; k < 8; k++) begin : g_nb
        localparam int RR = r + DR[k];
        localparam int CC = c + DC[k];
        if (RR >= 0 && RR < ROWS && CC >= 0 && CC < COLS) begin : g_in
          assign nbd[k] = shr[RR][CC];
          assign nbs[k] = shs[RR][CC];
        end else if (CC == COLS && RR >= 0 && RR < ROWS) begin : g_east
          assign nbd[k] = east_nb_in[RR];
          assign nbs[k] = east_nb_strobe[RR];
        end else begin : g_none
          assign nbd[k] = '0;
          assign nbs[k] = 1'b0;
        end
      end

      stack1_cell #(.ROW(r), .COL(c), .LAYERS(LAYERS), .MAX_DELAY(MAX_DELAY)) u_cell (
        .clk, .rst_n,
        .pad_strobe, .pad_first, .pad_word(pad_word[r][c]), .bcid_in,
        .dly, .dly_ref, .triple_mode,
        .share_out(shr[r][c]), .share_strobe(shs[r][c]),
        .share_full((c == COLS - 1) ? east_full[r] : 1'b0),
        .nb_in(nbd), .nb_strobe(nbs),
        .cand(cand[r][c]), .cand_valid(cand_valid[r][c]), .cand_ack(cand_ack[r][c]),
        .drop(drop[r*COLS + c]), .share_overruns(ovr), .frame_errors(ferr)
      );
      assign unused = ^{ovr, ferr};
    end
    assign east_share[r]  = shr[r][COLS-1];
    assign east_strobe[r] = shs[r][COLS-1];
  end

  assign drop_any = |drop;
endmodule
