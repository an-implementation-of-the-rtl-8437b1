// candidate_concentrator: carries candidate records from the first-stack
// cells to the processors of the second stack.
//
// Two levels. In each row a round-robin arbiter picks one cell with a
// candidate per clock and strobes it into that row's link FIFO, acking the
// cell; while the row FIFO is FULL the row's cells wait (the FIFO FULL
// handshake) and `backpressure` is high. A second round-robin arbiter picks
// one non-empty row FIFO per clock and hands its head to a free
// second-stack processor, chosen round-robin among those with `s2_ready`
// high: `s2_valid` is one-hot on the chosen processor, and the transfer
// happens in that clock. Throughput is one candidate per clock (two per
// beam crossing); a candidate spends at least two clocks here.
// That seeds are sent on to a smaller second stack is the document's; the
// arbitration tree, FIFO depth and dispatch order are this design's.
module candidate_concentrator
  import l0mu_pkg::*;
#(
  parameter int ROWS      = 42,
  parameter int COLS      = 44,
  parameter int N2        = 16,
  parameter int ROW_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cand_t   cand       [ROWS][COLS],
  input  logic    cand_valid [ROWS][COLS],
  output logic    cand_ack   [ROWS][COLS],
  output cand_t   s2_cand,
  output logic [N2-1:0] s2_valid,
  input  logic [N2-1:0] s2_ready,
  output logic    backpressure
);
  localparam int CW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int PW = (N2 > 1) ? $clog2(N2) : 1;

  cand_t          row_head  [ROWS];
  logic [ROWS-1:0] row_nempty;
  logic [ROWS-1:0] row_pop;
  logic [ROWS-1:0] row_bp;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [COLS-1:0] req, gnt;
    logic [CW-1:0]   gidx;
    logic            any, full, empty, push;
    logic [$clog2(ROW_DEPTH+1)-1:0] cnt;
    logic            unused_cnt;

    for (genvar c = 0; c < COLS; c++) begin : g_c
      assign req[c]         = cand_valid[r][c];
      assign cand_ack[r][c] = gnt[c] && !full;
    end

    rr_arbiter #(.N(COLS)) u_arb (
      .clk, .rst_n, .req, .advance(!full), .grant(gnt), .grant_idx(gidx), .any
    );

    assign push      = any && !full;
    assign row_bp[r] = any && full;

    link_fifo #(.WIDTH($bits(cand_t)), .DEPTH(ROW_DEPTH)) u_fifo (
      .clk, .rst_n,
      .strobe(push), .wr_data(cand[r][gidx]), .full,
      .rd_en(row_pop[r]), .rd_data(row_head[r]), .empty, .count(cnt)
    );
    assign row_nempty[r] = !empty;
    assign unused_cnt    = ^cnt;
  end

  // Row selection and dispatch
  logic [ROWS-1:0] rgnt;
  logic [RW-1:0]   ridx;
  logic            rany;
  logic [N2-1:0]   pgnt;
  logic [PW-1:0]   pidx;
  logic            pany;
  wire             dispatch = rany && pany;

  rr_arbiter #(.N(ROWS)) u_row_arb (
    .clk, .rst_n, .req(row_nempty), .advance(dispatch),
    .grant(rgnt), .grant_idx(ridx), .any(rany)
  );

  rr_arbiter #(.N(N2)) u_proc_arb (
    .clk, .rst_n, .req(s2_ready), .advance(dispatch),
    .grant(pgnt), .grant_idx(pidx), .any(pany)
  );

  logic unused_pidx;
  assign unused_pidx  = ^pidx;
  assign row_pop      = dispatch ? rgnt : '0;
  assign s2_valid     = dispatch ? pgnt : '0;
  assign s2_cand      = row_head[ridx];
  assign backpressure = |row_bp;

  a_one_hot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s2_valid));
endmodule
