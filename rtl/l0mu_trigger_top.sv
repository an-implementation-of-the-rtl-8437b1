// l0mu_trigger_top: two-stack Level-0 muon trigger.
//
// The first stack (stack1_array, ROWS x COLS cells) receives all logical
// pads of the five muon stations in parallel every beam crossing, finds
// the mu3 seeds and, in triple mode, the mu3-mu4-mu5 triple coincidences,
// and queues one 47-pad candidate record per seed. The candidate
// concentrator carries the records to N2 second-stack processors
// (stack2_processor), which finish the algorithm (mu2-mu3 combination,
// closest mu1 hit, slopes, y intercept, pt) at their own pace.
// Along the east border of the array, pairs of edge cells are joined to
// the processors of the next outer detector region through
// region_boundary_link; that outer region is not part of this design, so
// its side of the links is brought out on the outer_* ports. The edge cells
// take every word in the clock it arrives, so they never raise FIFO FULL
// towards the outer region (outer_full_out is low by construction).
//
// Timing: one crossing is two clocks (80 MHz clock, 25 ns crossings), the
// pads of a crossing come as two 16-bit words per cell (pad_first marks the
// first). Results come out per second-stack processor on result/
// result_valid. Crossing numbers (bcid_in, given with the first word) tag
// every result.
// The two-stack split, the window sizes, the second stack's size and the
// region-boundary wiring are the document's; the array shape, queue and
// FIFO depths and the arithmetic are this design's.
module l0mu_trigger_top
  import l0mu_pkg::*;
#(
  parameter int ROWS        = 42,
  parameter int COLS        = 44,
  parameter int N2          = 16,
  parameter int LAYERS      = 4,
  parameter int MAX_DELAY   = 3,
  parameter int ROW_DEPTH   = 4,
  parameter int PT_KICK_MEV = 1200,
  localparam int DW         = $clog2(MAX_DELAY + 1),
  localparam int NB         = ROWS / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // detector
  input  logic               pad_strobe,
  input  logic               pad_first,
  input  logic [15:0]        pad_word [ROWS][COLS],
  input  logic [BCID_W-1:0]  bcid_in,
  // configuration
  input  logic [4:0][DW-1:0] dly,
  input  logic [DW-1:0]      dly_ref,
  input  logic               triple_mode,
  input  logic [31:0]        pt_min_mev,
  input  logic [31:0]        y0_cut_um,
  // outer-region processors on the east border, one per pair of rows
  input  own_pads_t          outer_data_in    [NB],
  input  logic               outer_strobe_in  [NB],
  input  logic               outer_full_in    [NB],
  output own_pads_t          outer_data_out   [NB],
  output logic               outer_strobe_out [NB],
  output logic               outer_full_out   [NB],
  // results
  output result_t            result       [N2],
  output logic [N2-1:0]      result_valid,
  // status
  output logic               drop_any,
  output logic               backpressure,
  output logic [N2-1:0]      s2_busy
);
  own_pads_t east_nb_in  [ROWS];
  logic      east_nb_stb [ROWS];
  logic      east_full   [ROWS];
  own_pads_t east_share  [ROWS];
  logic      east_stb    [ROWS];

  cand_t cand       [ROWS][COLS];
  logic  cand_valid [ROWS][COLS];
  logic  cand_ack   [ROWS][COLS];
  logic [ROWS*COLS-1:0] drop;
  logic  unused_drop;

  stack1_array #(.ROWS(ROWS), .COLS(COLS), .LAYERS(LAYERS), .MAX_DELAY(MAX_DELAY)) u_stack1 (
    .clk, .rst_n,
    .pad_strobe, .pad_first, .pad_word, .bcid_in,
    .dly, .dly_ref, .triple_mode,
    .east_nb_in, .east_nb_strobe(east_nb_stb), .east_full,
    .east_share, .east_strobe(east_stb),
    .cand, .cand_valid, .cand_ack,
    .drop_any, .drop
  );
  assign unused_drop = ^drop;

  for (genvar b = 0; b < NB; b++) begin : g_link
    own_pads_t [1:0] idat, odat;
    logic      [1:0] istb, ostb, ifull, ofull;
    assign idat  = {east_share[2*b+1], east_share[2*b]};
    assign istb  = {east_stb[2*b+1],   east_stb[2*b]};
    assign ifull = 2'b00;  // edge cells consume every word when it arrives
    region_boundary_link u_link (
      .outer_data_in(outer_data_in[b]), .outer_strobe_in(outer_strobe_in[b]),
      .outer_full_in(outer_full_in[b]),
      .outer_data_out(outer_data_out[b]), .outer_strobe_out(outer_strobe_out[b]),
      .outer_full_out(outer_full_out[b]),
      .inner_data_in(idat), .inner_strobe_in(istb), .inner_full_in(ifull),
      .inner_data_out(odat), .inner_strobe_out(ostb), .inner_full_out(ofull)
    );
    assign east_nb_in[2*b]    = odat[0];
    assign east_nb_in[2*b+1]  = odat[1];
    assign east_nb_stb[2*b]   = ostb[0];
    assign east_nb_stb[2*b+1] = ostb[1];
    assign east_full[2*b]     = ofull[0];
    assign east_full[2*b+1]   = ofull[1];
  end
  if (ROWS % 2 == 1) begin : g_odd
    assign east_nb_in[ROWS-1]  = '0;
    assign east_nb_stb[ROWS-1] = 1'b0;
    assign east_full[ROWS-1]   = 1'b0;
  end

  cand_t         s2_cand;
  logic [N2-1:0] s2_valid, s2_ready;

  candidate_concentrator #(.ROWS(ROWS), .COLS(COLS), .N2(N2), .ROW_DEPTH(ROW_DEPTH)) u_conc (
    .clk, .rst_n, .cand, .cand_valid, .cand_ack,
    .s2_cand, .s2_valid, .s2_ready, .backpressure
  );

  for (genvar p = 0; p < N2; p++) begin : g_s2
    stack2_processor #(
      .X_SPAN(TILE_W * COLS), .Y_SPAN(ROWS), .PT_KICK_MEV(PT_KICK_MEV)
    ) u_proc (
      .clk, .rst_n,
      .in_cand(s2_cand), .in_valid(s2_valid[p]), .in_ready(s2_ready[p]),
      .pt_min_mev, .y0_cut_um,
      .result(result[p]), .out_valid(result_valid[p])
    );
  end
  assign s2_busy = ~s2_ready;
endmodule
