// stack1_cell: one processor of the first stack of the Level-0 muon trigger.
//
// The cell at array position (ROW, COL) owns the five seed columns
// 5*COL .. 5*COL+4 of row ROW. Every beam crossing (two clocks) it
//  1. reads its 31 hardwired pads (11 of mu1 in columns 5*COL-3 .. 5*COL+7,
//     5 each of mu2..mu5) through its top port as two 16-bit words,
//  2. delays each station by a programmable number of crossings so that all
//     stations belong to the same crossing,
//  3. sends its own pads to its eight neighbours and, in the same clock,
//     receives theirs (a neighbour's word counts only with its strobe),
//  4. assembles from both the pads around its tile: mu1 columns -8..+12,
//     mu2 and mu5 columns -2..+6, mu4 columns -1..+5 (mu4/mu5 over rows
//     ROW-1..ROW+1), i.e. the 47-pad window of each of its five seeds,
//  5. tests each seed for a mu3 hit and, when `triple_mode` is high, for
//     the mu4/mu5 triple coincidence,
//  6. queues the crossing if any seed passed. The queue has LAYERS entries:
//     it plays the part of the stacked layers that hold later crossings
//     while earlier ones are still being handed on. A crossing that finds
//     the queue full is lost and flagged on `drop`.
// The head of the queue is offered to the second stack one seed at a time
// (lowest seed first) as a cand_t on `cand`/`cand_valid`; `cand_ack` takes
// it. Latency from the second input word to the crossing in the queue is
// 3 clocks; the first candidate of a crossing is offered one clock later.
// Neighbour order on nb_*: 0 W (COL-1), 1 E (COL+1), 2 N (ROW+1),
// 3 S (ROW-1), 4 NW, 5 NE, 6 SW, 7 SE.
// `share_full` is the FIFO FULL of the processors this cell sends to; the
// exchange runs in step across the array, so a FULL seen while sending
// means those pads were lost, and it is counted in `share_overruns`.
// Steps 1-5 and the window sizes are the document's. That a fixed-function
// cell stands for the programmable processor, the queue in place of the
// layers, and the queue depth are this design's.
module stack1_cell
  import l0mu_pkg::*;
#(
  parameter int ROW       = 0,
  parameter int COL       = 0,
  parameter int LAYERS    = 4,
  parameter int MAX_DELAY = 3,
  localparam int DW       = $clog2(MAX_DELAY + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // detector top port
  input  logic              pad_strobe,
  input  logic              pad_first,
  input  logic [15:0]       pad_word,
  input  logic [BCID_W-1:0] bcid_in,
  // configuration
  input  logic [4:0][DW-1:0] dly,
  input  logic [DW-1:0]     dly_ref,
  input  logic              triple_mode,
  // neighbour exchange
  output own_pads_t         share_out,
  output logic              share_strobe,
  input  logic              share_full,
  input  own_pads_t [7:0]   nb_in,
  input  logic      [7:0]   nb_strobe,
  // candidates for the second stack
  output cand_t             cand,
  output logic              cand_valid,
  input  logic              cand_ack,
  // status
  output logic              drop,
  output logic [15:0]       share_overruns,
  output logic [15:0]       frame_errors
);
  localparam int W = 0, E = 1, N = 2, S = 3, NW = 4, NE = 5, SW = 6, SE = 7;

  // Pads around the tile, bit 0 = leftmost column of each range.
  typedef struct packed {
    logic [BCID_W-1:0]  bcid;
    logic [4:0]         mask;     // seeds to hand on
    logic [4:0]         triple;
    logic [20:0]        mu1;      // columns 5*COL-8 .. 5*COL+12
    logic [8:0]         mu2;      // 5*COL-2 .. 5*COL+6
    logic [4:0]         mu3;      // 5*COL   .. 5*COL+4
    logic [2:0][6:0]    mu4;      // 5*COL-1 .. 5*COL+5, rows ROW-1..ROW+1
    logic [2:0][8:0]    mu5;      // 5*COL-2 .. 5*COL+6
  } win_t;

  // ---- 1. top port
  own_pads_t         in_pads;
  logic [BCID_W-1:0] in_bcid;
  logic              in_valid;

  pad_input_port u_port (
    .clk, .rst_n,
    .strobe(pad_strobe), .first(pad_first), .word(pad_word), .bcid_in,
    .pads(in_pads), .bcid(in_bcid), .valid(in_valid), .frame_errors
  );

  // ---- 2. station synchronisation; its registered output is what is shared
  logic [BCID_W-1:0] own_bcid;

  plane_delay #(.MAX_DELAY(MAX_DELAY)) u_delay (
    .clk, .rst_n,
    .in_valid, .in_pads, .in_bcid, .dly, .dly_ref,
    .out_valid(share_strobe), .out_pads(share_out), .out_bcid(own_bcid)
  );

  // ---- 3./4. window assembly from own pads and the neighbours'
  own_pads_t [7:0] nb;
  win_t            win;
  logic [4:0]      seed, triple;

  always_comb begin
    for (int k = 0; k < 8; k++) nb[k] = nb_strobe[k] ? nb_in[k] : '0;
    win       = '0;
    win.bcid  = own_bcid;
    win.mu1   = {nb[E].mu1[10:6], share_out.mu1, nb[W].mu1[4:0]};
    win.mu2   = {nb[E].mu2[1:0], share_out.mu2, nb[W].mu2[4:3]};
    win.mu3   = share_out.mu3;
    win.mu4[0] = {nb[SE].mu4[0],   nb[S].mu4,     nb[SW].mu4[4]};
    win.mu4[1] = {nb[E].mu4[0],    share_out.mu4, nb[W].mu4[4]};
    win.mu4[2] = {nb[NE].mu4[0],   nb[N].mu4,     nb[NW].mu4[4]};
    win.mu5[0] = {nb[SE].mu5[1:0], nb[S].mu5,     nb[SW].mu5[4:3]};
    win.mu5[1] = {nb[E].mu5[1:0],  share_out.mu5, nb[W].mu5[4:3]};
    win.mu5[2] = {nb[NE].mu5[1:0], nb[N].mu5,     nb[NW].mu5[4:3]};
    win.triple = triple;
    win.mask   = triple_mode ? triple : seed;
  end

  // ---- 5. seed / triple coincidence for the five seeds
  for (genvar s = 0; s < TILE_W; s++) begin : g_seed
    logic [2:0][MU4_WIN-1:0] w4;
    logic [2:0][MU5_WIN-1:0] w5;
    logic unused_h4, unused_h5;
    always_comb begin
      for (int r = 0; r < 3; r++) begin
        w4[r] = win.mu4[r][s +: MU4_WIN];
        w5[r] = win.mu5[r][s +: MU5_WIN];
      end
    end
    triple_coincidence u_tc (
      .seed_pad(win.mu3[s]), .mu4(w4), .mu5(w5),
      .seed(seed[s]), .mu4_hit(unused_h4), .mu5_hit(unused_h5),
      .triple(triple[s])
    );
  end

  // ---- 6. layer queue
  logic q_full, q_empty, q_pop;
  win_t q_head;
  logic q_push;
  logic [$clog2(LAYERS+1)-1:0] q_count;

  assign q_push = share_strobe && (win.mask != '0) && !q_full;

  link_fifo #(.WIDTH($bits(win_t)), .DEPTH(LAYERS)) u_layers (
    .clk, .rst_n,
    .strobe(q_push), .wr_data(win), .full(q_full),
    .rd_en(q_pop), .rd_data(q_head), .empty(q_empty), .count(q_count)
  );

  // Crossing being handed on, with the seeds still to go.
  win_t       cur;
  logic [4:0] cur_mask;
  logic [2:0] sel;

  always_comb begin
    sel = '0;
    for (int s = TILE_W - 1; s >= 0; s--) if (cur_mask[s]) sel = 3'(s);
  end

  wire  cur_last = cand_ack && ((cur_mask & ~(5'b1 << sel)) == '0);
  assign q_pop   = !q_empty && ((cur_mask == '0) || cur_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur            <= '0;
      cur_mask       <= '0;
      drop           <= 1'b0;
      share_overruns <= '0;
    end else begin
      drop <= share_strobe && (win.mask != '0) && q_full;
      if (share_strobe && share_full) share_overruns <= share_overruns + 16'd1;
      if (q_pop) begin
        cur      <= q_head;
        cur_mask <= q_head.mask;
      end else if (cand_ack && cand_valid) begin
        cur_mask[sel] <= 1'b0;
      end
    end
  end

  always_comb begin
    cand_valid  = (cur_mask != '0);
    cand        = '0;
    cand.bcid   = cur.bcid;
    cand.row    = ROW_W'(ROW);
    cand.col    = COL_W'(TILE_W * COL) + COL_W'(sel);
    cand.triple = cur.triple[sel];
    cand.mu1    = cur.mu1[sel +: MU1_WIN];
    cand.mu2    = cur.mu2[sel +: MU2_WIN];
    for (int r = 0; r < 3; r++) begin
      cand.mu4[r] = cur.mu4[r][sel +: MU4_WIN];
      cand.mu5[r] = cur.mu5[r][sel +: MU5_WIN];
    end
  end

  a_ack_only_when_valid: assert property (@(posedge clk) disable iff (!rst_n)
    cand_ack |-> cand_valid);
endmodule
