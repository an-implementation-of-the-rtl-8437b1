// tb_l0mu_trigger_full: the end-to-end test of tb_l0mu_trigger_top run on
// the trigger at its default size (42 x 44 first-stack cells, 16
// second-stack processors), with fewer crossings per phase and sparse
// noise (1 per mille) plus 12 tracks per crossing.
//
// Crossings are sent every two clocks, each a random pad map (noise plus
// muon-like tracks); all stations are delayed by one crossing. For every
// seed the reference model predicts, in the current mode, the
// second-stack result (combination, slopes, y intercept, pt, cuts). Every
// result that comes out must be one of those, and in the normal phases all
// must come out, each within 256 clocks (3.2 us at 80 MHz) of its
// crossing. In the normal phases a crossing with hits is followed by idle
// crossings, so that the load on the small second stack stays below
// its capacity. Phases: seed mode, triple mode, triple mode with tight cuts,
// an overload burst (dense hits) that fills the cell queues, and a phase
// with the outer-region links active. The count of each mechanism is
// printed and a mechanism that never happened is a failure.
module tb_l0mu_trigger_full;
  import l0mu_pkg::*;
  import l0mu_tb_pkg::*;
  localparam int ROWS = 42, COLS = 44, N2 = 16, NB = ROWS / 2;
  localparam int NCROSS = 3;   // crossings per phase
  localparam int GAP = 100;      // idle clocks between crossings in the normal phases
  localparam int D = 1;
  localparam int NBURST = 4;    // overload crossings

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pad_strobe, pad_first, triple_mode, drop_any, backpressure;
  logic [15:0] pad_word [ROWS][COLS];
  logic [7:0] bcid_in;
  logic [4:0][1:0] dly;
  logic [1:0] dly_ref;
  logic [31:0] pt_min_mev, y0_cut_um;
  own_pads_t outer_data_in [NB], outer_data_out [NB];
  logic outer_strobe_in [NB], outer_full_in [NB], outer_strobe_out [NB], outer_full_out [NB];
  result_t result [N2];
  logic [N2-1:0] result_valid, s2_busy;

  l0mu_trigger_top dut (
    .clk, .rst_n, .pad_strobe, .pad_first, .pad_word, .bcid_in, .dly, .dly_ref, .triple_mode,
    .pt_min_mev, .y0_cut_um,
    .outer_data_in, .outer_strobe_in, .outer_full_in, .outer_data_out, .outer_strobe_out,
    .outer_full_out, .result, .result_valid, .drop_any, .backpressure, .s2_busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_seed_mode = 0, n_triple_mode = 0, n_no_triple = 0, n_drop = 0, n_bp = 0, n_all_busy = 0;
  int n_no_comb = 0, n_y0_rej = 0, n_pt_rej = 0, n_accept = 0, n_outer = 0, n_cross_cell = 0;
  int n_results = 0, n_late = 0, max_lat = 0;

  int      expected [string];
  longint  sent_at [int];     // clock of the second word of each map
  longint  cyc = 0;
  bit      strict = 1;        // every expected result must arrive
  bit      checking = 1;      // every result must be expected
  own_pads_t edge_now [ROWS];

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (drop_any) n_drop++;
      if (backpressure) n_bp++;
      if (s2_busy == '1) n_all_busy++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < N2; p++) if (result_valid[p]) begin
      string k;
      int lat;
      k = $sformatf("%h", result[p]);
      n_results++;
      if (checking) check(expected.exists(k) && expected[k] > 0,
            $sformatf("unexpected result bcid=%0d row=%0d col=%0d pt=%0d", result[p].bcid,
                      result[p].row, result[p].col, result[p].pt_mev));
      if (expected.exists(k)) expected[k]--;
      if (!result[p].found) n_no_comb++;
      else begin
        if (!result[p].y0_ok) n_y0_rej++;
        if (!result[p].pt_ok) n_pt_rej++;
        if (result[p].accept) n_accept++;
      end
      lat = int'(cyc - sent_at[int'(result[p].bcid)]);
      if (lat > max_lat) max_lat = lat;
      if (lat > 256) n_late++;
      if (strict) check(lat <= 256, $sformatf("result within 3.2 us (%0d clocks)", lat));
    end
  end

  // the outer-region link: ORed edge words with the strobe of the lower row
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) if (outer_strobe_out[b]) begin
      n_outer++;
      check(outer_full_out[b] == 1'b0, "edge cells never FULL");
    end
  end

  task automatic crossing(input int m, input int noise, input int tracks, input bit record);
    own_pads_t w [ROWS][COLS];
    logic [7:0] b;
    b = 8'(m);
    random_map(ROWS, 5 * COLS, 5 * COLS, 5 * COLS + 3, noise, tracks);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) w[r][c] = own(r, c);
    if (record) begin
      for (int r = 0; r < ROWS; r++) for (int col = 0; col < 5 * COLS; col++) if (hit(2, r, col)) begin
        if (triple_mode && !is_triple(r, col)) n_no_triple++;
        else begin
          cand_t c;
          c = exp_cand(r, col, b);
          expected[$sformatf("%h", s2_model(c, 5 * COLS, ROWS, pt_min_mev, y0_cut_um))]++;
          if (triple_mode) n_triple_mode++; else n_seed_mode++;
          if ((col % 5 < 3 && c.mu1[(col % 5) + 4 -: 5] != 0) || (col % 5 > 1 && c.mu1[16 -: 5] != 0))
            n_cross_cell++;
        end
      end
    end
    @(negedge clk);
    pad_strobe = 1; pad_first = 1; bcid_in = b;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) pad_word[r][c] = word(w[r][c], 0);
    @(negedge clk);
    pad_first = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) pad_word[r][c] = word(w[r][c], 1);
    sent_at[int'(b)] = cyc;
  endtask

  task automatic idle(input int n);
    @(negedge clk);
    pad_strobe = 0;
    repeat (n) @(negedge clk);
  endtask

  task automatic all_arrived(input string phase);
    int missing;
    missing = 0;
    foreach (expected[k]) if (expected[k] != 0) missing++;
    check(missing == 0, $sformatf("%s: %0d expected results missing", phase, missing));
    expected.delete();
  endtask

  initial begin
    int m;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) pad_word[r][c] = '0;
    for (int b = 0; b < NB; b++) begin
      outer_data_in[b] = '0; outer_strobe_in[b] = 0; outer_full_in[b] = 0;
    end
    pad_strobe = 0; pad_first = 0; bcid_in = '0; triple_mode = 0;
    for (int k = 0; k < 5; k++) dly[k] = 2'(D);
    dly_ref = 2'(D);
    pt_min_mev = 32'd1000; y0_cut_um = 32'd1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    m = 0;
    // seed mode, then triple mode, then triple mode with tight cuts
    for (int phase = 0; phase < 3; phase++) begin
      triple_mode = (phase > 0);
      if (phase == 2) begin pt_min_mev = 32'd3000; y0_cut_um = 32'd2; end
      for (int n = 0; n < NCROSS; n++) begin
        crossing(m, 1, 12, 1);
        m = (m + 1) % 256;
        idle(GAP);
      end
      crossing(m, 0, 0, 0); m = (m + 1) % 256;   // flush the delay stage
      idle(400);
      all_arrived($sformatf("phase %0d", phase));
    end
    // overload burst: dense hits, seed mode; results need only be valid
    strict = 0;
    triple_mode = 0;
    for (int n = 0; n < NBURST; n++) begin
      crossing(m, 150, 6, 1);
      m = (m + 1) % 256;
    end
    crossing(m, 0, 0, 0); m = (m + 1) % 256;
    idle(3000);
    expected.delete();
    strict = 1;
    // outer-region links active: the edge cells' windows now hold pads of
    // the outer region, which the reference map does not model
    checking = 0;
    for (int n = 0; n < 20; n++) begin
      for (int b = 0; b < NB; b++) begin
        outer_data_in[b] = own_pads_t'($urandom); outer_strobe_in[b] = 1'b1;
        outer_full_in[b] = 1'($urandom);
      end
      crossing(m, 8, 0, 0);
      m = (m + 1) % 256;
    end
    idle(50);

    $display("seeds handed on in seed mode:        %0d", n_seed_mode);
    $display("triples handed on in triple mode:    %0d", n_triple_mode);
    $display("seeds rejected for lack of a triple: %0d", n_no_triple);
    $display("windows using a neighbour's mu1 pads: %0d", n_cross_cell);
    $display("crossings dropped, layer queue full: %0d", n_drop);
    $display("clocks of row FIFO back-pressure:    %0d", n_bp);
    $display("clocks with every stack-2 busy:      %0d", n_all_busy);
    $display("results: %0d, no combination %0d, y0 rejected %0d, pt rejected %0d, accepted %0d",
             n_results, n_no_comb, n_y0_rej, n_pt_rej, n_accept);
    $display("words sent to the outer region:      %0d", n_outer);
    $display("longest latency %0d clocks, over 256: %0d", max_lat, n_late);
    check(n_seed_mode > 0, "seed mode used");
    check(n_triple_mode > 0, "triple mode used");
    check(n_no_triple > 0, "triple requirement rejected a seed");
    check(n_cross_cell > 0, "neighbour sharing used");
    check(n_drop > 0, "layer queue overflow happened");
    check(n_bp > 0, "row FIFO back-pressure happened");
    check(n_all_busy > 0, "second stack fully busy");
    check(n_no_comb > 0 && n_y0_rej > 0 && n_pt_rej > 0 && n_accept > 0, "all result kinds seen");
    check(n_outer > 0, "outer-region link used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // outer_data_out is the OR of the two edge cells' words
  always @(posedge clk) if (rst_n && outer_strobe_out[0]) begin
    for (int b = 0; b < NB; b++)
      check(outer_data_out[b] == (dut.u_stack1.east_share[2*b] | dut.u_stack1.east_share[2*b+1]),
            "outer word is the OR of the edge pair");
  end
endmodule
