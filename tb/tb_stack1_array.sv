// tb_stack1_array: self-checking test of the first stack at 4 x 3 cells.
//
// A crossing is sent every two clocks, each drawn as a random pad map
// (noise plus muon-like tracks). The east border is fed with the pads of a
// virtual fourth column of cells. All stations are delayed by one crossing
// (dly = 1), so the candidates of map n come out tagged with crossing n.
// Every candidate acknowledged must match a record expected from the map
// (built by the reference model: windows across cell borders, rows and the
// east link), none may be missing, and none may come twice. One phase runs
// in seed mode, one in triple mode. The words sent east by the edge cells
// are compared with their own pads.
module tb_stack1_array;
  import l0mu_pkg::*;
  import l0mu_tb_pkg::*;
  localparam int ROWS = 4, COLS = 3, D = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pad_strobe, pad_first, triple_mode, drop_any;
  logic [15:0] pad_word [ROWS][COLS];
  logic [7:0] bcid_in;
  logic [4:0][1:0] dly;
  logic [1:0] dly_ref;
  own_pads_t east_nb_in [ROWS], east_share [ROWS];
  logic east_nb_strobe [ROWS], east_full [ROWS], east_strobe [ROWS];
  cand_t cand [ROWS][COLS];
  logic cand_valid [ROWS][COLS], cand_ack [ROWS][COLS];
  logic [ROWS*COLS-1:0] drop;

  stack1_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .pad_strobe, .pad_first, .pad_word, .bcid_in, .dly, .dly_ref, .triple_mode,
    .east_nb_in, .east_nb_strobe, .east_full, .east_share, .east_strobe,
    .cand, .cand_valid, .cand_ack, .drop_any, .drop);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int        expected [string];
  own_pads_t east_q  [$][ROWS];
  own_pads_t edge_q  [$][ROWS];
  int        nexp = 0, ngot = 0, ndrop = 0, nsamples = 0;

  // acknowledge and check every candidate
  always @(negedge clk) if (rst_n) begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      cand_ack[r][c] = cand_valid[r][c];
      if (cand_valid[r][c]) begin
        string k;
        k = $sformatf("%h", cand[r][c]);
        ngot++;
        check(expected.exists(k) && expected[k] > 0,
              $sformatf("unexpected candidate bcid=%0d row=%0d col=%0d", cand[r][c].bcid, cand[r][c].row, cand[r][c].col));
        if (expected.exists(k)) expected[k]--;
      end
    end
  end
  always @(posedge clk) if (rst_n && drop_any) ndrop++;

  initial begin
    own_pads_t words [ROWS][COLS];
    for (int r = 0; r < ROWS; r++) begin
      east_nb_in[r] = '0; east_nb_strobe[r] = 0; east_full[r] = 0;
      for (int c = 0; c < COLS; c++) begin pad_word[r][c] = '0; cand_ack[r][c] = 0; end
    end
    pad_strobe = 0; pad_first = 0; bcid_in = '0;
    for (int k = 0; k < 5; k++) dly[k] = 2'(D);
    dly_ref = 2'(D);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      triple_mode = phase[0];
      for (int n = 0; n < 150 + D + 1; n++) begin
        logic [7:0] b;
        own_pads_t e [ROWS], g [ROWS];
        b = 8'(phase * 150 + n);
        if (n < 150) begin
          random_map(ROWS, 5 * COLS, 5 * (COLS + 1), 5 * COLS + 8, 25, 3);
          for (int r = 0; r < ROWS; r++) begin
            for (int c = 0; c < COLS; c++) words[r][c] = own(r, c);
            e[r] = own(r, COLS);
            g[r] = own(r, COLS - 1);
            for (int col = 0; col < 5 * COLS; col++)
              if (hit(2, r, col) && (!triple_mode || is_triple(r, col))) begin
                expected[$sformatf("%h", exp_cand(r, col, b))]++;
                nexp++;
              end
          end
        end else begin
          for (int r = 0; r < ROWS; r++) begin
            for (int c = 0; c < COLS; c++) words[r][c] = '0;
            e[r] = '0; g[r] = '0;
          end
        end
        east_q.push_back(e);
        edge_q.push_back(g);
        @(negedge clk);
        pad_strobe = 1; pad_first = 1; bcid_in = b;
        for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) pad_word[r][c] = word(words[r][c], 0);
        @(negedge clk);
        pad_first = 0;
        for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) pad_word[r][c] = word(words[r][c], 1);
        // east neighbour pads for the previous crossing, now leaving the
        // delay stage: map n - 1 - D
        for (int r = 0; r < ROWS; r++) begin
          east_nb_in[r] = (n - 1 - D >= 0) ? east_q[n - 1 - D][r] : '0;
          east_nb_strobe[r] = 1'b1;
        end
      end
      @(negedge clk);
      pad_strobe = 0;
      repeat (40) @(negedge clk);
      east_q.delete();
    end
    foreach (expected[k]) check(expected[k] == 0, $sformatf("candidate %s never offered", k));
    check(nexp > 100 && ngot == nexp, $sformatf("expected %0d candidates, got %0d", nexp, ngot));
    check(ndrop == 0, "no crossing dropped");
    check(nsamples > 100, "edge words checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge cells' words sent east
  logic [7:0] last_b;
  int         k_edge = 0;
  always @(posedge clk) if (rst_n && east_strobe[0]) begin
    if (k_edge >= D && k_edge - D < edge_q.size()) begin
      for (int r = 0; r < ROWS; r++) check(east_share[r] == edge_q[k_edge - D][r], "edge cell word sent east");
      nsamples++;
    end
    k_edge++;
  end
endmodule
