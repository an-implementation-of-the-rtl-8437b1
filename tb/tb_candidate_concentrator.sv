// tb_candidate_concentrator: self-checking test of the path from the
// first-stack cells to the second stack, at 3 x 4 cells and 3 second-stack
// processors. Every cell holds a queue of random records (its own row and
// column in the record); processors are ready at random. Each record
// handed on must go to exactly one processor that was ready, in one-hot
// form, in the order its cell queued them, and all records must arrive.
// The row FIFOs must fill up (FIFO FULL back-pressure) at some point, and
// the cycle rate of one record per clock must be reached when every
// processor is ready.
module tb_candidate_concentrator;
  import l0mu_pkg::*;
  localparam int ROWS = 3, COLS = 4, N2 = 3, PER_CELL = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cand_t cand [ROWS][COLS];
  logic cand_valid [ROWS][COLS], cand_ack [ROWS][COLS];
  cand_t s2_cand;
  logic [N2-1:0] s2_valid, s2_ready;
  logic backpressure;

  candidate_concentrator #(.ROWS(ROWS), .COLS(COLS), .N2(N2), .ROW_DEPTH(2)) dut (
    .clk, .rst_n, .cand, .cand_valid, .cand_ack, .s2_cand, .s2_valid, .s2_ready, .backpressure);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cand_t src [ROWS][COLS][$];
  cand_t exp_q [ROWS][COLS][$];
  int ndelivered = 0, nbp = 0, full_rate = 0, all_ready = 1;

  always_comb
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      cand_valid[r][c] = src[r][c].size() > 0;
      cand[r][c] = (src[r][c].size() > 0) ? src[r][c][0] : '0;
    end

  int run = 0;
  always @(posedge clk) if (rst_n) begin
    if (backpressure) nbp++;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      if (cand_ack[r][c]) begin
        check(cand_valid[r][c], "ack only with a candidate");
        if (src[r][c].size() > 0) void'(src[r][c].pop_front());
      end
    check($countones(s2_valid) <= 1, "one processor at a time");
    check((s2_valid & ~s2_ready) == '0, "only a ready processor");
    if (s2_valid != '0) begin
      int r, c;
      r = int'(s2_cand.row); c = int'(s2_cand.col);
      ndelivered++;
      if (r < ROWS && c < COLS && exp_q[r][c].size() > 0) begin
        check(s2_cand == exp_q[r][c][0], "record intact and in order");
        void'(exp_q[r][c].pop_front());
      end else check(0, "record from nowhere");
      run = (s2_ready == '1) ? run + 1 : 0;
      if (run >= 8) full_rate++;
    end else run = 0;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      for (int i = 0; i < PER_CELL; i++) begin
        cand_t x;
        x = cand_t'({$urandom, $urandom, $urandom, $urandom});
        x.row = ROW_W'(r); x.col = COL_W'(c); x.bcid = 8'(i);
        src[r][c].push_back(x);
        exp_q[r][c].push_back(x);
      end
    s2_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      s2_ready = (n % 600 < 200) ? '1 : N2'($urandom & $urandom);
    end
    check(ndelivered == ROWS * COLS * PER_CELL, $sformatf("delivered %0d", ndelivered));
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      check(exp_q[r][c].size() == 0, "cell queue emptied");
    check(nbp > 0, "row FIFO back-pressure seen");
    check(full_rate > 0, "one record per clock reached");
    $display("backpressure cycles: %0d", nbp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
