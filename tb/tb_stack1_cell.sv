// tb_stack1_cell: self-checking test of one first-stack cell.
//
// The cell under test sits at (ROW 1, COL 1) of a 3 x 3 block whose eight
// other cells are played by the testbench. For each crossing a random pad
// map is drawn; the cell gets its own pads as two 16-bit words and the
// neighbours' pads on nb_in. Some neighbours are switched off (strobe low,
// garbage on the data lines): the pads only they provide are then removed
// from the reference map. The candidates the cell offers must be, in seed
// order, the records the reference model builds from the map, in seed mode
// or triple mode. A second phase sends crossings back to back with no
// acknowledge and checks that LAYERS + 1 crossings are kept, the rest are
// dropped (drop pulses counted), and the kept ones come out intact.
module tb_stack1_cell;
  import l0mu_pkg::*;
  import l0mu_tb_pkg::*;
  localparam int LAYERS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pad_strobe, pad_first, triple_mode, share_strobe, share_full, cand_valid, cand_ack, drop;
  logic [15:0] pad_word, ovr, ferr;
  logic [7:0] bcid_in;
  logic [4:0][1:0] dly;
  logic [1:0] dly_ref;
  own_pads_t share_out;
  own_pads_t [7:0] nb_in;
  logic [7:0] nb_strobe;
  cand_t cand;

  stack1_cell #(.ROW(1), .COL(1), .LAYERS(LAYERS)) dut (
    .clk, .rst_n, .pad_strobe, .pad_first, .pad_word, .bcid_in, .dly, .dly_ref, .triple_mode,
    .share_out, .share_strobe, .share_full, .nb_in, .nb_strobe,
    .cand, .cand_valid, .cand_ack, .drop, .share_overruns(ovr), .frame_errors(ferr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int DR [8] = '{0, 0, 1, -1, 1, 1, -1, -1};
  localparam int DC [8] = '{-1, 1, 0, 0, -1, 1, -1, 1};

  cand_t expq [$];

  // draw a map for the 3 x 3 block and the expected candidates
  task automatic new_crossing(input logic [7:0] b, input bit all_on);
    random_map(3, 15, 15, 18, 60, 3);
    // mu1 columns -3..-1 of the west neighbour's strip
    for (int c = -3; c < 0; c++) if ($urandom_range(0, 9) == 0) set_hit(0, 1, c);
    for (int k = 0; k < 8; k++) begin
      own_pads_t o;
      o = own(1 + DR[k], 1 + DC[k]);
      nb_strobe[k] = all_on ? 1'b1 : ($urandom_range(0, 3) != 0);
      nb_in[k] = nb_strobe[k] ? o : own_pads_t'($urandom);
    end
    for (int k = 0; k < 8; k++) if (!nb_strobe[k]) begin
      int r, c0;
      r = 1 + DR[k]; c0 = 5 * (1 + DC[k]);
      for (int i = -3; i < 8; i++) if (!(r == 1 && c0 + i >= 2 && c0 + i <= 12)) clear_hit(0, r, c0 + i);
      for (int p = 1; p < 5; p++) for (int i = 0; i < 5; i++) clear_hit(p, r, c0 + i);
    end
    for (int s = 0; s < 5; s++) begin
      int col;
      col = 5 + s;
      if (hit(2, 1, col) && (!triple_mode || is_triple(1, col))) expq.push_back(exp_cand(1, col, b));
    end
  endtask

  task automatic send_words(input logic [7:0] b);
    own_pads_t o;
    o = own(1, 1);
    @(negedge clk);
    pad_strobe = 1; pad_first = 1; pad_word = word(o, 0); bcid_in = b;
    @(negedge clk);
    pad_first = 0; pad_word = word(o, 1);
    @(negedge clk);
    pad_strobe = 0;
  endtask

  initial begin
    int seen;
    pad_strobe = 0; pad_first = 0; pad_word = '0; bcid_in = '0; dly = '0; dly_ref = '0;
    triple_mode = 0; share_full = 0; nb_in = '0; nb_strobe = '0; cand_ack = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: one crossing at a time
    for (int n = 0; n < 400; n++) begin
      triple_mode = (n % 2);
      new_crossing(8'(n), n < 40);
      send_words(8'(n));
      repeat (3) @(negedge clk);
      seen = 0;
      while (expq.size() > 0 && seen < 50) begin
        cand_ack = 0;
        if (cand_valid && $urandom_range(0, 2) != 0) begin
          check(cand == expq[0], $sformatf("candidate bcid=%0d col=%0d/%0d mu1=%h/%h mu4=%h/%h mu5=%h/%h",
                cand.bcid, cand.col, expq[0].col, cand.mu1, expq[0].mu1, cand.mu4, expq[0].mu4, cand.mu5, expq[0].mu5));
          void'(expq.pop_front());
          cand_ack = 1;
        end
        @(negedge clk);
        seen++;
      end
      cand_ack = 0;
      check(expq.size() == 0, "all expected candidates offered");
      expq.delete();
      @(negedge clk);
      check(!cand_valid, "no extra candidate");
    end
    // phase 2: back-to-back crossings, nothing acknowledged
    begin
      int ndrop, nsent;
      ndrop = 0; nsent = 0;
      triple_mode = 0;
      fork
        begin
          for (int n = 0; n < 10; n++) begin
            int nkept;
            nkept = expq.size();
            do begin
              while (expq.size() > nkept) void'(expq.pop_back());
              new_crossing(8'(100 + n), 1);
            end while (expq.size() == nkept);
            if (nsent >= LAYERS + 1) while (expq.size() > nkept) void'(expq.pop_back());
            nsent++;
            send_words(8'(100 + n));
            repeat (2) @(negedge clk);  // neighbour pads held until taken
          end
        end
        begin
          repeat (100) begin
            @(posedge clk);
            if (drop) ndrop++;
          end
        end
      join
      check(ndrop == 10 - (LAYERS + 1), $sformatf("crossings dropped %0d", ndrop));
      seen = 0;
      while (expq.size() > 0 && seen < 200) begin
        @(negedge clk);
        cand_ack = 0;
        if (cand_valid) begin
          check(cand == expq[0], "kept candidate intact");
          void'(expq.pop_front());
          cand_ack = 1;
        end
        seen++;
      end
      @(negedge clk);
      cand_ack = 0;
      check(expq.size() == 0, "kept crossings all offered");
    end
    check(ferr == 0, "no frame errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
