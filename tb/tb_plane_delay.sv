// tb_plane_delay: self-checking test of the per-station synchronisation.
// A stream of random records, one per crossing (two clocks), is sent while
// the per-station delays are set to random values in 0..MAX_DELAY. Each
// output station must equal that station of the input sent `dly` crossings
// earlier (zero before the stream started), and the crossing number the
// one `dly_ref` crossings earlier, one clock after each input.
module tb_plane_delay;
  import l0mu_pkg::*;
  localparam int MAXD = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  own_pads_t in_pads, out_pads;
  logic [BCID_W-1:0] in_bcid, out_bcid;
  logic [4:0][1:0] dly;
  logic [1:0] dly_ref;

  plane_delay #(.MAX_DELAY(MAXD)) dut (.clk, .rst_n, .in_valid, .in_pads, .in_bcid,
    .dly, .dly_ref, .out_valid, .out_pads, .out_bcid);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  own_pads_t hist [$];
  logic [BCID_W-1:0] hb [$];

  initial begin
    own_pads_t e;
    in_valid = 0; in_pads = '0; in_bcid = '0; dly = '0; dly_ref = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      if (n % 50 == 0) begin
        for (int k = 0; k < 5; k++) dly[k] = 2'($urandom_range(0, MAXD));
        dly_ref = 2'($urandom_range(0, MAXD));
      end
      @(negedge clk);
      in_valid = 1; in_pads = own_pads_t'($urandom); in_bcid = 8'(n);
      hist.push_front(in_pads); hb.push_front(in_bcid);
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "valid one clock after input");
      e.mu1 = (dly[0] < hist.size()) ? hist[dly[0]].mu1 : '0;
      e.mu2 = (dly[1] < hist.size()) ? hist[dly[1]].mu2 : '0;
      e.mu3 = (dly[2] < hist.size()) ? hist[dly[2]].mu3 : '0;
      e.mu4 = (dly[3] < hist.size()) ? hist[dly[3]].mu4 : '0;
      e.mu5 = (dly[4] < hist.size()) ? hist[dly[4]].mu5 : '0;
      check(out_pads == e, $sformatf("stations delayed (crossing %0d)", n));
      check(out_bcid == ((dly_ref < hb.size()) ? hb[dly_ref] : 8'd0), "crossing number delayed");
      if (hist.size() > 8) begin void'(hist.pop_back()); void'(hb.pop_back()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
