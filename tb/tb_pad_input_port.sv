// tb_pad_input_port: self-checking test of the two-word detector port.
// Random 31-bit pad records are sent as two 16-bit words per crossing
// (one per clock), sometimes with idle clocks in between; the assembled
// record, its crossing number and the one-clock-later valid pulse are
// checked against the record sent. Stray second words are sent and the
// frame error count checked.
module tb_pad_input_port;
  import l0mu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic strobe, first, valid;
  logic [15:0] word, ferr;
  logic [BCID_W-1:0] bcid_in, bcid;
  own_pads_t pads;

  pad_input_port dut (.clk, .rst_n, .strobe, .first, .word, .bcid_in,
                      .pads, .bcid, .valid, .frame_errors(ferr));

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

  initial begin
    logic [30:0] rec;
    logic [7:0]  b;
    int errs;
    strobe = 0; first = 0; word = '0; bcid_in = '0; errs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      rec = 31'($urandom);
      b   = 8'($urandom);
      @(negedge clk);
      strobe = 1; first = 1; word = rec[15:0]; bcid_in = b;
      @(negedge clk);
      check(!valid, "no valid after first word");
      first = 0; word = {1'b0, rec[30:16]}; bcid_in = ~b;
      @(negedge clk);
      strobe = 0;
      check(valid, "valid one clock after second word");
      check(pads == own_pads_t'(rec), "record reassembled");
      check(pads.mu1 == rec[10:0] && pads.mu2 == rec[15:11] && pads.mu3 == rec[20:16],
            "word layout");
      check(bcid == b, "crossing number of the first word");
      if (n % 7 == 0) begin
        // stray second word
        strobe = 1; first = 0; word = 16'hFFFF; errs++;
        @(negedge clk);
        strobe = 0;
        check(!valid, "stray word gives no record");
      end
      @(negedge clk);
      check(!valid, "single-clock valid");
      if ($urandom_range(0, 1)) @(negedge clk);
    end
    check(ferr == 16'(errs), $sformatf("frame errors %0d expected %0d", ferr, errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
