// tb_link_fifo: self-checking test of the link FIFO. A sender that obeys
// FIFO FULL writes random words with random strobes while a reader pops
// at random; every word read must be the next one of a queue kept here.
// The run is biased so that the FIFO is full and empty many times; both
// are counted and must happen.
module tb_link_fifo;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic strobe, full, rd_en, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [2:0] count;

  link_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .strobe, .wr_data, .full,
    .rd_en, .rd_data, .empty, .count);

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

  logic [W-1:0] q [$];
  initial begin
    int nfull = 0, nempty = 0;
    strobe = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int bias;
      bias = (n / 500) % 2 ? 80 : 20;
      @(negedge clk);
      check(count == 3'(q.size()), "count");
      check(full == (q.size() == D), "FIFO FULL");
      check(empty == (q.size() == 0), "empty");
      if (full) nfull++;
      if (empty) nempty++;
      rd_en  = ($urandom_range(0, 99) >= bias);
      strobe = ($urandom_range(0, 99) < bias) && (!full || rd_en);
      wr_data = W'($urandom);
      if (rd_en && !empty) begin
        check(rd_data == q[0], "data order");
      end
      @(posedge clk);
      #1;
    end
    check(nfull > 10 && nempty > 10, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at the clock edge
  always @(posedge clk) if (rst_n) begin
    logic r;
    r = rd_en && q.size() > 0;
    if (r) void'(q.pop_front());
    if (strobe) q.push_back(wr_data);
  end
endmodule
