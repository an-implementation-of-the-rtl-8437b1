// pad_input_port: top (detector) port of one first-stack processor.
//
// The 31 pad bits hardwired to a processor for one beam crossing arrive as
// two 16-bit words, one per 80 MHz clock, so that a 25 ns crossing takes two
// clocks. Word 0 carries {mu2[4:0], mu1[10:0]}, word 1 carries
// {1'b0, mu5, mu4, mu3}. The port latches word 0 (with the crossing number)
// when `strobe` and `first` are high, and on the next strobe without
// `first` it presents the whole 31-bit record on `pads` with `valid` high
// for one clock, one clock after the second word. A second word with no
// first word before it is ignored and counted in `frame_errors`.
// The two-word split and the 31-bit count are the document's; the word
// layout, the `first` marker and the error counter are this design's.
module pad_input_port
  import l0mu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              strobe,
  input  logic              first,
  input  logic [15:0]       word,
  input  logic [BCID_W-1:0] bcid_in,
  output own_pads_t         pads,
  output logic [BCID_W-1:0] bcid,
  output logic              valid,
  output logic [15:0]       frame_errors
);
  logic [15:0]       word0_q;
  logic [BCID_W-1:0] bcid_q;
  logic              have_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word0_q      <= '0;
      bcid_q       <= '0;
      have_first   <= 1'b0;
      pads         <= '0;
      bcid         <= '0;
      valid        <= 1'b0;
      frame_errors <= '0;
    end else begin
      valid <= 1'b0;
      if (strobe && first) begin
        word0_q    <= word;
        bcid_q     <= bcid_in;
        have_first <= 1'b1;
      end else if (strobe) begin
        if (have_first) begin
          pads       <= own_pads_t'({word[14:0], word0_q});
          bcid       <= bcid_q;
          valid      <= 1'b1;
          have_first <= 1'b0;
        end else begin
          frame_errors <= frame_errors + 16'd1;
        end
      end
    end
  end
endmodule
