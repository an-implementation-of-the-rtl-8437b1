// link_fifo: the receive buffer of a processor-to-processor link.
//
// Links between processors carry data lines and a strobe; the receiving
// side stores each strobed word in a FIFO and returns FIFO FULL to the
// sender, which must not strobe while FULL is high. This is that FIFO:
// a synchronous circular buffer of DEPTH words of WIDTH bits. A strobed
// word is visible on `rd_data` (with `empty` low) from the next clock;
// `rd_en` pops it. `full` is combinational on the stored count, so a
// sender sees it in the same clock. Reading and writing in the same clock
// is allowed, also when full. The data/strobe/FULL handshake is the
// document's; the FIFO organisation is this design's.
module link_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             strobe,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  wire do_rd = rd_en && !empty;
  wire do_wr = strobe && (!full || do_rd);

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  // A sender must respect FIFO FULL.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(strobe && full && !rd_en));
endmodule
