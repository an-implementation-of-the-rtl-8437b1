// rr_arbiter: round-robin arbiter over N requesters.
//
// Grants the first requester after the last one served, in index order
// with wrap-around. `grant` (one-hot) and `grant_idx` are combinational on
// `req`; the pointer moves to the granted index on a clock where `advance`
// is high and a grant exists.
module rr_arbiter #(
  parameter int N = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          advance,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] grant_idx,
  output logic          any
);
  logic [IW-1:0] last;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int i = 1; i <= N; i++) begin
      if (!any && req[(int'(last) + i) % N]) begin
        any       = 1'b1;
        grant_idx = IW'((int'(last) + i) % N);
      end
    end
    if (any) grant[grant_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               last <= IW'(N - 1);
    else if (advance && any)  last <= grant_idx;
  end
endmodule
