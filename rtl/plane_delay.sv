// plane_delay: programmable synchronisation of the five stations.
//
// The pad signals of the five stations reach a processor slightly out of
// time with one another (cable lengths, and slewing that depends on pad
// capacitance). Before the trigger logic looks at a crossing, each
// station's bits are delayed by a programmable number of crossings so that
// all 31 bits of a record belong to the same beam crossing.
// A history of the last MAX_DELAY+1 input records is kept (shifted on
// every `in_valid`); output station k is taken from the record that is
// `dly[k]` crossings old. The crossing number given with the output is
// the input crossing number `dly_ref` crossings back; the caller sets
// dly_ref to the delay of the station taken as the time reference (mu3).
// Output is registered: valid one clock after in_valid. The need for programmable delays is the
// document's; the per-station granularity and depth are this design's.
module plane_delay
  import l0mu_pkg::*;
#(
  parameter int MAX_DELAY = 3,  // crossings
  localparam int DW       = $clog2(MAX_DELAY + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  own_pads_t         in_pads,
  input  logic [BCID_W-1:0] in_bcid,
  input  logic [4:0][DW-1:0] dly,     // per station mu1..mu5 (index 0..4)
  input  logic [DW-1:0]     dly_ref,  // delay applied to the crossing number
  output logic              out_valid,
  output own_pads_t         out_pads,
  output logic [BCID_W-1:0] out_bcid
);
  own_pads_t         hist   [MAX_DELAY+1];
  logic [BCID_W-1:0] hist_b [MAX_DELAY+1];

  // hist[0] is the record arriving now, hist[d] the one d crossings ago.
  always_comb begin
    hist[0]   = in_pads;
    hist_b[0] = in_bcid;
  end

  logic [MAX_DELAY:1][$bits(own_pads_t)-1:0] sh;
  logic [MAX_DELAY:1][BCID_W-1:0]            sh_b;

  always_comb begin
    for (int d = 1; d <= MAX_DELAY; d++) begin
      hist[d]   = own_pads_t'(sh[d]);
      hist_b[d] = sh_b[d];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      sh_b      <= '0;
      out_valid <= 1'b0;
      out_pads  <= '0;
      out_bcid  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sh[1]   <= in_pads;
        sh_b[1] <= in_bcid;
        for (int d = 2; d <= MAX_DELAY; d++) begin
          sh[d]   <= sh[d-1];
          sh_b[d] <= sh_b[d-1];
        end
        out_pads.mu1 <= hist[sat(dly[0])].mu1;
        out_pads.mu2 <= hist[sat(dly[1])].mu2;
        out_pads.mu3 <= hist[sat(dly[2])].mu3;
        out_pads.mu4 <= hist[sat(dly[3])].mu4;
        out_pads.mu5 <= hist[sat(dly[4])].mu5;
        out_bcid     <= hist_b[sat(dly_ref)];
      end
    end
  end

  function automatic int sat(input logic [DW-1:0] d);
    return (int'(d) > MAX_DELAY) ? MAX_DELAY : int'(d);
  endfunction
endmodule
