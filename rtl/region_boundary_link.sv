// region_boundary_link: interconnect between two processors of an inner
// detector region and the one processor of the next outer region that
// borders them.
//
// Pads double in size from one region to the next, so one outer-region
// processor borders two inner-region processors. As the document lays it
// out: the outer processor's data and strobe lines are wired to both inner
// processors; the FIFO FULL it returns is sent to both inner processors;
// the data the two inner processors send are ORed into one word for the
// outer processor, whose FIFO is written with the strobe of one of them
// (inner processor 0); and the FIFO FULL flags of the two inner
// processors are ORed into the one the outer processor sees. The programs
// of all processors run in step, so one strobe stands for both.
// Purely combinational. Bit-for-bit OR of the two inner words (the inner
// pair covering one outer pad row) is this design's reading.
module region_boundary_link
  import l0mu_pkg::*;
(
  // outer-region processor side
  input  own_pads_t       outer_data_in,
  input  logic            outer_strobe_in,
  input  logic            outer_full_in,    // FULL of the outer processor's FIFO
  output own_pads_t       outer_data_out,
  output logic            outer_strobe_out,
  output logic            outer_full_out,   // to the outer processor
  // inner-region processors side
  input  own_pads_t [1:0] inner_data_in,
  input  logic      [1:0] inner_strobe_in,
  input  logic      [1:0] inner_full_in,
  output own_pads_t [1:0] inner_data_out,
  output logic      [1:0] inner_strobe_out,
  output logic      [1:0] inner_full_out
);
  always_comb begin
    outer_data_out   = own_pads_t'(inner_data_in[0] | inner_data_in[1]);
    outer_strobe_out = inner_strobe_in[0];
    outer_full_out   = inner_full_in[0] | inner_full_in[1];
    inner_data_out   = {outer_data_in, outer_data_in};
    inner_strobe_out = {2{outer_strobe_in}};
    inner_full_out   = {2{outer_full_in}};
  end
endmodule
