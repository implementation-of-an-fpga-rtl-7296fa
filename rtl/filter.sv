// filter: lets through the readouts of one kind and drops the others.
//
// A readout passes when its label matches MATCH in the bits set in MASK.
// A passing readout is offered on the output and the input waits (next) as
// long as the output does; a readout that does not match is taken from the
// input at once and discarded, so a filter never blocks a stream for
// readouts that are not its own. No register: the filter is combinational.
//
// Selecting readouts by their addr label follows the original design; the mask is
// this design's addition, set to all ones by default for an exact match.
module filter
  import ssdr_pkg::*;
#(
  parameter addr_t MATCH = 8'h00,
  parameter addr_t MASK  = '1
) (
  input  readout_t in_data,
  input  logic     in_vld,
  output logic     in_next,
  output readout_t out_data,
  output logic     out_vld,
  input  logic     out_next
);

  logic match;

  always_comb begin
    match    = ((in_data.addr ^ MATCH) & MASK) == '0;
    out_data = in_data;
    out_vld  = in_vld && match;
    in_next  = in_vld && match && out_next;
  end

endmodule
