// delayed_storage: holds one kind of readout until the next update cycle.
//
// The module always takes its input (in_next is tied low by design: a
// readout is either kept or discarded). The first readout that arrives is
// kept in a pending register and `got` goes high; later readouts of the
// same kind are discarded until the pending value has been stored. On a
// `upd` pulse with `all_got` high - every delayed_storage of the interface
// has its readout - the pending value moves to the stored register, `got`
// drops and the stored readout is offered on the CMI output, held until
// taken. If some sibling is still missing its readout at upd, nothing is
// stored and the pending values wait for a later upd. `got` also stays low
// while the output still holds the previous value, so a store never
// overwrites a word that is being sent.
//
// Keeping the first occurrence, discarding repeats and storing with the
// following upd only when all siblings were updated follow the original design.
// Keeping a pending value across an upd at which the interface was not
// complete (so slow interfaces are stored every other cycle) is this
// design's reading of how slow interfaces are handled.
module delayed_storage
  import ssdr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     upd,
  input  logic     all_got,
  output logic     got,
  input  readout_t in_data,
  input  logic     in_vld,
  output logic     in_next,
  output readout_t out_data,
  output logic     out_vld,
  input  logic     out_next
);

  readout_t pend;
  logic     rcvd;
  logic     store;

  assign in_next = 1'b0;
  assign got     = rcvd && !out_vld;
  assign store   = upd && all_got;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= '0;
      rcvd     <= 1'b0;
      out_data <= '0;
      out_vld  <= 1'b0;
    end else begin
      if (store) begin
        out_data <= pend;
        out_vld  <= 1'b1;
        rcvd     <= 1'b0;
      end else if (out_vld && !out_next) begin
        out_vld  <= 1'b0;
      end
      if (in_vld && (!rcvd || store)) begin
        pend <= in_data;
        rcvd <= 1'b1;
      end
    end
  end

endmodule
