// priority_mux: merges N CMI streams into one, lowest input index first.
//
// In every cycle the lowest-numbered input with a valid word is chosen and
// its word is offered on the output; all other valid inputs are told to
// wait (next=1). Two rules keep the merge correct:
//  * a word that the output stalls stays selected until it is taken, even
//    if an input of higher priority becomes valid meanwhile;
//  * with PACKET=1 the most significant data bit is a header flag, and once
//    a word of an input has been sent the mux stays on that input while it
//    offers data words (flag 0). It chooses again when that input offers a
//    header (a new package) or nothing. Packages are therefore never
//    interleaved, provided a source sends the words of a package in
//    consecutive cycles, as the package sources of this design do.
// The mux is combinational from input to output, with two state bits and
// the index of the held input.
//
// A priority multiplexer that combines requests and packages follows the
// design; the fixed order by index and the package-holding rule are this
// design's choices.
module priority_mux #(
  parameter int unsigned W      = 8,
  parameter int unsigned N      = 2,
  parameter bit          PACKET = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data [N],
  input  logic [N-1:0] in_vld,
  output logic [N-1:0] in_next,
  output logic [W-1:0] out_data,
  output logic         out_vld,
  input  logic         out_next
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  logic             stall_hold;  // last cycle's word was not taken
  logic             pkt_hold;    // in the middle of a package
  logic [IDX_W-1:0] hold_idx;
  logic [IDX_W-1:0] pick;
  logic [IDX_W-1:0] sel;

  always_comb begin
    pick     = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (in_vld[i]) begin
        pick     = IDX_W'(i);
      end
    end

    if (stall_hold) begin
      sel = hold_idx;
    end else if (PACKET && pkt_hold && in_vld[hold_idx] && !in_data[hold_idx][W-1]) begin
      sel = hold_idx;
    end else begin
      sel = pick;
    end

    out_data = in_data[sel];
    out_vld  = in_vld[sel];
    for (int i = 0; i < N; i++) begin
      in_next[i] = in_vld[i] && ((IDX_W'(i) != sel) || out_next);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall_hold <= 1'b0;
      pkt_hold   <= 1'b0;
      hold_idx   <= '0;
    end else begin
      hold_idx   <= sel;
      stall_hold <= out_vld && out_next;
      if (out_vld && !out_next) begin
        pkt_hold <= PACKET;
      end else if (!out_vld) begin
        pkt_hold <= 1'b0;
      end
    end
  end

endmodule
