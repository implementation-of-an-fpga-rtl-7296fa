// scoreboard: records which interfaces delivered a package in an update
// cycle.
//
// The module watches the combined package stream (it never stalls it).
// Each header word sets the bit of the interface number it carries. At
// every upd the bits gathered since the previous upd, including a header
// seen in the upd cycle itself, are offered as one CMI word on the output
// and the record starts again from zero. If the previous result has not
// been taken by the next upd, the new result is dropped and `lost` pulses
// for one cycle.
//
// Tracking the occurrence of interface packages over a whole update cycle
// follows the original design; one bit per interface, and the reporting at upd, are
// this design's choices.
module scoreboard
  import ssdr_pkg::*;
#(
  parameter int unsigned N_INTF = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd,
  input  pkg_word_t         in_data,
  input  logic              in_vld,
  output logic              in_next,
  output logic [N_INTF-1:0] out_data,
  output logic              out_vld,
  input  logic              out_next,
  output logic              lost
);

  logic [N_INTF-1:0] seen;
  logic [N_INTF-1:0] hit;
  intf_t             hdr_intf;

  assign in_next  = 1'b0;
  assign hdr_intf = header_intf(in_data.payload);

  always_comb begin
    for (int i = 0; i < N_INTF; i++) begin
      hit[i] = in_vld && in_data.hdr && (32'(hdr_intf) == i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen     <= '0;
      out_data <= '0;
      out_vld  <= 1'b0;
      lost     <= 1'b0;
    end else begin
      lost <= 1'b0;
      if (upd) begin
        seen <= '0;
        if (out_vld && out_next) begin
          lost <= 1'b1;
        end else begin
          out_data <= seen | hit;
          out_vld  <= 1'b1;
        end
      end else begin
        seen <= seen | hit;
        if (out_vld && !out_next) out_vld <= 1'b0;
      end
    end
  end

endmodule
