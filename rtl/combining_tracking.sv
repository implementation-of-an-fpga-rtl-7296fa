// combining_tracking: the Combining and Tracking sub-function.
//
// A package-mode priority_mux joins the package streams of all N_INTF
// interfaces (interface 0 first) into the final package. A CMI fork sends
// every word of it both to the readout storage output and to a scoreboard
// that records which interfaces delivered a package in the update cycle;
// the scoreboard result leaves on its own CMI output at every upd.
//
// The structure (mux, looped-through scoreboard, two outputs towards the
// readout storage) follows the original design.
module combining_tracking
  import ssdr_pkg::*;
#(
  parameter int unsigned N_INTF = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd,
  // interface packages
  input  pkg_word_t         in_data [N_INTF],
  input  logic [N_INTF-1:0] in_vld,
  output logic [N_INTF-1:0] in_next,
  // final package
  output pkg_word_t         pkg_data,
  output logic              pkg_vld,
  input  logic              pkg_next,
  // tracking result
  output logic [N_INTF-1:0] score_data,
  output logic              score_vld,
  input  logic              score_next,
  output logic              score_lost
);

  logic [PKG_W-1:0] mux_in [N_INTF];
  logic [PKG_W-1:0] mux_data;
  logic             mux_vld, mux_next;
  logic [PKG_W-1:0] fork_data;
  logic [1:0]       fork_vld, fork_next;
  pkg_word_t        sb_in;
  logic             sb_next;

  for (genvar i = 0; i < N_INTF; i++) begin : g_in
    assign mux_in[i] = in_data[i];
  end

  priority_mux #(.W(PKG_W), .N(N_INTF), .PACKET(1'b1)) u_mux (
    .clk, .rst_n,
    .in_data(mux_in), .in_vld, .in_next,
    .out_data(mux_data), .out_vld(mux_vld), .out_next(mux_next)
  );

  cmi_interconnect #(.W(PKG_W), .N(2)) u_fork (
    .clk, .rst_n,
    .tx_data(mux_data), .tx_vld(mux_vld), .tx_next(mux_next),
    .rx_data(fork_data), .rx_vld(fork_vld), .rx_next(fork_next)
  );

  assign pkg_data     = fork_data;
  assign pkg_vld      = fork_vld[0];
  assign fork_next[0] = pkg_next;
  assign sb_in        = fork_data;
  assign fork_next[1] = sb_next;

  scoreboard #(.N_INTF(N_INTF)) u_sb (
    .clk, .rst_n, .upd,
    .in_data(sb_in), .in_vld(fork_vld[1]), .in_next(sb_next),
    .out_data(score_data), .out_vld(score_vld), .out_next(score_next),
    .lost(score_lost)
  );

endmodule
