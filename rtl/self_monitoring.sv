// self_monitoring: the System Self-Monitoring sub-function.
//
// The module taps the readout streams of all N_INTF diagnostic interfaces.
// Monitor channel m watches interface MON_INTF[m]: a filter picks the
// readouts labelled MON_ADDR[m] out of that stream and a failsafe_monitor
// checks them against WARN_TH[m] and CRIT_TH[m]. Because failsafe monitors
// never stall and filters drop foreign labels, the module never stalls a
// stream (in_next stays low); every channel sees every readout of its
// interface, including the extra ones requested by the fast sequence.
// `any_failsafe` is the OR of all channels' failsafe outputs.
//
// Filter plus failsafe monitor per channel follows the original design; the channel
// table and the OR of the failsafe outputs are this design's choices.
module self_monitoring
  import ssdr_pkg::*;
#(
  parameter int unsigned N_INTF = 2,
  parameter int unsigned N_MON  = 1,
  parameter int unsigned MON_INTF [N_MON] = '{0},
  parameter addr_t       MON_ADDR [N_MON] = '{8'h01},
  parameter data_t       WARN_TH  [N_MON] = '{32'd1000},
  parameter data_t       CRIT_TH  [N_MON] = '{32'd2000}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  readout_t          in_data [N_INTF],
  input  logic [N_INTF-1:0] in_vld,
  output logic [N_INTF-1:0] in_next,
  input  logic              clear,
  output severity_t         level    [N_MON],
  output logic [N_MON-1:0]  warn,
  output logic [N_MON-1:0]  failsafe,
  output logic              any_failsafe
);

  logic [N_MON-1:0] flt_next;

  for (genvar m = 0; m < N_MON; m++) begin : g_mon
    readout_t flt_data;
    logic     flt_vld;
    logic     fs_next;

    filter #(.MATCH(MON_ADDR[m])) u_filter (
      .in_data(in_data[MON_INTF[m]]), .in_vld(in_vld[MON_INTF[m]]),
      .in_next(flt_next[m]),
      .out_data(flt_data), .out_vld(flt_vld), .out_next(fs_next)
    );

    failsafe_monitor #(.WARN_TH(WARN_TH[m]), .CRIT_TH(CRIT_TH[m])) u_fs (
      .clk, .rst_n,
      .in_data(flt_data), .in_vld(flt_vld), .in_next(fs_next),
      .clear, .level(level[m]), .warn(warn[m]), .failsafe(failsafe[m])
    );
  end

  // A stream waits only if one of its channels' filters waits.
  always_comb begin
    in_next = '0;
    for (int m = 0; m < N_MON; m++) begin
      in_next[MON_INTF[m]] = in_next[MON_INTF[m]] | flt_next[m];
    end
  end

  assign any_failsafe = |failsafe;

endmodule
