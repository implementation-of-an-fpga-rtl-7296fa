// ssdr_top: System Survey and Diagnostic Reader.
//
// The reader collects diagnostic readouts from N_INTF external chips or
// sensors once per update cycle, packs them into one package per cycle
// for logging, records which interfaces delivered, and checks selected
// readouts on-chip against thresholds to trigger a failsafe reaction.
//
// Structure (every arrow is a CMI vld/next link):
//   timer --upd--> every block that works per update cycle
//   per interface i:
//     sequence_generator --rd_req--> [diagnostic interface, outside]
//     [diagnostic interface] --readout--> cmi_interconnect fork
//        fork.0 --> storing_packaging(i) --> combining_tracking input i
//        fork.1 --> self_monitoring (tap)
//   combining_tracking --package, scoreboard--> readout_storage
// The diagnostic interfaces are chip-specific protocol controllers; their
// rd_req and readout CMI ports are ports of this module.
//
// Latency: the requests sent at the upd that opens cycle k are answered
// during k, stored at the upd opening k+1, packed during k+1 and
// published in readout_storage (with the scoreboard of cycle k+1) at the
// upd opening k+2 - two update cycles after the request. An interface
// whose readouts take longer than a cycle is stored every other cycle,
// and the scoreboard shows its bit only in the cycles it delivered.
//
// Interface i has its own label list REQ_ADDR[i] with SLICES[i] data
// words per label (every interface reads N_REQ labels); interfaces named
// in MON_INTF also run the fast list FAST_SEQ every LOC_PERIOD cycles for
// the self-monitoring. The update interval is the
// run-time input upd_period (or an external event with use_ext=1). All
// these values are this design's example configuration.
//
// readout_next is always low: storing/packaging and self-monitoring never
// refuse a readout, so the reader never pushes back on a diagnostic
// interface (a readout that cannot be kept is dropped instead, as the
// first-occurrence rule requires). The port is kept for CMI compliance.
module ssdr_top
  import ssdr_pkg::*;
#(
  parameter int unsigned N_INTF     = 2,
  parameter int unsigned N_REQ      = 4,
  parameter addr_t       REQ_ADDR [N_INTF][N_REQ] = '{'{8'h00, 8'h01, 8'h02, 8'h03},
                                                   '{8'h10, 8'h11, 8'h12, 8'h13}},
  parameter int unsigned SLICES   [N_INTF][N_REQ] = '{'{2, 2, 1, 1}, '{1, 1, 1, 2}},
  parameter int unsigned N_FAST     = 1,
  parameter addr_t       FAST_SEQ [N_FAST] = '{8'h01},
  parameter int unsigned LOC_PERIOD = 100,
  parameter int unsigned N_MON      = 1,
  parameter int unsigned MON_INTF [N_MON] = '{0},
  parameter addr_t       MON_ADDR [N_MON] = '{8'h01},
  parameter data_t       WARN_TH  [N_MON] = '{32'd1000},
  parameter data_t       CRIT_TH  [N_MON] = '{32'd2000},
  parameter int unsigned DEPTH      = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // timer
  input  logic [31:0]       upd_period,
  input  logic              use_ext,
  input  logic              ext_evt,
  output logic              upd,
  // read requests to the diagnostic interfaces
  output addr_t             rd_req_data [N_INTF],
  output logic [N_INTF-1:0] rd_req_vld,
  input  logic [N_INTF-1:0] rd_req_next,
  output logic [N_INTF-1:0] seq_busy,
  output logic [N_REQ-1:0]  intf_got [N_INTF],  // readouts present per label
  // readouts from the diagnostic interfaces
  input  readout_t          readout_data [N_INTF],
  input  logic [N_INTF-1:0] readout_vld,
  output logic [N_INTF-1:0] readout_next,
  // self-monitoring
  input  logic              mon_clear,
  output severity_t         mon_level [N_MON],
  output logic [N_MON-1:0]  mon_warn,
  output logic [N_MON-1:0]  mon_failsafe,
  output logic              any_failsafe,
  // readout storage read port
  input  logic [$clog2(DEPTH)-1:0] st_rd_addr,
  output pkg_word_t         st_rd_data,
  output logic [$clog2(DEPTH):0]   st_rd_count,
  output logic              st_rd_overflow,
  output logic [N_INTF-1:0] st_rd_score,
  output logic              st_rd_score_vld,
  output logic              st_published,
  output logic              score_lost
);

  function automatic bit monitored(int unsigned i);
    for (int m = 0; m < N_MON; m++) begin
      if (MON_INTF[m] == i) return 1'b1;
    end
    return 1'b0;
  endfunction

  // One interface's row of the label and slice tables.
  typedef addr_t       addr_row_t  [N_REQ];
  typedef int unsigned slice_row_t [N_REQ];

  function automatic addr_row_t addr_row(int unsigned i);
    addr_row_t r;
    for (int k = 0; k < N_REQ; k++) r[k] = REQ_ADDR[i][k];
    return r;
  endfunction

  function automatic slice_row_t slice_row(int unsigned i);
    slice_row_t r;
    for (int k = 0; k < N_REQ; k++) r[k] = SLICES[i][k];
    return r;
  endfunction

  readout_t          tap_data [N_INTF];
  logic [N_INTF-1:0] sp_vld, sp_next;
  logic [N_INTF-1:0] tap_vld, tap_next;
  pkg_word_t         ip_data  [N_INTF];
  logic [N_INTF-1:0] ip_vld, ip_next;

  pkg_word_t         pkg_data;
  logic              pkg_vld, pkg_next;
  logic [N_INTF-1:0] score_data;
  logic              score_vld, score_next;

  timer #(.PERIOD_W(32)) u_timer (
    .clk, .rst_n, .period(upd_period), .use_ext, .ext_evt, .upd
  );

  for (genvar i = 0; i < N_INTF; i++) begin : g_intf
    localparam addr_row_t  ROW_ADDR   = addr_row(i);
    localparam slice_row_t ROW_SLICES = slice_row(i);
    logic [1:0] fk_vld, fk_next;

    sequence_generator #(
      .N_REQ(N_REQ), .SEQ(ROW_ADDR),
      .HAS_FAST(monitored(i)), .N_FAST(N_FAST), .FAST_SEQ(FAST_SEQ),
      .LOC_PERIOD(LOC_PERIOD)
    ) u_seq (
      .clk, .rst_n, .upd, .busy(seq_busy[i]),
      .req_data(rd_req_data[i]), .req_vld(rd_req_vld[i]),
      .req_next(rd_req_next[i])
    );

    cmi_interconnect #(.W($bits(readout_t)), .N(2)) u_tap (
      .clk, .rst_n,
      .tx_data(readout_data[i]), .tx_vld(readout_vld[i]),
      .tx_next(readout_next[i]),
      .rx_data(tap_data[i]), .rx_vld(fk_vld), .rx_next(fk_next)
    );
    assign sp_vld[i]  = fk_vld[0];
    assign tap_vld[i] = fk_vld[1];
    assign fk_next    = {tap_next[i], sp_next[i]};

    storing_packaging #(
      .INTF(intf_t'(i)), .N_ITEM(N_REQ), .ITEM_ADDR(ROW_ADDR), .SLICES(ROW_SLICES)
    ) u_sp (
      .clk, .rst_n, .upd,
      .in_data(tap_data[i]), .in_vld(sp_vld[i]), .in_next(sp_next[i]),
      .out_data(ip_data[i]), .out_vld(ip_vld[i]), .out_next(ip_next[i]),
      .got(intf_got[i])
    );
  end

  self_monitoring #(
    .N_INTF(N_INTF), .N_MON(N_MON), .MON_INTF(MON_INTF), .MON_ADDR(MON_ADDR),
    .WARN_TH(WARN_TH), .CRIT_TH(CRIT_TH)
  ) u_mon (
    .clk, .rst_n,
    .in_data(tap_data), .in_vld(tap_vld), .in_next(tap_next),
    .clear(mon_clear), .level(mon_level), .warn(mon_warn),
    .failsafe(mon_failsafe), .any_failsafe
  );

  combining_tracking #(.N_INTF(N_INTF)) u_ct (
    .clk, .rst_n, .upd,
    .in_data(ip_data), .in_vld(ip_vld), .in_next(ip_next),
    .pkg_data, .pkg_vld, .pkg_next,
    .score_data, .score_vld, .score_next, .score_lost
  );

  readout_storage #(.DEPTH(DEPTH), .N_INTF(N_INTF)) u_store (
    .clk, .rst_n, .upd,
    .pkg_data, .pkg_vld, .pkg_next,
    .score_data, .score_vld, .score_next,
    .rd_addr(st_rd_addr), .rd_data(st_rd_data), .rd_count(st_rd_count),
    .rd_overflow(st_rd_overflow), .rd_score(st_rd_score),
    .rd_score_vld(st_rd_score_vld), .published(st_published)
  );

endmodule
