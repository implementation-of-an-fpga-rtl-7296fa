// storing_packaging: the per-interface Storing and Packaging sub-function.
//
// The readout stream of one diagnostic interface is offered through a CMI
// fork to N_ITEM filters, one per kind of readout (label ITEM_ADDR[i]).
// Each filter feeds a delayed_storage; the storages share one `all_got`,
// the AND of their `got` outputs, so at a upd they store together or not
// at all. Each stored readout goes to a slice_and_tag, which makes it a
// package of a header and SLICES[i] data words, and a package-mode
// priority_mux puts the packages of the interface one after the other on
// the output. The input never stalls: filters drop foreign labels and
// storages always take their input.
//
// Timing: readouts of update cycle k are stored at the upd that opens
// cycle k+1 and sent as packages in the first cycles of k+1, item 0
// first; N_ITEM items of S slices take about N_ITEM*(S+2) cycles.
//
// The chain filter, delayed_storage, slice_and_tag, priority_mux follows
// the design; the label list and slice counts are this design's example.
module storing_packaging
  import ssdr_pkg::*;
#(
  parameter intf_t       INTF   = 4'd0,
  parameter int unsigned N_ITEM = 4,
  parameter addr_t       ITEM_ADDR [N_ITEM] = '{8'h00, 8'h01, 8'h02, 8'h03},
  parameter int unsigned SLICES    [N_ITEM] = '{2, 2, 1, 1}
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      upd,
  // readout stream from the diagnostic interface
  input  readout_t  in_data,
  input  logic      in_vld,
  output logic      in_next,
  // interface package stream
  output pkg_word_t out_data,
  output logic      out_vld,
  input  logic      out_next,
  // 1 for each item whose readout of this cycle has arrived
  output logic [N_ITEM-1:0] got
);

  readout_t          fork_data;
  logic [N_ITEM-1:0] fork_vld, fork_next;
  logic              all_got;

  readout_t          flt_data [N_ITEM];
  logic [N_ITEM-1:0] flt_vld, flt_next;
  readout_t          st_data  [N_ITEM];
  logic [N_ITEM-1:0] st_vld, st_next;
  logic [PKG_W-1:0]  pk_data  [N_ITEM];
  logic [N_ITEM-1:0] pk_vld, pk_next;
  logic [PKG_W-1:0]  mux_data;

  assign all_got = &got;

  cmi_interconnect #(.W($bits(readout_t)), .N(N_ITEM)) u_fork (
    .clk, .rst_n,
    .tx_data(in_data), .tx_vld(in_vld), .tx_next(in_next),
    .rx_data(fork_data), .rx_vld(fork_vld), .rx_next(fork_next)
  );

  for (genvar i = 0; i < N_ITEM; i++) begin : g_item
    pkg_word_t pk_word;

    filter #(.MATCH(ITEM_ADDR[i])) u_filter (
      .in_data(fork_data), .in_vld(fork_vld[i]), .in_next(fork_next[i]),
      .out_data(flt_data[i]), .out_vld(flt_vld[i]), .out_next(flt_next[i])
    );

    delayed_storage u_store (
      .clk, .rst_n, .upd, .all_got, .got(got[i]),
      .in_data(flt_data[i]), .in_vld(flt_vld[i]), .in_next(flt_next[i]),
      .out_data(st_data[i]), .out_vld(st_vld[i]), .out_next(st_next[i])
    );

    slice_and_tag #(.INTF(INTF), .N_SLICE(SLICES[i])) u_tag (
      .clk, .rst_n,
      .in_data(st_data[i]), .in_vld(st_vld[i]), .in_next(st_next[i]),
      .out_data(pk_word), .out_vld(pk_vld[i]), .out_next(pk_next[i])
    );
    assign pk_data[i] = pk_word;
  end

  priority_mux #(.W(PKG_W), .N(N_ITEM), .PACKET(1'b1)) u_mux (
    .clk, .rst_n,
    .in_data(pk_data), .in_vld(pk_vld), .in_next(pk_next),
    .out_data(mux_data), .out_vld(out_vld), .out_next(out_next)
  );
  assign out_data = mux_data;

endmodule
