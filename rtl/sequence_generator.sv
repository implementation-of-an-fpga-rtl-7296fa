// sequence_generator: the Sequence Generator sub-function of one
// diagnostic interface.
//
// A main seq_generator sends the interface's full request list SEQ at each
// upd. With HAS_FAST=1 a second seq_generator sends the short list
// FAST_SEQ - the readouts the self-monitoring needs more often - each time
// a local timer (a timer instance with period LOC_PERIOD) fires, and a
// priority_mux merges both request streams; the fast list has priority
// (mux input 0). With HAS_FAST=0 the main seq_generator drives the output
// directly. `busy` is high while the main list is running.
//
// The two generators, loc_timer and priority_mux follow the original design; the
// priority order and the lists are this design's choices.
module sequence_generator
  import ssdr_pkg::*;
#(
  parameter int unsigned N_REQ      = 4,
  parameter addr_t       SEQ [N_REQ] = '{8'h00, 8'h01, 8'h02, 8'h03},
  parameter bit          HAS_FAST   = 1'b1,
  parameter int unsigned N_FAST     = 1,
  parameter addr_t       FAST_SEQ [N_FAST] = '{8'h01},
  parameter int unsigned LOC_PERIOD = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  upd,
  output logic  busy,
  output addr_t req_data,
  output logic  req_vld,
  input  logic  req_next
);

  addr_t main_data;
  logic  main_vld, main_next;

  seq_generator #(.N_REQ(N_REQ), .SEQ(SEQ)) u_main (
    .clk, .rst_n, .start(upd), .busy,
    .req_data(main_data), .req_vld(main_vld), .req_next(main_next)
  );

  if (HAS_FAST) begin : g_fast
    logic       loc_upd;
    logic       fast_busy;
    addr_t      fast_data;
    logic       fast_vld, fast_next;
    logic [ADDR_W-1:0] mux_in [2];
    logic [1:0] mux_next;

    timer #(.PERIOD_W(32)) u_loc_timer (
      .clk, .rst_n, .period(32'(LOC_PERIOD)), .use_ext(1'b0), .ext_evt(1'b0),
      .upd(loc_upd)
    );

    seq_generator #(.N_REQ(N_FAST), .SEQ(FAST_SEQ)) u_fast (
      .clk, .rst_n, .start(loc_upd), .busy(fast_busy),
      .req_data(fast_data), .req_vld(fast_vld), .req_next(fast_next)
    );

    assign mux_in[0] = fast_data;
    assign mux_in[1] = main_data;
    assign fast_next = mux_next[0];
    assign main_next = mux_next[1];

    priority_mux #(.W(ADDR_W), .N(2), .PACKET(1'b0)) u_mux (
      .clk, .rst_n,
      .in_data(mux_in), .in_vld({main_vld, fast_vld}), .in_next(mux_next),
      .out_data(req_data), .out_vld(req_vld), .out_next(req_next)
    );
  end else begin : g_main_only
    assign req_data  = main_data;
    assign req_vld   = main_vld;
    assign main_next = req_next;
  end

endmodule
