// seq_generator: issues a fixed list of read requests to one diagnostic
// interface each time it is triggered.
//
// The list is a look-up table, the parameter SEQ of N_REQ labels. A pulse
// on `start` (upd, or the local timer) begins a run: the labels are offered
// one after the other on the CMI output, each held until the diagnostic
// interface takes it. While a run is in progress `busy` is high and further
// start pulses are ignored, so every run is complete even when it lasts
// longer than an update cycle; such an interface is then read only every
// other cycle. The first request is offered in the cycle after `start`.
//
// Running a stored list, ignoring triggers while busy and finishing only
// when every request has been accepted follow the original design; the labels in
// SEQ are this design's example.
module seq_generator
  import ssdr_pkg::*;
#(
  parameter int unsigned N_REQ = 4,
  parameter addr_t       SEQ [N_REQ] = '{8'h00, 8'h01, 8'h02, 8'h03}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  // read-request CMI output
  output addr_t req_data,
  output logic  req_vld,
  input  logic  req_next
);

  localparam int unsigned IDX_W = (N_REQ > 1) ? $clog2(N_REQ) : 1;

  logic [IDX_W-1:0] idx;

  assign req_vld  = busy;
  assign req_data = SEQ[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        idx  <= '0;
      end
    end else if (!req_next) begin
      if (32'(idx) == N_REQ - 1) begin
        busy <= 1'b0;
        idx  <= '0;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

endmodule
