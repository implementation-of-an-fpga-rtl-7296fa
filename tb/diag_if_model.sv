// diag_if_model: behavioural model of a diagnostic interface, for
// testbenches only.
//
// A real diagnostic interface runs the protocol of one external chip; this
// model stands in for it with the same CMI ports. It takes one read request
// at a time (req_next is high while it is busy), waits `lat` clock cycles,
// then offers the readout until taken. The value it returns is
//   data = INTF << 24 | epoch << 8 | label
// where `epoch` is a number the testbench supplies (the update cycle in
// which the readout is delivered). The value is formed from the current
// epoch in every cycle the readout is offered, so it names the cycle in
// which it is taken; it would change under a stall across an update, which
// the reader never causes (it never stalls readouts). `reads` counts
// delivered readouts.
module diag_if_model
  import ssdr_pkg::*;
#(
  parameter int unsigned INTF = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  int       lat,
  input  logic [15:0] epoch,
  input  addr_t    req_data,
  input  logic     req_vld,
  output logic     req_next,
  output readout_t readout_data,
  output logic     readout_vld,
  input  logic     readout_next,
  output int       reads
);

  logic  busy;
  addr_t label;
  int    wait_cnt;

  assign req_next = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      label        <= '0;
      wait_cnt     <= 0;
      readout_vld  <= 1'b0;
      reads        <= 0;
    end else if (!busy) begin
      if (req_vld) begin
        busy     <= 1'b1;
        label    <= req_data;
        wait_cnt <= lat;
      end
    end else if (readout_vld) begin
      if (!readout_next) begin
        readout_vld <= 1'b0;
        busy        <= 1'b0;
        reads       <= reads + 1;
      end
    end else if (wait_cnt > 1) begin
      wait_cnt <= wait_cnt - 1;
    end else begin
      readout_vld <= 1'b1;
    end
  end

  always_comb begin
    readout_data.addr = label;
    readout_data.data = (32'(INTF) << 24) | (32'(epoch) << 8) | 32'(label);
  end

endmodule
