// cmi_interconnect: connects one CMI transmitter to N receivers.
//
// The data bus is shared by all receivers; each receiver has its own
// rx_vld/rx_next pair. A word is offered to every receiver at once. A
// receiver that takes it (rx_vld=1, rx_next=0) is marked done and sees no
// rx_vld for that word again; the transmitter is held (tx_next=1) until the
// last receiver has taken it, so a slow receiver stalls the transmitter but
// never makes a fast receiver see the same word twice. When all receivers
// take the word in the same cycle the link runs at one word per cycle with
// no added latency: the block has no data register, only N "done" bits.
//
// The one-transmitter, many-receivers structure and the per-receiver
// vld/next pair follow the original design; the "done" bookkeeping is this design's
// way of doing it. The assertion states the CMI rule that a stalled
// transmitter holds its word.
module cmi_interconnect #(
  parameter int unsigned W = 8,   // data width
  parameter int unsigned N = 2    // number of receivers
) (
  input  logic         clk,
  input  logic         rst_n,
  // transmitter side
  input  logic [W-1:0] tx_data,
  input  logic         tx_vld,
  output logic         tx_next,
  // receiver side
  output logic [W-1:0] rx_data,
  output logic [N-1:0] rx_vld,
  input  logic [N-1:0] rx_next
);

  logic [N-1:0] done;
  logic [N-1:0] take;
  logic         all_taken;

  always_comb begin
    rx_data   = tx_data;
    rx_vld    = {N{tx_vld}} & ~done;
    take      = rx_vld & ~rx_next;
    all_taken = &(done | take);
    tx_next   = tx_vld & ~all_taken;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= '0;
    end else if (tx_vld && !all_taken) begin
      done <= done | take;
    end else begin
      done <= '0;
    end
  end

  // CMI rule: a transmitter told to wait keeps its word.
  logic         was_stalled;
  logic [W-1:0] stalled_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      was_stalled  <= 1'b0;
      stalled_data <= '0;
    end else begin
      was_stalled  <= tx_vld && tx_next;
      stalled_data <= tx_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && was_stalled) begin
      a_tx_hold : assert (tx_vld && tx_data == stalled_data)
        else $error("CMI transmitter dropped or changed a stalled word");
    end
  end

endmodule
