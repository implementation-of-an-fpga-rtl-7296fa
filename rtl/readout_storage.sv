// readout_storage: on-chip RAM that keeps the last complete package and its
// scoreboard for another process (e.g. a bus master forwarding the data to
// a logging database).
//
// The RAM holds two banks of DEPTH package words. During an update cycle
// incoming package words are written one after the other into the fill
// bank. At upd the banks swap: the bank just filled becomes the read bank,
// its word count is published in rd_count, and filling restarts at word 0
// of the other bank. Words beyond DEPTH in one cycle are dropped and set
// rd_overflow for that bank. The scoreboard word that the tracking logic
// sends just after upd describes the bank just published and is latched
// into rd_score; rd_score_vld rises then. Both inputs are always accepted.
// The read port is synchronous: rd_data shows word rd_addr of the read
// bank one cycle after rd_addr is applied.
//
// Keeping package and scoreboard in an SRAM, updated once per update cycle
// and read by another process, follows the original design; double banking, the
// depth and the read port are this design's choices.
module readout_storage
  import ssdr_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned N_INTF = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               upd,
  // final package
  input  pkg_word_t          pkg_data,
  input  logic               pkg_vld,
  output logic               pkg_next,
  // scoreboard
  input  logic [N_INTF-1:0]  score_data,
  input  logic               score_vld,
  output logic               score_next,
  // read side
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output pkg_word_t          rd_data,
  output logic [$clog2(DEPTH):0]   rd_count,
  output logic               rd_overflow,
  output logic [N_INTF-1:0]  rd_score,
  output logic               rd_score_vld,
  output logic               published     // pulses when a bank is published
);

  localparam int unsigned AW = $clog2(DEPTH);

  pkg_word_t     mem [2*DEPTH];
  logic          fill_bank;
  logic [AW:0]   wptr;
  logic          ovf;
  logic [AW:0]   wr_index;
  logic          wr_en;

  assign pkg_next   = 1'b0;
  assign score_next = 1'b0;

  // A word that arrives together with upd opens the new bank.
  always_comb begin
    wr_index = upd ? '0 : wptr;
    wr_en    = pkg_vld && (32'(wr_index) < DEPTH);
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[{upd ? !fill_bank : fill_bank, wr_index[AW-1:0]}] <= pkg_data;
    end
    rd_data <= mem[{!fill_bank, rd_addr}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_bank    <= 1'b0;
      wptr         <= '0;
      ovf          <= 1'b0;
      rd_count     <= '0;
      rd_overflow  <= 1'b0;
      rd_score     <= '0;
      rd_score_vld <= 1'b0;
      published    <= 1'b0;
    end else begin
      published <= upd;
      if (upd) begin
        fill_bank    <= !fill_bank;
        rd_count     <= wptr;
        rd_overflow  <= ovf;
        rd_score_vld <= 1'b0;
      end
      if (pkg_vld) begin
        if (wr_en) begin
          wptr <= wr_index + 1'b1;
          ovf  <= upd ? 1'b0 : ovf;
        end else begin
          wptr <= wr_index;
          ovf  <= 1'b1;
        end
      end else if (upd) begin
        wptr <= '0;
        ovf  <= 1'b0;
      end
      if (score_vld) begin
        rd_score     <= score_data;
        rd_score_vld <= 1'b1;
      end
    end
  end

endmodule
