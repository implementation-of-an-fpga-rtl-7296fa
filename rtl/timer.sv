// timer: produces `upd`, the one-clock-cycle pulse that starts every update
// cycle of the diagnostic reader.
//
// Two sources are supported. With use_ext=0 a free-running counter pulses
// upd once every `period` clock cycles; `period` is an input so the update
// interval can be changed while running (a new value takes effect when the
// running interval ends, values below 1 count as 1). With use_ext=1 upd is
// the rising edge of ext_evt, an external (machine timing) event, delayed
// by one register. The same module, given a short period, serves as the
// local timer (loc_timer) that triggers the fast request sequence used for
// self-monitoring.
//
// The one-cycle trigger and the external timing event follow the original design;
// the counter, the edge detector and the widths are this design's choices.
module timer #(
  parameter int unsigned PERIOD_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PERIOD_W-1:0] period,   // update interval in clock cycles
  input  logic                use_ext,  // 1: follow ext_evt instead
  input  logic                ext_evt,  // external timing event (level)
  output logic                upd       // one-cycle trigger
);

  logic [PERIOD_W-1:0] cnt;
  logic                evt_q;
  logic                cnt_hit;

  assign cnt_hit = (cnt + 1'b1 >= period);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      evt_q <= 1'b0;
      upd   <= 1'b0;
    end else begin
      evt_q <= ext_evt;
      if (use_ext) begin
        cnt <= '0;
        upd <= ext_evt && !evt_q;
      end else if (cnt_hit) begin
        cnt <= '0;
        upd <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        upd <= 1'b0;
      end
    end
  end

endmodule
