// tb_failsafe_monitor: checks threshold comparison and the two actions.
// Monitor "hi" alarms at or above its thresholds (500 warn, 900 critical),
// monitor "lo" at or below them (100 warn, 20 critical). For random values
// `level` and `warn` must match the reference one cycle after the readout,
// and `failsafe` must set on the first critical value and stay set until
// `clear`.
module tb_failsafe_monitor;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  readout_t  in_data;
  logic      in_vld, clear;
  logic      hi_next, lo_next;
  severity_t hi_level, lo_level;
  logic      hi_warn, lo_warn, hi_fs, lo_fs;

  failsafe_monitor #(.WARN_TH(32'd500), .CRIT_TH(32'd900), .ABOVE(1'b1)) hi (
    .clk, .rst_n, .in_data, .in_vld, .in_next(hi_next), .clear,
    .level(hi_level), .warn(hi_warn), .failsafe(hi_fs));
  failsafe_monitor #(.WARN_TH(32'd100), .CRIT_TH(32'd20), .ABOVE(1'b0)) lo (
    .clk, .rst_n, .in_data, .in_vld, .in_next(lo_next), .clear,
    .level(lo_level), .warn(lo_warn), .failsafe(lo_fs));

  function automatic severity_t ref_hi(int unsigned v);
    return v >= 900 ? SEV_CRIT : v >= 500 ? SEV_WARN : SEV_OK;
  endfunction
  function automatic severity_t ref_lo(int unsigned v);
    return v <= 20 ? SEV_CRIT : v <= 100 ? SEV_WARN : SEV_OK;
  endfunction

  initial begin
    logic exp_hi_fs, exp_lo_fs;
    int unsigned v;
    int n_crit;
    in_vld = 0; clear = 0; in_data = '0;
    exp_hi_fs = 0; exp_lo_fs = 0; n_crit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      // mostly values near the thresholds
      v = $urandom_range(0, 1000);
      in_data = '{addr: 8'h01, data: v};
      in_vld = 1;
      clear = (i % 37 == 36);
      @(negedge clk);
      if (ref_hi(v) == SEV_CRIT) exp_hi_fs = 1; else if (clear) exp_hi_fs = 0;
      if (ref_lo(v) == SEV_CRIT) exp_lo_fs = 1; else if (clear) exp_lo_fs = 0;
      if (ref_hi(v) == SEV_CRIT) n_crit++;
      checks++;
      if (hi_level != ref_hi(v) || hi_warn != (ref_hi(v) != SEV_OK) || hi_fs != exp_hi_fs ||
          lo_level != ref_lo(v) || lo_warn != (ref_lo(v) != SEV_OK) || lo_fs != exp_lo_fs ||
          hi_next || lo_next) begin
        failures++;
        $display("value %0d: hi %s/%b/%b lo %s/%b/%b", v, hi_level.name(), hi_warn, hi_fs,
                 lo_level.name(), lo_warn, lo_fs);
      end
      in_vld = 0; clear = 0;
      if (i % 5 == 0) begin
        // without a readout nothing changes
        @(negedge clk);
        checks++;
        if (hi_level != ref_hi(v) || hi_fs != exp_hi_fs) begin failures++; $display("changed without readout"); end
      end
    end
    checks++;
    if (n_crit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
