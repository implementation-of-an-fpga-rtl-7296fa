// tb_self_monitoring: two monitor channels on two readout streams.
// Channel 0 watches label 0x01 of interface 0 (warn 1000, critical 2000),
// channel 1 label 0x03 of interface 1 (warn 50, critical 60). Random
// readouts with random labels are sent on both streams; after each, every
// channel's level, warn and failsafe must match a reference that only
// looks at that channel's label, and the streams must never be stalled.
module tb_self_monitoring;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned MI [2] = '{0, 1};
  localparam addr_t       MA [2] = '{8'h01, 8'h03};
  localparam data_t       WT [2] = '{32'd1000, 32'd50};
  localparam data_t       CT [2] = '{32'd2000, 32'd60};

  readout_t   in_data [2];
  logic [1:0] in_vld, in_next;
  logic       clear, any_failsafe;
  severity_t  level [2];
  logic [1:0] warn, failsafe;

  self_monitoring #(.N_INTF(2), .N_MON(2), .MON_INTF(MI), .MON_ADDR(MA),
                    .WARN_TH(WT), .CRIT_TH(CT)) dut (.*);

  initial begin
    severity_t exp_lvl [2];
    logic      exp_fs [2];
    int        n_hits [2];
    for (int m = 0; m < 2; m++) begin exp_lvl[m] = SEV_OK; exp_fs[m] = 0; n_hits[m] = 0; end
    in_vld = 0; clear = 0; in_data[0] = '0; in_data[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      for (int s = 0; s < 2; s++) begin
        in_data[s].addr = 8'($urandom_range(0, 4));
        in_data[s].data = (s == 0) ? $urandom_range(0, 2500) : $urandom_range(0, 70);
        in_vld[s] = 1'($urandom);
      end
      clear = (i % 50 == 49);
      @(negedge clk);
      for (int m = 0; m < 2; m++) begin
        readout_t r;
        logic crit;
        r = in_data[MI[m]];
        crit = 0;
        if (in_vld[MI[m]] && r.addr == MA[m]) begin
          n_hits[m]++;
          exp_lvl[m] = r.data >= CT[m] ? SEV_CRIT : r.data >= WT[m] ? SEV_WARN : SEV_OK;
          crit = (exp_lvl[m] == SEV_CRIT);
        end
        if (crit) exp_fs[m] = 1; else if (clear) exp_fs[m] = 0;
        checks++;
        if (level[m] != exp_lvl[m] || warn[m] != (exp_lvl[m] != SEV_OK) || failsafe[m] != exp_fs[m]) begin
          failures++;
          $display("step %0d channel %0d: %s/%b/%b expected %s/%b", i, m, level[m].name(), warn[m],
                   failsafe[m], exp_lvl[m].name(), exp_fs[m]);
        end
      end
      checks++;
      if (in_next != 2'b00 || any_failsafe != (exp_fs[0] || exp_fs[1])) begin
        failures++; $display("stall or any_failsafe wrong");
      end
      in_vld = 0; clear = 0;
    end
    checks++;
    if (n_hits[0] == 0 || n_hits[1] == 0) failures++;
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
