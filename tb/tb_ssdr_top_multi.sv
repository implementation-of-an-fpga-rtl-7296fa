// tb_ssdr_top_multi: the reader in a larger configuration - three
// interfaces, all fast (3-cycle models) and all reading labels 0..3
// (interface 2 with 1, 2, 1, 2 data words), and two monitor channels: label 1
// of interface 0 (thresholds 1000 / 2000) and label 3 of interface 2
// (thresholds 1500 / 2500). Both monitored interfaces run the fast list
// {1, 3} every 64 cycles; interface 1 has no fast list.
//
// Checks, for every published bank after start-up: all three interfaces
// present, in order, with labels 0..3 and their slices; every value from
// exactly two update cycles before publication; scoreboard 111. For the
// monitors: the value of label k in cycle e is e*256 + k (interface 0) or
// 2<<24 | e*256 + k (interface 2, above every threshold from the start),
// so channel 1 must be critical from its first readout on, and channel 0
// must step OK, WARN, CRIT. Interface 1 must never see a fast request.
module tb_ssdr_top_multi;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NI = 3;
  localparam int unsigned SL  [NI][4] = '{'{2, 2, 1, 1}, '{2, 2, 1, 1}, '{1, 2, 1, 2}};
  localparam addr_t       LBL [NI][4] = '{'{8'h00, 8'h01, 8'h02, 8'h03},
                                          '{8'h00, 8'h01, 8'h02, 8'h03},
                                          '{8'h00, 8'h01, 8'h02, 8'h03}};
  localparam addr_t       FS [2] = '{8'h01, 8'h03};
  localparam int unsigned MI [2] = '{0, 2};
  localparam addr_t       MA [2] = '{8'h01, 8'h03};
  localparam data_t       WT [2] = '{32'd1000, 32'd1500};
  localparam data_t       CT [2] = '{32'd2000, 32'd2500};

  logic [31:0]   upd_period;
  logic          use_ext, ext_evt, upd;
  addr_t         rd_req_data [NI];
  logic [NI-1:0] rd_req_vld, rd_req_next, seq_busy;
  logic [3:0]    intf_got [NI];
  readout_t      readout_data [NI];
  logic [NI-1:0] readout_vld, readout_next;
  logic          mon_clear, any_failsafe;
  severity_t     mon_level [2];
  logic [1:0]    mon_warn, mon_failsafe;
  logic [7:0]    st_rd_addr;
  pkg_word_t     st_rd_data;
  logic [8:0]    st_rd_count;
  logic          st_rd_overflow, st_rd_score_vld, st_published, score_lost;
  logic [NI-1:0] st_rd_score;

  ssdr_top #(.N_INTF(NI), .REQ_ADDR(LBL), .SLICES(SL), .N_FAST(2), .FAST_SEQ(FS), .LOC_PERIOD(64), .N_MON(2),
             .MON_INTF(MI), .MON_ADDR(MA), .WARN_TH(WT), .CRIT_TH(CT)) dut (.*);

  int          n_upd = 0;
  logic [15:0] epoch;
  int          reads [NI];
  int          n_l3_intf1 = 0, n_l3_intf2 = 0;
  assign epoch = 16'(n_upd + int'(upd));

  for (genvar i = 0; i < NI; i++) begin : g_model
    diag_if_model #(.INTF(i)) u_model (
      .clk, .rst_n, .lat(3), .epoch,
      .req_data(rd_req_data[i]), .req_vld(rd_req_vld[i]), .req_next(rd_req_next[i]),
      .readout_data(readout_data[i]), .readout_vld(readout_vld[i]),
      .readout_next(readout_next[i]), .reads(reads[i]));
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (upd) n_upd <= n_upd + 1;
      if (rd_req_vld[1] && !rd_req_next[1] && rd_req_data[1] == 8'h03) n_l3_intf1 <= n_l3_intf1 + 1;
      if (rd_req_vld[2] && !rd_req_next[2] && rd_req_data[2] == 8'h03) n_l3_intf2 <= n_l3_intf2 + 1;
    end
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL at upd %0d: %s", n_upd, what); end
  endtask

  task automatic check_bank();
    int p, n, w;
    pkg_word_t words [$];
    p = n_upd;
    wait (st_rd_score_vld);
    @(negedge clk);
    n = int'(st_rd_count);
    for (int a = 0; a < n; a++) begin
      st_rd_addr = 8'(a);
      @(negedge clk);
      words.push_back(st_rd_data);
    end
    check($sformatf("bank size %0d", n), n == 10 + 10 + 10);
    check("scoreboard all present", st_rd_score == '1);
    w = 0;
    for (int i = 0; i < NI; i++) begin
      for (int k = 0; k < 4; k++) begin
        data_t v;
        check("header", w < n && words[w].hdr && header_intf(words[w].payload) == intf_t'(i)
                        && header_addr(words[w].payload) == addr_t'(k));
        w++;
        v = '0;
        for (int s = 0; s < int'(SL[i][k]); s++) begin
          check("data word", w < n && !words[w].hdr);
          if (w < n) v = (v << 16) | data_t'(words[w].payload);
          w++;
        end
        check($sformatf("interface %0d label %0d epoch %0d at publication %0d", i, k, v[23:8], p),
              v[7:0] == 8'(k) && int'(v[23:8]) == p - 2 && (SL[i][k] == 1 || v[31:24] == 8'(i)));
      end
    end
  endtask

  initial begin
    upd_period = 250; use_ext = 0; ext_evt = 0; mon_clear = 0; st_rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 12; c++) begin
      wait (st_published);
      @(negedge clk);
      if (n_upd >= 4) check_bank();
      repeat (120) @(negedge clk);
      if (n_upd >= 1) check("channel 1 critical", mon_level[1] == SEV_CRIT && mon_failsafe[1]);
      if (n_upd <= 3) check("channel 0 OK", mon_level[0] == SEV_OK && !mon_failsafe[0]);
      if (n_upd >= 5 && n_upd <= 7) check("channel 0 WARN", mon_level[0] == SEV_WARN && mon_warn[0] && !mon_failsafe[0]);
      if (n_upd >= 8) check("channel 0 CRIT", mon_level[0] == SEV_CRIT && mon_failsafe[0]);
      check("any_failsafe", any_failsafe == |mon_failsafe);
    end
    // label 3 is read once per cycle on interface 1, more often on interface 2
    check($sformatf("label 3 reads: interface 1 %0d, interface 2 %0d, upd %0d", n_l3_intf1, n_l3_intf2, n_upd),
          n_l3_intf1 == n_upd && n_l3_intf2 > 2 * n_upd);
    check("no scoreboard result lost", !score_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
