// tb_ssdr_top: end-to-end run of the diagnostic reader at its default
// configuration (two interfaces: labels 0..3 with 2, 2, 1, 1 data words
// and labels 0x10..0x13 with 1, 1, 1, 2 data words,
// label 1 of interface 0 monitored with thresholds 1000 / 2000 and
// re-requested by the fast list every 100 cycles, 256-word storage).
//
// Both diagnostic interfaces are behavioural models (diag_if_model). The
// model of interface 0 answers in 3 cycles; that of interface 1 needs 100
// cycles per request, so its list of four requests outlasts the 300-cycle
// update cycle. A readout carries the number of the update cycle in which
// it was delivered (epoch) and its label, so the testbench can tell from
// a published package when its data was read.
//
// After every publication the testbench reads the whole bank back and
// checks: package framing and order (interface 0 labels 0..3, then
// interface 1 labels 0x10..0x13 when present); values (interface 0 data from
// exactly two update cycles before publication - the reader's latency -,
// interface 1 data from two or three cycles before); the scoreboard word
// against the interfaces present. It also checks the monitor: label 1 of
// interface 0 rises by 256 per update cycle, so the level must go from OK
// to WARN to CRIT and the failsafe output must latch, clear on request,
// and latch again. The last part switches the timer to external events.
// Each mechanism must occur at least once: request stall, upd ignored by a
// busy sequence, missing package in the scoreboard, repeated readout
// dropped, fast request, competing interface packages, warning, failsafe,
// failsafe clear, external-event update.
module tb_ssdr_top;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NI = 2;
  localparam int PERIOD = 300;
  localparam int unsigned SL  [NI][4] = '{'{2, 2, 1, 1}, '{1, 1, 1, 2}};
  localparam addr_t       LBL [NI][4] = '{'{8'h00, 8'h01, 8'h02, 8'h03},
                                          '{8'h10, 8'h11, 8'h12, 8'h13}};

  logic [31:0]   upd_period;
  logic          use_ext, ext_evt, upd;
  addr_t         rd_req_data [NI];
  logic [NI-1:0] rd_req_vld, rd_req_next, seq_busy;
  logic [3:0]    intf_got [NI];
  readout_t      readout_data [NI];
  logic [NI-1:0] readout_vld, readout_next;
  logic          mon_clear, any_failsafe;
  severity_t     mon_level [1];
  logic [0:0]    mon_warn, mon_failsafe;
  logic [7:0]    st_rd_addr;
  pkg_word_t     st_rd_data;
  logic [8:0]    st_rd_count;
  logic          st_rd_overflow, st_rd_score_vld, st_published, score_lost;
  logic [NI-1:0] st_rd_score;

  ssdr_top dut (.*);

  // ---------------- diagnostic interface models ----------------
  int          n_upd = 0;
  logic [15:0] epoch;
  int          reads [NI];
  assign epoch = 16'(n_upd + int'(upd));

  for (genvar i = 0; i < NI; i++) begin : g_model
    diag_if_model #(.INTF(i)) u_model (
      .clk, .rst_n, .lat(i == 0 ? 3 : 100), .epoch,
      .req_data(rd_req_data[i]), .req_vld(rd_req_vld[i]), .req_next(rd_req_next[i]),
      .readout_data(readout_data[i]), .readout_vld(readout_vld[i]),
      .readout_next(readout_next[i]), .reads(reads[i]));
  end

  // ---------------- mechanism counters ----------------
  int n_req_stall = 0, n_upd_ignored = 0, n_missing = 0, n_dup = 0, n_fast = 0;
  int n_compete = 0, n_warn = 0, n_fs = 0, n_clear = 0, n_ext = 0, n_main_l1 = 0;
  int l1_this_cycle = 0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (upd) n_upd <= n_upd + 1;
      if (|(rd_req_vld & rd_req_next)) n_req_stall <= n_req_stall + 1;
      if (upd && seq_busy[1]) n_upd_ignored <= n_upd_ignored + 1;
      if (&dut.ip_vld) n_compete <= n_compete + 1;
      if (mon_level[0] == SEV_WARN) n_warn <= n_warn + 1;
      if (rd_req_vld[0] && !rd_req_next[0] && rd_req_data[0] == 8'h01) begin
        if (dut.g_intf[0].u_seq.g_fast.fast_vld && !dut.g_intf[0].u_seq.g_fast.fast_next)
          n_fast <= n_fast + 1;
        else
          n_main_l1 <= n_main_l1 + 1;
      end
      // second readout of label 1 in one cycle is dropped by the storage
      if (upd) l1_this_cycle <= 0;
      else if (readout_vld[0] && !readout_next[0] && readout_data[0].addr == 8'h01) begin
        if (l1_this_cycle > 0) n_dup <= n_dup + 1;
        l1_this_cycle <= l1_this_cycle + 1;
      end
    end
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL at upd %0d: %s", n_upd, what); end
  endtask

  // Read back one published bank and check it. The first bank (third upd)
  // is skipped: it may hold a fast-list readout taken before the first upd.
  int prev_intf1 = 0;
  bit counter_mode = 1;
  task automatic check_bank();
    int p, n, w, k;
    logic [NI-1:0] present;
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
    check("no overflow", !st_rd_overflow);
    present = '0;
    w = 0;
    for (int i = 0; i < NI; i++) begin
      if (w < n && words[w].hdr && int'(header_intf(words[w].payload)) == i) begin
        present[i] = 1'b1;
        for (k = 0; k < 4; k++) begin
          data_t v;
          int    ep;
          check("header", w < n && words[w].hdr && header_intf(words[w].payload) == intf_t'(i)
                          && header_addr(words[w].payload) == LBL[i][k]);
          w++;
          v = '0;
          for (int s = 0; s < int'(SL[i][k]); s++) begin
            check("data word", w < n && !words[w].hdr);
            v = (v << 16) | data_t'(words[w].payload);
            w++;
          end
          check("label in value", v[7:0] == LBL[i][k]);
          if (SL[i][k] == 2) check("interface in value", v[31:24] == 8'(i));
          ep = int'(v[23:8]);
          if (i == 0) check($sformatf("interface 0 label %0d epoch %0d at publication %0d", k, ep, p), ep == p - 2);
          else check($sformatf("interface 1 epoch %0d at publication %0d", ep, p), ep == p - 2 || ep == p - 3);
        end
      end
    end
    check("whole bank parsed", w == n);
    check("scoreboard matches bank", st_rd_score == present);
    if (p >= 3) begin
      check("interface 0 every cycle", present[0]);
      if (!present[1]) n_missing++;
      // with 300-cycle update cycles the slow interface fits every other one
      if (counter_mode) check("interface 1 not twice in a row", !(present[1] && prev_intf1 == 1));
      prev_intf1 = int'(present[1]);
    end
  endtask

  initial begin
    int fs_cycles;
    upd_period = PERIOD; use_ext = 0; ext_evt = 0; mon_clear = 0; st_rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 14; c++) begin
      wait (st_published);
      @(negedge clk);
      if (n_upd >= 4) check_bank();
      // monitor: label 1 of interface 0 is epoch*256+1 in this cycle
      repeat (150) @(negedge clk);
      if (n_upd <= 3) check("level OK", mon_level[0] == SEV_OK && !mon_failsafe[0]);
      if (n_upd >= 5 && n_upd <= 7) check("level WARN", mon_level[0] == SEV_WARN && mon_warn[0]);
      if (n_upd >= 8) check("level CRIT, failsafe", mon_level[0] == SEV_CRIT && mon_failsafe[0] && any_failsafe);
      if (mon_failsafe[0]) n_fs++;
      if (n_upd == 10) begin
        // clear: released until the next critical readout comes in
        mon_clear = 1;
        @(negedge clk);
        mon_clear = 0;
        check("failsafe cleared", !mon_failsafe[0]);
        n_clear++;
        fs_cycles = 0;
        while (!mon_failsafe[0] && fs_cycles < 200) begin @(negedge clk); fs_cycles++; end
        check("failsafe latched again", mon_failsafe[0]);
      end
    end
    // external timing events replace the counter
    use_ext = 1;
    counter_mode = 0;
    for (int e = 0; e < 4; e++) begin
      int n_before;
      n_before = n_upd;
      repeat (200) @(negedge clk);
      check("no upd without event", n_upd == n_before);
      ext_evt = 1;
      repeat (3) @(negedge clk);
      ext_evt = 0;
      check("one upd per event", n_upd == n_before + 1);
      n_ext++;
      @(negedge clk);
      if (e >= 1) check_bank();
    end
    // every mechanism must have happened
    check($sformatf("request stalls %0d", n_req_stall), n_req_stall > 0);
    check($sformatf("upd ignored %0d", n_upd_ignored), n_upd_ignored > 0);
    check($sformatf("missing packages %0d", n_missing), n_missing > 0);
    check($sformatf("dropped repeats %0d", n_dup), n_dup > 0);
    check($sformatf("fast requests %0d vs main %0d", n_fast, n_main_l1), n_fast > n_main_l1);
    check($sformatf("competing packages %0d", n_compete), n_compete > 0);
    check($sformatf("warnings %0d", n_warn), n_warn > 0);
    check($sformatf("failsafe %0d", n_fs), n_fs > 0);
    check($sformatf("clears %0d", n_clear), n_clear > 0);
    check($sformatf("external updates %0d", n_ext), n_ext > 0);
    check("no scoreboard result lost", !score_lost);
    $display("mechanisms: stall=%0d upd_ignored=%0d missing=%0d dropped_repeat=%0d fast=%0d compete=%0d warn=%0d failsafe=%0d clear=%0d ext=%0d",
             n_req_stall, n_upd_ignored, n_missing, n_dup, n_fast, n_compete, n_warn, n_fs, n_clear, n_ext);
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
