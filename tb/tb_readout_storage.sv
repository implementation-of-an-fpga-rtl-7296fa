// tb_readout_storage: checks the double-banked package RAM (DEPTH 8).
// Each update cycle the testbench writes a random number of package words
// (sometimes more than 8), then pulses upd and sends a scoreboard word.
// After the upd the published bank must hold exactly the words of the
// cycle just ended (up to 8), rd_count and rd_overflow must match, and
// rd_score must show the scoreboard word. The published bank is read back
// while the next cycle's words are being written into the other bank.
module tb_readout_storage;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 8;

  logic       upd;
  pkg_word_t  pkg_data, rd_data;
  logic       pkg_vld, pkg_next;
  logic [1:0] score_data, rd_score;
  logic       score_vld, score_next;
  logic [2:0] rd_addr;
  logic [3:0] rd_count;
  logic       rd_overflow, rd_score_vld, published;

  readout_storage #(.DEPTH(D), .N_INTF(2)) dut (.*);

  pkg_word_t prev [$], cur [$];
  int        n_ovf = 0;

  task automatic write_cycle(int n);
    cur.delete();
    for (int i = 0; i < n; i++) begin
      pkg_word_t w;
      w = pkg_word_t'($urandom);
      cur.push_back(w);
      pkg_data = w; pkg_vld = 1;
      @(negedge clk);
      pkg_vld = 0;
      // read back one word of the published bank in between
      if (prev.size() > 0) begin
        int a;
        a = $urandom_range(0, (prev.size() > D ? D : prev.size()) - 1);
        rd_addr = 3'(a);
        @(negedge clk);
        checks++;
        if (rd_data != prev[a]) begin failures++; $display("bank word %0d: %h expected %h", a, rd_data, prev[a]); end
      end
    end
  endtask

  initial begin
    logic [1:0] sc;
    upd = 0; pkg_vld = 0; pkg_data = '0; score_vld = 0; score_data = '0; rd_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (pkg_next || score_next) begin failures++; $display("storage stalls"); end
    for (int c = 0; c < 25; c++) begin
      write_cycle($urandom_range(0, 11));
      upd = 1;
      @(negedge clk);
      upd = 0;
      sc = 2'($urandom);
      score_data = sc; score_vld = 1;
      @(negedge clk);
      score_vld = 0;
      prev = cur;
      checks++;
      if (32'(rd_count) != (cur.size() > D ? D : cur.size()) || rd_overflow != (cur.size() > D)) begin
        failures++; $display("cycle %0d: count %0d ovf %b for %0d words", c, rd_count, rd_overflow, cur.size());
      end
      if (rd_overflow) n_ovf++;
      checks++;
      if (!rd_score_vld || rd_score != sc) begin failures++; $display("score %b expected %b", rd_score, sc); end
      for (int a = 0; a < D && a < cur.size(); a++) begin
        rd_addr = 3'(a);
        @(negedge clk);
        checks++;
        if (rd_data != cur[a]) begin failures++; $display("cycle %0d word %0d: %h expected %h", c, a, rd_data, cur[a]); end
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("overflow never happened"); end
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
