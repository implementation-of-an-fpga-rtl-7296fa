// tb_scoreboard: checks package tracking for four interfaces.
// In each update cycle the testbench sends headers of a random subset of
// interfaces (with data words between them); at the upd that ends the
// cycle the scoreboard must offer exactly that subset, one cycle later, and
// then start again from zero. A result not taken by the next upd makes the
// new one be dropped with a `lost` pulse.
module tb_scoreboard;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       upd;
  pkg_word_t  in_data;
  logic       in_vld, in_next;
  logic [3:0] out_data;
  logic       out_vld, out_next, lost;
  int         lost_seen;

  scoreboard #(.N_INTF(4)) dut (.*);

  always_ff @(posedge clk) if (lost) lost_seen <= lost_seen + 1;

  task automatic word(logic hdr, int intf);
    in_data = '{hdr: hdr, payload: make_header(intf_t'(intf), 8'h11)};
    in_vld = 1;
    @(negedge clk);
    in_vld = 0;
  endtask

  initial begin
    logic [3:0] subset;
    upd = 0; in_vld = 0; in_data = '0; out_next = 0; lost_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 30; c++) begin
      subset = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        if (subset[i]) begin
          word(1'b1, i);
          word(1'b0, 3 - i);      // data words carry no interface
        end
      end
      checks++;
      if (in_next) begin failures++; $display("scoreboard stalled its input"); end
      @(negedge clk);
      upd = 1;
      @(negedge clk);
      upd = 0;
      checks++;
      if (!out_vld || out_data != subset) begin
        failures++; $display("cycle %0d: score %b expected %b", c, out_data, subset);
      end
      @(negedge clk);
      checks++;
      if (out_vld) begin failures++; $display("result offered twice"); end
    end
    // a header in the upd cycle itself counts for the ending cycle
    in_data = '{hdr: 1'b1, payload: make_header(4'd2, 8'h00)};
    in_vld = 1; upd = 1;
    @(negedge clk);
    in_vld = 0; upd = 0;
    checks++;
    if (out_data != 4'b0100) begin failures++; $display("header at upd: %b", out_data); end
    // result not taken before the next upd
    @(negedge clk);
    out_next = 1;
    word(1'b1, 1);
    @(negedge clk);
    upd = 1; @(negedge clk); upd = 0;
    word(1'b1, 3);
    upd = 1; @(negedge clk); upd = 0;
    @(negedge clk);
    checks++;
    if (lost_seen != 1 || out_data != 4'b0010) begin
      failures++; $display("lost %0d, held %b", lost_seen, out_data);
    end
    out_next = 0;
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
