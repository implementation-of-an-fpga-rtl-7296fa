// tb_sequence_generator: the sub-function with main and fast lists.
// upd comes every 60 cycles, the local timer fires every 25 cycles and the
// receiver (the diagnostic interface) stalls at random. The main list
// 0,1,2,3 must be requested completely and in order once per upd; the fast
// list (label 9) once per local-timer pulse; when both lists wait at the
// same time the fast one goes first. A second instance without the fast
// list must send only the main list.
module tb_sequence_generator;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam addr_t MAIN [4] = '{8'h00, 8'h01, 8'h02, 8'h03};
  localparam addr_t FAST [1] = '{8'h09};

  logic  upd, busy, busy2;
  addr_t req_data, req2_data;
  logic  req_vld, req_next, req2_vld, req2_next;
  int    n_main = 0, n_fast = 0, n_loc = 0, n_upd = 0, n_main2 = 0, n_prio = 0;
  logic  prev_stall;

  sequence_generator #(.N_REQ(4), .SEQ(MAIN), .HAS_FAST(1'b1), .N_FAST(1),
                       .FAST_SEQ(FAST), .LOC_PERIOD(25)) dut (.*);
  sequence_generator #(.N_REQ(4), .SEQ(MAIN), .HAS_FAST(1'b0)) dut2 (
    .clk, .rst_n, .upd, .busy(busy2), .req_data(req2_data), .req_vld(req2_vld),
    .req_next(req2_next));

  always @(negedge clk) begin
    req_next  <= ($urandom_range(0, 2) != 0);
    req2_next <= ($urandom_range(0, 2) != 0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_stall <= 0;
    end else begin
      prev_stall <= req_vld && req_next;
      if (upd) n_upd <= n_upd + 1;
      if (dut.g_fast.loc_upd) n_loc <= n_loc + 1;
      // fast list first when both wait
      if (req_vld && !prev_stall && dut.g_fast.fast_vld && dut.main_vld) begin
        checks++;
        n_prio <= n_prio + 1;
        if (req_data != 8'h09) begin failures++; $display("main request chosen over fast one"); end
      end
      if (req_vld && !req_next) begin
        checks++;
        if (req_data == 8'h09) n_fast <= n_fast + 1;
        else begin
          if (req_data != MAIN[n_main % 4]) begin
            failures++; $display("main request %0d is %0d", n_main, req_data);
          end
          n_main <= n_main + 1;
        end
      end
      if (req2_vld && !req2_next) begin
        checks++;
        if (req2_data != MAIN[n_main2 % 4]) begin failures++; $display("single list request wrong"); end
        n_main2 <= n_main2 + 1;
      end
    end
  end

  initial begin
    upd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      repeat (59) @(negedge clk);
      upd = 1;
      @(negedge clk);
      upd = 0;
    end
    repeat (59) @(negedge clk);
    checks++;
    if (n_main != 4 * n_upd || n_main2 != 4 * n_upd) begin
      failures++; $display("%0d main requests for %0d upd", n_main, n_upd);
    end
    checks++;
    if (n_fast != n_loc) begin failures++; $display("%0d fast requests for %0d timer pulses", n_fast, n_loc); end
    checks++;
    if (n_prio == 0) begin failures++; $display("lists never competed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
