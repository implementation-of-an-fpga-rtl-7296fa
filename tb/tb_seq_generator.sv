// tb_seq_generator: checks the request sequence generator.
// A start pulse must produce the list 10, 20, 30, 40, 50 in order, the
// first request one cycle after start, while the receiver stalls at random;
// start pulses during a run must be ignored (each run gives exactly five
// requests) and `busy` must drop after the last request is taken. With no
// stalls a run of five requests takes five cycles.
module tb_seq_generator;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam addr_t LIST [5] = '{8'd10, 8'd20, 8'd30, 8'd40, 8'd50};

  logic  start, busy;
  addr_t req_data;
  logic  req_vld, req_next;
  logic  stall_en;
  int checks = 0, failures = 0;
  int n_req = 0, vld_cycles = 0;

  seq_generator #(.N_REQ(5), .SEQ(LIST)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && req_vld) vld_cycles++;
    if (rst_n && req_vld && !req_next) begin
      checks++;
      if (req_data != LIST[n_req % 5]) begin
        failures++;
        $display("request %0d: %0d expected %0d", n_req, req_data, LIST[n_req % 5]);
      end
      n_req++;
    end
  end

  always @(negedge clk) req_next <= stall_en && ($urandom_range(0, 1) == 1);

  initial begin
    start = 0; stall_en = 1; req_next = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!req_vld || !busy) begin failures++; $display("run %0d did not start", run); end
      // extra start pulses while busy
      repeat (2) @(negedge clk);
      start = busy;
      @(negedge clk);
      start = 0;
      wait (!busy);
      @(negedge clk);
      checks++;
      if (n_req != 5 * (run + 1)) begin failures++; $display("after run %0d: %0d requests", run, n_req); end
      checks++;
      if (req_vld) begin failures++; $display("vld after run"); end
    end
    // rate: no stalls
    stall_en = 0;
    @(negedge clk);
    @(negedge clk);
    vld_cycles = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (vld_cycles != 5) begin failures++; $display("run took %0d cycles", vld_cycles); end
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
