// tb_cmi_interconnect: checks the CMI fork with three receivers.
// The transmitter sends the words 0..NW-1, holding each while told to wait.
// Phase 1: every receiver stalls at random; each must receive every word
// exactly once and in order. Phase 2: nobody stalls; the fork must then pass
// one word per clock cycle.
module tb_cmi_interconnect;
  localparam int N  = 3;
  localparam int NW = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]   tx_data;
  logic         tx_vld, tx_next;
  logic [7:0]   rx_data;
  logic [N-1:0] rx_vld, rx_next;
  logic         rand_stall;

  int checks = 0, failures = 0;
  int got [N];
  int sent;

  cmi_interconnect #(.W(8), .N(N)) dut (.*);

  // receivers
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < N; r++) begin
        if (rx_vld[r] && !rx_next[r]) begin
          checks++;
          if (rx_data != 8'(got[r])) begin
            failures++;
            $display("receiver %0d: got %0d expected %0d", r, rx_data, got[r]);
          end
          got[r]++;
        end
      end
    end
  end

  always_ff @(negedge clk) begin
    for (int r = 0; r < N; r++) rx_next[r] <= rand_stall && ($urandom_range(0, 2) == 0);
  end

  // transmitter: sends words sent..last-1, advancing on a transfer
  int last;
  int vld_cycles;
  always_ff @(posedge clk) if (tx_vld) vld_cycles <= vld_cycles + 1;
  always_ff @(posedge clk) begin
    if (rst_n && tx_vld && !tx_next) sent <= sent + 1;
  end
  assign tx_vld  = rst_n && (sent < last);
  assign tx_data = 8'(sent);

  task automatic send_all(int first, int count);
    last = first + count;
    while (sent < last) @(posedge clk);
    #1;
  endtask

  initial begin
    for (int r = 0; r < N; r++) got[r] = 0;
    rand_stall = 1'b1;
    sent = 0; last = 0; rx_next = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    send_all(0, NW);
    repeat (5) @(posedge clk);
    for (int r = 0; r < N; r++) begin
      checks++;
      if (got[r] != NW) begin failures++; $display("receiver %0d got %0d words", r, got[r]); end
    end
    // phase 2: no stalls, one word per cycle
    rand_stall = 1'b0;
    @(posedge clk); #1;
    vld_cycles = 0;
    send_all(NW, 40);
    checks++;
    if (vld_cycles != 40) begin
      failures++;
      $display("40 words took %0d cycles", vld_cycles);
    end
    repeat (3) @(posedge clk);
    for (int r = 0; r < N; r++) begin
      checks++;
      if (got[r] != NW + 40) begin failures++; $display("receiver %0d total %0d", r, got[r]); end
    end
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
