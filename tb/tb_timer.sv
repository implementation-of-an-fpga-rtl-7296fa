// tb_timer: checks the update-cycle timer.
// Counter mode: with period 7 the upd pulses must be exactly 7 cycles apart
// and one cycle long; after the period is changed to 4 they must become 4
// cycles apart. External mode: each rising edge of ext_evt, however long
// the event lasts, gives exactly one upd pulse, from the first clock edge
// that sees the event.
module tb_timer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] period;
  logic        use_ext, ext_evt, upd;
  int checks = 0, failures = 0;
  int cyc = 0, last_upd = -1, pulses = 0;
  int expect_gap;

  timer #(.PERIOD_W(32)) dut (.*);

  always @(negedge clk) begin
    cyc++;
    if (rst_n && upd) begin
      pulses++;
      if (expect_gap > 0 && last_upd >= 0) begin
        checks++;
        if (cyc - last_upd != expect_gap) begin
          failures++;
          $display("upd gap %0d, expected %0d", cyc - last_upd, expect_gap);
        end
      end
      last_upd = cyc;
    end
  end

  initial begin
    int p0;
    period = 7; use_ext = 0; ext_evt = 0; expect_gap = 7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);
    checks++;
    if (pulses < 8) begin failures++; $display("only %0d pulses", pulses); end
    // change the period: first gap after the change may be partial
    wait (upd == 1'b1);
    @(negedge clk);
    expect_gap = 0;
    period = 4;
    wait (upd == 1'b1);
    @(negedge clk);
    expect_gap = 4;
    repeat (40) @(negedge clk);
    // external events
    expect_gap = 0;
    use_ext = 1;
    repeat (3) @(negedge clk);
    p0 = pulses;
    for (int e = 0; e < 5; e++) begin
      ext_evt = 1;
      checks++;
      if (upd) begin failures++; $display("upd too early"); end
      @(negedge clk);            // registered at the first clock edge
      checks++;
      if (!upd) begin failures++; $display("no upd after event %0d", e); end
      @(negedge clk);
      checks++;
      if (upd) begin failures++; $display("upd longer than one cycle"); end
      repeat (3 + e) @(negedge clk);   // event held high for a while
      ext_evt = 0;
      repeat (4) @(negedge clk);
    end
    checks++;
    if (pulses - p0 != 5) begin failures++; $display("%0d pulses for 5 events", pulses - p0); end
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
