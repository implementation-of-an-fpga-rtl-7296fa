// tb_priority_mux: checks the priority multiplexer in both modes.
// Word mode (mux_w): three sources send numbered words at random; the sink
// stalls at random. Every word must arrive once and in order per source,
// and whenever the previous cycle did not stall the chosen source must be
// the lowest-numbered valid one.
// Package mode (mux_p): source s sends packages of a header and s+1 data
// words, back to back inside a package and with random gaps between
// packages. Packages must arrive whole (no foreign word inside a package)
// and in order per source.
module tb_priority_mux;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- word mode ----------------
  logic [7:0]   w_in [N];
  logic [N-1:0] w_vld, w_next;
  logic [7:0]   w_out;
  logic         w_ovld, w_onext;
  int           w_cnt [N];
  int           w_rx  [N];
  logic         w_prev_stall;
  int           w_contention;

  priority_mux #(.W(8), .N(N), .PACKET(1'b0)) mux_w (
    .clk, .rst_n, .in_data(w_in), .in_vld(w_vld), .in_next(w_next),
    .out_data(w_out), .out_vld(w_ovld), .out_next(w_onext)
  );

  for (genvar s = 0; s < N; s++) begin : g_wsrc
    assign w_in[s] = {2'(s), 6'(w_cnt[s])};
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        w_cnt[s] <= 0;
        w_vld[s] <= 1'b0;
      end else if (w_vld[s] && !w_next[s]) begin
        w_cnt[s] <= w_cnt[s] + 1;
        w_vld[s] <= ($urandom_range(0, 1) == 1) && w_cnt[s] < 99;
      end else if (!w_vld[s]) begin
        w_vld[s] <= ($urandom_range(0, 2) == 0) && w_cnt[s] < 100;
      end
    end
  end

  always @(negedge clk) w_onext <= ($urandom_range(0, 3) == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_prev_stall <= 1'b0;
    end else begin
      w_prev_stall <= w_ovld && w_onext;
      if (w_ovld) begin
        int src, low;
        src = int'(w_out[7:6]);
        low = -1;
        for (int s = N - 1; s >= 0; s--) if (w_vld[s]) low = s;
        if ($countones(w_vld) > 1) w_contention++;
        if (!w_prev_stall) begin
          checks++;
          if (src != low) begin failures++; $display("word mode: chose %0d, lowest valid %0d", src, low); end
        end
        if (!w_onext) begin
          checks++;
          if (w_out[5:0] != 6'(w_rx[src])) begin
            failures++; $display("word mode: source %0d word %0d expected %0d", src, w_out[5:0], w_rx[src]);
          end
          w_rx[src]++;
        end
      end
    end
  end

  // ---------------- package mode ----------------
  logic [8:0]   p_in [N];
  logic [N-1:0] p_vld, p_next;
  logic [8:0]   p_out;
  logic         p_ovld, p_onext;
  int           p_pkg [N];   // package number
  int           p_pos [N];   // word within package, 0 = header
  int           rx_src, rx_left, rx_pkgs [N];
  int           p_contention;

  priority_mux #(.W(9), .N(N), .PACKET(1'b1)) mux_p (
    .clk, .rst_n, .in_data(p_in), .in_vld(p_vld), .in_next(p_next),
    .out_data(p_out), .out_vld(p_ovld), .out_next(p_onext)
  );

  for (genvar s = 0; s < N; s++) begin : g_psrc
    assign p_in[s] = {(p_pos[s] == 0), 2'(s), 6'(p_pos[s] == 0 ? p_pkg[s] : p_pos[s])};
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        p_pkg[s] <= 0;
        p_pos[s] <= 0;
        p_vld[s] <= 1'b0;
      end else if (p_vld[s] && !p_next[s]) begin
        if (p_pos[s] == s + 1) begin
          p_pos[s] <= 0;
          p_pkg[s] <= p_pkg[s] + 1;
          p_vld[s] <= ($urandom_range(0, 3) == 0) && p_pkg[s] < 39;
        end else begin
          p_pos[s] <= p_pos[s] + 1;     // package words are back to back
        end
      end else if (!p_vld[s]) begin
        p_vld[s] <= ($urandom_range(0, 2) == 0) && p_pkg[s] < 40;
      end
    end
  end

  always @(negedge clk) p_onext <= ($urandom_range(0, 3) == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_left <= 0;
      rx_src  <= -1;
    end else if (p_ovld && !p_onext) begin
      int src;
      src = int'(p_out[7:6]);
      if ($countones(p_vld) > 1) p_contention++;
      checks++;
      if (p_out[8]) begin
        if (rx_left != 0) begin failures++; $display("package of %0d cut short", rx_src); end
        if (int'(p_out[5:0]) != rx_pkgs[src]) begin
          failures++; $display("source %0d package %0d expected %0d", src, p_out[5:0], rx_pkgs[src]);
        end
        rx_pkgs[src]++;
        rx_src  <= src;
        rx_left <= src + 1;
      end else begin
        if (src != rx_src || rx_left == 0) begin
          failures++; $display("foreign data word from %0d inside package of %0d", src, rx_src);
        end
        rx_left <= rx_left - 1;
      end
    end
  end

  initial begin
    for (int s = 0; s < N; s++) begin w_rx[s] = 0; rx_pkgs[s] = 0; end
    w_contention = 0; p_contention = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int s = 0; s < N; s++) begin
      checks += 2;
      if (w_rx[s] != 100) begin failures++; $display("word mode: source %0d delivered %0d", s, w_rx[s]); end
      if (rx_pkgs[s] != 40) begin failures++; $display("package mode: source %0d delivered %0d", s, rx_pkgs[s]); end
    end
    checks += 2;
    if (w_contention == 0 || p_contention == 0) begin failures++; $display("no contention seen"); end
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
