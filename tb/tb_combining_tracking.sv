// tb_combining_tracking: three interfaces, random packages.
// In each update cycle a random subset of the interfaces sends one or two
// packages (header plus interface-number-dependent data words), each
// starting at a random moment so that they compete. The final package
// stream must carry every package whole and in order per interface, and after the upd the
// scoreboard result must name exactly the interfaces that sent. The
// storage side stalls at random.
module tb_combining_tracking;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NI = 3;

  logic          upd;
  pkg_word_t     in_data [NI];
  logic [NI-1:0] in_vld, in_next;
  pkg_word_t     pkg_data;
  logic          pkg_vld, pkg_next;
  logic [NI-1:0] score_data;
  logic          score_vld, score_next, score_lost;

  combining_tracking #(.N_INTF(NI)) dut (.*);

  // sources: package = header + (i+1) data words; n_pk[i] packages to send
  int n_pk [NI], pos [NI], sent_pk [NI], rx_pk [NI];
  int cur_src, left;

  for (genvar i = 0; i < NI; i++) begin : g_src
    always_comb begin
      in_vld[i]  = n_pk[i] > 0;
      in_data[i] = (pos[i] == 0) ? '{hdr: 1'b1, payload: make_header(intf_t'(i), 8'(sent_pk[i]))}
                                 : '{hdr: 1'b0, payload: 16'(i * 256 + pos[i])};
    end
    always_ff @(posedge clk) begin
      if (in_vld[i] && !in_next[i]) begin
        if (pos[i] == i + 1) begin
          pos[i] <= 0; n_pk[i] <= n_pk[i] - 1; sent_pk[i] <= sent_pk[i] + 1;
        end else begin
          pos[i] <= pos[i] + 1;
        end
      end
    end
  end

  always @(negedge clk) pkg_next <= ($urandom_range(0, 3) == 0);
  assign score_next = 1'b0;

  always_ff @(posedge clk) begin
    if (rst_n && pkg_vld && !pkg_next) begin
      checks++;
      if (pkg_data.hdr) begin
        int s;
        s = int'(header_intf(pkg_data.payload));
        if (left != 0) begin failures++; $display("package cut short"); end
        if (s >= NI || int'(header_addr(pkg_data.payload)) != rx_pk[s]) begin
          failures++; $display("header %h out of order", pkg_data.payload);
        end else rx_pk[s]++;
        cur_src <= s; left <= s + 1;
      end else begin
        if (left == 0 || pkg_data.payload != 16'(cur_src * 256 + (cur_src + 2 - left))) begin
          failures++; $display("data word %h wrong", pkg_data.payload);
        end
        left <= left - 1;
      end
    end
  end

  initial begin
    logic [NI-1:0] subset;
    int n_score = 0;
    upd = 0; cur_src = 0; left = 0;
    for (int i = 0; i < NI; i++) begin n_pk[i] = 0; pos[i] = 0; sent_pk[i] = 0; rx_pk[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      subset = NI'($urandom);
      // interfaces start at random moments, so one may become valid
      // while another is in the middle of a package
      begin
        logic [NI-1:0] started;
        started = '0;
        for (int t = 0; t < 12; t++) begin
          for (int i = 0; i < NI; i++) begin
            if (subset[i] && !started[i] && (t == 11 || $urandom_range(0, 3) == 0)) begin
              n_pk[i] = $urandom_range(1, 2);
              started[i] = 1'b1;
            end
          end
          @(negedge clk);
        end
      end
      repeat (40) @(negedge clk);
      checks++;
      if (n_pk[0] + n_pk[1] + n_pk[2] != 0) begin failures++; $display("packages not drained"); end
      upd = 1;
      @(negedge clk);
      upd = 0;
      checks++;
      if (!score_vld || score_data != subset) begin
        failures++; $display("cycle %0d: score %b expected %b", c, score_data, subset);
      end else n_score++;
    end
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (rx_pk[i] != sent_pk[i]) begin failures++; $display("interface %0d: %0d of %0d packages", i, rx_pk[i], sent_pk[i]); end
    end
    checks++;
    if (score_lost) failures++;
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
