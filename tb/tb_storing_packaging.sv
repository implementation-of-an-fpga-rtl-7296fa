// tb_storing_packaging: the per-interface store-and-pack chain (interface
// number 3, labels 0..3 with 2, 2, 1, 1 data words).
// Each update cycle the testbench sends readouts of random labels (0..5,
// so some are foreign), with repeats, and sometimes leaves a label out.
// A reference keeps the first value per label since the last store; at a
// upd where all four labels have a value it expects the four packages, in
// label order, with the right header and slices. The output stalls at
// random; the stream of package words must equal the reference exactly,
// and nothing may come out after a upd with a label missing.
module tb_storing_packaging;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam addr_t       LBL [4] = '{8'h00, 8'h01, 8'h02, 8'h03};
  localparam int unsigned SL  [4] = '{2, 2, 1, 1};

  logic       upd;
  readout_t   in_data;
  logic       in_vld, in_next;
  pkg_word_t  out_data;
  logic       out_vld, out_next;
  logic [3:0] got;

  storing_packaging #(.INTF(4'd3), .N_ITEM(4), .ITEM_ADDR(LBL), .SLICES(SL)) dut (.*);

  pkg_word_t exp_q [$];
  data_t     pend [4];
  logic      rcvd [4];
  int        n_store = 0, n_skip = 0, n_words = 0;

  always @(negedge clk) out_next <= ($urandom_range(0, 3) == 0);

  always_ff @(posedge clk) begin
    if (rst_n && out_vld && !out_next) begin
      checks++;
      n_words++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected word %h", out_data);
      end else begin
        if (out_data != exp_q[0]) begin failures++; $display("word %h expected %h", out_data, exp_q[0]); end
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    upd = 0; in_vld = 0; in_data = '0;
    for (int k = 0; k < 4; k++) rcvd[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      int missing;
      missing = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 3) : -1;
      for (int i = 0; i < 12; i++) begin
        int l;
        l = $urandom_range(0, 5);
        if (i < 4) l = i;            // every label offered at least once ...
        if (l == missing) continue;  // ... unless it is left out this cycle
        in_data = '{addr: 8'(l), data: $urandom};
        in_vld = 1;
        checks++;
        if (in_next) begin failures++; $display("input stalled"); end
        @(negedge clk);
        in_vld = 0;
        if (l < 4 && !rcvd[l]) begin pend[l] = in_data.data; rcvd[l] = 1; end
      end
      wait (exp_q.size() == 0);
      repeat (2) @(negedge clk);
      upd = 1;
      if (rcvd[0] && rcvd[1] && rcvd[2] && rcvd[3]) begin
        n_store++;
        for (int k = 0; k < 4; k++) begin
          exp_q.push_back('{hdr: 1'b1, payload: make_header(4'd3, LBL[k])});
          if (SL[k] == 2) exp_q.push_back('{hdr: 1'b0, payload: pend[k][31:16]});
          exp_q.push_back('{hdr: 1'b0, payload: pend[k][15:0]});
          rcvd[k] = 0;
        end
      end else begin
        n_skip++;
      end
      @(negedge clk);
      upd = 0;
    end
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    checks++;
    if (n_store == 0 || n_skip == 0) begin failures++; $display("stores %0d skips %0d", n_store, n_skip); end
    checks++;
    if (n_words != n_store * 10) begin failures++; $display("%0d words for %0d stores", n_words, n_store); end
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
