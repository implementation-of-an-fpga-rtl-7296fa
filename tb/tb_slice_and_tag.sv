// tb_slice_and_tag: checks package building with two and one slices.
// A readout must become a header (flag 1, interface number, label) and
// then the 16-bit slices of the value, most significant first, in
// consecutive cycles when not stalled; under random stalls every word
// must still arrive in order. The input is held (next) while a package is
// being sent.
module tb_slice_and_tag;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  readout_t  in_data;
  logic      in_vld;
  logic      n2_in_next, n1_in_next;
  pkg_word_t o2, o1;
  logic      v2, v1, x2, x1;
  logic      stall_en;

  slice_and_tag #(.INTF(4'd5), .N_SLICE(2)) dut2 (.clk, .rst_n,
    .in_data, .in_vld, .in_next(n2_in_next), .out_data(o2), .out_vld(v2), .out_next(x2));
  slice_and_tag #(.INTF(4'd9), .N_SLICE(1)) dut1 (.clk, .rst_n,
    .in_data, .in_vld, .in_next(n1_in_next), .out_data(o1), .out_vld(v1), .out_next(x1));

  // expected word streams
  pkg_word_t exp2 [$], exp1 [$];
  int        vcyc2;

  always @(negedge clk) begin
    x2 <= stall_en && ($urandom_range(0, 2) == 0);
    x1 <= stall_en && ($urandom_range(0, 2) == 0);
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (v2) vcyc2 <= vcyc2 + 1;
      if (v2 && !x2) begin
        checks++;
        if (exp2.size() == 0 || o2 != exp2[0]) begin failures++; $display("2-slice word %h wrong", o2); end
        if (exp2.size() != 0) void'(exp2.pop_front());
      end
      if (v1 && !x1) begin
        checks++;
        if (exp1.size() == 0 || o1 != exp1[0]) begin failures++; $display("1-slice word %h wrong", o1); end
        if (exp1.size() != 0) void'(exp1.pop_front());
      end
    end
  end

  task automatic send(readout_t r);
    // both instances take the readout in the same cycle when both are idle
    wait (!n2_in_next && !n1_in_next);
    @(negedge clk);
    in_data = r; in_vld = 1;
    exp2.push_back('{hdr: 1'b1, payload: {4'h0, 4'd5, r.addr}});
    exp2.push_back('{hdr: 1'b0, payload: r.data[31:16]});
    exp2.push_back('{hdr: 1'b0, payload: r.data[15:0]});
    exp1.push_back('{hdr: 1'b1, payload: {4'h0, 4'd9, r.addr}});
    exp1.push_back('{hdr: 1'b0, payload: r.data[15:0]});
    @(negedge clk);
    in_vld = 0;
    checks++;
    if (!n2_in_next || !n1_in_next) begin failures++; $display("input not held during package"); end
  endtask

  initial begin
    in_vld = 0; in_data = '0; stall_en = 1; x1 = 0; x2 = 0; vcyc2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) send('{addr: 8'($urandom), data: $urandom});
    wait (exp2.size() == 0 && exp1.size() == 0);
    // rate: three words in three cycles without stalls
    stall_en = 0;
    repeat (3) @(negedge clk);
    vcyc2 = 0;
    send('{addr: 8'h7e, data: 32'hdeadbeef});
    repeat (5) @(negedge clk);
    checks++;
    if (vcyc2 != 3) begin failures++; $display("package of 3 words took %0d cycles", vcyc2); end
    checks++;
    if (exp2.size() != 0 || exp1.size() != 0) begin failures++; $display("words missing"); end
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
