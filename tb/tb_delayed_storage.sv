// tb_delayed_storage: two delayed_storage blocks sharing all_got, as in one
// interface with two kinds of readout.
// Checks: the first readout of a cycle is kept and a repeat is dropped; a
// upd while one block is still empty stores nothing; the upd after both
// have their readouts makes both offer their value one cycle later; the
// output is held while stalled; a readout arriving in the upd cycle itself
// belongs to the new cycle; `got` is low while the output is busy.
module tb_delayed_storage;
  import ssdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     upd, all_got;
  logic     got_a, got_b;
  readout_t in_a, in_b, out_a, out_b;
  logic     vld_a, vld_b, next_a, next_b, ovld_a, ovld_b, onext_a, onext_b;

  assign all_got = got_a && got_b;

  delayed_storage dut_a (.clk, .rst_n, .upd, .all_got, .got(got_a),
    .in_data(in_a), .in_vld(vld_a), .in_next(next_a),
    .out_data(out_a), .out_vld(ovld_a), .out_next(onext_a));
  delayed_storage dut_b (.clk, .rst_n, .upd, .all_got, .got(got_b),
    .in_data(in_b), .in_vld(vld_b), .in_next(next_b),
    .out_data(out_b), .out_vld(ovld_b), .out_next(onext_b));

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic give_a(data_t v);
    in_a = '{addr: 8'h01, data: v}; vld_a = 1;
    @(negedge clk); vld_a = 0;
  endtask

  task automatic give_b(data_t v);
    in_b = '{addr: 8'h02, data: v}; vld_b = 1;
    @(negedge clk); vld_b = 0;
  endtask

  task automatic pulse_upd();
    upd = 1; @(negedge clk); upd = 0;
  endtask

  initial begin
    upd = 0; vld_a = 0; vld_b = 0; onext_a = 0; onext_b = 0; in_a = '0; in_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("never ready stalls the input", !next_a && !next_b);
    give_a(100);
    check("A got", got_a && !got_b);
    give_a(101);                      // repeat: dropped
    pulse_upd();                      // B still empty: nothing stored
    check("no store while B empty", !ovld_a && !ovld_b && got_a);
    repeat (3) @(negedge clk);
    give_b(200);
    check("both got", got_a && got_b);
    onext_a = 1;                      // A's receiver stalls
    in_a = '{addr: 8'h01, data: 102}; vld_a = 1;   // arrives with the upd
    pulse_upd();
    vld_a = 0;
    check("both offered one cycle after upd", ovld_a && ovld_b);
    check("A keeps the first readout", out_a.data == 100 && out_a.addr == 8'h01);
    check("B value", out_b.data == 200);
    check("got low while output busy", !got_a && !got_b);
    @(negedge clk);                   // B taken, A still stalled
    check("B taken", !ovld_b);
    check("A held while stalled", ovld_a && out_a.data == 100);
    upd = 1;                          // upd while A busy: no store
    @(negedge clk);
    upd = 0;
    check("no overwrite while busy", ovld_a && out_a.data == 100);
    onext_a = 0;
    @(negedge clk);
    check("A taken", !ovld_a);
    check("readout from the upd cycle kept", got_a);
    give_b(201);
    pulse_upd();
    check("second store", ovld_a && ovld_b && out_a.data == 102 && out_b.data == 201);
    @(negedge clk);
    check("both taken", !ovld_a && !ovld_b && !got_a && !got_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
