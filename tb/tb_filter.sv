// tb_filter: checks the label filter with random readouts and stalls.
// A readout labelled 0x35 must pass with next following the output's next;
// any other label must be dropped without holding the input.
module tb_filter;
  import ssdr_pkg::*;
  readout_t in_data, out_data;
  logic     in_vld, in_next, out_vld, out_next;
  int checks = 0, failures = 0;
  int passed = 0, dropped = 0;

  filter #(.MATCH(8'h35)) dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic m;
      in_data.addr = ($urandom_range(0, 3) == 0) ? 8'h35 : 8'($urandom);
      in_data.data = $urandom;
      in_vld       = 1'($urandom);
      out_next     = 1'($urandom);
      #1;
      m = (in_data.addr == 8'h35);
      checks++;
      if (out_vld != (in_vld && m) || in_next != (in_vld && m && out_next) ||
          (out_vld && out_data != in_data)) begin
        failures++;
        $display("addr %h vld %b next %b: out_vld %b in_next %b",
                 in_data.addr, in_vld, out_next, out_vld, in_next);
      end
      if (in_vld && m) passed++;
      if (in_vld && !m) dropped++;
    end
    checks++;
    if (passed == 0 || dropped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
