// tb_ctrl_pattern_gen: the bring-up pattern is a50f00bc / 00000000 /
// counter / be800000 and the Word_2 counter steps once per frame_start.
module tb_ctrl_pattern_gen;
  import hub_pkg::*;

  logic      clk = 0, rst = 1, frame_start = 0;
  ctrl_msg_t msg;
  int checks = 0, failures = 0;

  ctrl_pattern_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int n = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      chk(msg[0] == 32'hA50F00BC && msg[1] == 32'h0 && msg[3] == 32'hBE800000, "static words");
      chk(msg[2] == 32'(n), "counter word");
      frame_start = ($urandom % 3) == 0;
      @(negedge clk);
      if (frame_start) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
