// tb_ctrl_link_tx: the control-link transmitter sends Word_0..Word_3 as one
// frame every four clocks, K28.5 with charisk 0001 in byte 0 of Word_0, and
// every frame is the set of control registers present at frame_start, even
// though the testbench changes the registers on every clock.
module tb_ctrl_link_tx;
  import hub_pkg::*;

  logic        clk = 0, rst = 1;
  ctrl_msg_t   ctrl;
  logic [31:0] tx_data;
  logic [3:0]  tx_charisk;
  logic        frame_start;
  int checks = 0, failures = 0;

  ctrl_link_tx dut (.*);

  always #5 clk = ~clk;

  typedef struct packed { logic [31:0] d; logic [3:0] k; } beat_t;
  beat_t exp_q[$];

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
    int frames = 0, since_comma = 0, last_gap = 0;
    ctrl = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      if (exp_q.size() > 0) begin
        beat_t e;
        e = exp_q.pop_front();
        chk(tx_data == e.d && tx_charisk == e.k, "word content");
      end
      // frame rate: a comma exactly every 4 words
      since_comma++;
      if (tx_charisk == 4'b0001) begin
        if (cyc > 8) chk(since_comma == 4, "comma spacing");
        since_comma = 0;
        frames++;
      end
      ctrl = {$urandom, $urandom, $urandom, $urandom};
      #1;
      if (frame_start) begin
        exp_q.push_back('{{ctrl[0][31:8], 8'hBC}, 4'b0001});
        exp_q.push_back('{ctrl[1], 4'b0000});
        exp_q.push_back('{ctrl[2], 4'b0000});
        exp_q.push_back('{ctrl[3], 4'b0000});
      end
    end
    chk(frames >= 99, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
