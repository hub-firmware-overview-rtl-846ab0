// tb_crc9: checks the 9-bit link CRC against a long-division reference on
// fixed and random messages, and checks that bits 127:119 do not matter.
module tb_crc9;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  ctrl_msg_t  msg;
  logic [8:0] crc;
  int checks = 0, failures = 0;

  crc9 dut (.msg(msg), .crc(crc));

  task automatic check_one(msg128_t m);
    logic [8:0] exp;
    msg = m;
    #1;
    exp = ref_crc(m);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL msg=%h crc=%h exp=%h", m, crc, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] c0;
    check_one('0);
    check_one({96'h0, 32'h0000_00BC});
    check_one('1);
    for (int i = 0; i < 119; i++) begin
      msg128_t one;
      one    = '0;
      one[i] = 1'b1;
      check_one(one);
    end
    for (int i = 0; i < 500; i++)
      check_one({$urandom, $urandom, $urandom, $urandom});
    // CRC field bits must not feed the CRC
    msg = {9'h000, 119'h1234_5678_9abc_def0_1122_3344_5566_77};
    #1 c0 = crc;
    msg[3][31:23] = 9'h1A5;
    #1;
    checks++;
    if (crc !== c0) begin failures++; $display("FAIL crc depends on its own field"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
