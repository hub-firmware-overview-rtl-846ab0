// tb_cttc_encode: random Combined_TTC/DATA fields are packed into the four
// words exactly as the bit-definition table places them, with K28.5, the
// fixed version and a correct CRC in Word_3[31:23].
module tb_cttc_encode;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  cttc_fields_t f;
  ctrl_msg_t    msg;
  int checks = 0, failures = 0;

  cttc_encode #(.VERSION(4'h0)) dut (.f(f), .msg(msg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg128_t exp;
    for (int t = 0; t < 500; t++) begin
      f.version = 4'($urandom);        // must be overridden by VERSION
      f.reset = 4'($urandom);
      f.l1a = 1'($urandom); f.bcr = 1'($urandom); f.ecr = 1'($urandom);
      f.priv_readout = 1'($urandom);
      f.l1id = 24'($urandom); f.ecrid = 8'($urandom);
      f.control_channel = $urandom;
      f.link_reset = 4'($urandom);
      f.rod_busy = 1'($urandom); f.link_enable = 1'($urandom);
      f.rod0_channel_up = 1'($urandom); f.rod1_channel_up = 1'($urandom);
      f.shelf = 3'($urandom);
      #1;
      exp = ref_cttc(4'h0, f.reset, f.l1a, f.bcr, f.ecr, f.priv_readout, f.l1id,
                     f.ecrid, f.control_channel, f.link_reset, f.rod_busy,
                     f.link_enable, f.rod0_channel_up, f.rod1_channel_up, f.shelf);
      checks++;
      if (msg !== exp) begin
        failures++;
        $display("FAIL got %h exp %h", msg, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
