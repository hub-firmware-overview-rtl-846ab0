// tb_rdctrl_decode: Readout_Ctrl messages built bit by bit from the bit
// definition table are decoded into ROD busy, Aurora_Init, channel-up and
// per-slot link resets (Aurora_Init reaching every slot), one clock later.
module tb_rdctrl_decode;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  logic           clk = 0, rst = 1;
  ctrl_msg_t      shadow;
  rdctrl_fields_t fields;
  logic           version_ok;
  int checks = 0, failures = 0;

  rdctrl_decode #(.EXPECTED_VERSION(4'h0)) dut (.*);

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
    shadow = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      logic [3:0] ver; logic busy, ainit; logic [11:0] chup;
      logic [23:0] l6; logic [5:0] l1; logic [3:0] exp_slot;
      ver   = (t % 3 == 0) ? 4'h0 : 4'($urandom);
      busy  = 1'($urandom);
      ainit = ($urandom % 4) == 0;
      chup  = 12'($urandom);
      l6    = 24'($urandom);
      l1    = 6'($urandom);
      shadow = ref_rdctrl(ver, busy, ainit, chup, l6, l1);
      @(negedge clk);
      chk(fields.rod_busy == busy && fields.aurora_init == ainit, "busy / aurora_init");
      chk(fields.channel_up == chup && fields.version == ver, "channel up / version");
      chk(version_ok == (ver == 4'h0), "version check");
      for (int s = 0; s < 12; s++) begin
        // slot s+3
        if (s < 6) exp_slot = l6[4*s +: 4];
        else       exp_slot = l1[s - 6] ? 4'hF : 4'h0;
        if (ainit) exp_slot = 4'hF;
        chk(fields.slot_link_reset[s] == exp_slot, $sformatf("slot %0d link reset", s + 3));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
