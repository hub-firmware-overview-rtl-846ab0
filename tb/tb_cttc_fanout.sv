// tb_cttc_fanout: all fourteen Combined_TTC/DATA links (FEX slots 3..14,
// ROD, other Hub) are captured word by word and each frame is compared with
// a reference message built from the inputs present at frame_start: common
// TTC fields on every link, each FEX slot's own link resets and channel-up
// bits, Aurora_Init on the ROD and other-Hub links. A second phase runs in
// retransmit mode and expects the Readout_Ctrl shadow registers on every
// link; a third runs in pattern mode (which overrides retransmit mode) and
// expects the bring-up pattern with a per-frame counter.
// All links must start their frames in the same cycle.
module tb_cttc_fanout;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  logic                  clk = 0, rst = 1;
  ttc_info_t             ttc;
  rdctrl_fields_t        rd;
  logic [N_FEX-1:0]      other_rod_channel_up;
  logic [3:0]            sys_reset;
  logic                  link_enable;
  logic [2:0]            shelf;
  logic [31:0]           control_channel;
  logic                  pattern_mode;
  logic                  retransmit_mode;
  ctrl_msg_t             rd_shadow;
  logic [N_CTTC_DEST-1:0][31:0] tx_data;
  logic [N_CTTC_DEST-1:0][3:0]  tx_charisk;
  logic                  frame_start;
  int checks = 0, failures = 0;

  cttc_fanout dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef logic [N_CTTC_DEST-1:0][127:0] frame_set_t;
  frame_set_t exp_q[$];

  function automatic void push_expected(int pat_count);
    frame_set_t e;
    for (int d = 0; d < N_CTTC_DEST; d++) begin
      logic [3:0] lr; logic u0, u1;
      if (d < N_FEX) begin
        lr = rd.slot_link_reset[d]; u0 = rd.channel_up[d]; u1 = other_rod_channel_up[d];
      end else begin
        lr = {4{rd.aurora_init}}; u0 = 0; u1 = 0;
      end
      if (pattern_mode)
        e[d] = {32'hBE800000, 32'(pat_count), 32'h0, 32'hA50F00BC};
      else if (retransmit_mode)
        e[d] = {rd_shadow[3], rd_shadow[2], rd_shadow[1], rd_shadow[0][31:8], 8'hBC};
      else
        e[d] = ref_cttc(4'h0, sys_reset, ttc.l1a, ttc.bcr, ttc.ecr, ttc.priv_readout,
                        ttc.l1id, ttc.ecrid, control_channel, lr, rd.rod_busy,
                        link_enable, u0, u1, shelf);
    end
    exp_q.push_back(e);
  endfunction

  initial begin
    int frames = 0, pat_count = 0, widx = -1;
    ctrl_msg_t got[N_CTTC_DEST];
    frame_set_t e;
    {ttc, rd, other_rod_channel_up, sys_reset, link_enable, shelf, control_channel} = '0;
    pattern_mode = 0; retransmit_mode = 0; rd_shadow = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    #1;
    if (frame_start) begin
      push_expected(pat_count);
      pat_count++;
    end
    for (int cyc = 0; cyc < 1200; cyc++) begin
      @(negedge clk);
      // capture
      if (tx_charisk[0] == 4'b0001) widx = 0;
      if (widx >= 0) begin
        for (int d = 0; d < N_CTTC_DEST; d++) begin
          got[d][widx] = tx_data[d];
          chk(tx_charisk[d] == ((widx == 0) ? 4'b0001 : 4'b0000), "links in phase");
        end
        if (widx == 3) begin
          e = exp_q.pop_front();
          for (int d = 0; d < N_CTTC_DEST; d++)
            chk(msg128_t'(got[d]) == e[d], $sformatf("link %0d frame %0d", d, frames));
          frames++;
          widx = -1;
        end else widx++;
      end
      // new random inputs every cycle; only those at frame_start count
      ttc = ttc_info_t'({$urandom, $urandom});
      rd  = rdctrl_fields_t'({$urandom, $urandom, $urandom});
      other_rod_channel_up = 12'($urandom);
      sys_reset = 4'($urandom); link_enable = 1'($urandom); shelf = 3'($urandom);
      control_channel = $urandom;
      rd_shadow = {$urandom, $urandom, $urandom, $urandom};
      retransmit_mode = (cyc >= 400 && cyc < 800) || (cyc >= 800 && 1'($urandom));
      pattern_mode = (cyc >= 800);
      #1;
      if (frame_start) begin
        push_expected(pat_count);
        pat_count++;
      end
    end
    chk(frames >= 290, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
