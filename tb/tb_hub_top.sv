// tb_hub_top: end-to-end test of the Hub firmware at its default sizes.
//
// Models around the Hub: a ROD sending Readout_Ctrl frames through a
// three-cycle link, the other Hub sending Combined_TTC/DATA frames, a TTC
// source aligned to the Hub's frames, an IPbus master, two MACs and an IPbus
// controller that echoes requests. A monitor decodes all fourteen outgoing
// Combined_TTC/DATA links (comma, CRC, fields).
// Scenario: configure hub_control over IPbus, bring the Readout_Ctrl link to
// lock, check per-slot link resets, channel-up, ROD busy and TTC fields on
// every link, assert the global Aurora_Init, measure ROD-busy latency
// through the Hub, inject a CRC error and a short frame, switch to pattern
// mode and retransmit mode, check the other-Hub receiver, and pass IPbus packets from both MACs
// through the mux (one without reply, to use the timeout). Each mechanism is
// counted and a failure is counted for any that never happened.
module tb_hub_top;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #3.119 clk = ~clk;    // ~160.32 MHz

  // ---------------------------------------------------------------- DUT
  logic [31:0] rdctrl_rx_data;  logic [3:0] rdctrl_rx_charisk;  logic rdctrl_rx_code_err;
  logic rdctrl_locked, rdctrl_version_ok;
  rdctrl_fields_t rdctrl_fields;
  ctrl_msg_t rdctrl_shadow;
  logic [15:0] rdctrl_crc_err_cnt, rdctrl_align_err_cnt;
  logic [31:0] ohub_rx_data;    logic [3:0] ohub_rx_charisk;    logic ohub_rx_code_err;
  logic ohub_locked;
  cttc_fields_t ohub_fields;
  logic [15:0] ohub_crc_err_cnt, ohub_align_err_cnt;
  logic [N_CTTC_DEST-1:0][31:0] cttc_tx_data;
  logic [N_CTTC_DEST-1:0][3:0]  cttc_tx_charisk;
  logic cttc_frame_start;
  ttc_info_t ttc;
  logic [31:0] control_channel;
  logic [N_FEX-1:0] other_rod_channel_up;
  logic [7:0] shelf_addr, slot_addr;
  logic [31:0] alerts_in;
  logic [15:0] rod_geo_addr;
  ipb_wbus_t ipb_in;  ipb_rbus_t ipb_out;
  axis8_t [1:0] mac_rx;  logic [1:0] mac_rx_tready;
  axis8_t ipbc_rx;  logic ipbc_rx_tready;
  axis8_t ipbc_tx;  logic ipbc_tx_tready;
  axis8_t [1:0] mac_tx;  logic [1:0] mac_tx_tready;
  logic mac_owner;

  hub_top dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- ROD model
  msg128_t rod_msg;                 // ROD control registers (with CRC)
  logic    rod_bad_crc  = 0;        // corrupt the CRC of the next frame
  logic    rod_short    = 0;        // drop Word_3 of the next frame
  int      rod_idx = 0;
  msg128_t rod_snap;
  logic [2:0][35:0] rod_line;       // 3-cycle link: {charisk, data}
  int unsigned rod_change_cycle;    // cycle a changed message was first sampled
  msg128_t     rod_prev = '0;

  always @(posedge clk) begin
    logic [35:0] w;
    logic        skip;
    msg128_t     m;
    skip = 0;
    if (rod_idx == 0) begin
      m = rod_msg;
      if (rod_bad_crc) begin m[127:119] = ~m[127:119]; rod_bad_crc <= 0; end
      rod_snap = m;
      if (rod_msg != rod_prev) rod_change_cycle <= cycle;
      rod_prev = rod_msg;
    end
    if (rod_idx == 3 && rod_short) begin skip = 1; rod_short <= 0; end
    w = (rod_idx == 0) ? {4'b0001, rod_snap[31:0]} : {4'b0000, rod_snap[32*rod_idx +: 32]};
    rod_idx = skip ? 1 : (rod_idx + 1) % 4;   // a skipped Word_3 becomes the next Word_0 slot
    if (skip) begin
      rod_snap = rod_msg;
      w = {4'b0001, rod_snap[31:0]};
    end
    rod_line <= {rod_line[1:0], w};
  end
  assign {rdctrl_rx_charisk, rdctrl_rx_data} = rod_line[2];
  assign rdctrl_rx_code_err = 1'b0;

  // ---------------------------------------------------------------- other Hub model
  msg128_t ohub_msg;
  int      oh_idx = 0;
  msg128_t oh_snap;
  always @(posedge clk) begin
    if (oh_idx == 0) oh_snap = ohub_msg;
    ohub_rx_data    <= oh_snap[32*oh_idx +: 32];
    ohub_rx_charisk <= (oh_idx == 0) ? 4'b0001 : 4'b0000;
    oh_idx = (oh_idx + 1) % 4;
  end
  assign ohub_rx_code_err = 1'b0;

  // ---------------------------------------------------------------- output monitor
  ctrl_msg_t   asm_frame[N_CTTC_DEST];
  ctrl_msg_t   last_frame[N_CTTC_DEST];
  int          widx = -1;
  int unsigned out_frames = 0;
  int          bad_out = 0;
  logic        check_out_crc = 1;
  int unsigned busy_seen_cycle;
  logic        busy_watch = 0, busy_watch_val = 0;

  always @(posedge clk) if (!rst) begin
    int wi;
    wi = widx;
    if (cttc_tx_charisk[0] == 4'b0001) wi = 0;
    if (wi >= 0) begin
      for (int d = 0; d < N_CTTC_DEST; d++) begin
        asm_frame[d][wi] = cttc_tx_data[d];
        if (cttc_tx_charisk[d] != ((wi == 0) ? 4'b0001 : 4'b0000)) bad_out++;
      end
      if (wi == 3) begin
        for (int d = 0; d < N_CTTC_DEST; d++) begin
          last_frame[d] = asm_frame[d];
          if (asm_frame[d][0][7:0] != 8'hBC) bad_out++;
          if (check_out_crc && asm_frame[d][3][31:23] != ref_crc(asm_frame[d])) bad_out++;
        end
        if (busy_watch && asm_frame[0][3][4] == busy_watch_val) begin
          busy_seen_cycle = cycle;
          busy_watch = 0;
        end
        out_frames++;
        wi = -1;
      end else wi++;
    end
    widx = wi;
  end

  task automatic wait_frames(int n);
    int unsigned f0;
    f0 = out_frames;
    wait (out_frames >= f0 + n);
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------- IPbus master
  task automatic ipb(input logic wr, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output logic err);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: wd, strobe: 1'b1, write: wr};
    do @(negedge clk); while (!ipb_out.ack && !ipb_out.err);
    rd = ipb_out.rdata; err = ipb_out.err;
    ipb_in.strobe = 1'b0;
  endtask

  // ---------------------------------------------------------------- IPbus controller model (echo)
  logic [7:0] req[$], rep[$];
  int         rep_pos = -1;
  int         mac_replies[2];
  assign ipbc_rx_tready = 1'b1;
  always @(posedge clk) begin
    if (ipbc_rx.tvalid && ipbc_rx_tready) begin
      req.push_back(ipbc_rx.tdata);
      if (ipbc_rx.tlast) begin
        if (req[0] != 8'hFF) begin rep = req; rep_pos = 0; end   // 0xFF: no reply
        req.delete();
      end
    end
    if (rep_pos >= 0 && ipbc_tx.tvalid && ipbc_tx_tready)
      rep_pos = (rep_pos == rep.size() - 1) ? -1 : rep_pos + 1;
  end
  always_comb begin
    ipbc_tx = '0;
    if (rep_pos >= 0) begin
      ipbc_tx.tvalid = 1; ipbc_tx.tdata = rep[rep_pos]; ipbc_tx.tlast = (rep_pos == rep.size() - 1);
    end
  end
  assign mac_tx_tready = 2'b11;
  for (genvar k = 0; k < 2; k++) begin : g_macsink
    always @(posedge clk) if (mac_tx[k].tvalid && mac_tx[k].tlast) begin
      if (mac_tx[k].tdata == 8'(8'hA0 + k)) mac_replies[k]++;   // last byte tags the MAC
      else begin failures++; $display("FAIL reply on wrong MAC %0d", k); end
    end
  end

  task automatic mac_send(int k, logic [7:0] first);
    logic [7:0] b[4];
    b = '{first, 8'h12, 8'h34, 8'(8'hA0 + k)};
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      mac_rx[k] = '{tdata: b[i], tvalid: 1'b1, tlast: (i == 3), tuser: 1'b0};
      do @(posedge clk); while (!mac_rx_tready[k]);
    end
    @(negedge clk);
    mac_rx[k] = '0;
  endtask

  // ---------------------------------------------------------------- expected link content
  function automatic msg128_t exp_fex(int s, logic [3:0] rst4, logic len, logic [2:0] shelf,
                                      logic busy, logic ainit, logic [3:0] lr, logic up0,
                                      logic up1);
    return ref_cttc(4'h0, rst4, ttc.l1a, ttc.bcr, ttc.ecr, ttc.priv_readout, ttc.l1id,
                    ttc.ecrid, control_channel, ainit ? 4'hF : lr, busy, len, up0, up1, shelf);
  endfunction

  // mechanism counters
  int n_lock = 0, n_crc_err = 0, n_align_err = 0, n_aurora_init = 0, n_pattern = 0,
      n_ipb_err = 0, n_mac0 = 0, n_mac1 = 0, n_timeout = 0, n_ohub = 0, n_l1a = 0,
      n_retransmit = 0;

  initial begin
    logic [31:0] r; logic e;
    logic [23:0] l6; logic [5:0] l1; logic [11:0] chup;
    int unsigned lat;

    ipb_in = '0; mac_rx = '0;
    ttc = '0; control_channel = 32'hC0DE_0001; other_rod_channel_up = 12'hA5A;
    shelf_addr = 8'h06; slot_addr = 8'h01; alerts_in = 32'h0;
    l6 = 24'h8C_3A51; l1 = 6'b100110; chup = 12'hF0F;
    rod_msg  = ref_rdctrl(4'h0, 1'b0, 1'b0, chup, l6, l1);
    ohub_msg = ref_cttc(4'h0, 4'h3, 0, 0, 0, 0, 24'h000123, 8'h07, 32'hFEED_0000, 4'h5,
                        1, 1, 1, 0, 3'h6);
    repeat (5) @(negedge clk);
    rst = 0;

    // -- IPbus: module/address registers, control write, error
    ipb(0, 0, 0, r, e); chk(!e && r[31:24] == 8'h48, "hub_module read");
    ipb(0, 1, 0, r, e); chk(!e && r[15:0] == 16'h0601 && rod_geo_addr == 16'h0601, "hub_address read");
    ipb(1, 3, 32'h0000_002A, r, e); chk(!e, "hub_control write");   // link_enable, reset=4'hA
    ipb(1, 0, 32'h1, r, e); chk(e, "write to RO register rejected"); n_ipb_err += int'(e);
    alerts_in = 32'h0000_0004;
    repeat (4) @(negedge clk);
    ipb(0, 2, 0, r, e); chk(!e && r == 32'h4, "hub_alerts read");

    // -- Readout_Ctrl lock
    wait_frames(8);
    chk(rdctrl_locked && rdctrl_version_ok, "Readout_Ctrl locked"); n_lock += int'(rdctrl_locked);
    chk(ohub_locked && cttc_pack(ohub_fields) == {9'h0, ohub_msg[118:0]}, "other-Hub shadow registers");
    n_ohub += int'(ohub_locked);

    // -- per-slot fields on every link
    wait_frames(2);
    for (int s = 0; s < N_FEX; s++) begin
      logic [3:0] lr;
      lr = (s < 6) ? l6[4*s +: 4] : {4{l1[s - 6]}};
      chk(msg128_t'(last_frame[s]) == exp_fex(s, 4'hA, 1'b1, 3'h6, 1'b0, 1'b0, lr, chup[s],
                                                other_rod_channel_up[s]),
          $sformatf("FEX slot %0d link content", s + 3));
    end
    for (int d = N_FEX; d < N_CTTC_DEST; d++)
      chk(msg128_t'(last_frame[d]) == exp_fex(d, 4'hA, 1'b1, 3'h6, 1'b0, 1'b0, 4'h0, 0, 0),
          $sformatf("system link %0d content", d));

    // -- TTC fields: L1A with new L1ID, aligned to the Hub frame
    @(posedge clk iff cttc_frame_start);
    @(negedge clk);
    ttc = '{l1a: 1, bcr: 0, ecr: 0, priv_readout: 1, l1id: 24'h00ABCD, ecrid: 8'h11};
    wait_frames(3);
    for (int d = 0; d < N_CTTC_DEST; d++)
      chk(last_frame[d][0][16] && last_frame[d][0][19] && last_frame[d][1] == 32'h1100ABCD,
          $sformatf("TTC fields on link %0d", d));
    n_l1a++;
    ttc = '0;

    // -- global Aurora_Init resets all data links
    rod_msg = ref_rdctrl(4'h0, 1'b0, 1'b1, chup, l6, l1);
    wait_frames(4);
    for (int d = 0; d < N_CTTC_DEST; d++)
      chk(last_frame[d][3][3:0] == 4'hF, $sformatf("Aurora_Init on link %0d", d));
    n_aurora_init++;
    rod_msg = ref_rdctrl(4'h0, 1'b0, 1'b0, chup, l6, l1);
    wait_frames(4);
    chk(last_frame[DEST_ROD][3][3:0] == 4'h0, "Aurora_Init released");

    // -- ROD busy latency through the Hub
    rod_msg = ref_rdctrl(4'h0, 1'b1, 1'b0, chup, l6, l1);
    busy_watch_val = 1; busy_watch = 1;
    wait (!busy_watch);
    lat = busy_seen_cycle - rod_change_cycle;
    $display("ROD_BUSY latency: %0d user clocks (%0d LHC clocks)", lat, (lat + 3) / 4);
    chk(lat <= 16, "ROD_BUSY crosses the Hub within four LHC clocks");

    // -- CRC error and short frame on Readout_Ctrl
    rod_bad_crc = 1;
    wait_frames(4);
    chk(rdctrl_crc_err_cnt == 1, "CRC error counted"); n_crc_err += int'(rdctrl_crc_err_cnt);
    chk(rdctrl_fields.rod_busy, "fields held across bad frame");
    rod_short = 1;
    wait_frames(4);
    chk(rdctrl_align_err_cnt >= 1, "short frame counted"); n_align_err += int'(rdctrl_align_err_cnt);
    wait_frames(6);
    chk(rdctrl_locked, "relocked after errors");

    // -- pattern mode (CRC checking off)
    ipb(1, 3, 32'h0000_0041, r, e); chk(!e, "pattern mode on");
    check_out_crc = 0;
    wait_frames(3);
    begin
      logic [31:0] c0;
      c0 = last_frame[5][2];
      chk(last_frame[5][0] == 32'hA50F00BC && last_frame[5][1] == 0 &&
          last_frame[5][3] == 32'hBE800000, "pattern words");
      wait_frames(1);
      chk(last_frame[5][2] == c0 + 1 && last_frame[13][2] == c0 + 1, "pattern counter");
    end
    n_pattern++;

    // -- retransmit mode: Readout_Ctrl message looped back on the links
    ipb(1, 3, 32'h0000_0082, r, e); chk(!e, "retransmit mode on");
    wait_frames(3);
    chk(last_frame[DEST_ROD] == rdctrl_shadow && last_frame[0] == rdctrl_shadow,
        "Readout_Ctrl message retransmitted");
    n_retransmit++;
    ipb(1, 3, 32'h0000_0002, r, e);
    wait_frames(2);
    check_out_crc = 1;

    // -- MAC mux: one packet from each MAC, one unanswered
    mac_send(0, 8'h01);
    wait (mac_replies[0] == 1);
    n_mac0++;
    mac_send(1, 8'hFF);          // controller gives no reply
    repeat (4200) @(negedge clk); // longer than the reply timeout
    mac_send(1, 8'h02);
    wait (mac_replies[1] == 1);
    n_mac1++; n_timeout++;
    chk(mac_replies[0] == 1 && mac_replies[1] == 1, "replies to the right MACs");

    chk(bad_out == 0, "every output frame well formed");
    chk(ohub_crc_err_cnt == 0 && ohub_align_err_cnt == 0, "other-Hub link clean");

    begin
      int cnt[12];
      string nm[12];
      cnt = '{n_lock, n_crc_err, n_align_err, n_aurora_init, n_pattern, n_ipb_err,
              n_mac0, n_mac1, n_timeout, n_ohub, n_l1a, n_retransmit};
      nm  = '{"lock", "crc_error", "align_error", "aurora_init", "pattern_mode",
              "ipbus_error", "mac0_served", "mac1_served", "reply_timeout",
              "other_hub_rx", "l1a", "retransmit"};
      for (int i = 0; i < 12; i++) begin
        $display("mechanism %-14s %0d", nm[i], cnt[i]);
        chk(cnt[i] > 0, {"mechanism exercised: ", nm[i]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
