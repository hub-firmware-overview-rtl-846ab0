// tb_hub_bringup: the Hub's link bring-up sequence, run on the full top.
//
// Stage 1: the Hub sends the static test pattern on its Combined_TTC/DATA
//          links; a ROD-side receiver checks a50f00bc / 00000000 / counter /
//          be800000 with the counter stepping once per frame.
// Stage 2: the ROD sends the same kind of pattern on Readout_Ctrl; with CRC
//          checking off the Hub locks and its shadow registers show the
//          expected words, the counter changing every frame.
// Stage 3: retransmit mode: the Readout_Ctrl message received from the ROD
//          comes back on the links to the ROD and to FEX slot 3.
// Stage 4: normal operation with CRC checking on: real Readout_Ctrl messages
//          from the ROD and correct Combined_TTC/DATA frames (valid CRC, the
//          ROD's busy flag and slot 3's link resets) at the ROD and slot 3.
module tb_hub_bringup;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #3.119 clk = ~clk;

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

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- ROD transmitter model
  logic    rod_pattern = 1;
  msg128_t rod_msg = '0;
  logic [31:0] rod_count = 0;
  int      rod_idx = 0;
  msg128_t rod_snap;
  always @(posedge clk) begin
    if (rod_idx == 0) begin
      rod_snap  = rod_pattern ? {32'hBE800000, rod_count, 32'h0, 32'hA50F00BC} : rod_msg;
      rod_count <= rod_count + 1;
    end
    rdctrl_rx_data    <= rod_snap[32*rod_idx +: 32];
    rdctrl_rx_charisk <= (rod_idx == 0) ? 4'b0001 : 4'b0000;
    rod_idx = (rod_idx + 1) % 4;
  end
  assign rdctrl_rx_code_err = 0;
  assign {ohub_rx_data, ohub_rx_charisk, ohub_rx_code_err} = '0;

  // ---------------------------------------------------------------- receivers at the ROD and slot 3
  // Hunts for the comma on each link independently and keeps the last frame.
  localparam int NMON = 2;
  int        mon_link[NMON] = '{DEST_ROD, 0};
  ctrl_msg_t mon_asm[NMON], mon_last[NMON];
  int        mon_w[NMON] = '{-1, -1};
  int        mon_frames[NMON] = '{0, 0};
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NMON; i++) begin
      logic [31:0] d; logic [3:0] k;
      d = cttc_tx_data[mon_link[i]]; k = cttc_tx_charisk[mon_link[i]];
      if (k == 4'b0001 && d[7:0] == 8'hBC) mon_w[i] = 0;
      if (mon_w[i] >= 0) begin
        mon_asm[i][mon_w[i]] = d;
        if (mon_w[i] == 3) begin
          mon_last[i] = mon_asm[i];
          mon_frames[i]++;
          mon_w[i] = -1;
        end else mon_w[i]++;
      end
    end
  end

  task automatic frames(int n);
    int f0;
    f0 = mon_frames[0];
    wait (mon_frames[0] >= f0 + n);
    @(negedge clk);
  endtask

  task automatic ipb_write(logic [31:0] a, logic [31:0] wd);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: wd, strobe: 1'b1, write: 1'b1};
    do @(negedge clk); while (!ipb_out.ack && !ipb_out.err);
    chk(ipb_out.ack, "IPbus write acknowledged");
    ipb_in.strobe = 1'b0;
  endtask

  initial begin
    logic [31:0] c0;
    ipb_in = '0; mac_rx = '0; ipbc_rx_tready = 1; ipbc_tx = '0; mac_tx_tready = '1;
    ttc = '0; control_channel = 0; other_rod_channel_up = 0;
    shelf_addr = 8'h02; slot_addr = 8'h01; alerts_in = 0;
    repeat (4) @(negedge clk);
    rst = 0;

    // Stage 1: Hub test pattern, Hub receivers without CRC check
    ipb_write(3, 32'h0000_0041);
    frames(3);
    for (int i = 0; i < NMON; i++) begin
      chk(mon_last[i][0] == 32'hA50F00BC && mon_last[i][1] == 0 && mon_last[i][3] == 32'hBE800000,
          $sformatf("stage 1 pattern words on link %0d", mon_link[i]));
    end
    c0 = mon_last[0][2];
    frames(5);
    chk(mon_last[0][2] == c0 + 5, "stage 1 pattern counter steps once per frame");

    // Stage 2: ROD pattern received by the Hub
    frames(6);
    chk(rdctrl_locked, "stage 2 Readout_Ctrl locked on the ROD pattern");
    chk(rdctrl_shadow[0] == 32'hA50F00BC && rdctrl_shadow[1] == 0 &&
        rdctrl_shadow[3] == 32'hBE800000, "stage 2 shadow registers hold the expected words");
    c0 = rdctrl_shadow[2];
    frames(4);
    chk(rdctrl_shadow[2] == c0 + 4, "stage 2 counter word advances");
    chk(rdctrl_fields.channel_up == 12'h50F && !rdctrl_fields.rod_busy, "stage 2 decoded fields");

    // Stage 3: Readout_Ctrl retransmitted as Combined_TTC to the ROD and slot 3
    ipb_write(3, 32'h0000_00C0);
    frames(3);
    for (int i = 0; i < NMON; i++)
      chk(mon_last[i][0] == 32'hA50F00BC && mon_last[i][3] == 32'hBE800000 &&
          rdctrl_shadow[2] - mon_last[i][2] <= 4,
          $sformatf("stage 3 ROD message looped back on link %0d", mon_link[i]));
    c0 = mon_last[1][2];
    frames(3);
    chk(mon_last[1][2] == c0 + 3, "stage 3 counter follows the ROD");

    // Stage 4: real messages, CRC on
    rod_msg = ref_rdctrl(4'h0, 1'b1, 1'b0, 12'h001, 24'h00000C, 6'h0);
    rod_pattern = 0;
    ipb_write(3, 32'h0000_0002);
    frames(8);
    c0 = 32'(rdctrl_crc_err_cnt);
    frames(4);
    chk(rdctrl_locked && 32'(rdctrl_crc_err_cnt) == c0, "stage 4 locked with CRC checking");
    for (int i = 0; i < NMON; i++) begin
      chk(mon_last[i][3][31:23] == ref_crc(mon_last[i]), $sformatf("stage 4 CRC on link %0d", mon_link[i]));
      chk(mon_last[i][3][4] == 1'b1 && mon_last[i][3][5] == 1'b1 && mon_last[i][3][22:20] == 3'h2,
          $sformatf("stage 4 busy, link enable, shelf on link %0d", mon_link[i]));
    end
    chk(mon_last[1][3][3:0] == 4'hC && mon_last[1][3][6], "stage 4 slot 3 link reset and channel up");
    chk(mon_last[0][3][3:0] == 4'h0, "stage 4 ROD link has no link reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
