// hub_top: firmware of the Hub FPGA of an ATCA shelf.
//
// The Hub is the shelf's distribution point for timing, trigger and control.
// From the ROD it receives the Readout_Ctrl stream (ctrl_link_rx +
// rdctrl_decode): ROD busy, the global Aurora_Init link reset, per-slot link
// resets and per-slot channel-up flags. It merges these with the TTC
// information (L1A, BCR, ECR, L1ID, ECRID) and sends one Combined_TTC/DATA
// stream to each of the twelve FEX slots, to its own ROD and to the other Hub
// (cttc_fanout). For bring-up, the outgoing links can instead carry a test
// pattern or loop the ROD's Readout_Ctrl message back. It also receives the other Hub's Combined_TTC/DATA stream
// into a second set of shadow registers. Control and monitoring go through
// IPbus: mac_mux lets a single IPbus controller serve two Ethernet MACs, and
// hub_regs holds the Hub's common registers.
//
// Transceivers, MACs, the IPbus controller and the TTC receiver are outside
// this RTL; their parallel interfaces are the ports below. Everything runs on
// one clock, the transceiver user clock at four times the LHC clock (160.32
// MHz for a 6.4 Gb/s 8b10b line with 32-bit words); a real build would put
// IPbus on its own clock with a synchroniser for hub_control.
//
// hub_control bits (own assignment):
//   [0]   pattern_mode: Combined_TTC links send the test pattern
//   [1]   link_enable bit sent to all destinations
//   [5:2] reset[3:0] bits sent to all destinations
//   [6]   disable CRC checking on both receivers (needed for test patterns)
//   [7]   retransmit_mode: Combined_TTC links resend the Readout_Ctrl message
module hub_top
  import hub_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  // Readout_Ctrl from the ROD (transceiver RX parallel side)
  input  logic [31:0]                  rdctrl_rx_data,
  input  logic [3:0]                   rdctrl_rx_charisk,
  input  logic                         rdctrl_rx_code_err,
  output logic                         rdctrl_locked,
  output logic                         rdctrl_version_ok,
  output rdctrl_fields_t               rdctrl_fields,
  output ctrl_msg_t                    rdctrl_shadow,   // raw shadow registers
  output logic [15:0]                  rdctrl_crc_err_cnt,
  output logic [15:0]                  rdctrl_align_err_cnt,
  // Combined_TTC/DATA from the other Hub
  input  logic [31:0]                  ohub_rx_data,
  input  logic [3:0]                   ohub_rx_charisk,
  input  logic                         ohub_rx_code_err,
  output logic                         ohub_locked,
  output cttc_fields_t                 ohub_fields,
  output logic [15:0]                  ohub_crc_err_cnt,
  output logic [15:0]                  ohub_align_err_cnt,
  // Combined_TTC/DATA to FEX slots 3..14, this ROD, the other Hub
  output logic [N_CTTC_DEST-1:0][31:0] cttc_tx_data,
  output logic [N_CTTC_DEST-1:0][3:0]  cttc_tx_charisk,
  output logic                         cttc_frame_start,
  // TTC interface and other sources of Combined_TTC fields
  input  ttc_info_t                    ttc,
  input  logic [31:0]                  control_channel,
  input  logic [N_FEX-1:0]             other_rod_channel_up,
  // board signals
  input  logic [7:0]                   shelf_addr,
  input  logic [7:0]                   slot_addr,
  input  logic [31:0]                  alerts_in,
  output logic [15:0]                  rod_geo_addr,
  // IPbus bus from the controller
  input  ipb_wbus_t                    ipb_in,
  output ipb_rbus_t                    ipb_out,
  // MAC <-> IPbus controller packet streams
  input  axis8_t [1:0]                 mac_rx,
  output logic   [1:0]                 mac_rx_tready,
  output axis8_t                       ipbc_rx,
  input  logic                         ipbc_rx_tready,
  input  axis8_t                       ipbc_tx,
  output logic                         ipbc_tx_tready,
  output axis8_t [1:0]                 mac_tx,
  input  logic   [1:0]                 mac_tx_tready,
  output logic                         mac_owner
);

  logic [31:0] hub_control;
  ctrl_msg_t   rd_shadow, oh_shadow;
  logic        crc_check_en;

  assign crc_check_en = !hub_control[6];

  // ---------------------------------------------------------------- IPbus side
  hub_regs u_regs (
    .clk(clk), .rst(rst), .ipb_in(ipb_in), .ipb_out(ipb_out),
    .shelf_addr(shelf_addr), .slot_addr(slot_addr), .alerts_in(alerts_in),
    .hub_control(hub_control), .rod_geo_addr(rod_geo_addr)
  );

  mac_mux u_mux (
    .clk(clk), .rst(rst),
    .mac_rx(mac_rx), .mac_rx_tready(mac_rx_tready),
    .ctrl_rx(ipbc_rx), .ctrl_rx_tready(ipbc_rx_tready),
    .ctrl_tx(ipbc_tx), .ctrl_tx_tready(ipbc_tx_tready),
    .mac_tx(mac_tx), .mac_tx_tready(mac_tx_tready),
    .owner(mac_owner)
  );

  // ---------------------------------------------------------------- Readout_Ctrl
  logic rd_valid, rd_crc_err, rd_align_err;

  ctrl_link_rx u_rdctrl_rx (
    .clk(clk), .rst(rst),
    .rx_data(rdctrl_rx_data), .rx_charisk(rdctrl_rx_charisk),
    .rx_code_err(rdctrl_rx_code_err), .crc_check_en(crc_check_en),
    .shadow(rd_shadow), .shadow_valid(rd_valid), .locked(rdctrl_locked),
    .crc_err(rd_crc_err), .align_err(rd_align_err),
    .crc_err_cnt(rdctrl_crc_err_cnt), .align_err_cnt(rdctrl_align_err_cnt)
  );

  rdctrl_decode u_rdctrl_dec (
    .clk(clk), .rst(rst), .shadow(rd_shadow),
    .fields(rdctrl_fields), .version_ok(rdctrl_version_ok)
  );

  // ---------------------------------------------------------------- Combined_TTC out
  cttc_fanout u_fanout (
    .clk(clk), .rst(rst), .ttc(ttc), .rd(rdctrl_fields),
    .other_rod_channel_up(other_rod_channel_up),
    .sys_reset(hub_control[5:2]), .link_enable(hub_control[1]),
    .shelf(shelf_addr[2:0]), .control_channel(control_channel),
    .pattern_mode(hub_control[0]), .retransmit_mode(hub_control[7]),
    .rd_shadow(rd_shadow),
    .tx_data(cttc_tx_data), .tx_charisk(cttc_tx_charisk),
    .frame_start(cttc_frame_start)
  );

  // ---------------------------------------------------------------- Combined_TTC from other Hub
  logic oh_valid, oh_crc_err, oh_align_err;

  ctrl_link_rx u_ohub_rx (
    .clk(clk), .rst(rst),
    .rx_data(ohub_rx_data), .rx_charisk(ohub_rx_charisk),
    .rx_code_err(ohub_rx_code_err), .crc_check_en(crc_check_en),
    .shadow(oh_shadow), .shadow_valid(oh_valid), .locked(ohub_locked),
    .crc_err(oh_crc_err), .align_err(oh_align_err),
    .crc_err_cnt(ohub_crc_err_cnt), .align_err_cnt(ohub_align_err_cnt)
  );

  assign ohub_fields   = cttc_unpack(oh_shadow);
  assign rdctrl_shadow = rd_shadow;

endmodule
