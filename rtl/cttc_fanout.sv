// cttc_fanout: Combined_TTC/DATA transmitters of the Hub.
//
// The Hub distributes TTC information and data-link initialisation to the
// shelf over one Combined_TTC/DATA link per destination: the twelve FEX slots
// 3..14 (index 0..11), the ROD on this Hub (index N_FEX) and the other Hub
// (index N_FEX+1). For each destination the block assembles the fields, runs
// them through cttc_encode (comma, version, CRC) and a ctrl_link_tx, giving
// one 32-bit word per user-clock cycle and one 128-bit message per LHC clock.
//
// Field sources:
//   L1A, BCR, ECR, privileged readout, L1ID, ECRID  TTC interface (all links)
//   ROD busy, link resets, ROD 0 channel up         Readout_Ctrl from the ROD
//   reset[3:0], link enable, control channel        Hub registers / inputs
//   shelf number                                    shelf address pins
// A FEX slot gets its own four link-reset bits (already OR-ed with
// Aurora_Init) and its own channel-up bit from this ROD (ROD 0) and from the
// ROD of the other Hub (ROD 1, given as an input). The ROD and other-Hub links
// get Aurora_Init on all four link-reset bits and zero channel-up bits (own
// choice; the document defines the fields per FEX slot). Two bring-up modes
// replace the live messages on every link: pattern_mode sends the
// ctrl_pattern_gen test pattern, and retransmit_mode (when pattern_mode is
// low) sends the Readout_Ctrl shadow registers received from the ROD as they
// are, which loops the ROD's message back through the shelf links.
// The inputs are sampled at frame_start and are expected to be held for the
// whole LHC clock period, as LHC-clock-domain registers are.
module cttc_fanout
  import hub_pkg::*;
#(
  parameter logic [3:0] VERSION = 4'h0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  ttc_info_t             ttc,
  input  rdctrl_fields_t        rd,
  input  logic [N_FEX-1:0]      other_rod_channel_up,
  input  logic [3:0]            sys_reset,
  input  logic                  link_enable,
  input  logic [2:0]            shelf,
  input  logic [31:0]           control_channel,
  input  logic                  pattern_mode,
  input  logic                  retransmit_mode,
  input  ctrl_msg_t             rd_shadow,      // Readout_Ctrl shadow registers
  output logic [N_CTTC_DEST-1:0][31:0] tx_data,
  output logic [N_CTTC_DEST-1:0][3:0]  tx_charisk,
  output logic                  frame_start
);

  ctrl_msg_t pattern;
  logic [N_CTTC_DEST-1:0] fs;

  assign frame_start = fs[0];

  ctrl_pattern_gen u_pat (
    .clk(clk), .rst(rst), .frame_start(fs[0]), .msg(pattern)
  );

  for (genvar d = 0; d < N_CTTC_DEST; d++) begin : g_dest
    cttc_fields_t f;
    ctrl_msg_t    enc, ctrl;
    logic [3:0]   lrst;
    logic         up0, up1;

    if (d < N_FEX) begin : g_fex
      assign lrst = rd.slot_link_reset[d];
      assign up0  = rd.channel_up[d];
      assign up1  = other_rod_channel_up[d];
    end else begin : g_sys
      assign lrst = {4{rd.aurora_init}};
      assign up0  = 1'b0;
      assign up1  = 1'b0;
    end

    always_comb begin
      f.version         = VERSION;
      f.reset           = sys_reset;
      f.l1a             = ttc.l1a;
      f.bcr             = ttc.bcr;
      f.ecr             = ttc.ecr;
      f.priv_readout    = ttc.priv_readout;
      f.l1id            = ttc.l1id;
      f.ecrid           = ttc.ecrid;
      f.control_channel = control_channel;
      f.rod_busy        = rd.rod_busy;
      f.link_enable     = link_enable;
      f.shelf           = shelf;
      f.link_reset      = lrst;
      f.rod0_channel_up = up0;
      f.rod1_channel_up = up1;
    end

    cttc_encode #(.VERSION(VERSION)) u_enc (.f(f), .msg(enc));

    assign ctrl = pattern_mode    ? pattern   :
                  retransmit_mode ? rd_shadow : enc;

    ctrl_link_tx u_tx (
      .clk(clk), .rst(rst), .ctrl(ctrl),
      .tx_data(tx_data[d]), .tx_charisk(tx_charisk[d]), .frame_start(fs[d])
    );
  end

  // All transmitters share reset and clock, so their frames stay in phase.
  assert property (@(posedge clk) disable iff (rst) fs == '0 || fs == '1);

endmodule
