// hub_pkg: types and constants shared by the Hub FPGA firmware.
//
// Both serial control links of the Hub (Readout_Ctrl from the ROD and
// Combined_TTC/DATA to the shelf) carry a 128-bit message made of four 32-bit
// control registers, Word_0..Word_3, sent back to back, one message per LHC
// bunch-crossing clock. Byte 0 of Word_0 is the K28.5 comma (0xBC) and the top
// nine bits of Word_3 hold a CRC. The bit layouts below follow the bit
// definition tables of the two links; the CRC polynomial and initial value,
// the IPbus record types and the stream types of the MAC mux are this
// design's own choices.
package hub_pkg;

  // ---------------------------------------------------------------- link
  localparam logic [7:0] K28_5       = 8'hBC;   // comma in Word_0[7:0]
  localparam int         MSG_WORDS   = 4;
  localparam int         CRC_LSB     = 119;     // CRC sits in msg[127:119]
  // CRC-9 generator x^9 + x^8 + x^4 + x^3 + 1 (own choice), MSB-first,
  // register preset to all ones.
  localparam logic [8:0] CRC9_POLY   = 9'h119;
  localparam logic [8:0] CRC9_INIT   = 9'h1FF;

  // Word i of a message is msg[i]; flat bit b of the message is msg[b/32][b%32].
  typedef logic [MSG_WORDS-1:0][31:0] ctrl_msg_t;

  // ---------------------------------------------------------------- shelf
  localparam int N_FEX          = 12;   // FEX slots 3..14
  localparam int FIRST_FEX_SLOT = 3;
  localparam int N_CTTC_DEST    = N_FEX + 2;  // + this ROD + other Hub
  localparam int DEST_ROD       = N_FEX;      // index of the ROD link
  localparam int DEST_OTHER_HUB = N_FEX + 1;  // index of the other-Hub link

  // ---------------------------------------------------------------- Combined_TTC/DATA fields
  typedef struct packed {
    // Word_0
    logic [3:0]  version;       // [11:8]
    logic [3:0]  reset;         // [15:12] system-level reset/enable
    logic        l1a;           // [16]
    logic        bcr;           // [17]
    logic        ecr;           // [18]
    logic        priv_readout;  // [19]
    // Word_1
    logic [23:0] l1id;          // [23:0]
    logic [7:0]  ecrid;         // [31:24]
    // Word_2
    logic [31:0] control_channel;
    // Word_3
    logic [3:0]  link_reset;    // [3:0]
    logic        rod_busy;      // [4]
    logic        link_enable;   // [5]
    logic        rod0_channel_up; // [6]
    logic        rod1_channel_up; // [7]
    logic [2:0]  shelf;         // [22:20]
  } cttc_fields_t;

  // TTC information from the Hub's TTC interface.
  typedef struct packed {
    logic        l1a;
    logic        bcr;
    logic        ecr;
    logic        priv_readout;
    logic [23:0] l1id;
    logic [7:0]  ecrid;
  } ttc_info_t;

  // ---------------------------------------------------------------- Readout_Ctrl fields
  typedef struct packed {
    logic [3:0]             version;         // Word_0[11:8]
    logic                   rod_busy;        // Word_0[14]
    logic                   aurora_init;     // Word_0[15] global link reset
    logic [N_FEX-1:0]       channel_up;      // Word_0[27:16], slot 3 in bit 0
    logic [N_FEX-1:0][3:0]  slot_link_reset; // per slot, Aurora_Init already merged
  } rdctrl_fields_t;

  // ---------------------------------------------------------------- IPbus
  // Same signal set as the IPbus firmware's bus records.
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  // ---------------------------------------------------------------- byte stream (MAC side)
  typedef struct packed {
    logic [7:0] tdata;
    logic       tvalid;
    logic       tlast;
    logic       tuser;   // frame error / drop marker, passed through
  } axis8_t;

  // ---------------------------------------------------------------- helpers
  // Packs Combined_TTC/DATA fields into the four words; comma set, CRC zero.
  function automatic ctrl_msg_t cttc_pack(cttc_fields_t f);
    ctrl_msg_t m;
    m        = '0;
    m[0][7:0]   = K28_5;
    m[0][11:8]  = f.version;
    m[0][15:12] = f.reset;
    m[0][16]    = f.l1a;
    m[0][17]    = f.bcr;
    m[0][18]    = f.ecr;
    m[0][19]    = f.priv_readout;
    m[1][23:0]  = f.l1id;
    m[1][31:24] = f.ecrid;
    m[2]        = f.control_channel;
    m[3][3:0]   = f.link_reset;
    m[3][4]     = f.rod_busy;
    m[3][5]     = f.link_enable;
    m[3][6]     = f.rod0_channel_up;
    m[3][7]     = f.rod1_channel_up;
    m[3][22:20] = f.shelf;
    return m;
  endfunction

  function automatic cttc_fields_t cttc_unpack(ctrl_msg_t m);
    cttc_fields_t f;
    f.version         = m[0][11:8];
    f.reset           = m[0][15:12];
    f.l1a             = m[0][16];
    f.bcr             = m[0][17];
    f.ecr             = m[0][18];
    f.priv_readout    = m[0][19];
    f.l1id            = m[1][23:0];
    f.ecrid           = m[1][31:24];
    f.control_channel = m[2];
    f.link_reset      = m[3][3:0];
    f.rod_busy        = m[3][4];
    f.link_enable     = m[3][5];
    f.rod0_channel_up = m[3][6];
    f.rod1_channel_up = m[3][7];
    f.shelf           = m[3][22:20];
    return f;
  endfunction

endpackage
