// cttc_encode: builds the four Combined_TTC/DATA control words of one link.
//
// Packs the TTC and initialisation fields into Word_0..Word_3 following the
// Combined_TTC/DATA bit definition table: Word_0 = K28.5, version, reset[3:0],
// L1A, BCR, ECR, privileged readout; Word_1 = L1ID[23:0], ECRID[7:0];
// Word_2 = control channel; Word_3 = link_reset[3:0], ROD busy, link enable,
// ROD 0/1 channel up, shelf number [22:20] and the 9-bit CRC [31:23]. All
// reserved bits are zero. The version field is forced to the VERSION
// parameter. Purely combinational; the link transmitter registers it.
module cttc_encode
  import hub_pkg::*;
#(
  parameter logic [3:0] VERSION = 4'h0
) (
  input  cttc_fields_t f,
  output ctrl_msg_t    msg
);

  ctrl_msg_t  body;
  logic [8:0] crc;

  always_comb begin
    cttc_fields_t g;
    g         = f;
    g.version = VERSION;
    body      = cttc_pack(g);
  end

  crc9 u_crc (.msg(body), .crc(crc));

  always_comb begin
    msg          = body;
    msg[3][31:23] = crc;
  end

endmodule
