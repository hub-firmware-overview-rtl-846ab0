// crc9: the 9-bit CRC of a 128-bit control-link message.
//
// Word_3[31:23] of both the Readout_Ctrl and the Combined_TTC/DATA message is
// a 9-bit CRC; this block computes it over the other 119 bits, msg[118:0]
// (flat bit b = Word_(b/32) bit b%32, comma included). The bits enter a
// linear-feedback register most significant first, one per step of an
// unrolled loop, so the whole CRC is one combinational cone with no clock.
// The message layout and the 9-bit width follow the link specification
// tables; the generator polynomial (x^9+x^8+x^4+x^3+1), the all-ones preset
// and the bit order are this design's own choice and can be changed with
// the parameters, which must match at both ends of a link.
module crc9
  import hub_pkg::*;
#(
  parameter logic [8:0] POLY = CRC9_POLY,
  parameter logic [8:0] INIT = CRC9_INIT
) (
  input  ctrl_msg_t  msg,   // message; bits [127:119] are ignored
  output logic [8:0] crc
);

  logic [127:0] flat;
  assign flat = msg;

  always_comb begin
    logic [8:0] r;
    logic       fb;
    r = INIT;
    for (int b = CRC_LSB - 1; b >= 0; b--) begin
      fb = r[8] ^ flat[b];
      r  = {r[7:0], 1'b0};
      if (fb) r = r ^ POLY;
    end
    crc = r;
  end

endmodule
