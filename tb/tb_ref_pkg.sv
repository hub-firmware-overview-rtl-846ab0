// tb_ref_pkg: reference models shared by the testbenches.
//
// Written independently of the RTL: the CRC is computed by polynomial long
// division of (M(x)*x^9 + INIT(x)*x^119) by G(x) = x^9 + POLY, and the word
// layouts are built bit by bit from the link bit-definition tables rather
// than with the RTL package's pack functions.
package tb_ref_pkg;

  localparam logic [8:0] REF_POLY = 9'h119;
  localparam logic [8:0] REF_INIT = 9'h1FF;

  typedef logic [127:0] msg128_t;

  function automatic logic [8:0] ref_crc(msg128_t m);
    logic [127:0] v;   // coefficients of x^0..x^127
    logic [9:0]   g;
    g = {1'b1, REF_POLY};
    for (int b = 0; b < 128; b++) v[b] = (b >= 9) ? m[b - 9] : 1'b0;   // M(x) * x^9
    for (int b = 0; b < 9; b++)   v[119 + b] = v[119 + b] ^ REF_INIT[b]; // + INIT * x^119
    for (int b = 127; b >= 9; b--)
      if (v[b])
        for (int j = 0; j < 10; j++) v[b - j] = v[b - j] ^ g[9 - j];
    return v[8:0];
  endfunction

  function automatic msg128_t with_crc(msg128_t m);
    msg128_t r;
    r = m;
    r[127:119] = ref_crc(m);
    return r;
  endfunction

  // Combined_TTC/DATA reference layout, bit positions from the table.
  function automatic msg128_t ref_cttc(
      logic [3:0] version, logic [3:0] rst4, logic l1a, logic bcr, logic ecr,
      logic priv, logic [23:0] l1id, logic [7:0] ecrid, logic [31:0] cc,
      logic [3:0] lrst, logic busy, logic len, logic up0, logic up1,
      logic [2:0] shelf);
    msg128_t m;
    m = '0;
    m[7:0] = 8'b1011_1100;   // K28.5
    for (int i = 0; i < 4; i++) begin
      m[8 + i]      = version[i];
      m[12 + i]     = rst4[i];
      m[96 + i]     = lrst[i];
    end
    m[16] = l1a; m[17] = bcr; m[18] = ecr; m[19] = priv;
    for (int i = 0; i < 24; i++) m[32 + i] = l1id[i];
    for (int i = 0; i < 8; i++)  m[56 + i] = ecrid[i];
    for (int i = 0; i < 32; i++) m[64 + i] = cc[i];
    m[100] = busy; m[101] = len; m[102] = up0; m[103] = up1;
    for (int i = 0; i < 3; i++)  m[116 + i] = shelf[i];
    return with_crc(m);
  endfunction

  // Readout_Ctrl reference layout as the ROD would send it.
  // lrst6: 4 bits for each of slots 3..8; lrst1: one bit for slots 9..14.
  function automatic msg128_t ref_rdctrl(
      logic [3:0] version, logic busy, logic ainit, logic [11:0] chup,
      logic [23:0] lrst6, logic [5:0] lrst1);
    msg128_t m;
    m = '0;
    m[7:0] = 8'hBC;
    m[11:8] = version;
    m[14] = busy;
    m[15] = ainit;
    m[27:16] = chup;
    m[55:32] = lrst6;
    m[61:56] = lrst1;
    return with_crc(m);
  endfunction

endpackage
