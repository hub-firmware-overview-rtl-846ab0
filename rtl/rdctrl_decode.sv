// rdctrl_decode: turns the Readout_Ctrl shadow registers into named signals.
//
// The ROD sends the Hub one Readout_Ctrl message per LHC clock. Its fields
// (Word_0: version [11:8], ROD_BUSY [14], Aurora_Init [15], channel-up of
// slots 3..14 [27:16]; Word_1: four link-reset bits for each of slots 3..8
// in [23:0] and one for each of slots 9..14 in [29:24]) follow the
// Readout_Ctrl bit definition table. Aurora_Init is the global link reset
// for all data links of the shelf, so it is OR-ed into every slot's four
// link-reset bits here; a slot 9..14 single bit drives all four of that
// slot's bits (own choice, the table gives those slots one bit). The version
// field is compared with EXPECTED_VERSION ("0000" during debug).
// Outputs are registered: one cycle after the shadow registers change.
module rdctrl_decode
  import hub_pkg::*;
#(
  parameter logic [3:0] EXPECTED_VERSION = 4'h0
) (
  input  logic           clk,
  input  logic           rst,
  input  ctrl_msg_t      shadow,      // Readout_Ctrl shadow registers
  output rdctrl_fields_t fields,
  output logic           version_ok
);

  rdctrl_fields_t d;

  always_comb begin
    d.version     = shadow[0][11:8];
    d.rod_busy    = shadow[0][14];
    d.aurora_init = shadow[0][15];
    d.channel_up  = shadow[0][16 +: N_FEX];
    for (int s = 0; s < N_FEX; s++) begin
      if (s < 6) d.slot_link_reset[s] = shadow[1][4*s +: 4];
      else       d.slot_link_reset[s] = {4{shadow[1][24 + s - 6]}};
      d.slot_link_reset[s] = d.slot_link_reset[s] | {4{d.aurora_init}};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fields     <= '0;
      version_ok <= 1'b0;
    end else begin
      fields     <= d;
      version_ok <= (d.version == EXPECTED_VERSION);
    end
  end

endmodule
