// ctrl_link_tx: transmit side of a control link (Readout_Ctrl or
// Combined_TTC/DATA).
//
// The four control registers Word_0..Word_3 are sent continuously to the
// transceiver's 32-bit parallel port, one word per user-clock cycle, so one
// 128-bit message goes out per LHC clock (6.4 Gb/s line rate, 8b10b coded,
// 32-bit words at 4x the LHC clock). A free-running 2-bit word counter picks
// the word. When Word_0 goes out, all four registers are sampled at once, so
// each frame on the line is one consistent message even if the registers
// change mid-frame; whatever is in the registers at the start of a frame is
// on the line within that frame. Byte 0 of Word_0 is always replaced by
// K28.5 and flagged as a control character (charisk = 4'b0001); all other
// bytes are data. `frame_start` is high in the cycle whose input is sampled,
// so a writer in the LHC-clock domain can align to it.
//
// Continuous transmission, the 4-word message and the comma in Word_0 follow
// the link description; the user-clock ratio, the sampling point and the
// one-cycle output register are this design's choices. Latency: the word
// sampled at frame_start appears on tx_data one cycle later.
module ctrl_link_tx
  import hub_pkg::*;
(
  input  logic       clk,          // transceiver user clock, 4x LHC clock
  input  logic       rst,          // synchronous, active high
  input  ctrl_msg_t  ctrl,         // control registers Word_0..Word_3
  output logic [31:0] tx_data,     // to transceiver TXDATA
  output logic [3:0]  tx_charisk,  // to transceiver TXCHARISK
  output logic        frame_start  // ctrl is sampled in this cycle
);

  logic [1:0] idx;
  ctrl_msg_t  snap;

  assign frame_start = (idx == 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      idx        <= 2'd0;
      snap       <= '0;
      tx_data    <= {24'h0, K28_5};
      tx_charisk <= 4'b0001;
    end else begin
      idx <= idx + 2'd1;
      if (idx == 2'd0) begin
        snap       <= ctrl;
        tx_data    <= {ctrl[0][31:8], K28_5};
        tx_charisk <= 4'b0001;
      end else begin
        tx_data    <= snap[idx];
        tx_charisk <= 4'b0000;
      end
    end
  end

endmodule
