// ctrl_link_rx: receive side of a control link, holding the shadow registers.
//
// The transceiver delivers 32-bit words with per-byte K flags after its own
// comma alignment has put K28.5 in byte 0. A word whose flags are 4'b0001 and
// whose byte 0 is 0xBC starts a frame; the next three words are Word_1..3.
// When Word_3 arrives the 9-bit CRC in Word_3[31:23] is checked against the
// other 119 bits. A frame that is complete, has no transceiver code error and
// a correct CRC (or arrives while crc_check_en is low) is copied into the four
// shadow registers in one cycle, so the shadow set always holds one whole
// message, and shadow_valid pulses. A comma where a data word is due, a K
// flag inside a frame, or a missing comma after Word_3 is an alignment error.
// LOCK_FRAMES good frames in a row set `locked`; any error clears it.
// Error counters saturate. The shadow registers keep the last good message
// across errors and loss of lock; they reset to zero.
//
// Shadow registers fed by a comma-aligned stream follow the link
// description; the lock rule, the error counters and the decision to drop
// frames with a bad CRC are this design's choices.
// Timing: shadow updates on the clock edge after Word_3 is at the input.
module ctrl_link_rx
  import hub_pkg::*;
#(
  parameter int unsigned LOCK_FRAMES = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rx_data,      // from transceiver RXDATA
  input  logic [3:0]  rx_charisk,   // from transceiver RXCHARISK
  input  logic        rx_code_err,  // disparity or not-in-table error
  input  logic        crc_check_en, // 0: accept frames whatever their CRC
  output ctrl_msg_t   shadow,       // shadow registers Word_0..Word_3
  output logic        shadow_valid, // one-cycle pulse on update
  output logic        locked,
  output logic        crc_err,      // one-cycle pulse per bad CRC
  output logic        align_err,    // one-cycle pulse per framing error
  output logic [15:0] crc_err_cnt,
  output logic [15:0] align_err_cnt
);

  localparam int LC_W = $clog2(LOCK_FRAMES + 1);

  logic        in_frame;
  logic [1:0]  idx;          // index of the last word stored
  logic        code_bad;     // code error seen in the current frame
  logic [2:0][31:0] buffer;  // Word_0..Word_2 of the frame in progress
  logic [LC_W-1:0]  good_run;

  logic       is_comma;
  ctrl_msg_t  cand;
  logic [8:0] cand_crc;

  assign is_comma  = (rx_charisk == 4'b0001) && (rx_data[7:0] == K28_5);
  assign cand      = {rx_data, buffer[2], buffer[1], buffer[0]};

  crc9 u_crc (.msg(cand), .crc(cand_crc));

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame      <= 1'b0;
      idx           <= 2'd0;
      code_bad      <= 1'b0;
      buffer        <= '0;
      shadow        <= '0;
      shadow_valid  <= 1'b0;
      locked        <= 1'b0;
      crc_err       <= 1'b0;
      align_err     <= 1'b0;
      crc_err_cnt   <= '0;
      align_err_cnt <= '0;
      good_run      <= '0;
    end else begin
      logic aerr, cerr, good;
      aerr = 1'b0;
      cerr = 1'b0;
      good = 1'b0;

      if (is_comma) begin
        // A comma is only expected right after Word_3 (or while hunting).
        if (in_frame) aerr = 1'b1;
        in_frame  <= 1'b1;
        idx       <= 2'd0;
        buffer[0] <= rx_data;
        code_bad  <= rx_code_err;
      end else if (in_frame) begin
        if (rx_charisk != 4'b0000) begin
          aerr     = 1'b1;
          in_frame <= 1'b0;
        end else if (idx == 2'd2) begin
          in_frame <= 1'b0;
          if ((cand_crc == rx_data[31:23] || !crc_check_en) && !code_bad && !rx_code_err)
            good = 1'b1;
          else
            cerr = 1'b1;
        end else begin
          buffer[idx + 2'd1] <= rx_data;
          idx      <= idx + 2'd1;
          code_bad <= code_bad | rx_code_err;
        end
      end else if (locked) begin
        // Locked and not in a frame: this word should have been a comma.
        aerr = 1'b1;
      end

      shadow_valid <= good;
      if (good) shadow <= cand;
      crc_err   <= cerr;
      align_err <= aerr;
      if (cerr && crc_err_cnt != '1)   crc_err_cnt   <= crc_err_cnt + 16'd1;
      if (aerr && align_err_cnt != '1) align_err_cnt <= align_err_cnt + 16'd1;

      if (aerr || cerr) begin
        good_run <= '0;
        locked   <= 1'b0;
      end else if (good) begin
        if (good_run >= LC_W'(LOCK_FRAMES - 1)) locked <= 1'b1;
        if (good_run != LC_W'(LOCK_FRAMES))    good_run <= good_run + 1'b1;
      end
    end
  end

  // A shadow update never coincides with an error report.
  assert property (@(posedge clk) disable iff (rst) shadow_valid |-> !crc_err && !align_err);

endmodule
