// ctrl_pattern_gen: test-pattern source for a control link.
//
// For bring-up the control registers of a link are filled with static
// patterns instead of live data: Word_0, Word_1 and Word_3 are constants
// and Word_2 is a counter, which makes every frame distinct and lets the
// receiving end check the word order. Defaults are the words that the
// Readout_Ctrl bring-up test expects at the receiver (a50f00bc, 00000000,
// counter, be800000). The counter steps once per frame, on frame_start
// (own choice), and starts at zero after reset. Word_3 is sent as given,
// so its CRC field is not a valid CRC: receivers must have CRC checking off.
module ctrl_pattern_gen
  import hub_pkg::*;
#(
  parameter logic [31:0] PAT_W0 = 32'hA50F00BC,
  parameter logic [31:0] PAT_W1 = 32'h00000000,
  parameter logic [31:0] PAT_W3 = 32'hBE800000
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      frame_start,  // from the link transmitter
  output ctrl_msg_t msg
);

  logic [31:0] count;

  always_ff @(posedge clk) begin
    if (rst)              count <= '0;
    else if (frame_start) count <= count + 32'd1;
  end

  assign msg = {PAT_W3, count, PAT_W1, {PAT_W0[31:8], K28_5}};

endmodule
