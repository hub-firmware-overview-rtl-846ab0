// mac_mux: shares one IPbus controller between the Hub's two Ethernet MACs.
//
// The Hub has two Ethernet base-interface connections, each with its own PHY
// and MAC, but a single IPbus controller. This mux passes one request packet
// at a time from either MAC's receive stream to the controller and returns
// the controller's reply to the MAC the request came from.
//
// Streams are byte-wide, AXI-stream style (tdata/tvalid/tlast/tuser with a
// separate tready). In IDLE the mux grants the next MAC with tvalid, taking
// turns when both wait. During REQUEST it forwards that MAC's bytes until the
// tlast byte is accepted. In REPLY it accepts no new request and routes the
// controller's transmit stream to the same MAC until the reply's tlast byte
// is accepted. A request that the controller does not answer (for example a
// malformed packet) must not lock the mux: if no reply byte has appeared
// REPLY_TIMEOUT cycles after the request ended, the mux goes back to IDLE.
// The document says only that one controller reaches two MACs through a mux;
// this packet-level pairing and the timeout are this design's choices.
module mac_mux
  import hub_pkg::*;
#(
  parameter int unsigned REPLY_TIMEOUT = 4096
) (
  input  logic         clk,
  input  logic         rst,
  // MAC receive streams (requests)
  input  axis8_t [1:0] mac_rx,
  output logic   [1:0] mac_rx_tready,
  // to the IPbus controller
  output axis8_t       ctrl_rx,
  input  logic         ctrl_rx_tready,
  // from the IPbus controller (replies)
  input  axis8_t       ctrl_tx,
  output logic         ctrl_tx_tready,
  // MAC transmit streams
  output axis8_t [1:0] mac_tx,
  input  logic   [1:0] mac_tx_tready,
  output logic         owner        // MAC currently served
);

  typedef enum logic [1:0] {S_IDLE, S_REQUEST, S_REPLY} state_t;

  localparam int TW = $clog2(REPLY_TIMEOUT + 1);

  state_t        state;
  logic          last_served;
  logic          reply_started;
  logic [TW-1:0] timer;

  // ---- request path
  always_comb begin
    ctrl_rx       = '0;
    mac_rx_tready = '0;
    if (state == S_REQUEST) begin
      ctrl_rx              = mac_rx[owner];
      mac_rx_tready[owner] = ctrl_rx_tready;
    end
  end

  // ---- reply path: always to the owner of the last request
  always_comb begin
    mac_tx         = '0;
    mac_tx[owner]  = ctrl_tx;
    ctrl_tx_tready = mac_tx_tready[owner];
  end

  logic rx_last_hs, tx_hs, tx_last_hs;
  assign rx_last_hs = (state == S_REQUEST) && mac_rx[owner].tvalid && mac_rx[owner].tlast && ctrl_rx_tready;
  assign tx_hs      = ctrl_tx.tvalid && ctrl_tx_tready;
  assign tx_last_hs = tx_hs && ctrl_tx.tlast;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      owner         <= 1'b0;
      last_served   <= 1'b1;
      reply_started <= 1'b0;
      timer         <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (mac_rx[0].tvalid || mac_rx[1].tvalid) begin
            // Round robin: prefer the MAC not served last time.
            if (mac_rx[!last_served].tvalid) owner <= !last_served;
            else                             owner <= last_served;
            state <= S_REQUEST;
          end
        end
        S_REQUEST: begin
          if (rx_last_hs) begin
            last_served   <= owner;
            state         <= S_REPLY;
            reply_started <= 1'b0;
            timer         <= '0;
          end
        end
        S_REPLY: begin
          if (tx_hs) reply_started <= 1'b1;
          if (tx_last_hs) begin
            state <= S_IDLE;
          end else if (!reply_started && !tx_hs) begin
            if (timer == TW'(REPLY_TIMEOUT - 1)) state <= S_IDLE;
            else                                 timer <= timer + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Only the granted MAC is ever told it may send.
  assert property (@(posedge clk) disable iff (rst) !(mac_rx_tready[0] && mac_rx_tready[1]));

endmodule
