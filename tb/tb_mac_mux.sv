// tb_mac_mux: two MAC models send request packets (first byte tags the MAC
// and a sequence number) with random gaps; an IPbus-controller model accepts
// them with random back-pressure and answers each with a reply, except every
// seventh request, which it drops. The testbench checks that every reply
// reaches the MAC its request came from, byte for byte and in order, that
// both MACs are served, and that dropped requests do not stall the mux
// (reply timeout).
module tb_mac_mux;
  import hub_pkg::*;

  logic         clk = 0, rst = 1;
  axis8_t [1:0] mac_rx;
  logic   [1:0] mac_rx_tready;
  axis8_t       ctrl_rx;
  logic         ctrl_rx_tready;
  axis8_t       ctrl_tx;
  logic         ctrl_tx_tready;
  axis8_t [1:0] mac_tx;
  logic   [1:0] mac_tx_tready;
  logic         owner;
  int checks = 0, failures = 0;

  localparam int NPKT = 30;   // per MAC

  mac_mux #(.REPLY_TIMEOUT(40)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef logic [7:0] bytes_t[$];

  // ---------------------------------------------------------------- MAC sources
  bytes_t     pkt[2][NPKT];
  int         sent_pkts[2], sent_pos[2];
  bytes_t     expect_q[2][$];     // replies each MAC should get
  int         dropped = 0;

  function automatic bytes_t make_pkt(int k, int seq);
    bytes_t b;
    int len = 2 + ($urandom % 9);
    b.push_back({1'(k), 7'(seq)});
    for (int i = 1; i < len; i++) b.push_back(8'($urandom));
    return b;
  endfunction

  for (genvar k = 0; k < 2; k++) begin : g_src
    logic gap;
    always @(posedge clk) begin
      if (rst) begin
        sent_pkts[k] <= 0; sent_pos[k] <= 0; gap <= 0;
      end else begin
        if (mac_rx[k].tvalid && mac_rx_tready[k]) begin
          if (mac_rx[k].tlast) begin
            sent_pkts[k] <= sent_pkts[k] + 1;
            sent_pos[k]  <= 0;
          end else sent_pos[k] <= sent_pos[k] + 1;
        end
        gap <= ($urandom % 5) == 0;
      end
    end
    always_comb begin
      mac_rx[k] = '0;
      if (!rst && !gap && sent_pkts[k] < NPKT) begin
        mac_rx[k].tvalid = 1'b1;
        mac_rx[k].tdata  = pkt[k][sent_pkts[k]][sent_pos[k]];
        mac_rx[k].tlast  = (sent_pos[k] == pkt[k][sent_pkts[k]].size() - 1);
      end
    end
  end

  // ---------------------------------------------------------------- controller model
  bytes_t cur, reply;
  int     reply_pos = -1, reply_wait = 0;
  logic   rx_rdy;
  int     grants[2];

  assign ctrl_rx_tready = rx_rdy;

  always @(posedge clk) begin
    if (rst) begin
      rx_rdy <= 0; grants[0] <= 0; grants[1] <= 0;
    end else begin
      rx_rdy <= ($urandom % 4) != 0;
      if (ctrl_rx.tvalid && ctrl_rx_tready) begin
        cur.push_back(ctrl_rx.tdata);
        if (ctrl_rx.tlast) begin
          logic k;
          k = cur[0][7];
          grants[k] <= grants[k] + 1;
          if (cur[0][6:0] % 7 == 3) begin
            dropped++;            // no reply for this request
          end else begin
            bytes_t r;
            r = cur;
            for (int i = 1; i < r.size(); i++) r[i] = ~r[i];
            expect_q[k].push_back(r);
            reply      = r;
            reply_wait = 2 + ($urandom % 6);
            reply_pos  = 0;
          end
          cur.delete();
        end
      end
      if (reply_pos >= 0) begin
        if (reply_wait > 0) reply_wait--;
        else if (ctrl_tx.tvalid && ctrl_tx_tready) begin
          if (reply_pos == reply.size() - 1) reply_pos = -1;
          else reply_pos++;
        end
      end
    end
  end

  always_comb begin
    ctrl_tx = '0;
    if (reply_pos >= 0 && reply_wait == 0) begin
      ctrl_tx.tvalid = 1'b1;
      ctrl_tx.tdata  = reply[reply_pos];
      ctrl_tx.tlast  = (reply_pos == reply.size() - 1);
    end
  end

  // ---------------------------------------------------------------- MAC sinks
  bytes_t got[2];
  int     replies[2];
  for (genvar k = 0; k < 2; k++) begin : g_sink
    always @(posedge clk) begin
      if (rst) begin
        mac_tx_tready[k] <= 0; replies[k] <= 0;
      end else begin
        mac_tx_tready[k] <= ($urandom % 3) != 0;
        if (mac_tx[k].tvalid && mac_tx_tready[k]) begin
          got[k].push_back(mac_tx[k].tdata);
          if (mac_tx[k].tlast) begin
            checks++;
            if (expect_q[k].size() == 0 || got[k] != expect_q[k][0]) begin
              failures++;
              $display("FAIL reply on MAC %0d does not match its request", k);
            end
            if (expect_q[k].size() > 0) void'(expect_q[k].pop_front());
            replies[k] <= replies[k] + 1;
            got[k].delete();
          end
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < NPKT; i++) pkt[k][i] = make_pkt(k, i);
    repeat (3) @(negedge clk);
    rst = 0;
    wait (sent_pkts[0] == NPKT && sent_pkts[1] == NPKT);
    repeat (200) @(negedge clk);
    chk(grants[0] == NPKT && grants[1] == NPKT, "every request reached the controller");
    chk(dropped > 0, "some requests dropped (timeout path used)");
    chk(replies[0] + replies[1] + dropped == 2 * NPKT, "every answered request got its reply");
    chk(expect_q[0].size() == 0 && expect_q[1].size() == 0, "no reply missing");
    $display("grants %0d/%0d replies %0d/%0d dropped %0d", grants[0], grants[1],
             replies[0], replies[1], dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
