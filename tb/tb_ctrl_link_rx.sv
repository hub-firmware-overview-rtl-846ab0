// tb_ctrl_link_rx: shadow-register receiver. Sends good frames and checks
// that each appears whole in the shadow registers one clock after its last
// word, that lock comes after four good frames, and that a bad CRC, a
// transceiver code error, a short frame, a K character inside a frame and a
// missing comma are each reported, counted, drop lock and leave the shadow
// registers unchanged. With CRC checking off a bad-CRC frame is accepted.
module tb_ctrl_link_rx;
  import hub_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic [31:0] rx_data;
  logic [3:0]  rx_charisk;
  logic        rx_code_err;
  logic        crc_check_en;
  ctrl_msg_t   shadow;
  logic        shadow_valid, locked, crc_err, align_err;
  logic [15:0] crc_err_cnt, align_err_cnt;
  int checks = 0, failures = 0;
  int n_valid = 0;

  ctrl_link_rx #(.LOCK_FRAMES(4)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    n_valid += int'(shadow_valid);
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic word(logic [31:0] d, logic [3:0] k, logic cerr = 0);
    rx_data = d; rx_charisk = k; rx_code_err = cerr;
    @(negedge clk);
  endtask

  // Sends a frame; returns after the clock edge that takes Word_3.
  task automatic send(msg128_t m, int code_err_word = -1);
    for (int w = 0; w < 4; w++)
      word(m[32*w +: 32], (w == 0) ? 4'b0001 : 4'b0000, code_err_word == w);
  endtask

  function automatic msg128_t rnd_msg();
    msg128_t m;
    m = {$urandom, $urandom, $urandom, $urandom};
    m[7:0] = 8'hBC;
    return with_crc(m);
  endfunction

  initial begin
    msg128_t m, prev;
    int v0;
    rx_data = 0; rx_charisk = 0; rx_code_err = 0; crc_check_en = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) word(32'h1234_5678, 4'b0000);   // noise before the first comma

    // 1. good frames: shadow follows, lock after the fourth
    for (int i = 0; i < 6; i++) begin
      m = rnd_msg();
      send(m);
      // the edge after Word_3 has updated the shadow registers
      chk(shadow_valid && !crc_err && !align_err, "shadow_valid pulse after Word_3");
      chk(shadow == m, "shadow equals sent message");
      chk(locked == (i >= 3), "lock after four good frames");
      prev = m;
    end

    // 2. bad CRC
    m = rnd_msg();
    m[127:119] = ~m[127:119];
    send(m);
    chk(crc_err && !shadow_valid && crc_err_cnt == 1, "crc error counted");
    chk(shadow == prev, "bad frame not copied");
    chk(!locked, "lock lost on crc error");

    // 3. relock, then code error inside a frame
    for (int i = 0; i < 4; i++) begin m = rnd_msg(); send(m); prev = m; end
    chk(locked, "relock");
    send(rnd_msg(), 2);
    chk(crc_err && crc_err_cnt == 2 && !locked && shadow == prev, "code error rejects frame");

    // 4. short frame: comma, two words, comma
    for (int i = 0; i < 4; i++) begin m = rnd_msg(); send(m); prev = m; end
    m = rnd_msg();
    word(m[31:0], 4'b0001); word(m[63:32], 0); word(m[95:64], 0);
    chk(shadow == prev, "short frame not copied");
    m = rnd_msg();
    send(m);
    chk(align_err_cnt == 1, "short frame is an alignment error");
    chk(shadow == m, "frame after short frame accepted");

    // 5. K character inside a frame
    m = rnd_msg();
    word(m[31:0], 4'b0001); word(m[63:32], 4'b0100);
    chk(align_err && align_err_cnt == 2, "K character inside frame");
    word(m[95:64], 0); word(m[127:96], 0);
    chk(shadow != m, "frame with K character not copied");

    // 6. missing comma while locked
    for (int i = 0; i < 4; i++) begin m = rnd_msg(); send(m); prev = m; end
    chk(locked, "locked before gap");
    word(32'hDEAD_BEEF, 0);
    chk(align_err && align_err_cnt == 3 && !locked, "missing comma drops lock");

    // 7. CRC check disabled: bad CRC accepted
    crc_check_en = 0;
    m = rnd_msg();
    m[127:119] = ~m[127:119];
    v0 = n_valid;
    send(m);
    chk(shadow_valid && shadow == m, "crc check disabled accepts frame");
    crc_check_en = 1;

    @(negedge clk);
    chk(n_valid == 20, "number of shadow updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
