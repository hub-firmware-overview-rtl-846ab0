// tb_hub_regs: IPbus access to the four common Hub registers. Checks the
// hub_module constant, the synchronised shelf/slot address and alert inputs,
// read/write of hub_control (zero after reset), error responses for writes to
// read-only registers and for addresses outside the block, and that every
// strobe is answered in exactly one cycle.
module tb_hub_regs;
  import hub_pkg::*;

  logic        clk = 0, rst = 1;
  ipb_wbus_t   ipb_in;
  ipb_rbus_t   ipb_out;
  logic [7:0]  shelf_addr, slot_addr;
  logic [31:0] alerts_in, hub_control;
  logic [15:0] rod_geo_addr;
  int checks = 0, failures = 0;

  localparam logic [31:0] BASE = 32'h0000_0040;

  hub_regs #(.BASE_ADDR(BASE), .MODULE_ID(8'h48), .HW_VERSION(8'h02),
             .FW_VERSION(16'h1234)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One IPbus cycle; returns data and whether it ended in err.
  task automatic ipb(input logic wr, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output logic err);
    int n = 0;
    ipb_in = '{addr: a, wdata: wd, strobe: 1'b1, write: wr};
    do begin @(negedge clk); n++; end while (!ipb_out.ack && !ipb_out.err && n < 20);
    chk(n == 1, "one-cycle response");
    rd  = ipb_out.rdata;
    err = ipb_out.err;
    ipb_in.strobe = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] r; logic e;
    ipb_in = '0; shelf_addr = 8'h05; slot_addr = 8'h02; alerts_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    chk(hub_control == 0, "hub_control zero after reset");
    repeat (3) @(negedge clk);
    ipb(0, BASE + 0, 0, r, e); chk(!e && r == 32'h4802_1234, "hub_module");
    ipb(0, BASE + 1, 0, r, e); chk(!e && r == 32'h0502_0502, "hub_address");
    chk(rod_geo_addr == 16'h0502, "address to ROD");
    ipb(0, BASE + 2, 0, r, e); chk(!e && r == 0, "alerts clear");
    alerts_in = 32'h8000_0011;
    repeat (3) @(negedge clk);
    ipb(0, BASE + 2, 0, r, e); chk(!e && r == 32'h8000_0011, "alerts set");
    ipb(0, BASE + 3, 0, r, e); chk(!e && r == 0, "control reads zero");
    for (int i = 0; i < 20; i++) begin
      logic [31:0] v;
      v = $urandom;
      ipb(1, BASE + 3, v, r, e); chk(!e && hub_control == v, "control write");
      ipb(0, BASE + 3, 0, r, e); chk(!e && r == v, "control readback");
    end
    ipb(1, BASE + 0, 32'hFFFF_FFFF, r, e); chk(e, "write to RO register gives err");
    ipb(1, BASE + 2, 32'hFFFF_FFFF, r, e); chk(e, "write to alerts gives err");
    ipb(0, BASE + 0, 0, r, e); chk(!e && r == 32'h4802_1234, "RO unchanged");
    ipb(0, BASE + 4, 0, r, e); chk(e, "address above block");
    ipb(0, BASE - 1, 0, r, e); chk(e, "address below block");
    rst = 1; @(negedge clk); rst = 0;
    chk(hub_control == 0, "control cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
