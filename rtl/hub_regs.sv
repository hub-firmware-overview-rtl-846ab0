// hub_regs: the Hub's common IPbus registers.
//
// An IPbus slave with the four registers of the Hub's initial register map:
//   BASE+0  hub_module  RO  {MODULE_ID[7:0], HW_VERSION[7:0], FW_VERSION[15:0]}
//   BASE+1  hub_address RO  {rod_geo_addr[15:0], shelf_addr[7:0], slot_addr[7:0]}
//   BASE+2  hub_alerts  RO  external alert inputs, 0 in normal operation
//   BASE+3  hub_control RW  all zero after reset, set and cleared over IPbus
// The register names, their access and the reset value of hub_control follow
// the register map; the field widths, the address layout and the address given
// to the ROD are own choices. The ROD is given the Hub's own shelf and slot
// address (rod_geo_addr = {shelf, slot}). Address pins and alerts pass through
// a two-flop synchroniser. A strobe is answered one cycle later with ack, or
// with err for an address outside the block or a write to a read-only
// register; the response lasts one cycle and the master drops strobe after it.
module hub_regs
  import hub_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR  = 32'h0000_0000,
  parameter logic [7:0]  MODULE_ID  = 8'h48,
  parameter logic [7:0]  HW_VERSION = 8'h01,
  parameter logic [15:0] FW_VERSION = 16'h0009
) (
  input  logic        clk,
  input  logic        rst,
  input  ipb_wbus_t   ipb_in,
  output ipb_rbus_t   ipb_out,
  input  logic [7:0]  shelf_addr,   // external pins
  input  logic [7:0]  slot_addr,    // external pins
  input  logic [31:0] alerts_in,    // external alert signals
  output logic [31:0] hub_control,
  output logic [15:0] rod_geo_addr
);

  logic [1:0][7:0]  shelf_s, slot_s;
  logic [1:0][31:0] alerts_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      shelf_s  <= '0;
      slot_s   <= '0;
      alerts_s <= '0;
    end else begin
      shelf_s  <= {shelf_s[0], shelf_addr};
      slot_s   <= {slot_s[0], slot_addr};
      alerts_s <= {alerts_s[0], alerts_in};
    end
  end

  assign rod_geo_addr = {shelf_s[1], slot_s[1]};

  logic [31:0] offset;
  logic        in_range;
  logic [1:0]  sel;
  logic [31:0] rd_val;

  assign offset   = ipb_in.addr - BASE_ADDR;
  assign in_range = (offset < 32'd4);
  assign sel      = offset[1:0];

  always_comb begin
    unique case (sel)
      2'd0: rd_val = {MODULE_ID, HW_VERSION, FW_VERSION};
      2'd1: rd_val = {rod_geo_addr, shelf_s[1], slot_s[1]};
      2'd2: rd_val = alerts_s[1];
      2'd3: rd_val = hub_control;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hub_control <= '0;
      ipb_out     <= '0;
    end else begin
      ipb_out.ack <= 1'b0;
      ipb_out.err <= 1'b0;
      if (ipb_in.strobe && !ipb_out.ack && !ipb_out.err) begin
        if (!in_range || (ipb_in.write && sel != 2'd3)) begin
          ipb_out.err <= 1'b1;
        end else begin
          ipb_out.ack <= 1'b1;
          if (ipb_in.write) hub_control <= ipb_in.wdata;
          ipb_out.rdata <= ipb_in.write ? ipb_in.wdata : rd_val;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(ipb_out.ack && ipb_out.err));

endmodule
