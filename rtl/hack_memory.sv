// hack_memory: the Hack data memory map.
//
// Addresses 0..16383 are general-purpose RAM (RAM16K), 16384..24575 the screen
// map (8K words, one bit per pixel of the 512x256 display, row r column c at
// word r*32+c/16, bit c%16) and 24576 the keyboard register, which reads the
// code of the key held (kbd input) and ignores writes. Reads above 24576 return
// 0 and writes there are dropped. The map is the document's. This version has a
// separate read port and write port, because the forwarding pipeline uses a
// dedicated reader and a dedicated writer memory unit, and a third read port on
// the screen RAM for a display controller. Reads are combinational, writes
// take effect at the clock edge.
module hack_memory
  import hack_pkg::*;
(
  input  logic        clk,
  input  logic        we,
  input  addr_t       waddr,
  input  word_t       wdata,
  input  addr_t       raddr,
  output word_t       rdata,
  input  word_t       kbd,
  input  logic [12:0] screen_addr,
  output word_t       screen_data
);
  word_t ram_out, scr_out, unused_ram2;
  logic  ram_we, scr_we;

  assign ram_we = we & ~waddr[14];
  assign scr_we = we & (waddr[14:13] == 2'b10);

  hack_ram #(.N(14)) u_ram (
    .clk(clk), .load(ram_we), .waddr(waddr[13:0]), .in(wdata),
    .raddr(raddr[13:0]), .out(ram_out), .raddr2(14'd0), .out2(unused_ram2));

  hack_ram #(.N(13)) u_screen (
    .clk(clk), .load(scr_we), .waddr(waddr[12:0]), .in(wdata),
    .raddr(raddr[12:0]), .out(scr_out), .raddr2(screen_addr), .out2(screen_data));

  always_comb begin
    if (!raddr[14])                rdata = ram_out;
    else if (raddr[13] == 1'b0)    rdata = scr_out;
    else if (raddr == KBD_ADDR)    rdata = kbd;
    else                           rdata = '0;
  end
endmodule
