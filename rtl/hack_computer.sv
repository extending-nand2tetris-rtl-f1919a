// hack_computer: the Hack computer in its fully optimised configuration.
//
// A pipelined Hack CPU (hack_cpu: 4 stages, operand forwarding, jump and write
// back in parallel, gshare outcome and FIFO 2-bit target prediction) fetches
// from a 32K-word instruction ROM and reaches the data memory map (16K RAM,
// 8K screen map, keyboard register) through two memory units: a dedicated
// reader used by operand fetch and a dedicated writer used by write back, each
// with its own 16-line 2-way FIFO cache (1-cycle hit, 14-cycle read miss,
// 15-cycle write miss). Writes update the reader's cache when it holds the
// word. This is the document's most optimised configuration.
//
// Ports: the ROM is loaded through prog_* while rst is high (a cartridge).
// kbd is the code of the key held (0 for none). screen_addr/screen_data read
// the screen map for a display. retire_* and mem_w* show each retired
// instruction and each data memory write, and perf holds running event
// counts (cycles, retired instructions, flushes, half flushes, resolved and
// mispredicted jumps, forwarded operands, hazard stall cycles, cycles in which
// a jump and a memory write overlapped, cache hits and misses).
module hack_computer
  import hack_pkg::*;
#(
  parameter int unsigned CACHE_LINES = 16,
  parameter int unsigned CACHE_WAYS  = 2,
  parameter int unsigned RD_LAT      = 14,
  parameter int unsigned WR_LAT      = 15,
  parameter int unsigned ALU_LAT     = 3,
  parameter int unsigned OUT_SIZE    = 16,
  parameter int unsigned TGT_ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_we,
  input  addr_t       prog_addr,
  input  word_t       prog_data,
  input  word_t       kbd,
  input  logic [12:0] screen_addr,
  output word_t       screen_data,
  output logic        retire,
  output addr_t       retire_pc,
  output word_t       retire_instr,
  output word_t       a_reg,
  output word_t       d_reg,
  output logic        mem_we,
  output addr_t       mem_waddr,
  output word_t       mem_wdata,
  output perf_t       perf
);
  addr_t rom_addr;
  word_t rom_instr;

  logic  rd_req, rd_done, rd_hit, rd_miss, rd_busy;
  addr_t rd_addr;
  word_t rd_data;
  logic  wr_req, wr_done, wr_hit, wr_miss, wr_busy;
  addr_t wr_addr;
  word_t wr_data;

  addr_t m_raddr, unused_raddr;
  word_t m_rdata, unused_wdata, unused_rdata;
  logic  unused_we;
  addr_t unused_waddr;

  cpu_evt_t evt;

  hack_rom u_rom (
    .clk(clk), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .addr(rom_addr), .instr(rom_instr));

  hack_cpu #(.ALU_LAT(ALU_LAT), .OUT_SIZE(OUT_SIZE), .TGT_ENTRIES(TGT_ENTRIES)) u_cpu (
    .clk(clk), .rst(rst),
    .rom_addr(rom_addr), .rom_instr(rom_instr),
    .rd_req(rd_req), .rd_addr(rd_addr), .rd_done(rd_done), .rd_data(rd_data),
    .wr_req(wr_req), .wr_addr(wr_addr), .wr_data(wr_data), .wr_done(wr_done),
    .retire(retire), .retire_pc(retire_pc), .retire_instr(retire_instr),
    .a_reg(a_reg), .d_reg(d_reg), .evt(evt));

  // Dedicated reader: its cache is kept current by the writer's stores.
  hack_mem_unit #(.LINES(CACHE_LINES), .WAYS(CACHE_WAYS), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) u_reader (
    .clk(clk), .rst(rst),
    .req(rd_req), .we(1'b0), .addr(rd_addr), .wdata('0),
    .busy(rd_busy), .done(rd_done), .rdata(rd_data), .hit_evt(rd_hit), .miss_evt(rd_miss),
    .upd_en(mem_we), .upd_addr(mem_waddr), .upd_data(mem_wdata),
    .mem_raddr(m_raddr), .mem_rdata(m_rdata),
    .mem_we(unused_we), .mem_waddr(unused_waddr), .mem_wdata(unused_wdata));

  // Dedicated writer
  hack_mem_unit #(.LINES(CACHE_LINES), .WAYS(CACHE_WAYS), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) u_writer (
    .clk(clk), .rst(rst),
    .req(wr_req), .we(1'b1), .addr(wr_addr), .wdata(wr_data),
    .busy(wr_busy), .done(wr_done), .rdata(unused_rdata), .hit_evt(wr_hit), .miss_evt(wr_miss),
    .upd_en(1'b0), .upd_addr('0), .upd_data('0),
    .mem_raddr(unused_raddr), .mem_rdata('0),
    .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_wdata(mem_wdata));

  hack_memory u_mem (
    .clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(m_raddr), .rdata(m_rdata), .kbd(kbd),
    .screen_addr(screen_addr), .screen_data(screen_data));

  always_ff @(posedge clk) begin
    if (rst) begin
      perf <= '0;
    end else begin
      perf.cycles        <= perf.cycles + 1;
      perf.retired       <= perf.retired       + 32'(evt.retire);
      perf.flushes       <= perf.flushes       + 32'(evt.flush);
      perf.half_flushes  <= perf.half_flushes  + 32'(evt.half_flush);
      perf.jumps         <= perf.jumps         + 32'(evt.jump);
      perf.mispredicts   <= perf.mispredicts   + 32'(evt.mispredict);
      perf.fwd_a         <= perf.fwd_a         + 32'(evt.fwd_a);
      perf.fwd_d         <= perf.fwd_d         + 32'(evt.fwd_d);
      perf.fwd_m         <= perf.fwd_m         + 32'(evt.fwd_m);
      perf.hazard_stalls <= perf.hazard_stalls + 32'(evt.hazard_stall);
      perf.overlap       <= perf.overlap       + 32'(evt.overlap);
      perf.rd_hits       <= perf.rd_hits       + 32'(rd_hit);
      perf.rd_misses     <= perf.rd_misses     + 32'(rd_miss);
      perf.wr_hits       <= perf.wr_hits       + 32'(wr_hit);
      perf.wr_misses     <= perf.wr_misses     + 32'(wr_miss);
    end
  end

  // The CPU issues one access at a time per unit.
  a_rd_one: assert property (@(posedge clk) disable iff (rst) rd_req |-> !rd_busy);
  a_wr_one: assert property (@(posedge clk) disable iff (rst) wr_req |-> !wr_busy);
endmodule
