// hack_mem_unit: a memory unit, i.e. a cache in front of the slow main memory.
//
// One access at a time. A request (req with addr, we, wdata) is looked up in
// the cache in the cycle it arrives. A hit completes in that same cycle (a
// one-cycle access); a miss takes the main memory time, RD_LAT = 14 cycles for
// a read and WR_LAT = 15 for a write, counted from the request cycle (the
// document's schedule, from 8086 MOV timings). done is high in the last cycle
// of the access, with rdata valid in that cycle only. A read miss brings the
// word into the cache; a write updates or allocates the line (write allocate)
// and is written through to main memory in its last cycle, so main memory
// always holds current data. The keyboard register and unmapped addresses
// (>= 24576) bypass the cache and always take the miss time, since the
// keyboard changes without a write. upd_en lets a write made by another unit
// update a line this cache holds, keeping a dedicated reader coherent with a
// dedicated writer.
//
// The latencies and the hit/miss behaviour are the document's. Write-through
// with a one-cycle write hit, coherence by update and the uncached keyboard are
// this design's choices; the document models the cache for its timing only.
module hack_mem_unit
  import hack_pkg::*;
#(
  parameter int unsigned LINES  = 16,
  parameter int unsigned WAYS   = 2,
  parameter int unsigned RD_LAT = 14,
  parameter int unsigned WR_LAT = 15
) (
  input  logic  clk,
  input  logic  rst,
  // request side
  input  logic  req,
  input  logic  we,
  input  addr_t addr,
  input  word_t wdata,
  output logic  busy,
  output logic  done,
  output word_t rdata,
  output logic  hit_evt,
  output logic  miss_evt,
  // coherence update from the other unit
  input  logic  upd_en,
  input  addr_t upd_addr,
  input  word_t upd_data,
  // main memory side
  output addr_t mem_raddr,
  input  word_t mem_rdata,
  output logic  mem_we,
  output addr_t mem_waddr,
  output word_t mem_wdata
);
  localparam int unsigned MAXLAT = (RD_LAT > WR_LAT) ? RD_LAT : WR_LAT;
  localparam int unsigned CB = $clog2(MAXLAT + 1);

  logic [CB-1:0] cnt;
  addr_t addr_q;
  word_t wdata_q;
  logic  we_q;

  addr_t cur_addr;
  word_t cur_wdata;
  logic  cur_we, cacheable, c_hit, start, hit_now;
  word_t c_rdata;

  assign start     = req & ~busy;
  assign cur_addr  = busy ? addr_q  : addr;
  assign cur_wdata = busy ? wdata_q : wdata;
  assign cur_we    = busy ? we_q    : we;
  assign cacheable = (cur_addr < KBD_ADDR);
  assign hit_now   = start & cacheable & c_hit;

  hack_cache #(.LINES(LINES), .WAYS(WAYS)) u_cache (
    .clk(clk), .rst(rst),
    .addr(cur_addr), .hit(c_hit), .rdata(c_rdata),
    .fill_en(done & cacheable & (cur_we | busy)),
    .fill_addr(cur_addr),
    .fill_data(cur_we ? cur_wdata : mem_rdata),
    .upd_en(upd_en), .upd_addr(upd_addr), .upd_data(upd_data));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      addr_q  <= '0;
      wdata_q <= '0;
      we_q    <= 1'b0;
    end else if (start && !hit_now) begin
      addr_q  <= addr;
      wdata_q <= wdata;
      we_q    <= we;
      cnt     <= we ? CB'(WR_LAT - 1) : CB'(RD_LAT - 1);
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end
  end

  assign busy      = (cnt != 0);
  assign done      = busy ? (cnt == 1) : hit_now;
  assign rdata     = busy ? mem_rdata : c_rdata;
  assign hit_evt   = hit_now;
  assign miss_evt  = start & ~hit_now;

  assign mem_raddr = cur_addr;
  assign mem_we    = done & cur_we;
  assign mem_waddr = cur_addr;
  assign mem_wdata = cur_wdata;

  initial assert (RD_LAT >= 2 && WR_LAT >= 2)
    else $error("hack_mem_unit: miss latencies must be at least 2");
endmodule
