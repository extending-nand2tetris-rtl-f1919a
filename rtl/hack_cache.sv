// hack_cache: an N-way set associative cache of 16-bit words with FIFO
// replacement.
//
// LINES one-word lines are grouped into LINES/WAYS sets. The set index is the
// low log2(LINES/WAYS) address bits (an AND mask) and the rest of the address is
// the tag. An address can live in any way of its set. When a new address is
// brought into a full set, the way that was filled longest ago is replaced
// (FIFO): each set keeps a pointer to its oldest way, and since lines are never
// invalidated, filling in pointer order keeps it the oldest. WAYS=1 gives a
// direct mapped cache and WAYS=LINES a fully associative one. The defaults,
// 16 lines in 2 ways with FIFO, are the document's chosen configuration.
//
// Interface: lookup is combinational (hit, rdata for addr). fill_en writes a
// word: it updates the line if the address is present, otherwise it allocates
// the FIFO victim (write allocate). upd_en only updates a line already present
// (used to keep a read cache coherent with writes done elsewhere). If both hit
// the same line in one cycle, fill wins. Valid bits clear on reset.
module hack_cache
  import hack_pkg::*;
#(
  parameter int unsigned LINES = 16,
  parameter int unsigned WAYS  = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  addr_t addr,
  output logic  hit,
  output word_t rdata,
  input  logic  fill_en,
  input  addr_t fill_addr,
  input  word_t fill_data,
  input  logic  upd_en,
  input  addr_t upd_addr,
  input  word_t upd_data
);
  localparam int unsigned SETS = LINES / WAYS;
  localparam int unsigned IB   = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WB   = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic  valid [SETS][WAYS];
  addr_t tag   [SETS][WAYS];   // whole address kept as the tag, for clarity
  word_t data  [SETS][WAYS];
  logic [WB-1:0] fifo_ptr [SETS];

  function automatic logic [IB-1:0] set_of(input addr_t a);
    return (SETS > 1) ? a[IB-1:0] : '0;
  endfunction

  // Lookup
  always_comb begin
    hit   = 1'b0;
    rdata = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[set_of(addr)][w] && tag[set_of(addr)][w] == addr) begin
        hit   = 1'b1;
        rdata = data[set_of(addr)][w];
      end
    end
  end

  // Way match for the fill and update ports
  logic          f_hit, u_hit;
  logic [WB-1:0] f_way, u_way;
  always_comb begin
    f_hit = 1'b0; f_way = '0;
    u_hit = 1'b0; u_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[set_of(fill_addr)][w] && tag[set_of(fill_addr)][w] == fill_addr) begin
        f_hit = 1'b1; f_way = WB'(w);
      end
      if (valid[set_of(upd_addr)][w] && tag[set_of(upd_addr)][w] == upd_addr) begin
        u_hit = 1'b1; u_way = WB'(w);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < SETS; s++) begin
        fifo_ptr[s] <= '0;
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
      end
    end else begin
      if (upd_en && u_hit)
        data[set_of(upd_addr)][u_way] <= upd_data;
      if (fill_en) begin
        if (f_hit) begin
          data[set_of(fill_addr)][f_way] <= fill_data;
        end else begin
          valid[set_of(fill_addr)][fifo_ptr[set_of(fill_addr)]] <= 1'b1;
          tag  [set_of(fill_addr)][fifo_ptr[set_of(fill_addr)]] <= fill_addr;
          data [set_of(fill_addr)][fifo_ptr[set_of(fill_addr)]] <= fill_data;
          fifo_ptr[set_of(fill_addr)] <= (WAYS > 1) ?
              WB'((32'(fifo_ptr[set_of(fill_addr)]) + 1) % WAYS) : '0;
        end
      end
    end
  end

  initial assert (WAYS >= 1 && LINES % WAYS == 0 && (SETS & (SETS - 1)) == 0)
    else $error("hack_cache: LINES/WAYS must be a power of two");
endmodule
