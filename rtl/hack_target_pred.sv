// hack_target_pred: 2-bit branch target predictor with FIFO eviction.
//
// A fully associative buffer of ENTRIES entries, each holding a jump's ROM
// address, the target last trusted for it and a 2-bit confidence counter.
// Lookup (combinational) returns the stored target on a hit and 0 on a miss;
// when alloc is asserted with a missing address the address is entered with
// target 0 and counter 1, replacing the oldest entry when the buffer is full
// (FIFO, a pointer that walks the entries in fill order). A confirmation gives
// the jump's real target: if the stored target was right the counter goes up
// (saturating at 3), if wrong it goes down, and when it reaches 0 the target
// is replaced and the counter set back to 1. Confirmations for addresses not in
// the buffer are ignored. All of this, and ENTRIES = 32 with FIFO, is the
// document's; the buffer is empty after reset.
module hack_target_pred
  import hack_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic  clk,
  input  logic  rst,
  input  addr_t pc,
  input  logic  alloc,
  output logic  hit,
  output addr_t target,
  input  logic  conf_en,
  input  addr_t conf_pc,
  input  addr_t conf_target
);
  localparam int unsigned EB = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic       valid [ENTRIES];
  addr_t      tag   [ENTRIES];
  addr_t      tgt   [ENTRIES];
  logic [1:0] cnt   [ENTRIES];
  logic [EB-1:0] ptr;

  logic          c_hit;
  logic [EB-1:0] c_idx;

  always_comb begin
    hit = 1'b0; target = '0;
    c_hit = 1'b0; c_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid[i] && tag[i] == pc) begin
        hit = 1'b1; target = tgt[i];
      end
      if (valid[i] && tag[i] == conf_pc) begin
        c_hit = 1'b1; c_idx = EB'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
      for (int i = 0; i < ENTRIES; i++) valid[i] <= 1'b0;
    end else begin
      if (conf_en && c_hit) begin
        if (tgt[c_idx] == conf_target) begin
          if (cnt[c_idx] != 2'd3) cnt[c_idx] <= cnt[c_idx] + 2'd1;
        end else if (cnt[c_idx] <= 2'd1) begin
          tgt[c_idx] <= conf_target;
          cnt[c_idx] <= 2'd1;
        end else begin
          cnt[c_idx] <= cnt[c_idx] - 2'd1;
        end
      end
      // allocation last so that it wins over a confirmation of the evicted entry
      if (alloc && !hit) begin
        valid[ptr] <= 1'b1;
        tag[ptr]   <= pc;
        tgt[ptr]   <= '0;
        cnt[ptr]   <= 2'd1;
        ptr        <= (ENTRIES > 1) ? EB'((32'(ptr) + 1) % ENTRIES) : '0;
      end
    end
  end
endmodule
