// hack_gshare: gshare branch outcome predictor.
//
// A table of SIZE 2-bit saturating counters is indexed by the low log2(SIZE)
// bits of the jump's ROM address XORed with a global history register of the
// same width. A counter of 2 or 3 predicts taken, 0 or 1 not taken. On a
// confirmation the counter used for the prediction is incremented when the
// jump was taken and decremented when not, saturating at 3 and 0, and the
// outcome is shifted into the history register (taken = 1). The lookup is
// combinational and returns the table index, which the caller carries with the
// jump and hands back with its confirmation, so that the counter that made the
// prediction is the one trained. SIZE = 16 is the document's chosen size.
// The reset value of the counters (1, weakly not taken) and the history shift
// direction (new outcome enters at bit 0) are this design's choices.
module hack_gshare
  import hack_pkg::*;
#(
  parameter int unsigned SIZE = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  addr_t                    pc,
  output logic                     taken,
  output logic [$clog2(SIZE)-1:0]  idx,
  input  logic                     upd_en,
  input  logic [$clog2(SIZE)-1:0]  upd_idx,
  input  logic                     upd_taken
);
  localparam int unsigned IB = $clog2(SIZE);

  logic [1:0]    ctr [SIZE];
  logic [IB-1:0] ghr;

  assign idx   = pc[IB-1:0] ^ ghr;
  assign taken = ctr[idx][1];

  always_ff @(posedge clk) begin
    if (rst) begin
      ghr <= '0;
      for (int i = 0; i < SIZE; i++) ctr[i] <= 2'd1;
    end else if (upd_en) begin
      ghr <= (IB > 1) ? {ghr[IB-2:0], upd_taken} : IB'(upd_taken);
      if (upd_taken && ctr[upd_idx] != 2'd3)      ctr[upd_idx] <= ctr[upd_idx] + 2'd1;
      else if (!upd_taken && ctr[upd_idx] != 2'd0) ctr[upd_idx] <= ctr[upd_idx] - 2'd1;
    end
  end

  initial assert (SIZE >= 2 && (SIZE & (SIZE - 1)) == 0)
    else $error("hack_gshare: SIZE must be a power of two");
endmodule
