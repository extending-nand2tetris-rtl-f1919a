// hack_decode_unit: the decode unit, with branch prediction.
//
// It decodes the instruction leaving fetch and, for a C-instruction with jump
// bits, predicts the outcome and the target. Unconditional jumps are predicted
// taken; conditional ones use the gshare outcome predictor. Only for a jump
// predicted taken is the target predictor consulted (and, on a miss, told to
// enter the address), which predicts target 0 when it has no entry. Hack jumps
// are all indirect (to the value of A), so both predictions are needed to
// redirect fetch. The prediction is acted on when predict_en is high (the
// instruction actually moves into decode); that is also when the target buffer
// allocates. When the jump resolves, the control unit sends a confirmation:
// conditional jumps train the gshare counters and history, and taken jumps
// train the target predictor. Defaults gshare 16 and FIFO 2-bit 32 are the
// document's chosen predictors; training only conditional jumps in gshare and
// only taken jumps in the target buffer is this design's reading.
module hack_decode_unit
  import hack_pkg::*;
#(
  parameter int unsigned OUT_SIZE    = 16,
  parameter int unsigned TGT_ENTRIES = 32
) (
  input  logic                        clk,
  input  logic                        rst,
  input  word_t                       instr,
  input  addr_t                       pc,
  input  logic                        predict_en,
  output dec_t                        dec,
  output logic                        pred_taken,
  output addr_t                       pred_target,
  output logic [$clog2(OUT_SIZE)-1:0] pred_idx,
  // confirmation
  input  logic                        conf_en,
  input  logic                        conf_cond,
  input  addr_t                       conf_pc,
  input  logic [$clog2(OUT_SIZE)-1:0] conf_idx,
  input  logic                        conf_taken,
  input  addr_t                       conf_target
);
  logic  g_taken, t_hit;
  addr_t t_target;

  assign dec = decode(instr);

  hack_gshare #(.SIZE(OUT_SIZE)) u_gshare (
    .clk(clk), .rst(rst), .pc(pc), .taken(g_taken), .idx(pred_idx),
    .upd_en(conf_en & conf_cond), .upd_idx(conf_idx), .upd_taken(conf_taken));

  hack_target_pred #(.ENTRIES(TGT_ENTRIES)) u_tgt (
    .clk(clk), .rst(rst), .pc(pc),
    .alloc(predict_en & pred_taken), .hit(t_hit), .target(t_target),
    .conf_en(conf_en & conf_taken), .conf_pc(conf_pc), .conf_target(conf_target));

  assign pred_taken  = dec.is_jump & (dec.is_uncond | g_taken);
  assign pred_target = t_target;
endmodule
