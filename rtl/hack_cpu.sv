// hack_cpu: pipelined Hack CPU with operand forwarding, simultaneous jump and
// write back, and branch prediction (the control unit with its A-instruction,
// operand, compute, jump and write-back units).
//
// Four stages hold one instruction each: IF (fetch ROM[PC], PC+1, 1 cycle),
// ID (decode and predict, at least 1 cycle), EXE and WB. In EXE an
// A-instruction takes 1 cycle to produce its constant; a C-instruction first
// fetches operands (1 cycle for A and D, or a read of RAM[A] through the
// reader memory unit: 1 cycle on a cache hit, 14 on a miss) and then computes
// for 3 cycles. In WB the jump sub-stage (0, 4, 6 or 10 cycles, see
// hack_jump_unit) and the write back (1 cycle to A or D, or a write of RAM[A]
// through the writer memory unit: 1 cycle on a hit, 15 on a miss) run at the
// same time, and the instruction retires when both are finished. These are the
// document's stage costs and its "simultaneous write back".
//
// Operand forwarding: an instruction leaving ID always finds the instruction
// ahead of it either in WB or retired, so in its operand-fetch cycle it takes
// A, D, and M at the same address, from WB when WB is about to write them. A
// dependent instruction therefore waits only until its producer enters WB
// (counted as a hazard stall), as the document describes.
//
// Branch prediction: as a jump moves from IF to ID the decode unit predicts
// it. When predicted taken, PC is set to the predicted target and the
// instruction behind it in fetch is dropped (a half flush). When the jump
// resolves in WB, a wrong outcome or target causes a flush: IF and ID are
// cleared and fetch restarts at the right address in the next cycle.
// Instructions behind an unresolved jump wait in ID, so nothing wrong ever
// reaches EXE; the document's flush likewise only discards IF and ID. The
// jump target is the A value the jump saw in operand fetch (forwarded if
// needed).
//
// Interfaces: rom_addr/rom_instr fetch combinationally; rd_* and wr_* are the
// request sides of the reader and writer memory units (req in a cycle, done in
// the last cycle of the access). retire is high in the cycle an instruction
// finishes, with its ROM address, the instruction, and the A and D values it
// leaves behind; evt carries one-cycle event strobes.
//
// Sub-units: hack_decode_unit, hack_operand_unit, hack_alu_unit,
// hack_jump_unit and hack_wb_unit (A and D registers, memory write). The
// A-instruction unit's work, taking the 15-bit constant, is the decoded
// constant field loaded into the WB register.
//
// This design's own choices: fetch resumes right after a flush rather than
// after EXE and WB drain; a jump's use of A counts as a use of A; every stage
// takes at least one cycle.
module hack_cpu
  import hack_pkg::*;
#(
  parameter int unsigned ALU_LAT     = 3,
  parameter int unsigned UNCOND_LAT  = 4,
  parameter int unsigned COND_LAT    = 6,
  parameter int unsigned TAKEN_LAT   = 4,
  parameter int unsigned OUT_SIZE    = 16,
  parameter int unsigned TGT_ENTRIES = 32
) (
  input  logic     clk,
  input  logic     rst,
  // instruction ROM
  output addr_t    rom_addr,
  input  word_t    rom_instr,
  // reader memory unit
  output logic     rd_req,
  output addr_t    rd_addr,
  input  logic     rd_done,
  input  word_t    rd_data,
  // writer memory unit
  output logic     wr_req,
  output addr_t    wr_addr,
  output word_t    wr_data,
  input  logic     wr_done,
  // retirement and events
  output logic     retire,
  output addr_t    retire_pc,
  output word_t    retire_instr,
  output word_t    a_reg,
  output word_t    d_reg,
  output cpu_evt_t evt
);
  localparam int unsigned PB = $clog2(OUT_SIZE);

  typedef enum logic [1:0] {E_OF, E_MEM, E_COMP, E_READY} e_phase_t;

  // ---------------- state ----------------
  addr_t pc;

  logic  f_valid;
  word_t f_instr;
  addr_t f_pc;

  logic    d_valid;
  word_t   d_instr;
  dec_t    d_dec;
  addr_t   d_pc;
  logic    d_pt;
  addr_t   d_ptgt;
  logic [PB-1:0] d_pidx;

  logic     e_valid;
  word_t    e_instr;
  dec_t     e_dec;
  addr_t    e_pc;
  logic     e_pt;
  addr_t    e_ptgt;
  logic [PB-1:0] e_pidx;
  e_phase_t e_phase;
  word_t    e_a;       // A value seen by this instruction (M address, jump target)
  word_t    e_x;       // D operand

  logic     w_valid;
  word_t    w_instr;
  dec_t     w_dec;
  addr_t    w_pc;
  logic     w_pt;
  addr_t    w_ptgt;
  logic [PB-1:0] w_pidx;
  word_t    w_value;
  word_t    w_a;
  logic     w_jdone;   // jump sub-stage finished in an earlier cycle

  // ---------------- units ----------------
  dec_t  dec_f;
  logic  p_taken;
  addr_t p_target;
  logic [PB-1:0] p_idx;

  logic  conf_en;
  logic  j_busy, j_done, j_taken;
  logic  alu_start, alu_busy, alu_done, alu_zr, alu_ng;
  word_t alu_out, alu_y;
  word_t op_a, op_d, op_m;
  logic  op_mfwd, op_fwd_a, op_fwd_d;

  // moves
  logic f_to_d, d_to_e, e_to_w, w_retire;
  logic mispredict, flush;
  logic jump_block;

  hack_decode_unit #(.OUT_SIZE(OUT_SIZE), .TGT_ENTRIES(TGT_ENTRIES)) u_decode (
    .clk(clk), .rst(rst),
    .instr(f_instr), .pc(f_pc), .predict_en(f_to_d & ~flush),
    .dec(dec_f), .pred_taken(p_taken), .pred_target(p_target), .pred_idx(p_idx),
    .conf_en(conf_en), .conf_cond(~w_dec.is_uncond), .conf_pc(w_pc), .conf_idx(w_pidx),
    .conf_taken(j_taken), .conf_target(w_a[AW-1:0]));

  hack_operand_unit u_operand (
    .a_reg(a_reg), .d_reg(d_reg),
    .wb_valid(w_valid), .wb_dest_a(w_dec.dest_a | ~w_dec.is_c), .wb_dest_d(w_dec.dest_d),
    .wb_dest_m(w_dec.dest_m), .wb_value(w_value), .wb_maddr(w_a[AW-1:0]),
    .a_val(op_a), .d_val(op_d), .m_fwd(op_mfwd), .m_val(op_m),
    .fwd_a(op_fwd_a), .fwd_d(op_fwd_d));

  hack_alu_unit #(.LAT(ALU_LAT)) u_alu (
    .clk(clk), .rst(rst), .start(alu_start),
    .x(e_phase == E_OF ? op_d : e_x), .y(alu_y), .ctrl(e_dec.ctrl),
    .busy(alu_busy), .done(alu_done), .out(alu_out), .zr(alu_zr), .ng(alu_ng));

  hack_jump_unit #(.UNCOND_LAT(UNCOND_LAT), .COND_LAT(COND_LAT), .TAKEN_LAT(TAKEN_LAT)) u_jump (
    .clk(clk), .rst(rst), .start(e_to_w & e_dec.is_jump), .jump(e_dec.jump),
    .zr(alu_zr), .ng(alu_ng), .busy(j_busy), .done(j_done), .taken(j_taken));

  hack_pc u_pc (
    .clk(clk), .reset(rst),
    .load(flush | (f_to_d & p_taken)),
    .in(flush ? (j_taken ? w_a[AW-1:0] : w_pc + 1'b1) : p_target),
    .inc(~f_valid | f_to_d),
    .out(pc));

  assign rom_addr = pc;

  // ---------------- EXE stage control ----------------
  logic e_needs_mem;
  assign e_needs_mem = e_dec.uses_m & ~op_mfwd;

  always_comb begin
    alu_start = 1'b0;
    alu_y     = '0;
    rd_req    = 1'b0;
    rd_addr   = op_a[AW-1:0];
    if (e_valid && e_dec.is_c) begin
      case (e_phase)
        E_OF: begin
          if (e_needs_mem) begin
            rd_req    = 1'b1;
            alu_start = rd_done;
            alu_y     = rd_data;
          end else begin
            alu_start = 1'b1;
            alu_y     = e_dec.uses_m ? op_m : op_a;
          end
        end
        E_MEM: begin
          rd_addr   = e_a[AW-1:0];
          alu_start = rd_done;
          alu_y     = rd_data;
        end
        default: ;
      endcase
    end
  end

  logic e_done;
  assign e_done = e_valid & (e_dec.is_c ? ((e_phase == E_COMP & alu_done) | e_phase == E_READY)
                                        : 1'b1);

  // ---------------- WB stage control ----------------
  logic w_jfin, w_mfin;

  hack_wb_unit u_wb (
    .clk(clk), .rst(rst), .start(e_to_w), .valid(w_valid),
    .dest_a(w_dec.dest_a | ~w_dec.is_c), .dest_d(w_dec.dest_d), .dest_m(w_dec.dest_m),
    .value(w_value), .maddr(w_a[AW-1:0]), .commit(w_retire),
    .wr_req(wr_req), .wr_addr(wr_addr), .wr_data(wr_data), .wr_done(wr_done),
    .fin(w_mfin), .a_reg(a_reg), .d_reg(d_reg));

  assign w_jfin   = ~w_dec.is_jump | w_jdone | j_done;
  assign w_retire = w_valid & w_jfin & w_mfin;

  assign conf_en    = w_valid & w_dec.is_jump & j_done;
  assign mispredict = conf_en & ((j_taken != w_pt) | (j_taken & (w_a[AW-1:0] != w_ptgt)));
  assign flush      = mispredict;

  // ---------------- moves ----------------
  assign jump_block = (e_valid & e_dec.is_jump) |
                      (w_valid & w_dec.is_jump & ~w_jdone & ~(j_done & ~mispredict));
  assign e_to_w = e_done & (~w_valid | w_retire);
  assign d_to_e = d_valid & (~e_valid | e_to_w) & ~jump_block;
  assign f_to_d = f_valid & (~d_valid | d_to_e);

  // ---------------- sequential ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      f_valid <= 1'b0;
      d_valid <= 1'b0;
      e_valid <= 1'b0;
      w_valid <= 1'b0;
      f_instr <= '0;  f_pc <= '0;
      d_instr <= '0;  d_dec <= '0; d_pc <= '0; d_pt <= 1'b0; d_ptgt <= '0; d_pidx <= '0;
      e_instr <= '0;  e_dec <= '0; e_pc <= '0; e_pt <= 1'b0; e_ptgt <= '0; e_pidx <= '0;
      e_phase <= E_OF; e_a <= '0; e_x <= '0;
      w_instr <= '0;  w_dec <= '0; w_pc <= '0; w_pt <= 1'b0; w_ptgt <= '0; w_pidx <= '0;
      w_value <= '0;  w_a <= '0; w_jdone <= 1'b0;
    end else begin
      // ---- IF / ID ----
      if (flush) begin
        f_valid <= 1'b0;
        d_valid <= 1'b0;
      end else begin
        if (f_to_d) begin
          d_valid <= 1'b1;
          d_instr <= f_instr;
          d_dec   <= dec_f;
          d_pc    <= f_pc;
          d_pt    <= p_taken;
          d_ptgt  <= p_target;
          d_pidx  <= p_idx;
        end else if (d_to_e) begin
          d_valid <= 1'b0;
        end
        if (f_to_d && p_taken) begin
          f_valid <= 1'b0;              // half flush
        end else if (!f_valid || f_to_d) begin
          f_valid <= 1'b1;
          f_instr <= rom_instr;
          f_pc    <= pc;
        end
      end

      // ---- EXE ----
      if (d_to_e) begin
        e_valid <= 1'b1;
        e_instr <= d_instr;
        e_dec   <= d_dec;
        e_pc    <= d_pc;
        e_pt    <= d_pt;
        e_ptgt  <= d_ptgt;
        e_pidx  <= d_pidx;
        e_phase <= E_OF;
      end else if (e_to_w) begin
        e_valid <= 1'b0;
      end else if (e_valid && e_dec.is_c) begin
        case (e_phase)
          E_OF:    e_phase <= (e_needs_mem && !rd_done) ? E_MEM : E_COMP;
          E_MEM:   if (rd_done)  e_phase <= E_COMP;
          E_COMP:  if (alu_done) e_phase <= E_READY;
          default: ;
        endcase
      end
      if (e_valid && e_phase == E_OF) begin
        e_a <= op_a;
        e_x <= op_d;
      end

      // ---- WB ----
      if (e_to_w) begin
        w_valid <= 1'b1;
        w_instr <= e_instr;
        w_dec   <= e_dec;
        w_pc    <= e_pc;
        w_pt    <= e_pt;
        w_ptgt  <= e_ptgt;
        w_pidx  <= e_pidx;
        w_value <= e_dec.is_c ? alu_out : e_dec.constant;
        w_a     <= (e_phase == E_OF) ? op_a : e_a;
        w_jdone <= 1'b0;
      end else if (w_retire) begin
        w_valid <= 1'b0;
      end else if (w_valid) begin
        if (j_done)  w_jdone <= 1'b1;
      end
    end
  end

  // ---------------- retirement and events ----------------
  assign retire       = w_retire;
  assign retire_pc    = w_pc;
  assign retire_instr = w_instr;

  logic d_dep;
  assign d_dep = d_valid & e_valid & d_dec.is_c &
                 ( ((~e_dec.is_c | e_dec.dest_a) & (d_dec.uses_a | d_dec.uses_m | d_dec.dest_m | d_dec.is_jump))
                 | (e_dec.dest_d & d_dec.uses_x)
                 | (e_dec.dest_m & d_dec.uses_m));

  always_comb begin
    evt              = '0;
    evt.retire       = w_retire;
    evt.flush        = flush;
    evt.half_flush   = f_to_d & p_taken & ~flush;
    evt.jump         = conf_en;
    evt.mispredict   = mispredict;
    evt.fwd_a        = e_valid & e_phase == E_OF & op_fwd_a &
                       (e_dec.uses_a | e_dec.uses_m | e_dec.dest_m | e_dec.is_jump);
    evt.fwd_d        = e_valid & e_phase == E_OF & op_fwd_d & e_dec.uses_x;
    evt.fwd_m        = e_valid & e_phase == E_OF & e_dec.uses_m & op_mfwd;
    evt.hazard_stall = d_dep & ~d_to_e;
    evt.overlap      = w_valid & w_dec.is_jump & w_dec.dest_m & ~w_jfin & ~w_mfin;
  end

  // A read never starts while a write to the same RAM or screen address is
  // still open: that value is forwarded instead.
  a_no_raw: assert property (@(posedge clk) disable iff (rst)
              rd_req && e_phase == E_OF && w_valid && w_dec.dest_m && rd_addr < KBD_ADDR
              |-> rd_addr != w_a[AW-1:0]);
endmodule
