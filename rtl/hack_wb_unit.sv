// hack_wb_unit: write-back unit. It saves an instruction's result into the A
// and D registers and writes it to memory (RAM[A]) through the writer memory
// unit.
//
// An instruction enters write back with start. Its destination bits, result
// and M address are held by the pipeline register in front of this unit and
// stay steady until commit. In the first cycle, a write to M raises wr_req;
// the write is finished in the cycle wr_done comes back (the same cycle on a
// cache hit, 15 cycles on a miss). fin says that the write part of the stage
// is finished: at once when M is not a destination, otherwise from the cycle
// of wr_done on. The pipeline raises commit when the instruction leaves write
// back (after the jump sub-stage that runs alongside, see hack_cpu). A and D
// are loaded on commit, so a destination of A or D costs the one cycle the
// stage always takes.
//
// Following the document: the unit carries out the dest field (A, D and M
// in any combination), an A-instruction writes A, and a write to M takes the
// memory write time. This design's own choice: A and D change only at commit,
// and the pipeline forwards the result from here before that.
module hack_wb_unit
  import hack_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,     // an instruction enters write back
  input  logic  valid,     // write back holds an instruction
  input  logic  dest_a,
  input  logic  dest_d,
  input  logic  dest_m,
  input  word_t value,     // result to save
  input  addr_t maddr,     // RAM address (A) for a write to M
  input  logic  commit,    // the instruction leaves write back this cycle
  // writer memory unit
  output logic  wr_req,
  output addr_t wr_addr,
  output word_t wr_data,
  input  logic  wr_done,
  output logic  fin,       // write part finished (this cycle or earlier)
  output word_t a_reg,
  output word_t d_reg
);
  logic first;   // first cycle in write back
  logic mdone;   // memory write finished in an earlier cycle

  assign wr_req  = valid & first & dest_m;
  assign wr_addr = maddr;
  assign wr_data = value;
  assign fin     = ~dest_m | mdone | wr_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      first <= 1'b0;
      mdone <= 1'b0;
      a_reg <= '0;
      d_reg <= '0;
    end else begin
      if (start) begin
        first <= 1'b1;
        mdone <= 1'b0;
      end else if (valid) begin
        first <= 1'b0;
        if (wr_done) mdone <= 1'b1;
      end
      if (commit) begin
        if (dest_a) a_reg <= value;
        if (dest_d) d_reg <= value;
      end
    end
  end

  // one write request per instruction, never while a previous one is open
  a_one_req: assert property (@(posedge clk) disable iff (rst) wr_req |-> !mdone);
endmodule
