// hack_jump_unit: the jump sub-stage of execute.
//
// On start it evaluates the jump bits j1 j2 j3 (<0, =0, >0) against the ALU
// status flags and reports whether the jump is taken, after the document's
// cycle costs: an unconditional jump (all bits set) takes UNCOND_LAT = 4 cycles;
// a conditional jump takes COND_LAT = 6 cycles to decide and TAKEN_LAT = 4 more
// to load the new PC when taken, 6 cycles in all when not taken. The caller
// does not start the unit for an instruction without jump bits (0 cycles).
// taken is valid with done and held until the next start.
module hack_jump_unit
  import hack_pkg::*;
#(
  parameter int unsigned UNCOND_LAT = 4,
  parameter int unsigned COND_LAT   = 6,
  parameter int unsigned TAKEN_LAT  = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [2:0] jump,
  input  logic       zr,
  input  logic       ng,
  output logic       busy,
  output logic       done,
  output logic       taken
);
  localparam int unsigned MAXLAT = COND_LAT + TAKEN_LAT;
  logic [$clog2(MAXLAT+1)-1:0] cnt;
  logic cond;

  assign cond = jump_cond(jump, zr, ng);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      taken <= 1'b0;
    end else if (start) begin
      taken <= cond;
      if (&jump)     cnt <= UNCOND_LAT[$bits(cnt)-1:0];
      else if (cond) cnt <= MAXLAT[$bits(cnt)-1:0];
      else           cnt <= COND_LAT[$bits(cnt)-1:0];
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end
  end

  assign busy = (cnt != 0);
  assign done = (cnt == 1);

  initial assert (UNCOND_LAT >= 1 && COND_LAT >= 1) else $error("hack_jump_unit: latencies must be at least 1");
endmodule
