// hack_alu_unit: the compute sub-stage of execute, a multi-cycle wrapper around
// the Hack ALU.
//
// A start pulse captures x, y and the control bits; LAT cycles later done
// pulses for one cycle with out, zr and ng held until the next start. The
// document's timing schedule gives the compute sub-stage 3 cycles, so LAT
// defaults to 3. Operands are registered at start, so the caller may change them
// afterwards. Interface timing: start in cycle t gives done in cycle t+LAT.
module hack_alu_unit
  import hack_pkg::*;
#(
  parameter int unsigned LAT = 3
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  word_t     x,
  input  word_t     y,
  input  alu_ctrl_t ctrl,
  output logic      busy,
  output logic      done,
  output word_t     out,
  output logic      zr,
  output logic      ng
);
  word_t     x_q, y_q;
  alu_ctrl_t c_q;
  logic [$clog2(LAT+1)-1:0] cnt;

  hack_alu u_alu (.x(x_q), .y(y_q), .ctrl(c_q), .out(out), .zr(zr), .ng(ng));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      x_q <= '0;
      y_q <= '0;
      c_q <= '0;
    end else if (start) begin
      x_q <= x;
      y_q <= y;
      c_q <= ctrl;
      cnt <= LAT[$bits(cnt)-1:0];
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end
  end

  assign busy = (cnt != 0);
  assign done = (cnt == 1);

  initial assert (LAT >= 1) else $error("hack_alu_unit: LAT must be at least 1");
endmodule
