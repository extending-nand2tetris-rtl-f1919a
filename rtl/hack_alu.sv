// hack_alu: the Hack arithmetic logic unit (combinational).
//
// x and y are optionally zeroed (zx, zy), then optionally bit-inverted (nx, ny);
// f selects x&y (0) or x+y (1); no inverts the result. zr flags a zero result
// and ng a negative one (bit 15). These six control bits and two status flags
// are the Hack ALU as the document specifies it; the adder and logic are written
// with operators rather than as a gate netlist.
module hack_alu
  import hack_pkg::*;
(
  input  word_t     x,
  input  word_t     y,
  input  alu_ctrl_t ctrl,
  output word_t     out,
  output logic      zr,
  output logic      ng
);
  word_t xa, xb, ya, yb, fo;

  always_comb begin
    xa  = ctrl.zx ? '0 : x;
    xb  = ctrl.nx ? ~xa : xa;
    ya  = ctrl.zy ? '0 : y;
    yb  = ctrl.ny ? ~ya : ya;
    fo  = ctrl.f ? (xb + yb) : (xb & yb);
    out = ctrl.no ? ~fo : fo;
    zr  = (out == '0);
    ng  = out[W-1];
  end
endmodule
