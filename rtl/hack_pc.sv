// hack_pc: the Hack program counter.
//
// A 15-bit register (the ROM address width). Priority: reset clears it to 0,
// else load sets it to in, else inc adds one, else it holds. This is the
// program counter the document describes; the width follows the 15-bit ROM
// address bus. The new value appears one clock after the request.
module hack_pc
  import hack_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  load,
  input  logic  inc,
  input  addr_t in,
  output addr_t out
);
  always_ff @(posedge clk) begin
    if (reset)     out <= '0;
    else if (load) out <= in;
    else if (inc)  out <= out + 1'b1;
  end
endmodule
