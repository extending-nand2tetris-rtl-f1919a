// hack_ram: a bank of 2^N 16-bit registers (the Hack RAM8 ... RAM16K chips).
//
// One write port (load, address, in) updates the addressed word at the clock
// edge; two read ports return words combinationally, as the Hack memory chips
// do (out always shows the addressed word). The second read port serves a
// second client, such as a display scanning the screen map. The document builds
// RAM8 to RAM16K as a hierarchy of smaller banks; here one array of size 2^N
// stands for any level of that hierarchy. Contents are not reset.
module hack_ram
  import hack_pkg::*;
#(
  parameter int unsigned N = 14
) (
  input  logic         clk,
  input  logic         load,
  input  logic [N-1:0] waddr,
  input  word_t        in,
  input  logic [N-1:0] raddr,
  output word_t        out,
  input  logic [N-1:0] raddr2,
  output word_t        out2
);
  word_t mem [2**N];

  always_ff @(posedge clk) begin
    if (load) mem[waddr] <= in;
  end

  assign out  = mem[raddr];
  assign out2 = mem[raddr2];
endmodule
