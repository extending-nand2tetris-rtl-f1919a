// hack_rom: the Hack instruction memory, 2^AW 16-bit words (32K).
//
// The fetch port returns ROM[addr] combinationally. On the real machine the
// ROM is a replaceable cartridge; here a program port (prog_we, prog_addr,
// prog_data) stands for inserting a cartridge and writes one word per clock.
// It is meant to be used while the CPU is held in reset. The program port is
// this design's own choice; the size is the document's.
module hack_rom
  import hack_pkg::*;
#(
  parameter int unsigned ABITS = AW
) (
  input  logic             clk,
  input  logic             prog_we,
  input  logic [ABITS-1:0] prog_addr,
  input  word_t            prog_data,
  input  logic [ABITS-1:0] addr,
  output word_t            instr
);
  word_t mem [2**ABITS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign instr = mem[addr];
endmodule
