// hack_pkg: types, constants and decode helpers shared by the Hack computer.
//
// The Hack instruction set is 16 bits wide. Bit 15 (t) selects an A-instruction
// (t=0, bits 14:0 are a constant loaded into A) or a C-instruction (t=1). A
// C-instruction holds the a-bit (12), six ALU control bits c1..c6 (11:6), three
// destination bits d1 d2 d3 = A, D, M (5:3) and three jump bits j1 j2 j3 =
// <0, =0, >0 (2:0). The encoding and the ALU control meanings follow the
// Nand2Tetris Hack specification; the decoded struct and the operand-use flags
// (x used when zx=0, y used when zy=0) are this design's own.
package hack_pkg;

  localparam int unsigned W      = 16;  // data word
  localparam int unsigned AW     = 15;  // ROM and RAM address bus width

  // Data memory map
  localparam logic [AW-1:0] SCREEN_BASE = 15'd16384;
  localparam logic [AW-1:0] KBD_ADDR    = 15'd24576;

  typedef logic [W-1:0]  word_t;
  typedef logic [AW-1:0] addr_t;

  // ALU control bits in instruction order c1..c6
  typedef struct packed {
    logic zx;
    logic nx;
    logic zy;
    logic ny;
    logic f;
    logic no;
  } alu_ctrl_t;

  typedef struct packed {
    logic      is_c;      // C-instruction
    word_t     constant;  // A-instruction constant (bit 15 zero)
    logic      a;         // y operand: 0 = A, 1 = M
    alu_ctrl_t ctrl;
    logic      dest_a;
    logic      dest_d;
    logic      dest_m;
    logic [2:0] jump;     // j1 j2 j3
    logic      uses_x;    // reads D
    logic      uses_a;    // reads A as ALU operand
    logic      uses_m;    // reads RAM[A]
    logic      is_jump;   // any jump bit set
    logic      is_uncond; // all three jump bits set
  } dec_t;

  function automatic dec_t decode(input word_t instr);
    dec_t d;
    d.is_c      = instr[15];
    d.constant  = {1'b0, instr[14:0]};
    d.a         = instr[12];
    d.ctrl      = alu_ctrl_t'(instr[11:6]);
    d.dest_a    = instr[15] & instr[5];
    d.dest_d    = instr[15] & instr[4];
    d.dest_m    = instr[15] & instr[3];
    d.jump      = instr[15] ? instr[2:0] : 3'b000;
    d.uses_x    = instr[15] & ~instr[11];
    d.uses_a    = instr[15] & ~instr[9] & ~instr[12];
    d.uses_m    = instr[15] & ~instr[9] &  instr[12];
    d.is_jump   = instr[15] & (|instr[2:0]);
    d.is_uncond = instr[15] & (&instr[2:0]);
    return d;
  endfunction

  // Jump condition from the j bits and the ALU status flags.
  function automatic logic jump_cond(input logic [2:0] j, input logic zr, input logic ng);
    return (j[2] & ng) | (j[1] & zr) | (j[0] & ~ng & ~zr);
  endfunction

  // One-cycle event strobes from the CPU, for the performance counters.
  typedef struct packed {
    logic retire;
    logic flush;
    logic half_flush;
    logic jump;
    logic mispredict;
    logic fwd_a;
    logic fwd_d;
    logic fwd_m;
    logic hazard_stall;
    logic overlap;
  } cpu_evt_t;

  // Event counters the computer exposes for performance measurement.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] retired;
    logic [31:0] flushes;        // full flush on a mispredicted jump
    logic [31:0] half_flushes;   // fetch cleared on a predicted-taken jump
    logic [31:0] jumps;          // jumps resolved
    logic [31:0] mispredicts;
    logic [31:0] fwd_a;          // A operand forwarded from write back
    logic [31:0] fwd_d;          // D operand forwarded from write back
    logic [31:0] fwd_m;          // M operand forwarded from write back
    logic [31:0] hazard_stalls;  // cycles ID waited on a dependency in EXE
    logic [31:0] overlap;        // cycles jump and write back ran together
    logic [31:0] rd_hits;
    logic [31:0] rd_misses;
    logic [31:0] wr_hits;
    logic [31:0] wr_misses;
  } perf_t;

endpackage
