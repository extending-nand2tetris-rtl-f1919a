// hack_ref_pkg: an instruction-level reference model of the Hack computer for
// the testbenches, written from the instruction set tables (each comp code
// mapped to the operation it names) rather than from the ALU control bits.
//
// HackRef holds the ROM, the data memory map, A, D and PC. step() executes one
// instruction and reports whether it wrote memory, where and what. Reads above
// the keyboard address return 0; every store is reported, including those the
// memory map drops.
package hack_ref_pkg;
  typedef logic [15:0] word_t;

  typedef struct {
    logic [14:0] pc;
    word_t       instr;
    logic        wr;
    logic [14:0] waddr;
    word_t       wdata;
  } step_t;

  class HackRef;
    word_t       rom [32768];
    word_t       mem [24576];
    word_t       kbd;
    word_t       A, D;
    logic [14:0] pc;

    function new();
      A = 0; D = 0; pc = 0; kbd = 0;
      foreach (rom[i]) rom[i] = 0;
      foreach (mem[i]) mem[i] = 0;
    endfunction

    function word_t rd(logic [14:0] a);
      if (a < 24576)       return mem[a];
      else if (a == 24576) return kbd;
      else                 return 0;
    endfunction

    static function word_t comp(logic [6:0] c, word_t d, word_t a, word_t m);
      case (c)
        7'b0101010: return 0;
        7'b0111111: return 1;
        7'b0111010: return 16'hFFFF;
        7'b0001100: return d;
        7'b0110000: return a;
        7'b1110000: return m;
        7'b0001101: return ~d;
        7'b0110001: return ~a;
        7'b1110001: return ~m;
        7'b0001111: return 16'(-d);
        7'b0110011: return 16'(-a);
        7'b1110011: return 16'(-m);
        7'b0011111: return d + 1;
        7'b0110111: return a + 1;
        7'b1110111: return m + 1;
        7'b0001110: return d - 1;
        7'b0110010: return a - 1;
        7'b1110010: return m - 1;
        7'b0000010: return d + a;
        7'b1000010: return d + m;
        7'b0010011: return d - a;
        7'b1010011: return d - m;
        7'b0000111: return a - d;
        7'b1000111: return m - d;
        7'b0000000: return d & a;
        7'b1000000: return d & m;
        7'b0010101: return d | a;
        7'b1010101: return d | m;
        default:    return 16'hDEAD;   // not used by the tests
      endcase
    endfunction

    function step_t step();
      step_t s;
      word_t i, out, oldA;
      logic  take;
      i = rom[pc];
      s.pc = pc; s.instr = i; s.wr = 0; s.waddr = 0; s.wdata = 0;
      if (!i[15]) begin
        A  = {1'b0, i[14:0]};
        pc = pc + 1;
        return s;
      end
      oldA = A;
      out  = comp(i[12:6], D, A, rd(A[14:0]));
      case (i[2:0])
        3'b000: take = 0;
        3'b001: take = $signed(out) > 0;
        3'b010: take = out == 0;
        3'b011: take = $signed(out) >= 0;
        3'b100: take = $signed(out) < 0;
        3'b101: take = out != 0;
        3'b110: take = $signed(out) <= 0;
        default: take = 1;
      endcase
      if (i[3]) begin
        s.wr = 1; s.waddr = oldA[14:0]; s.wdata = out;
        if (oldA[14:0] < 24576) mem[oldA[14:0]] = out;
      end
      if (i[5]) A = out;
      if (i[4]) D = out;
      pc = take ? oldA[14:0] : pc + 1;
      return s;
    endfunction
  endclass
endpackage
