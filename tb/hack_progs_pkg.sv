// hack_progs_pkg: the hand-written Hack test programs used by the CPU and
// computer testbenches, as machine words with their assembly text.
//
// sum_fill: sums 20..1 into RAM[2] with a counted loop, fills RAM[300..339]
//   with 40..1 through a pointer, sums that array back into RAM[5] and copies
//   the keyboard register into RAM[6]. Expected: RAM[2]=210, RAM[5]=820.
// calls: calls a subroutine from two sites 7 times each, returning through
//   RAM[13] (an indirect jump with a changing target), then exercises the
//   JLT, JEQ, JGE, JNE and JLE conditions, writes the screen map and executes
//   a jump that also writes memory. Expected: RAM[12]=14 (calls) and
//   RAM[14]=105 (sum of 1..14).
// Each program ends in a loop that jumps to itself; halt_pc is its address.
package hack_progs_pkg;
  typedef logic [15:0] word_t;
  typedef word_t prog_t[$];

  localparam int unsigned SUM_FILL_HALT = 54;
  function automatic prog_t sum_fill();
    prog_t p;
    p.push_back(16'h0014);  //   0: @20
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0001);  //   2: @1
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h0002);  //   4: @2
    p.push_back(16'hea88);  //   5: M=0
    p.push_back(16'h0001);  //   6: @1
    p.push_back(16'hfc10);  //   7: D=M
    p.push_back(16'h0002);  //   8: @2
    p.push_back(16'hf088);  //   9: M=D+M
    p.push_back(16'h0001);  //  10: @1
    p.push_back(16'hfc98);  //  11: MD=M-1
    p.push_back(16'h0006);  //  12: @LOOP
    p.push_back(16'he301);  //  13: D;JGT
    p.push_back(16'h012c);  //  14: @300
    p.push_back(16'hec10);  //  15: D=A
    p.push_back(16'h0003);  //  16: @3
    p.push_back(16'he308);  //  17: M=D
    p.push_back(16'h0028);  //  18: @40
    p.push_back(16'hec10);  //  19: D=A
    p.push_back(16'h0004);  //  20: @4
    p.push_back(16'he308);  //  21: M=D
    p.push_back(16'h0004);  //  22: @4
    p.push_back(16'hfc10);  //  23: D=M
    p.push_back(16'h0003);  //  24: @3
    p.push_back(16'hfc20);  //  25: A=M
    p.push_back(16'he308);  //  26: M=D
    p.push_back(16'h0003);  //  27: @3
    p.push_back(16'hfdc8);  //  28: M=M+1
    p.push_back(16'h0004);  //  29: @4
    p.push_back(16'hfc98);  //  30: MD=M-1
    p.push_back(16'h0016);  //  31: @FILL
    p.push_back(16'he305);  //  32: D;JNE
    p.push_back(16'h0153);  //  33: @339
    p.push_back(16'hec10);  //  34: D=A
    p.push_back(16'h0003);  //  35: @3
    p.push_back(16'he308);  //  36: M=D
    p.push_back(16'h0005);  //  37: @5
    p.push_back(16'hea88);  //  38: M=0
    p.push_back(16'h0003);  //  39: @3
    p.push_back(16'hfc20);  //  40: A=M
    p.push_back(16'hfc10);  //  41: D=M
    p.push_back(16'h0005);  //  42: @5
    p.push_back(16'hf088);  //  43: M=D+M
    p.push_back(16'h0003);  //  44: @3
    p.push_back(16'hfc98);  //  45: MD=M-1
    p.push_back(16'h012b);  //  46: @299
    p.push_back(16'he4d0);  //  47: D=D-A
    p.push_back(16'h0027);  //  48: @SUM
    p.push_back(16'he301);  //  49: D;JGT
    p.push_back(16'h6000);  //  50: @24576
    p.push_back(16'hfc10);  //  51: D=M
    p.push_back(16'h0006);  //  52: @6
    p.push_back(16'he308);  //  53: M=D
    p.push_back(16'h0036);  //  54: @END
    p.push_back(16'hea87);  //  55: 0;JMP
    return p;
  endfunction
  localparam int unsigned CALLS_HALT = 79;
  function automatic prog_t calls();
    prog_t p;
    p.push_back(16'h0007);  //   0: @7
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h000a);  //   2: @10
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h000c);  //   4: @12
    p.push_back(16'hea88);  //   5: M=0
    p.push_back(16'h000e);  //   6: @14
    p.push_back(16'hea88);  //   7: M=0
    p.push_back(16'h000e);  //   8: @RET1
    p.push_back(16'hec10);  //   9: D=A
    p.push_back(16'h000d);  //  10: @13
    p.push_back(16'he308);  //  11: M=D
    p.push_back(16'h0044);  //  12: @SUB
    p.push_back(16'hea87);  //  13: 0;JMP
    p.push_back(16'h0014);  //  14: @RET2
    p.push_back(16'hec10);  //  15: D=A
    p.push_back(16'h000d);  //  16: @13
    p.push_back(16'he308);  //  17: M=D
    p.push_back(16'h0044);  //  18: @SUB
    p.push_back(16'hea87);  //  19: 0;JMP
    p.push_back(16'h000a);  //  20: @10
    p.push_back(16'hfc98);  //  21: MD=M-1
    p.push_back(16'h0008);  //  22: @MAIN
    p.push_back(16'he301);  //  23: D;JGT
    p.push_back(16'h000b);  //  24: @11
    p.push_back(16'hea88);  //  25: M=0
    p.push_back(16'h0005);  //  26: @5
    p.push_back(16'hecd0);  //  27: D=-A
    p.push_back(16'h000b);  //  28: @11
    p.push_back(16'hfdc8);  //  29: M=M+1
    p.push_back(16'he7d0);  //  30: D=D+1
    p.push_back(16'h001c);  //  31: @NEG
    p.push_back(16'he304);  //  32: D;JLT
    p.push_back(16'h0025);  //  33: @DONE1
    p.push_back(16'he302);  //  34: D;JEQ
    p.push_back(16'h004f);  //  35: @END
    p.push_back(16'hea87);  //  36: 0;JMP
    p.push_back(16'h4000);  //  37: @16384
    p.push_back(16'hee88);  //  38: M=-1
    p.push_back(16'h0003);  //  39: @3
    p.push_back(16'hec10);  //  40: D=A
    p.push_back(16'h000f);  //  41: @15
    p.push_back(16'he308);  //  42: M=D
    p.push_back(16'he390);  //  43: D=D-1
    p.push_back(16'h0029);  //  44: @CNT
    p.push_back(16'he303);  //  45: D;JGE
    p.push_back(16'h000f);  //  46: @15
    p.push_back(16'hfc10);  //  47: D=M
    p.push_back(16'h0034);  //  48: @SKIP
    p.push_back(16'he305);  //  49: D;JNE
    p.push_back(16'h000f);  //  50: @15
    p.push_back(16'hee88);  //  51: M=-1
    p.push_back(16'h000f);  //  52: @15
    p.push_back(16'hfc10);  //  53: D=M
    p.push_back(16'h003a);  //  54: @SKIP2
    p.push_back(16'he306);  //  55: D;JLE
    p.push_back(16'h000f);  //  56: @15
    p.push_back(16'he348);  //  57: M=!D
    p.push_back(16'h003d);  //  58: @OVL
    p.push_back(16'hefd0);  //  59: D=1
    p.push_back(16'he309);  //  60: M=D;JGT
    p.push_back(16'h4010);  //  61: @16400
    p.push_back(16'hfde8);  //  62: AM=M+1
    p.push_back(16'hec10);  //  63: D=A
    p.push_back(16'h0008);  //  64: @8
    p.push_back(16'he308);  //  65: M=D
    p.push_back(16'h004f);  //  66: @END
    p.push_back(16'hea87);  //  67: 0;JMP
    p.push_back(16'h000c);  //  68: @12
    p.push_back(16'hfdc8);  //  69: M=M+1
    p.push_back(16'h000e);  //  70: @14
    p.push_back(16'hfc10);  //  71: D=M
    p.push_back(16'h000c);  //  72: @12
    p.push_back(16'hf090);  //  73: D=D+M
    p.push_back(16'h000e);  //  74: @14
    p.push_back(16'he308);  //  75: M=D
    p.push_back(16'h000d);  //  76: @13
    p.push_back(16'hfc20);  //  77: A=M
    p.push_back(16'hea87);  //  78: 0;JMP
    p.push_back(16'h004f);  //  79: @END
    p.push_back(16'hea87);  //  80: 0;JMP
    return p;
  endfunction
endpackage
