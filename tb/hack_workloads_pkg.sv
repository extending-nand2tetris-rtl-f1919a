// hack_workloads_pkg: assembly kernels modelled on the classic Hack micro
// benchmarks (loop, array fill, function calls, head and tail recursion, long
// if chain, mathematics, memory read, memory write, memory access, objects,
// output), as machine words. The output kernel draws the 8x11 'Z' bitmap of
// the standard Hack font. Each ends in a loop that jumps to itself at address
// <NAME>_HALT. Calls use a stack at RAM[256..] with the stack pointer in
// RAM[0]: the caller pushes its return address and passes the argument in D;
// the callee pops the return address and returns its result in D.
package hack_workloads_pkg;
  typedef logic [15:0] word_t;
  typedef word_t prog_t[$];

  // loop: while loop of 10000 iterations counting into RAM[2] (14 words)
  localparam int unsigned LOOP_HALT = 12;
  function automatic prog_t loop();
    prog_t p;
    p.push_back(16'h2710);  //   0: @10000
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0001);  //   2: @1
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h0002);  //   4: @2
    p.push_back(16'hea88);  //   5: M=0
    p.push_back(16'h0002);  //   6: @2
    p.push_back(16'hfdc8);  //   7: M=M+1
    p.push_back(16'h0001);  //   8: @1
    p.push_back(16'hfc98);  //   9: MD=M-1
    p.push_back(16'h0006);  //  10: @L
    p.push_back(16'he301);  //  11: D;JGT
    p.push_back(16'h000c);  //  12: @END
    p.push_back(16'hea87);  //  13: 0;JMP
    return p;
  endfunction
  // array_fill: sets RAM[2048..12047] to 1 through a pointer (19 words)
  localparam int unsigned ARRAY_FILL_HALT = 17;
  function automatic prog_t array_fill();
    prog_t p;
    p.push_back(16'h0800);  //   0: @2048
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0003);  //   2: @3
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h2710);  //   4: @10000
    p.push_back(16'hec10);  //   5: D=A
    p.push_back(16'h0004);  //   6: @4
    p.push_back(16'he308);  //   7: M=D
    p.push_back(16'h0003);  //   8: @3
    p.push_back(16'hfc20);  //   9: A=M
    p.push_back(16'hefc8);  //  10: M=1
    p.push_back(16'h0003);  //  11: @3
    p.push_back(16'hfdc8);  //  12: M=M+1
    p.push_back(16'h0004);  //  13: @4
    p.push_back(16'hfc98);  //  14: MD=M-1
    p.push_back(16'h0008);  //  15: @L
    p.push_back(16'he301);  //  16: D;JGT
    p.push_back(16'h0011);  //  17: @END
    p.push_back(16'hea87);  //  18: 0;JMP
    return p;
  endfunction
  // fib_head: fib(23) by head recursion (fib(n-1)+fib(n-2)) on a stack at RAM[256..], result in RAM[1] (108 words)
  localparam int unsigned FIB_HEAD_HALT = 21;
  function automatic prog_t fib_head();
    prog_t p;
    p.push_back(16'h0100);  //   0: @256
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0000);  //   2: @0
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h0017);  //   4: @23
    p.push_back(16'hec10);  //   5: D=A
    p.push_back(16'h000d);  //   6: @13
    p.push_back(16'he308);  //   7: M=D
    p.push_back(16'h0013);  //   8: @RET1
    p.push_back(16'hec10);  //   9: D=A
    p.push_back(16'h0000);  //  10: @0
    p.push_back(16'hfc20);  //  11: A=M
    p.push_back(16'he308);  //  12: M=D
    p.push_back(16'h0000);  //  13: @0
    p.push_back(16'hfdc8);  //  14: M=M+1
    p.push_back(16'h000d);  //  15: @13
    p.push_back(16'hfc10);  //  16: D=M
    p.push_back(16'h0017);  //  17: @FIB
    p.push_back(16'hea87);  //  18: 0;JMP
    p.push_back(16'h0001);  //  19: @1
    p.push_back(16'he308);  //  20: M=D
    p.push_back(16'h0015);  //  21: @END
    p.push_back(16'hea87);  //  22: 0;JMP
    p.push_back(16'h000f);  //  23: @15
    p.push_back(16'he308);  //  24: M=D
    p.push_back(16'h0002);  //  25: @2
    p.push_back(16'he4d0);  //  26: D=D-A
    p.push_back(16'h005e);  //  27: @BASE
    p.push_back(16'he304);  //  28: D;JLT
    p.push_back(16'h000f);  //  29: @15
    p.push_back(16'hfc10);  //  30: D=M
    p.push_back(16'h0000);  //  31: @0
    p.push_back(16'hfc20);  //  32: A=M
    p.push_back(16'he308);  //  33: M=D
    p.push_back(16'h0000);  //  34: @0
    p.push_back(16'hfdc8);  //  35: M=M+1
    p.push_back(16'he390);  //  36: D=D-1
    p.push_back(16'h000d);  //  37: @13
    p.push_back(16'he308);  //  38: M=D
    p.push_back(16'h0032);  //  39: @RET2
    p.push_back(16'hec10);  //  40: D=A
    p.push_back(16'h0000);  //  41: @0
    p.push_back(16'hfc20);  //  42: A=M
    p.push_back(16'he308);  //  43: M=D
    p.push_back(16'h0000);  //  44: @0
    p.push_back(16'hfdc8);  //  45: M=M+1
    p.push_back(16'h000d);  //  46: @13
    p.push_back(16'hfc10);  //  47: D=M
    p.push_back(16'h0017);  //  48: @FIB
    p.push_back(16'hea87);  //  49: 0;JMP
    p.push_back(16'h000f);  //  50: @15
    p.push_back(16'he308);  //  51: M=D
    p.push_back(16'h0000);  //  52: @0
    p.push_back(16'hfca0);  //  53: A=M-1
    p.push_back(16'hfc10);  //  54: D=M
    p.push_back(16'h000e);  //  55: @14
    p.push_back(16'he308);  //  56: M=D
    p.push_back(16'h000f);  //  57: @15
    p.push_back(16'hfc10);  //  58: D=M
    p.push_back(16'h0000);  //  59: @0
    p.push_back(16'hfca0);  //  60: A=M-1
    p.push_back(16'he308);  //  61: M=D
    p.push_back(16'h000e);  //  62: @14
    p.push_back(16'hfc10);  //  63: D=M
    p.push_back(16'h0002);  //  64: @2
    p.push_back(16'he4d0);  //  65: D=D-A
    p.push_back(16'h000d);  //  66: @13
    p.push_back(16'he308);  //  67: M=D
    p.push_back(16'h004f);  //  68: @RET3
    p.push_back(16'hec10);  //  69: D=A
    p.push_back(16'h0000);  //  70: @0
    p.push_back(16'hfc20);  //  71: A=M
    p.push_back(16'he308);  //  72: M=D
    p.push_back(16'h0000);  //  73: @0
    p.push_back(16'hfdc8);  //  74: M=M+1
    p.push_back(16'h000d);  //  75: @13
    p.push_back(16'hfc10);  //  76: D=M
    p.push_back(16'h0017);  //  77: @FIB
    p.push_back(16'hea87);  //  78: 0;JMP
    p.push_back(16'h0000);  //  79: @0
    p.push_back(16'hfca8);  //  80: AM=M-1
    p.push_back(16'hf090);  //  81: D=D+M
    p.push_back(16'h000d);  //  82: @13
    p.push_back(16'he308);  //  83: M=D
    p.push_back(16'h0000);  //  84: @0
    p.push_back(16'hfca8);  //  85: AM=M-1
    p.push_back(16'hfc10);  //  86: D=M
    p.push_back(16'h000e);  //  87: @14
    p.push_back(16'he308);  //  88: M=D
    p.push_back(16'h000d);  //  89: @13
    p.push_back(16'hfc10);  //  90: D=M
    p.push_back(16'h000e);  //  91: @14
    p.push_back(16'hfc20);  //  92: A=M
    p.push_back(16'hea87);  //  93: 0;JMP
    p.push_back(16'h000f);  //  94: @15
    p.push_back(16'hfc10);  //  95: D=M
    p.push_back(16'h000d);  //  96: @13
    p.push_back(16'he308);  //  97: M=D
    p.push_back(16'h0000);  //  98: @0
    p.push_back(16'hfca8);  //  99: AM=M-1
    p.push_back(16'hfc10);  // 100: D=M
    p.push_back(16'h000e);  // 101: @14
    p.push_back(16'he308);  // 102: M=D
    p.push_back(16'h000d);  // 103: @13
    p.push_back(16'hfc10);  // 104: D=M
    p.push_back(16'h000e);  // 105: @14
    p.push_back(16'hfc20);  // 106: A=M
    p.push_back(16'hea87);  // 107: 0;JMP
    return p;
  endfunction
  // fib_tail: fib(23) by tail recursion fib(n,a,b)=fib(n-1,b,a+b), each step a real call, result in RAM[1] (88 words)
  localparam int unsigned FIB_TAIL_HALT = 27;
  function automatic prog_t fib_tail();
    prog_t p;
    p.push_back(16'h0100);  //   0: @256
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0000);  //   2: @0
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h0017);  //   4: @23
    p.push_back(16'hec10);  //   5: D=A
    p.push_back(16'h0005);  //   6: @5
    p.push_back(16'he308);  //   7: M=D
    p.push_back(16'h0006);  //   8: @6
    p.push_back(16'hea88);  //   9: M=0
    p.push_back(16'h0007);  //  10: @7
    p.push_back(16'hefc8);  //  11: M=1
    p.push_back(16'h000d);  //  12: @13
    p.push_back(16'he308);  //  13: M=D
    p.push_back(16'h0019);  //  14: @RET4
    p.push_back(16'hec10);  //  15: D=A
    p.push_back(16'h0000);  //  16: @0
    p.push_back(16'hfc20);  //  17: A=M
    p.push_back(16'he308);  //  18: M=D
    p.push_back(16'h0000);  //  19: @0
    p.push_back(16'hfdc8);  //  20: M=M+1
    p.push_back(16'h000d);  //  21: @13
    p.push_back(16'hfc10);  //  22: D=M
    p.push_back(16'h001d);  //  23: @FT
    p.push_back(16'hea87);  //  24: 0;JMP
    p.push_back(16'h0001);  //  25: @1
    p.push_back(16'he308);  //  26: M=D
    p.push_back(16'h001b);  //  27: @END
    p.push_back(16'hea87);  //  28: 0;JMP
    p.push_back(16'h0005);  //  29: @5
    p.push_back(16'hfc10);  //  30: D=M
    p.push_back(16'h004a);  //  31: @FTBASE
    p.push_back(16'he302);  //  32: D;JEQ
    p.push_back(16'h0005);  //  33: @5
    p.push_back(16'hfc88);  //  34: M=M-1
    p.push_back(16'h0006);  //  35: @6
    p.push_back(16'hfc10);  //  36: D=M
    p.push_back(16'h0007);  //  37: @7
    p.push_back(16'hf090);  //  38: D=D+M
    p.push_back(16'h0008);  //  39: @8
    p.push_back(16'he308);  //  40: M=D
    p.push_back(16'h0007);  //  41: @7
    p.push_back(16'hfc10);  //  42: D=M
    p.push_back(16'h0006);  //  43: @6
    p.push_back(16'he308);  //  44: M=D
    p.push_back(16'h0008);  //  45: @8
    p.push_back(16'hfc10);  //  46: D=M
    p.push_back(16'h0007);  //  47: @7
    p.push_back(16'he308);  //  48: M=D
    p.push_back(16'h000d);  //  49: @13
    p.push_back(16'he308);  //  50: M=D
    p.push_back(16'h003e);  //  51: @RET5
    p.push_back(16'hec10);  //  52: D=A
    p.push_back(16'h0000);  //  53: @0
    p.push_back(16'hfc20);  //  54: A=M
    p.push_back(16'he308);  //  55: M=D
    p.push_back(16'h0000);  //  56: @0
    p.push_back(16'hfdc8);  //  57: M=M+1
    p.push_back(16'h000d);  //  58: @13
    p.push_back(16'hfc10);  //  59: D=M
    p.push_back(16'h001d);  //  60: @FT
    p.push_back(16'hea87);  //  61: 0;JMP
    p.push_back(16'h000d);  //  62: @13
    p.push_back(16'he308);  //  63: M=D
    p.push_back(16'h0000);  //  64: @0
    p.push_back(16'hfca8);  //  65: AM=M-1
    p.push_back(16'hfc10);  //  66: D=M
    p.push_back(16'h000e);  //  67: @14
    p.push_back(16'he308);  //  68: M=D
    p.push_back(16'h000d);  //  69: @13
    p.push_back(16'hfc10);  //  70: D=M
    p.push_back(16'h000e);  //  71: @14
    p.push_back(16'hfc20);  //  72: A=M
    p.push_back(16'hea87);  //  73: 0;JMP
    p.push_back(16'h0006);  //  74: @6
    p.push_back(16'hfc10);  //  75: D=M
    p.push_back(16'h000d);  //  76: @13
    p.push_back(16'he308);  //  77: M=D
    p.push_back(16'h0000);  //  78: @0
    p.push_back(16'hfca8);  //  79: AM=M-1
    p.push_back(16'hfc10);  //  80: D=M
    p.push_back(16'h000e);  //  81: @14
    p.push_back(16'he308);  //  82: M=D
    p.push_back(16'h000d);  //  83: @13
    p.push_back(16'hfc10);  //  84: D=M
    p.push_back(16'h000e);  //  85: @14
    p.push_back(16'hfc20);  //  86: A=M
    p.push_back(16'hea87);  //  87: 0;JMP
    return p;
  endfunction
  // function_calls: calls 7 different functions 1000 times each; RAM[10] accumulates their results (225 words)
  localparam int unsigned FUNCTION_CALLS_HALT = 133;
  function automatic prog_t function_calls();
    prog_t p;
    p.push_back(16'h0100);  //   0: @256
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0000);  //   2: @0
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h03e8);  //   4: @1000
    p.push_back(16'hec10);  //   5: D=A
    p.push_back(16'h0009);  //   6: @9
    p.push_back(16'he308);  //   7: M=D
    p.push_back(16'h000a);  //   8: @10
    p.push_back(16'hea88);  //   9: M=0
    p.push_back(16'h0001);  //  10: @1
    p.push_back(16'hec10);  //  11: D=A
    p.push_back(16'h000d);  //  12: @13
    p.push_back(16'he308);  //  13: M=D
    p.push_back(16'h0019);  //  14: @RET6
    p.push_back(16'hec10);  //  15: D=A
    p.push_back(16'h0000);  //  16: @0
    p.push_back(16'hfc20);  //  17: A=M
    p.push_back(16'he308);  //  18: M=D
    p.push_back(16'h0000);  //  19: @0
    p.push_back(16'hfdc8);  //  20: M=M+1
    p.push_back(16'h000d);  //  21: @13
    p.push_back(16'hfc10);  //  22: D=M
    p.push_back(16'h0087);  //  23: @F0
    p.push_back(16'hea87);  //  24: 0;JMP
    p.push_back(16'h000a);  //  25: @10
    p.push_back(16'hf088);  //  26: M=D+M
    p.push_back(16'h0002);  //  27: @2
    p.push_back(16'hec10);  //  28: D=A
    p.push_back(16'h000d);  //  29: @13
    p.push_back(16'he308);  //  30: M=D
    p.push_back(16'h002a);  //  31: @RET7
    p.push_back(16'hec10);  //  32: D=A
    p.push_back(16'h0000);  //  33: @0
    p.push_back(16'hfc20);  //  34: A=M
    p.push_back(16'he308);  //  35: M=D
    p.push_back(16'h0000);  //  36: @0
    p.push_back(16'hfdc8);  //  37: M=M+1
    p.push_back(16'h000d);  //  38: @13
    p.push_back(16'hfc10);  //  39: D=M
    p.push_back(16'h0093);  //  40: @F1
    p.push_back(16'hea87);  //  41: 0;JMP
    p.push_back(16'h000a);  //  42: @10
    p.push_back(16'hf088);  //  43: M=D+M
    p.push_back(16'h0003);  //  44: @3
    p.push_back(16'hec10);  //  45: D=A
    p.push_back(16'h000d);  //  46: @13
    p.push_back(16'he308);  //  47: M=D
    p.push_back(16'h003b);  //  48: @RET8
    p.push_back(16'hec10);  //  49: D=A
    p.push_back(16'h0000);  //  50: @0
    p.push_back(16'hfc20);  //  51: A=M
    p.push_back(16'he308);  //  52: M=D
    p.push_back(16'h0000);  //  53: @0
    p.push_back(16'hfdc8);  //  54: M=M+1
    p.push_back(16'h000d);  //  55: @13
    p.push_back(16'hfc10);  //  56: D=M
    p.push_back(16'h00a0);  //  57: @F2
    p.push_back(16'hea87);  //  58: 0;JMP
    p.push_back(16'h000a);  //  59: @10
    p.push_back(16'hf088);  //  60: M=D+M
    p.push_back(16'h0004);  //  61: @4
    p.push_back(16'hec10);  //  62: D=A
    p.push_back(16'h000d);  //  63: @13
    p.push_back(16'he308);  //  64: M=D
    p.push_back(16'h004c);  //  65: @RET9
    p.push_back(16'hec10);  //  66: D=A
    p.push_back(16'h0000);  //  67: @0
    p.push_back(16'hfc20);  //  68: A=M
    p.push_back(16'he308);  //  69: M=D
    p.push_back(16'h0000);  //  70: @0
    p.push_back(16'hfdc8);  //  71: M=M+1
    p.push_back(16'h000d);  //  72: @13
    p.push_back(16'hfc10);  //  73: D=M
    p.push_back(16'h00ae);  //  74: @F3
    p.push_back(16'hea87);  //  75: 0;JMP
    p.push_back(16'h000a);  //  76: @10
    p.push_back(16'hf088);  //  77: M=D+M
    p.push_back(16'h0005);  //  78: @5
    p.push_back(16'hec10);  //  79: D=A
    p.push_back(16'h000d);  //  80: @13
    p.push_back(16'he308);  //  81: M=D
    p.push_back(16'h005d);  //  82: @RET10
    p.push_back(16'hec10);  //  83: D=A
    p.push_back(16'h0000);  //  84: @0
    p.push_back(16'hfc20);  //  85: A=M
    p.push_back(16'he308);  //  86: M=D
    p.push_back(16'h0000);  //  87: @0
    p.push_back(16'hfdc8);  //  88: M=M+1
    p.push_back(16'h000d);  //  89: @13
    p.push_back(16'hfc10);  //  90: D=M
    p.push_back(16'h00ba);  //  91: @F4
    p.push_back(16'hea87);  //  92: 0;JMP
    p.push_back(16'h000a);  //  93: @10
    p.push_back(16'hf088);  //  94: M=D+M
    p.push_back(16'h0006);  //  95: @6
    p.push_back(16'hec10);  //  96: D=A
    p.push_back(16'h000d);  //  97: @13
    p.push_back(16'he308);  //  98: M=D
    p.push_back(16'h006e);  //  99: @RET11
    p.push_back(16'hec10);  // 100: D=A
    p.push_back(16'h0000);  // 101: @0
    p.push_back(16'hfc20);  // 102: A=M
    p.push_back(16'he308);  // 103: M=D
    p.push_back(16'h0000);  // 104: @0
    p.push_back(16'hfdc8);  // 105: M=M+1
    p.push_back(16'h000d);  // 106: @13
    p.push_back(16'hfc10);  // 107: D=M
    p.push_back(16'h00c7);  // 108: @F5
    p.push_back(16'hea87);  // 109: 0;JMP
    p.push_back(16'h000a);  // 110: @10
    p.push_back(16'hf088);  // 111: M=D+M
    p.push_back(16'h0007);  // 112: @7
    p.push_back(16'hec10);  // 113: D=A
    p.push_back(16'h000d);  // 114: @13
    p.push_back(16'he308);  // 115: M=D
    p.push_back(16'h007f);  // 116: @RET12
    p.push_back(16'hec10);  // 117: D=A
    p.push_back(16'h0000);  // 118: @0
    p.push_back(16'hfc20);  // 119: A=M
    p.push_back(16'he308);  // 120: M=D
    p.push_back(16'h0000);  // 121: @0
    p.push_back(16'hfdc8);  // 122: M=M+1
    p.push_back(16'h000d);  // 123: @13
    p.push_back(16'hfc10);  // 124: D=M
    p.push_back(16'h00d5);  // 125: @F6
    p.push_back(16'hea87);  // 126: 0;JMP
    p.push_back(16'h000a);  // 127: @10
    p.push_back(16'hf088);  // 128: M=D+M
    p.push_back(16'h0009);  // 129: @9
    p.push_back(16'hfc98);  // 130: MD=M-1
    p.push_back(16'h000a);  // 131: @L
    p.push_back(16'he301);  // 132: D;JGT
    p.push_back(16'h0085);  // 133: @END
    p.push_back(16'hea87);  // 134: 0;JMP
    p.push_back(16'h000d);  // 135: @13
    p.push_back(16'he308);  // 136: M=D
    p.push_back(16'h0000);  // 137: @0
    p.push_back(16'hfca8);  // 138: AM=M-1
    p.push_back(16'hfc10);  // 139: D=M
    p.push_back(16'h000e);  // 140: @14
    p.push_back(16'he308);  // 141: M=D
    p.push_back(16'h000d);  // 142: @13
    p.push_back(16'hfc10);  // 143: D=M
    p.push_back(16'h000e);  // 144: @14
    p.push_back(16'hfc20);  // 145: A=M
    p.push_back(16'hea87);  // 146: 0;JMP
    p.push_back(16'he7d0);  // 147: D=D+1
    p.push_back(16'h000d);  // 148: @13
    p.push_back(16'he308);  // 149: M=D
    p.push_back(16'h0000);  // 150: @0
    p.push_back(16'hfca8);  // 151: AM=M-1
    p.push_back(16'hfc10);  // 152: D=M
    p.push_back(16'h000e);  // 153: @14
    p.push_back(16'he308);  // 154: M=D
    p.push_back(16'h000d);  // 155: @13
    p.push_back(16'hfc10);  // 156: D=M
    p.push_back(16'h000e);  // 157: @14
    p.push_back(16'hfc20);  // 158: A=M
    p.push_back(16'hea87);  // 159: 0;JMP
    p.push_back(16'he7d0);  // 160: D=D+1
    p.push_back(16'he7d0);  // 161: D=D+1
    p.push_back(16'h000d);  // 162: @13
    p.push_back(16'he308);  // 163: M=D
    p.push_back(16'h0000);  // 164: @0
    p.push_back(16'hfca8);  // 165: AM=M-1
    p.push_back(16'hfc10);  // 166: D=M
    p.push_back(16'h000e);  // 167: @14
    p.push_back(16'he308);  // 168: M=D
    p.push_back(16'h000d);  // 169: @13
    p.push_back(16'hfc10);  // 170: D=M
    p.push_back(16'h000e);  // 171: @14
    p.push_back(16'hfc20);  // 172: A=M
    p.push_back(16'hea87);  // 173: 0;JMP
    p.push_back(16'h000d);  // 174: @13
    p.push_back(16'he308);  // 175: M=D
    p.push_back(16'h0000);  // 176: @0
    p.push_back(16'hfca8);  // 177: AM=M-1
    p.push_back(16'hfc10);  // 178: D=M
    p.push_back(16'h000e);  // 179: @14
    p.push_back(16'he308);  // 180: M=D
    p.push_back(16'h000d);  // 181: @13
    p.push_back(16'hfc10);  // 182: D=M
    p.push_back(16'h000e);  // 183: @14
    p.push_back(16'hfc20);  // 184: A=M
    p.push_back(16'hea87);  // 185: 0;JMP
    p.push_back(16'he7d0);  // 186: D=D+1
    p.push_back(16'h000d);  // 187: @13
    p.push_back(16'he308);  // 188: M=D
    p.push_back(16'h0000);  // 189: @0
    p.push_back(16'hfca8);  // 190: AM=M-1
    p.push_back(16'hfc10);  // 191: D=M
    p.push_back(16'h000e);  // 192: @14
    p.push_back(16'he308);  // 193: M=D
    p.push_back(16'h000d);  // 194: @13
    p.push_back(16'hfc10);  // 195: D=M
    p.push_back(16'h000e);  // 196: @14
    p.push_back(16'hfc20);  // 197: A=M
    p.push_back(16'hea87);  // 198: 0;JMP
    p.push_back(16'he7d0);  // 199: D=D+1
    p.push_back(16'he7d0);  // 200: D=D+1
    p.push_back(16'h000d);  // 201: @13
    p.push_back(16'he308);  // 202: M=D
    p.push_back(16'h0000);  // 203: @0
    p.push_back(16'hfca8);  // 204: AM=M-1
    p.push_back(16'hfc10);  // 205: D=M
    p.push_back(16'h000e);  // 206: @14
    p.push_back(16'he308);  // 207: M=D
    p.push_back(16'h000d);  // 208: @13
    p.push_back(16'hfc10);  // 209: D=M
    p.push_back(16'h000e);  // 210: @14
    p.push_back(16'hfc20);  // 211: A=M
    p.push_back(16'hea87);  // 212: 0;JMP
    p.push_back(16'h000d);  // 213: @13
    p.push_back(16'he308);  // 214: M=D
    p.push_back(16'h0000);  // 215: @0
    p.push_back(16'hfca8);  // 216: AM=M-1
    p.push_back(16'hfc10);  // 217: D=M
    p.push_back(16'h000e);  // 218: @14
    p.push_back(16'he308);  // 219: M=D
    p.push_back(16'h000d);  // 220: @13
    p.push_back(16'hfc10);  // 221: D=M
    p.push_back(16'h000e);  // 222: @14
    p.push_back(16'hfc20);  // 223: A=M
    p.push_back(16'hea87);  // 224: 0;JMP
    return p;
  endfunction
  // long_if: 20-clause if/else-if chain on i & 31, run 10000 times; RAM[4] sums the clause taken (or -1) (262 words)
  localparam int unsigned LONG_IF_HALT = 260;
  function automatic prog_t long_if();
    prog_t p;
    p.push_back(16'h2710);  //   0: @10000
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0001);  //   2: @1
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h0004);  //   4: @4
    p.push_back(16'hea88);  //   5: M=0
    p.push_back(16'h0001);  //   6: @1
    p.push_back(16'hfc10);  //   7: D=M
    p.push_back(16'h001f);  //   8: @31
    p.push_back(16'he010);  //   9: D=D&A
    p.push_back(16'h0003);  //  10: @3
    p.push_back(16'he308);  //  11: M=D
    p.push_back(16'h0003);  //  12: @3
    p.push_back(16'hfc10);  //  13: D=M
    p.push_back(16'h0000);  //  14: @0
    p.push_back(16'he4d0);  //  15: D=D-A
    p.push_back(16'h0088);  //  16: @C0
    p.push_back(16'he302);  //  17: D;JEQ
    p.push_back(16'h0003);  //  18: @3
    p.push_back(16'hfc10);  //  19: D=M
    p.push_back(16'h0001);  //  20: @1
    p.push_back(16'he4d0);  //  21: D=D-A
    p.push_back(16'h008e);  //  22: @C1
    p.push_back(16'he302);  //  23: D;JEQ
    p.push_back(16'h0003);  //  24: @3
    p.push_back(16'hfc10);  //  25: D=M
    p.push_back(16'h0002);  //  26: @2
    p.push_back(16'he4d0);  //  27: D=D-A
    p.push_back(16'h0094);  //  28: @C2
    p.push_back(16'he302);  //  29: D;JEQ
    p.push_back(16'h0003);  //  30: @3
    p.push_back(16'hfc10);  //  31: D=M
    p.push_back(16'h0003);  //  32: @3
    p.push_back(16'he4d0);  //  33: D=D-A
    p.push_back(16'h009a);  //  34: @C3
    p.push_back(16'he302);  //  35: D;JEQ
    p.push_back(16'h0003);  //  36: @3
    p.push_back(16'hfc10);  //  37: D=M
    p.push_back(16'h0004);  //  38: @4
    p.push_back(16'he4d0);  //  39: D=D-A
    p.push_back(16'h00a0);  //  40: @C4
    p.push_back(16'he302);  //  41: D;JEQ
    p.push_back(16'h0003);  //  42: @3
    p.push_back(16'hfc10);  //  43: D=M
    p.push_back(16'h0005);  //  44: @5
    p.push_back(16'he4d0);  //  45: D=D-A
    p.push_back(16'h00a6);  //  46: @C5
    p.push_back(16'he302);  //  47: D;JEQ
    p.push_back(16'h0003);  //  48: @3
    p.push_back(16'hfc10);  //  49: D=M
    p.push_back(16'h0006);  //  50: @6
    p.push_back(16'he4d0);  //  51: D=D-A
    p.push_back(16'h00ac);  //  52: @C6
    p.push_back(16'he302);  //  53: D;JEQ
    p.push_back(16'h0003);  //  54: @3
    p.push_back(16'hfc10);  //  55: D=M
    p.push_back(16'h0007);  //  56: @7
    p.push_back(16'he4d0);  //  57: D=D-A
    p.push_back(16'h00b2);  //  58: @C7
    p.push_back(16'he302);  //  59: D;JEQ
    p.push_back(16'h0003);  //  60: @3
    p.push_back(16'hfc10);  //  61: D=M
    p.push_back(16'h0008);  //  62: @8
    p.push_back(16'he4d0);  //  63: D=D-A
    p.push_back(16'h00b8);  //  64: @C8
    p.push_back(16'he302);  //  65: D;JEQ
    p.push_back(16'h0003);  //  66: @3
    p.push_back(16'hfc10);  //  67: D=M
    p.push_back(16'h0009);  //  68: @9
    p.push_back(16'he4d0);  //  69: D=D-A
    p.push_back(16'h00be);  //  70: @C9
    p.push_back(16'he302);  //  71: D;JEQ
    p.push_back(16'h0003);  //  72: @3
    p.push_back(16'hfc10);  //  73: D=M
    p.push_back(16'h000a);  //  74: @10
    p.push_back(16'he4d0);  //  75: D=D-A
    p.push_back(16'h00c4);  //  76: @C10
    p.push_back(16'he302);  //  77: D;JEQ
    p.push_back(16'h0003);  //  78: @3
    p.push_back(16'hfc10);  //  79: D=M
    p.push_back(16'h000b);  //  80: @11
    p.push_back(16'he4d0);  //  81: D=D-A
    p.push_back(16'h00ca);  //  82: @C11
    p.push_back(16'he302);  //  83: D;JEQ
    p.push_back(16'h0003);  //  84: @3
    p.push_back(16'hfc10);  //  85: D=M
    p.push_back(16'h000c);  //  86: @12
    p.push_back(16'he4d0);  //  87: D=D-A
    p.push_back(16'h00d0);  //  88: @C12
    p.push_back(16'he302);  //  89: D;JEQ
    p.push_back(16'h0003);  //  90: @3
    p.push_back(16'hfc10);  //  91: D=M
    p.push_back(16'h000d);  //  92: @13
    p.push_back(16'he4d0);  //  93: D=D-A
    p.push_back(16'h00d6);  //  94: @C13
    p.push_back(16'he302);  //  95: D;JEQ
    p.push_back(16'h0003);  //  96: @3
    p.push_back(16'hfc10);  //  97: D=M
    p.push_back(16'h000e);  //  98: @14
    p.push_back(16'he4d0);  //  99: D=D-A
    p.push_back(16'h00dc);  // 100: @C14
    p.push_back(16'he302);  // 101: D;JEQ
    p.push_back(16'h0003);  // 102: @3
    p.push_back(16'hfc10);  // 103: D=M
    p.push_back(16'h000f);  // 104: @15
    p.push_back(16'he4d0);  // 105: D=D-A
    p.push_back(16'h00e2);  // 106: @C15
    p.push_back(16'he302);  // 107: D;JEQ
    p.push_back(16'h0003);  // 108: @3
    p.push_back(16'hfc10);  // 109: D=M
    p.push_back(16'h0010);  // 110: @16
    p.push_back(16'he4d0);  // 111: D=D-A
    p.push_back(16'h00e8);  // 112: @C16
    p.push_back(16'he302);  // 113: D;JEQ
    p.push_back(16'h0003);  // 114: @3
    p.push_back(16'hfc10);  // 115: D=M
    p.push_back(16'h0011);  // 116: @17
    p.push_back(16'he4d0);  // 117: D=D-A
    p.push_back(16'h00ee);  // 118: @C17
    p.push_back(16'he302);  // 119: D;JEQ
    p.push_back(16'h0003);  // 120: @3
    p.push_back(16'hfc10);  // 121: D=M
    p.push_back(16'h0012);  // 122: @18
    p.push_back(16'he4d0);  // 123: D=D-A
    p.push_back(16'h00f4);  // 124: @C18
    p.push_back(16'he302);  // 125: D;JEQ
    p.push_back(16'h0003);  // 126: @3
    p.push_back(16'hfc10);  // 127: D=M
    p.push_back(16'h0013);  // 128: @19
    p.push_back(16'he4d0);  // 129: D=D-A
    p.push_back(16'h00fa);  // 130: @C19
    p.push_back(16'he302);  // 131: D;JEQ
    p.push_back(16'h0004);  // 132: @4
    p.push_back(16'hfc88);  // 133: M=M-1
    p.push_back(16'h0100);  // 134: @NEXT
    p.push_back(16'hea87);  // 135: 0;JMP
    p.push_back(16'h0001);  // 136: @1
    p.push_back(16'hec10);  // 137: D=A
    p.push_back(16'h0004);  // 138: @4
    p.push_back(16'hf088);  // 139: M=D+M
    p.push_back(16'h0100);  // 140: @NEXT
    p.push_back(16'hea87);  // 141: 0;JMP
    p.push_back(16'h0002);  // 142: @2
    p.push_back(16'hec10);  // 143: D=A
    p.push_back(16'h0004);  // 144: @4
    p.push_back(16'hf088);  // 145: M=D+M
    p.push_back(16'h0100);  // 146: @NEXT
    p.push_back(16'hea87);  // 147: 0;JMP
    p.push_back(16'h0003);  // 148: @3
    p.push_back(16'hec10);  // 149: D=A
    p.push_back(16'h0004);  // 150: @4
    p.push_back(16'hf088);  // 151: M=D+M
    p.push_back(16'h0100);  // 152: @NEXT
    p.push_back(16'hea87);  // 153: 0;JMP
    p.push_back(16'h0004);  // 154: @4
    p.push_back(16'hec10);  // 155: D=A
    p.push_back(16'h0004);  // 156: @4
    p.push_back(16'hf088);  // 157: M=D+M
    p.push_back(16'h0100);  // 158: @NEXT
    p.push_back(16'hea87);  // 159: 0;JMP
    p.push_back(16'h0005);  // 160: @5
    p.push_back(16'hec10);  // 161: D=A
    p.push_back(16'h0004);  // 162: @4
    p.push_back(16'hf088);  // 163: M=D+M
    p.push_back(16'h0100);  // 164: @NEXT
    p.push_back(16'hea87);  // 165: 0;JMP
    p.push_back(16'h0006);  // 166: @6
    p.push_back(16'hec10);  // 167: D=A
    p.push_back(16'h0004);  // 168: @4
    p.push_back(16'hf088);  // 169: M=D+M
    p.push_back(16'h0100);  // 170: @NEXT
    p.push_back(16'hea87);  // 171: 0;JMP
    p.push_back(16'h0007);  // 172: @7
    p.push_back(16'hec10);  // 173: D=A
    p.push_back(16'h0004);  // 174: @4
    p.push_back(16'hf088);  // 175: M=D+M
    p.push_back(16'h0100);  // 176: @NEXT
    p.push_back(16'hea87);  // 177: 0;JMP
    p.push_back(16'h0008);  // 178: @8
    p.push_back(16'hec10);  // 179: D=A
    p.push_back(16'h0004);  // 180: @4
    p.push_back(16'hf088);  // 181: M=D+M
    p.push_back(16'h0100);  // 182: @NEXT
    p.push_back(16'hea87);  // 183: 0;JMP
    p.push_back(16'h0009);  // 184: @9
    p.push_back(16'hec10);  // 185: D=A
    p.push_back(16'h0004);  // 186: @4
    p.push_back(16'hf088);  // 187: M=D+M
    p.push_back(16'h0100);  // 188: @NEXT
    p.push_back(16'hea87);  // 189: 0;JMP
    p.push_back(16'h000a);  // 190: @10
    p.push_back(16'hec10);  // 191: D=A
    p.push_back(16'h0004);  // 192: @4
    p.push_back(16'hf088);  // 193: M=D+M
    p.push_back(16'h0100);  // 194: @NEXT
    p.push_back(16'hea87);  // 195: 0;JMP
    p.push_back(16'h000b);  // 196: @11
    p.push_back(16'hec10);  // 197: D=A
    p.push_back(16'h0004);  // 198: @4
    p.push_back(16'hf088);  // 199: M=D+M
    p.push_back(16'h0100);  // 200: @NEXT
    p.push_back(16'hea87);  // 201: 0;JMP
    p.push_back(16'h000c);  // 202: @12
    p.push_back(16'hec10);  // 203: D=A
    p.push_back(16'h0004);  // 204: @4
    p.push_back(16'hf088);  // 205: M=D+M
    p.push_back(16'h0100);  // 206: @NEXT
    p.push_back(16'hea87);  // 207: 0;JMP
    p.push_back(16'h000d);  // 208: @13
    p.push_back(16'hec10);  // 209: D=A
    p.push_back(16'h0004);  // 210: @4
    p.push_back(16'hf088);  // 211: M=D+M
    p.push_back(16'h0100);  // 212: @NEXT
    p.push_back(16'hea87);  // 213: 0;JMP
    p.push_back(16'h000e);  // 214: @14
    p.push_back(16'hec10);  // 215: D=A
    p.push_back(16'h0004);  // 216: @4
    p.push_back(16'hf088);  // 217: M=D+M
    p.push_back(16'h0100);  // 218: @NEXT
    p.push_back(16'hea87);  // 219: 0;JMP
    p.push_back(16'h000f);  // 220: @15
    p.push_back(16'hec10);  // 221: D=A
    p.push_back(16'h0004);  // 222: @4
    p.push_back(16'hf088);  // 223: M=D+M
    p.push_back(16'h0100);  // 224: @NEXT
    p.push_back(16'hea87);  // 225: 0;JMP
    p.push_back(16'h0010);  // 226: @16
    p.push_back(16'hec10);  // 227: D=A
    p.push_back(16'h0004);  // 228: @4
    p.push_back(16'hf088);  // 229: M=D+M
    p.push_back(16'h0100);  // 230: @NEXT
    p.push_back(16'hea87);  // 231: 0;JMP
    p.push_back(16'h0011);  // 232: @17
    p.push_back(16'hec10);  // 233: D=A
    p.push_back(16'h0004);  // 234: @4
    p.push_back(16'hf088);  // 235: M=D+M
    p.push_back(16'h0100);  // 236: @NEXT
    p.push_back(16'hea87);  // 237: 0;JMP
    p.push_back(16'h0012);  // 238: @18
    p.push_back(16'hec10);  // 239: D=A
    p.push_back(16'h0004);  // 240: @4
    p.push_back(16'hf088);  // 241: M=D+M
    p.push_back(16'h0100);  // 242: @NEXT
    p.push_back(16'hea87);  // 243: 0;JMP
    p.push_back(16'h0013);  // 244: @19
    p.push_back(16'hec10);  // 245: D=A
    p.push_back(16'h0004);  // 246: @4
    p.push_back(16'hf088);  // 247: M=D+M
    p.push_back(16'h0100);  // 248: @NEXT
    p.push_back(16'hea87);  // 249: 0;JMP
    p.push_back(16'h0014);  // 250: @20
    p.push_back(16'hec10);  // 251: D=A
    p.push_back(16'h0004);  // 252: @4
    p.push_back(16'hf088);  // 253: M=D+M
    p.push_back(16'h0100);  // 254: @NEXT
    p.push_back(16'hea87);  // 255: 0;JMP
    p.push_back(16'h0001);  // 256: @1
    p.push_back(16'hfc98);  // 257: MD=M-1
    p.push_back(16'h0006);  // 258: @L
    p.push_back(16'he301);  // 259: D;JGT
    p.push_back(16'h0104);  // 260: @END
    p.push_back(16'hea87);  // 261: 0;JMP
    return p;
  endfunction
  // mathematics: 10000 iterations of acc = ((acc+i)*4 - (i & 255)) | i with shift-free adds, in RAM[2] (30 words)
  localparam int unsigned MATHEMATICS_HALT = 28;
  function automatic prog_t mathematics();
    prog_t p;
    p.push_back(16'h2710);  //   0: @10000
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0001);  //   2: @1
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h0002);  //   4: @2
    p.push_back(16'hea88);  //   5: M=0
    p.push_back(16'h0001);  //   6: @1
    p.push_back(16'hfc10);  //   7: D=M
    p.push_back(16'h0002);  //   8: @2
    p.push_back(16'hf090);  //   9: D=D+M
    p.push_back(16'he308);  //  10: M=D
    p.push_back(16'hf090);  //  11: D=D+M
    p.push_back(16'hf090);  //  12: D=D+M
    p.push_back(16'hf088);  //  13: M=D+M
    p.push_back(16'h0001);  //  14: @1
    p.push_back(16'hfc10);  //  15: D=M
    p.push_back(16'h00ff);  //  16: @255
    p.push_back(16'he010);  //  17: D=D&A
    p.push_back(16'h0002);  //  18: @2
    p.push_back(16'hf1c8);  //  19: M=M-D
    p.push_back(16'h0001);  //  20: @1
    p.push_back(16'hfc10);  //  21: D=M
    p.push_back(16'h0002);  //  22: @2
    p.push_back(16'hf548);  //  23: M=D|M
    p.push_back(16'h0001);  //  24: @1
    p.push_back(16'hfc98);  //  25: MD=M-1
    p.push_back(16'h0006);  //  26: @L
    p.push_back(16'he301);  //  27: D;JGT
    p.push_back(16'h001c);  //  28: @END
    p.push_back(16'hea87);  //  29: 0;JMP
    return p;
  endfunction
  // memory_read: reads every RAM and screen address 0..24575 and sums them into RAM[4] (17 words)
  localparam int unsigned MEMORY_READ_HALT = 15;
  function automatic prog_t memory_read();
    prog_t p;
    p.push_back(16'h0004);  //   0: @4
    p.push_back(16'hea88);  //   1: M=0
    p.push_back(16'h0003);  //   2: @3
    p.push_back(16'hea88);  //   3: M=0
    p.push_back(16'h0003);  //   4: @3
    p.push_back(16'hfc20);  //   5: A=M
    p.push_back(16'hfc10);  //   6: D=M
    p.push_back(16'h0004);  //   7: @4
    p.push_back(16'hf088);  //   8: M=D+M
    p.push_back(16'h0003);  //   9: @3
    p.push_back(16'hfdd8);  //  10: MD=M+1
    p.push_back(16'h6000);  //  11: @24576
    p.push_back(16'he4d0);  //  12: D=D-A
    p.push_back(16'h0004);  //  13: @L
    p.push_back(16'he304);  //  14: D;JLT
    p.push_back(16'h000f);  //  15: @END
    p.push_back(16'hea87);  //  16: 0;JMP
    return p;
  endfunction
  // memory_write: writes every address 2048..24574 with its own address (16 words)
  localparam int unsigned MEMORY_WRITE_HALT = 14;
  function automatic prog_t memory_write();
    prog_t p;
    p.push_back(16'h0800);  //   0: @2048
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0003);  //   2: @3
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h0003);  //   4: @3
    p.push_back(16'hfc10);  //   5: D=M
    p.push_back(16'he320);  //   6: A=D
    p.push_back(16'he308);  //   7: M=D
    p.push_back(16'h0003);  //   8: @3
    p.push_back(16'hfdd8);  //   9: MD=M+1
    p.push_back(16'h5fff);  //  10: @24575
    p.push_back(16'he4d0);  //  11: D=D-A
    p.push_back(16'h0004);  //  12: @L
    p.push_back(16'he304);  //  13: D;JLT
    p.push_back(16'h000e);  //  14: @END
    p.push_back(16'hea87);  //  15: 0;JMP
    return p;
  endfunction
  // memory_access: sums addresses 0..2047 into RAM[4], writes 2048..24574 with their own addresses, then copies the keyboard word into RAM[5] (31 words)
  localparam int unsigned MEMORY_ACCESS_HALT = 29;
  function automatic prog_t memory_access();
    prog_t p;
    p.push_back(16'h0004);  //   0: @4
    p.push_back(16'hea88);  //   1: M=0
    p.push_back(16'h0003);  //   2: @3
    p.push_back(16'hea88);  //   3: M=0
    p.push_back(16'h0003);  //   4: @3
    p.push_back(16'hfc20);  //   5: A=M
    p.push_back(16'hfc10);  //   6: D=M
    p.push_back(16'h0004);  //   7: @4
    p.push_back(16'hf088);  //   8: M=D+M
    p.push_back(16'h0003);  //   9: @3
    p.push_back(16'hfdd8);  //  10: MD=M+1
    p.push_back(16'h0800);  //  11: @2048
    p.push_back(16'he4d0);  //  12: D=D-A
    p.push_back(16'h0004);  //  13: @R
    p.push_back(16'he304);  //  14: D;JLT
    p.push_back(16'h0003);  //  15: @3
    p.push_back(16'hfc10);  //  16: D=M
    p.push_back(16'he320);  //  17: A=D
    p.push_back(16'he308);  //  18: M=D
    p.push_back(16'h0003);  //  19: @3
    p.push_back(16'hfdd8);  //  20: MD=M+1
    p.push_back(16'h5fff);  //  21: @24575
    p.push_back(16'he4d0);  //  22: D=D-A
    p.push_back(16'h000f);  //  23: @W
    p.push_back(16'he304);  //  24: D;JLT
    p.push_back(16'h6000);  //  25: @24576
    p.push_back(16'hfc10);  //  26: D=M
    p.push_back(16'h0005);  //  27: @5
    p.push_back(16'he308);  //  28: M=D
    p.push_back(16'h001d);  //  29: @END
    p.push_back(16'hea87);  //  30: 0;JMP
    return p;
  endfunction
  // objects: 100 times: allocate a 3-word object from a free list (head RAM[11], bump pointer RAM[12]), set its two fields to i and 2i, call its sum method, add the result into RAM[10], and dispose of it (169 words)
  localparam int unsigned OBJECTS_HALT = 79;
  function automatic prog_t objects();
    prog_t p;
    p.push_back(16'h0100);  //   0: @256
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0000);  //   2: @0
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h000a);  //   4: @10
    p.push_back(16'hea88);  //   5: M=0
    p.push_back(16'h000b);  //   6: @11
    p.push_back(16'hea88);  //   7: M=0
    p.push_back(16'h0800);  //   8: @2048
    p.push_back(16'hec10);  //   9: D=A
    p.push_back(16'h000c);  //  10: @12
    p.push_back(16'he308);  //  11: M=D
    p.push_back(16'h0064);  //  12: @100
    p.push_back(16'hec10);  //  13: D=A
    p.push_back(16'h0007);  //  14: @7
    p.push_back(16'he308);  //  15: M=D
    p.push_back(16'h000d);  //  16: @13
    p.push_back(16'he308);  //  17: M=D
    p.push_back(16'h001d);  //  18: @RET13
    p.push_back(16'hec10);  //  19: D=A
    p.push_back(16'h0000);  //  20: @0
    p.push_back(16'hfc20);  //  21: A=M
    p.push_back(16'he308);  //  22: M=D
    p.push_back(16'h0000);  //  23: @0
    p.push_back(16'hfdc8);  //  24: M=M+1
    p.push_back(16'h000d);  //  25: @13
    p.push_back(16'hfc10);  //  26: D=M
    p.push_back(16'h0051);  //  27: @ALLOC
    p.push_back(16'hea87);  //  28: 0;JMP
    p.push_back(16'h0008);  //  29: @8
    p.push_back(16'he308);  //  30: M=D
    p.push_back(16'h0007);  //  31: @7
    p.push_back(16'hfc10);  //  32: D=M
    p.push_back(16'h0008);  //  33: @8
    p.push_back(16'hfc20);  //  34: A=M
    p.push_back(16'he308);  //  35: M=D
    p.push_back(16'h0007);  //  36: @7
    p.push_back(16'hfc10);  //  37: D=M
    p.push_back(16'hf090);  //  38: D=D+M
    p.push_back(16'h0008);  //  39: @8
    p.push_back(16'hfc20);  //  40: A=M
    p.push_back(16'hede0);  //  41: A=A+1
    p.push_back(16'he308);  //  42: M=D
    p.push_back(16'h0008);  //  43: @8
    p.push_back(16'hfc10);  //  44: D=M
    p.push_back(16'h000d);  //  45: @13
    p.push_back(16'he308);  //  46: M=D
    p.push_back(16'h003a);  //  47: @RET14
    p.push_back(16'hec10);  //  48: D=A
    p.push_back(16'h0000);  //  49: @0
    p.push_back(16'hfc20);  //  50: A=M
    p.push_back(16'he308);  //  51: M=D
    p.push_back(16'h0000);  //  52: @0
    p.push_back(16'hfdc8);  //  53: M=M+1
    p.push_back(16'h000d);  //  54: @13
    p.push_back(16'hfc10);  //  55: D=M
    p.push_back(16'h0082);  //  56: @SUM
    p.push_back(16'hea87);  //  57: 0;JMP
    p.push_back(16'h000a);  //  58: @10
    p.push_back(16'hf088);  //  59: M=D+M
    p.push_back(16'h0008);  //  60: @8
    p.push_back(16'hfc10);  //  61: D=M
    p.push_back(16'h000d);  //  62: @13
    p.push_back(16'he308);  //  63: M=D
    p.push_back(16'h004b);  //  64: @RET15
    p.push_back(16'hec10);  //  65: D=A
    p.push_back(16'h0000);  //  66: @0
    p.push_back(16'hfc20);  //  67: A=M
    p.push_back(16'he308);  //  68: M=D
    p.push_back(16'h0000);  //  69: @0
    p.push_back(16'hfdc8);  //  70: M=M+1
    p.push_back(16'h000d);  //  71: @13
    p.push_back(16'hfc10);  //  72: D=M
    p.push_back(16'h0092);  //  73: @FREE
    p.push_back(16'hea87);  //  74: 0;JMP
    p.push_back(16'h0007);  //  75: @7
    p.push_back(16'hfc98);  //  76: MD=M-1
    p.push_back(16'h0010);  //  77: @OL
    p.push_back(16'he301);  //  78: D;JGT
    p.push_back(16'h004f);  //  79: @END
    p.push_back(16'hea87);  //  80: 0;JMP
    p.push_back(16'h000b);  //  81: @11
    p.push_back(16'hfc10);  //  82: D=M
    p.push_back(16'h006c);  //  83: @ANEW
    p.push_back(16'he302);  //  84: D;JEQ
    p.push_back(16'h000b);  //  85: @11
    p.push_back(16'hfc10);  //  86: D=M
    p.push_back(16'h000f);  //  87: @15
    p.push_back(16'he308);  //  88: M=D
    p.push_back(16'h000b);  //  89: @11
    p.push_back(16'hfc20);  //  90: A=M
    p.push_back(16'hfc10);  //  91: D=M
    p.push_back(16'h000b);  //  92: @11
    p.push_back(16'he308);  //  93: M=D
    p.push_back(16'h000f);  //  94: @15
    p.push_back(16'hfc10);  //  95: D=M
    p.push_back(16'h000d);  //  96: @13
    p.push_back(16'he308);  //  97: M=D
    p.push_back(16'h0000);  //  98: @0
    p.push_back(16'hfca8);  //  99: AM=M-1
    p.push_back(16'hfc10);  // 100: D=M
    p.push_back(16'h000e);  // 101: @14
    p.push_back(16'he308);  // 102: M=D
    p.push_back(16'h000d);  // 103: @13
    p.push_back(16'hfc10);  // 104: D=M
    p.push_back(16'h000e);  // 105: @14
    p.push_back(16'hfc20);  // 106: A=M
    p.push_back(16'hea87);  // 107: 0;JMP
    p.push_back(16'h000c);  // 108: @12
    p.push_back(16'hfc10);  // 109: D=M
    p.push_back(16'h000f);  // 110: @15
    p.push_back(16'he308);  // 111: M=D
    p.push_back(16'h0003);  // 112: @3
    p.push_back(16'hec10);  // 113: D=A
    p.push_back(16'h000c);  // 114: @12
    p.push_back(16'hf088);  // 115: M=D+M
    p.push_back(16'h000f);  // 116: @15
    p.push_back(16'hfc10);  // 117: D=M
    p.push_back(16'h000d);  // 118: @13
    p.push_back(16'he308);  // 119: M=D
    p.push_back(16'h0000);  // 120: @0
    p.push_back(16'hfca8);  // 121: AM=M-1
    p.push_back(16'hfc10);  // 122: D=M
    p.push_back(16'h000e);  // 123: @14
    p.push_back(16'he308);  // 124: M=D
    p.push_back(16'h000d);  // 125: @13
    p.push_back(16'hfc10);  // 126: D=M
    p.push_back(16'h000e);  // 127: @14
    p.push_back(16'hfc20);  // 128: A=M
    p.push_back(16'hea87);  // 129: 0;JMP
    p.push_back(16'he320);  // 130: A=D
    p.push_back(16'hfc10);  // 131: D=M
    p.push_back(16'hede0);  // 132: A=A+1
    p.push_back(16'hf090);  // 133: D=D+M
    p.push_back(16'h000d);  // 134: @13
    p.push_back(16'he308);  // 135: M=D
    p.push_back(16'h0000);  // 136: @0
    p.push_back(16'hfca8);  // 137: AM=M-1
    p.push_back(16'hfc10);  // 138: D=M
    p.push_back(16'h000e);  // 139: @14
    p.push_back(16'he308);  // 140: M=D
    p.push_back(16'h000d);  // 141: @13
    p.push_back(16'hfc10);  // 142: D=M
    p.push_back(16'h000e);  // 143: @14
    p.push_back(16'hfc20);  // 144: A=M
    p.push_back(16'hea87);  // 145: 0;JMP
    p.push_back(16'h000f);  // 146: @15
    p.push_back(16'he308);  // 147: M=D
    p.push_back(16'h000b);  // 148: @11
    p.push_back(16'hfc10);  // 149: D=M
    p.push_back(16'h000f);  // 150: @15
    p.push_back(16'hfc20);  // 151: A=M
    p.push_back(16'he308);  // 152: M=D
    p.push_back(16'h000f);  // 153: @15
    p.push_back(16'hfc10);  // 154: D=M
    p.push_back(16'h000b);  // 155: @11
    p.push_back(16'he308);  // 156: M=D
    p.push_back(16'h000d);  // 157: @13
    p.push_back(16'he308);  // 158: M=D
    p.push_back(16'h0000);  // 159: @0
    p.push_back(16'hfca8);  // 160: AM=M-1
    p.push_back(16'hfc10);  // 161: D=M
    p.push_back(16'h000e);  // 162: @14
    p.push_back(16'he308);  // 163: M=D
    p.push_back(16'h000d);  // 164: @13
    p.push_back(16'hfc10);  // 165: D=M
    p.push_back(16'h000e);  // 166: @14
    p.push_back(16'hfc20);  // 167: A=M
    p.push_back(16'hea87);  // 168: 0;JMP
    return p;
  endfunction
  // text_output: draws 100 8x11 'Z' glyphs, 64 per text line, two per screen word, by read-modify-write (379 words)
  localparam int unsigned TEXT_OUTPUT_HALT = 377;
  function automatic prog_t text_output();
    prog_t p;
    p.push_back(16'h4000);  //   0: @16384
    p.push_back(16'hec10);  //   1: D=A
    p.push_back(16'h0003);  //   2: @3
    p.push_back(16'he308);  //   3: M=D
    p.push_back(16'h0006);  //   4: @6
    p.push_back(16'hea88);  //   5: M=0
    p.push_back(16'h0008);  //   6: @8
    p.push_back(16'hea88);  //   7: M=0
    p.push_back(16'h0064);  //   8: @100
    p.push_back(16'hec10);  //   9: D=A
    p.push_back(16'h0007);  //  10: @7
    p.push_back(16'he308);  //  11: M=D
    p.push_back(16'h0006);  //  12: @6
    p.push_back(16'hfc10);  //  13: D=M
    p.push_back(16'h00c2);  //  14: @ODD
    p.push_back(16'he305);  //  15: D;JNE
    p.push_back(16'h0003);  //  16: @3
    p.push_back(16'hfc10);  //  17: D=M
    p.push_back(16'h0009);  //  18: @9
    p.push_back(16'he308);  //  19: M=D
    p.push_back(16'he320);  //  20: A=D
    p.push_back(16'hfc10);  //  21: D=M
    p.push_back(16'h00ff);  //  22: @255
    p.push_back(16'hec60);  //  23: A=!A
    p.push_back(16'he010);  //  24: D=D&A
    p.push_back(16'h003f);  //  25: @63
    p.push_back(16'he550);  //  26: D=D|A
    p.push_back(16'h0009);  //  27: @9
    p.push_back(16'hfc20);  //  28: A=M
    p.push_back(16'he308);  //  29: M=D
    p.push_back(16'h0003);  //  30: @3
    p.push_back(16'hfc10);  //  31: D=M
    p.push_back(16'h0020);  //  32: @32
    p.push_back(16'he090);  //  33: D=D+A
    p.push_back(16'h0009);  //  34: @9
    p.push_back(16'he308);  //  35: M=D
    p.push_back(16'he320);  //  36: A=D
    p.push_back(16'hfc10);  //  37: D=M
    p.push_back(16'h00ff);  //  38: @255
    p.push_back(16'hec60);  //  39: A=!A
    p.push_back(16'he010);  //  40: D=D&A
    p.push_back(16'h0033);  //  41: @51
    p.push_back(16'he550);  //  42: D=D|A
    p.push_back(16'h0009);  //  43: @9
    p.push_back(16'hfc20);  //  44: A=M
    p.push_back(16'he308);  //  45: M=D
    p.push_back(16'h0003);  //  46: @3
    p.push_back(16'hfc10);  //  47: D=M
    p.push_back(16'h0040);  //  48: @64
    p.push_back(16'he090);  //  49: D=D+A
    p.push_back(16'h0009);  //  50: @9
    p.push_back(16'he308);  //  51: M=D
    p.push_back(16'he320);  //  52: A=D
    p.push_back(16'hfc10);  //  53: D=M
    p.push_back(16'h00ff);  //  54: @255
    p.push_back(16'hec60);  //  55: A=!A
    p.push_back(16'he010);  //  56: D=D&A
    p.push_back(16'h0031);  //  57: @49
    p.push_back(16'he550);  //  58: D=D|A
    p.push_back(16'h0009);  //  59: @9
    p.push_back(16'hfc20);  //  60: A=M
    p.push_back(16'he308);  //  61: M=D
    p.push_back(16'h0003);  //  62: @3
    p.push_back(16'hfc10);  //  63: D=M
    p.push_back(16'h0060);  //  64: @96
    p.push_back(16'he090);  //  65: D=D+A
    p.push_back(16'h0009);  //  66: @9
    p.push_back(16'he308);  //  67: M=D
    p.push_back(16'he320);  //  68: A=D
    p.push_back(16'hfc10);  //  69: D=M
    p.push_back(16'h00ff);  //  70: @255
    p.push_back(16'hec60);  //  71: A=!A
    p.push_back(16'he010);  //  72: D=D&A
    p.push_back(16'h0018);  //  73: @24
    p.push_back(16'he550);  //  74: D=D|A
    p.push_back(16'h0009);  //  75: @9
    p.push_back(16'hfc20);  //  76: A=M
    p.push_back(16'he308);  //  77: M=D
    p.push_back(16'h0003);  //  78: @3
    p.push_back(16'hfc10);  //  79: D=M
    p.push_back(16'h0080);  //  80: @128
    p.push_back(16'he090);  //  81: D=D+A
    p.push_back(16'h0009);  //  82: @9
    p.push_back(16'he308);  //  83: M=D
    p.push_back(16'he320);  //  84: A=D
    p.push_back(16'hfc10);  //  85: D=M
    p.push_back(16'h00ff);  //  86: @255
    p.push_back(16'hec60);  //  87: A=!A
    p.push_back(16'he010);  //  88: D=D&A
    p.push_back(16'h000c);  //  89: @12
    p.push_back(16'he550);  //  90: D=D|A
    p.push_back(16'h0009);  //  91: @9
    p.push_back(16'hfc20);  //  92: A=M
    p.push_back(16'he308);  //  93: M=D
    p.push_back(16'h0003);  //  94: @3
    p.push_back(16'hfc10);  //  95: D=M
    p.push_back(16'h00a0);  //  96: @160
    p.push_back(16'he090);  //  97: D=D+A
    p.push_back(16'h0009);  //  98: @9
    p.push_back(16'he308);  //  99: M=D
    p.push_back(16'he320);  // 100: A=D
    p.push_back(16'hfc10);  // 101: D=M
    p.push_back(16'h00ff);  // 102: @255
    p.push_back(16'hec60);  // 103: A=!A
    p.push_back(16'he010);  // 104: D=D&A
    p.push_back(16'h0006);  // 105: @6
    p.push_back(16'he550);  // 106: D=D|A
    p.push_back(16'h0009);  // 107: @9
    p.push_back(16'hfc20);  // 108: A=M
    p.push_back(16'he308);  // 109: M=D
    p.push_back(16'h0003);  // 110: @3
    p.push_back(16'hfc10);  // 111: D=M
    p.push_back(16'h00c0);  // 112: @192
    p.push_back(16'he090);  // 113: D=D+A
    p.push_back(16'h0009);  // 114: @9
    p.push_back(16'he308);  // 115: M=D
    p.push_back(16'he320);  // 116: A=D
    p.push_back(16'hfc10);  // 117: D=M
    p.push_back(16'h00ff);  // 118: @255
    p.push_back(16'hec60);  // 119: A=!A
    p.push_back(16'he010);  // 120: D=D&A
    p.push_back(16'h0023);  // 121: @35
    p.push_back(16'he550);  // 122: D=D|A
    p.push_back(16'h0009);  // 123: @9
    p.push_back(16'hfc20);  // 124: A=M
    p.push_back(16'he308);  // 125: M=D
    p.push_back(16'h0003);  // 126: @3
    p.push_back(16'hfc10);  // 127: D=M
    p.push_back(16'h00e0);  // 128: @224
    p.push_back(16'he090);  // 129: D=D+A
    p.push_back(16'h0009);  // 130: @9
    p.push_back(16'he308);  // 131: M=D
    p.push_back(16'he320);  // 132: A=D
    p.push_back(16'hfc10);  // 133: D=M
    p.push_back(16'h00ff);  // 134: @255
    p.push_back(16'hec60);  // 135: A=!A
    p.push_back(16'he010);  // 136: D=D&A
    p.push_back(16'h0033);  // 137: @51
    p.push_back(16'he550);  // 138: D=D|A
    p.push_back(16'h0009);  // 139: @9
    p.push_back(16'hfc20);  // 140: A=M
    p.push_back(16'he308);  // 141: M=D
    p.push_back(16'h0003);  // 142: @3
    p.push_back(16'hfc10);  // 143: D=M
    p.push_back(16'h0100);  // 144: @256
    p.push_back(16'he090);  // 145: D=D+A
    p.push_back(16'h0009);  // 146: @9
    p.push_back(16'he308);  // 147: M=D
    p.push_back(16'he320);  // 148: A=D
    p.push_back(16'hfc10);  // 149: D=M
    p.push_back(16'h00ff);  // 150: @255
    p.push_back(16'hec60);  // 151: A=!A
    p.push_back(16'he010);  // 152: D=D&A
    p.push_back(16'h003f);  // 153: @63
    p.push_back(16'he550);  // 154: D=D|A
    p.push_back(16'h0009);  // 155: @9
    p.push_back(16'hfc20);  // 156: A=M
    p.push_back(16'he308);  // 157: M=D
    p.push_back(16'h0003);  // 158: @3
    p.push_back(16'hfc10);  // 159: D=M
    p.push_back(16'h0120);  // 160: @288
    p.push_back(16'he090);  // 161: D=D+A
    p.push_back(16'h0009);  // 162: @9
    p.push_back(16'he308);  // 163: M=D
    p.push_back(16'he320);  // 164: A=D
    p.push_back(16'hfc10);  // 165: D=M
    p.push_back(16'h00ff);  // 166: @255
    p.push_back(16'hec60);  // 167: A=!A
    p.push_back(16'he010);  // 168: D=D&A
    p.push_back(16'h0000);  // 169: @0
    p.push_back(16'he550);  // 170: D=D|A
    p.push_back(16'h0009);  // 171: @9
    p.push_back(16'hfc20);  // 172: A=M
    p.push_back(16'he308);  // 173: M=D
    p.push_back(16'h0003);  // 174: @3
    p.push_back(16'hfc10);  // 175: D=M
    p.push_back(16'h0140);  // 176: @320
    p.push_back(16'he090);  // 177: D=D+A
    p.push_back(16'h0009);  // 178: @9
    p.push_back(16'he308);  // 179: M=D
    p.push_back(16'he320);  // 180: A=D
    p.push_back(16'hfc10);  // 181: D=M
    p.push_back(16'h00ff);  // 182: @255
    p.push_back(16'hec60);  // 183: A=!A
    p.push_back(16'he010);  // 184: D=D&A
    p.push_back(16'h0000);  // 185: @0
    p.push_back(16'he550);  // 186: D=D|A
    p.push_back(16'h0009);  // 187: @9
    p.push_back(16'hfc20);  // 188: A=M
    p.push_back(16'he308);  // 189: M=D
    p.push_back(16'h0006);  // 190: @6
    p.push_back(16'hefc8);  // 191: M=1
    p.push_back(16'h0169);  // 192: @NEXT
    p.push_back(16'hea87);  // 193: 0;JMP
    p.push_back(16'h0003);  // 194: @3
    p.push_back(16'hfc10);  // 195: D=M
    p.push_back(16'h0009);  // 196: @9
    p.push_back(16'he308);  // 197: M=D
    p.push_back(16'he320);  // 198: A=D
    p.push_back(16'hfc10);  // 199: D=M
    p.push_back(16'h00ff);  // 200: @255
    p.push_back(16'he010);  // 201: D=D&A
    p.push_back(16'h3f00);  // 202: @16128
    p.push_back(16'he550);  // 203: D=D|A
    p.push_back(16'h0009);  // 204: @9
    p.push_back(16'hfc20);  // 205: A=M
    p.push_back(16'he308);  // 206: M=D
    p.push_back(16'h0003);  // 207: @3
    p.push_back(16'hfc10);  // 208: D=M
    p.push_back(16'h0020);  // 209: @32
    p.push_back(16'he090);  // 210: D=D+A
    p.push_back(16'h0009);  // 211: @9
    p.push_back(16'he308);  // 212: M=D
    p.push_back(16'he320);  // 213: A=D
    p.push_back(16'hfc10);  // 214: D=M
    p.push_back(16'h00ff);  // 215: @255
    p.push_back(16'he010);  // 216: D=D&A
    p.push_back(16'h3300);  // 217: @13056
    p.push_back(16'he550);  // 218: D=D|A
    p.push_back(16'h0009);  // 219: @9
    p.push_back(16'hfc20);  // 220: A=M
    p.push_back(16'he308);  // 221: M=D
    p.push_back(16'h0003);  // 222: @3
    p.push_back(16'hfc10);  // 223: D=M
    p.push_back(16'h0040);  // 224: @64
    p.push_back(16'he090);  // 225: D=D+A
    p.push_back(16'h0009);  // 226: @9
    p.push_back(16'he308);  // 227: M=D
    p.push_back(16'he320);  // 228: A=D
    p.push_back(16'hfc10);  // 229: D=M
    p.push_back(16'h00ff);  // 230: @255
    p.push_back(16'he010);  // 231: D=D&A
    p.push_back(16'h3100);  // 232: @12544
    p.push_back(16'he550);  // 233: D=D|A
    p.push_back(16'h0009);  // 234: @9
    p.push_back(16'hfc20);  // 235: A=M
    p.push_back(16'he308);  // 236: M=D
    p.push_back(16'h0003);  // 237: @3
    p.push_back(16'hfc10);  // 238: D=M
    p.push_back(16'h0060);  // 239: @96
    p.push_back(16'he090);  // 240: D=D+A
    p.push_back(16'h0009);  // 241: @9
    p.push_back(16'he308);  // 242: M=D
    p.push_back(16'he320);  // 243: A=D
    p.push_back(16'hfc10);  // 244: D=M
    p.push_back(16'h00ff);  // 245: @255
    p.push_back(16'he010);  // 246: D=D&A
    p.push_back(16'h1800);  // 247: @6144
    p.push_back(16'he550);  // 248: D=D|A
    p.push_back(16'h0009);  // 249: @9
    p.push_back(16'hfc20);  // 250: A=M
    p.push_back(16'he308);  // 251: M=D
    p.push_back(16'h0003);  // 252: @3
    p.push_back(16'hfc10);  // 253: D=M
    p.push_back(16'h0080);  // 254: @128
    p.push_back(16'he090);  // 255: D=D+A
    p.push_back(16'h0009);  // 256: @9
    p.push_back(16'he308);  // 257: M=D
    p.push_back(16'he320);  // 258: A=D
    p.push_back(16'hfc10);  // 259: D=M
    p.push_back(16'h00ff);  // 260: @255
    p.push_back(16'he010);  // 261: D=D&A
    p.push_back(16'h0c00);  // 262: @3072
    p.push_back(16'he550);  // 263: D=D|A
    p.push_back(16'h0009);  // 264: @9
    p.push_back(16'hfc20);  // 265: A=M
    p.push_back(16'he308);  // 266: M=D
    p.push_back(16'h0003);  // 267: @3
    p.push_back(16'hfc10);  // 268: D=M
    p.push_back(16'h00a0);  // 269: @160
    p.push_back(16'he090);  // 270: D=D+A
    p.push_back(16'h0009);  // 271: @9
    p.push_back(16'he308);  // 272: M=D
    p.push_back(16'he320);  // 273: A=D
    p.push_back(16'hfc10);  // 274: D=M
    p.push_back(16'h00ff);  // 275: @255
    p.push_back(16'he010);  // 276: D=D&A
    p.push_back(16'h0600);  // 277: @1536
    p.push_back(16'he550);  // 278: D=D|A
    p.push_back(16'h0009);  // 279: @9
    p.push_back(16'hfc20);  // 280: A=M
    p.push_back(16'he308);  // 281: M=D
    p.push_back(16'h0003);  // 282: @3
    p.push_back(16'hfc10);  // 283: D=M
    p.push_back(16'h00c0);  // 284: @192
    p.push_back(16'he090);  // 285: D=D+A
    p.push_back(16'h0009);  // 286: @9
    p.push_back(16'he308);  // 287: M=D
    p.push_back(16'he320);  // 288: A=D
    p.push_back(16'hfc10);  // 289: D=M
    p.push_back(16'h00ff);  // 290: @255
    p.push_back(16'he010);  // 291: D=D&A
    p.push_back(16'h2300);  // 292: @8960
    p.push_back(16'he550);  // 293: D=D|A
    p.push_back(16'h0009);  // 294: @9
    p.push_back(16'hfc20);  // 295: A=M
    p.push_back(16'he308);  // 296: M=D
    p.push_back(16'h0003);  // 297: @3
    p.push_back(16'hfc10);  // 298: D=M
    p.push_back(16'h00e0);  // 299: @224
    p.push_back(16'he090);  // 300: D=D+A
    p.push_back(16'h0009);  // 301: @9
    p.push_back(16'he308);  // 302: M=D
    p.push_back(16'he320);  // 303: A=D
    p.push_back(16'hfc10);  // 304: D=M
    p.push_back(16'h00ff);  // 305: @255
    p.push_back(16'he010);  // 306: D=D&A
    p.push_back(16'h3300);  // 307: @13056
    p.push_back(16'he550);  // 308: D=D|A
    p.push_back(16'h0009);  // 309: @9
    p.push_back(16'hfc20);  // 310: A=M
    p.push_back(16'he308);  // 311: M=D
    p.push_back(16'h0003);  // 312: @3
    p.push_back(16'hfc10);  // 313: D=M
    p.push_back(16'h0100);  // 314: @256
    p.push_back(16'he090);  // 315: D=D+A
    p.push_back(16'h0009);  // 316: @9
    p.push_back(16'he308);  // 317: M=D
    p.push_back(16'he320);  // 318: A=D
    p.push_back(16'hfc10);  // 319: D=M
    p.push_back(16'h00ff);  // 320: @255
    p.push_back(16'he010);  // 321: D=D&A
    p.push_back(16'h3f00);  // 322: @16128
    p.push_back(16'he550);  // 323: D=D|A
    p.push_back(16'h0009);  // 324: @9
    p.push_back(16'hfc20);  // 325: A=M
    p.push_back(16'he308);  // 326: M=D
    p.push_back(16'h0003);  // 327: @3
    p.push_back(16'hfc10);  // 328: D=M
    p.push_back(16'h0120);  // 329: @288
    p.push_back(16'he090);  // 330: D=D+A
    p.push_back(16'h0009);  // 331: @9
    p.push_back(16'he308);  // 332: M=D
    p.push_back(16'he320);  // 333: A=D
    p.push_back(16'hfc10);  // 334: D=M
    p.push_back(16'h00ff);  // 335: @255
    p.push_back(16'he010);  // 336: D=D&A
    p.push_back(16'h0000);  // 337: @0
    p.push_back(16'he550);  // 338: D=D|A
    p.push_back(16'h0009);  // 339: @9
    p.push_back(16'hfc20);  // 340: A=M
    p.push_back(16'he308);  // 341: M=D
    p.push_back(16'h0003);  // 342: @3
    p.push_back(16'hfc10);  // 343: D=M
    p.push_back(16'h0140);  // 344: @320
    p.push_back(16'he090);  // 345: D=D+A
    p.push_back(16'h0009);  // 346: @9
    p.push_back(16'he308);  // 347: M=D
    p.push_back(16'he320);  // 348: A=D
    p.push_back(16'hfc10);  // 349: D=M
    p.push_back(16'h00ff);  // 350: @255
    p.push_back(16'he010);  // 351: D=D&A
    p.push_back(16'h0000);  // 352: @0
    p.push_back(16'he550);  // 353: D=D|A
    p.push_back(16'h0009);  // 354: @9
    p.push_back(16'hfc20);  // 355: A=M
    p.push_back(16'he308);  // 356: M=D
    p.push_back(16'h0006);  // 357: @6
    p.push_back(16'hea88);  // 358: M=0
    p.push_back(16'h0003);  // 359: @3
    p.push_back(16'hfdc8);  // 360: M=M+1
    p.push_back(16'h0008);  // 361: @8
    p.push_back(16'hfdd8);  // 362: MD=M+1
    p.push_back(16'h0040);  // 363: @64
    p.push_back(16'he4d0);  // 364: D=D-A
    p.push_back(16'h0175);  // 365: @NOWRAP
    p.push_back(16'he305);  // 366: D;JNE
    p.push_back(16'h0008);  // 367: @8
    p.push_back(16'hea88);  // 368: M=0
    p.push_back(16'h0140);  // 369: @320
    p.push_back(16'hec10);  // 370: D=A
    p.push_back(16'h0003);  // 371: @3
    p.push_back(16'hf088);  // 372: M=D+M
    p.push_back(16'h0007);  // 373: @7
    p.push_back(16'hfc98);  // 374: MD=M-1
    p.push_back(16'h000c);  // 375: @CH
    p.push_back(16'he301);  // 376: D;JGT
    p.push_back(16'h0179);  // 377: @END
    p.push_back(16'hea87);  // 378: 0;JMP
    return p;
  endfunction
endpackage
