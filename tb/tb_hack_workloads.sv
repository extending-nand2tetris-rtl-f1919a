// tb_hack_workloads: runs benchmark-style kernels on the Hack computer at its
// default parameters and reports their cycle counts and CPI.
//
// The kernels (tb/hack_workloads_pkg.sv) follow the classic Hack micro
// benchmarks:
// - a 10000-iteration loop;
// - a 10000-element array fill;
// - 7 functions called 1000 times each;
// - fib(23) by head recursion and by tail recursion;
// - a 20-clause if chain run 10000 times;
// - an arithmetic loop;
// - a read of every RAM and screen word;
// - a write of every address from 2048 to 24574;
// - a read of 0..2047, a write of 2048..24574 and a keyboard read;
// - 100 objects allocated, used through a method call and freed;
// - 100 'Z' characters drawn as 8x11 bitmaps, two to a screen word.
//
// Each kernel is loaded through the cartridge port, and the data memory is
// filled with a known pattern. Every retired instruction, A and D value and
// store is compared with the instruction-level reference model. The final
// results are also checked against values this testbench computes on its own
// (for example fib(23) = 28657, and the memory-read sum from the fill
// pattern). A summary line per kernel gives cycles, instructions, CPI,
// mispredictions and the hit rates of both caches.
//
// For comparison, it also counts the cycles the same instruction stream would
// take on the unpipelined, uncached base machine. That machine runs one
// instruction at a time through fetch (1), decode (1), execute and write
// back:
// - an A-instruction executes in 1 cycle and writes A in 1;
// - a C-instruction fetches operands (1 cycle, or 14 for M), computes for 3,
//   and jumps: 0, 4 unconditional, 6 conditional, plus 4 when taken;
// - write back takes 0 cycles with no destination, 1 for A/D, and 15 when M
//   is written.
// A jump counts as taken when the next instruction is not the following word.
// It prints the base CPI and the speedup, and checks the speedup is over 1.
module tb_hack_workloads;
  import hack_pkg::*;
  import hack_workloads_pkg::prog_t;
  import hack_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic prog_we = 0;
  addr_t prog_addr = 0;
  word_t prog_data = 0;
  word_t kbd = 16'd0;
  logic [12:0] screen_addr = 0;
  word_t screen_data;
  logic  retire, mem_we;
  addr_t retire_pc, mem_waddr;
  word_t retire_instr, a_reg, d_reg, mem_wdata;
  perf_t perf;

  int checks = 0, failures = 0;

  hack_computer dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data, .kbd, .screen_addr, .screen_data,
    .retire, .retire_pc, .retire_instr, .a_reg, .d_reg, .mem_we, .mem_waddr, .mem_wdata,
    .perf);

  always #5 clk = ~clk;

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  HackRef ref_m;

  // initial data memory contents: RAM[i] = i*37+seed, screen[i] = i*11+seed
  function automatic word_t fill_word(int addr, int seed);
    return (addr < 16384) ? word_t'(addr * 37 + seed) : word_t'((addr - 16384) * 11 + seed);
  endfunction

  task automatic run_prog(string name, prog_t p, int halt_pc, int max_cycles, int seed);
    step_t s;
    logic [15:0] rq_a[$], dq_a[$];
    word_t rq_d[$], dq_d[$];
    int halts = 0, cyc = 0;
    longint base = 0;
    dec_t dd;
    ref_m = new();
    ref_m.kbd = kbd;
    rst = 1;
    for (int i = 0; i < 1024; i++) dut.u_rom.mem[i] = '0;
    @(negedge clk);
    foreach (p[i]) begin
      prog_we = 1; prog_addr = addr_t'(i); prog_data = p[i]; ref_m.rom[i] = p[i];
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < 16384; i++) begin
      dut.u_mem.u_ram.mem[i] = fill_word(i, seed);
      ref_m.mem[i] = fill_word(i, seed);
    end
    for (int i = 0; i < 8192; i++) begin
      dut.u_mem.u_screen.mem[i] = fill_word(16384 + i, seed);
      ref_m.mem[16384 + i] = fill_word(16384 + i, seed);
    end
    @(negedge clk);
    rst = 0;
    while (halts < 2 && cyc < max_cycles) begin
      @(negedge clk);
      cyc++;
      if (retire) begin
        check({name, " A"}, a_reg == ref_m.A);
        check({name, " D"}, d_reg == ref_m.D);
        s = ref_m.step();
        dd = decode(s.instr);
        if (!dd.is_c) base += 4;
        else begin
          base += 2 + (dd.uses_m ? 14 : 1) + 3;
          if (dd.is_jump) base += dd.is_uncond ? 4 : (6 + ((ref_m.pc != 15'(s.pc + 1)) ? 4 : 0));
          base += dd.dest_m ? 15 : ((dd.dest_a || dd.dest_d) ? 1 : 0);
        end
        check({name, " retire pc"}, retire_pc == s.pc && retire_instr == s.instr);
        if (s.wr) begin rq_a.push_back({1'b0, s.waddr}); rq_d.push_back(s.wdata); end
        if (retire_pc == addr_t'(halt_pc)) halts++;
      end
      if (mem_we) begin dq_a.push_back({1'b0, mem_waddr}); dq_d.push_back(mem_wdata); end
      while (dq_a.size() > 0 && rq_a.size() > 0)
        check({name, " store"}, dq_a.pop_front() == rq_a.pop_front() &&
                                dq_d.pop_front() == rq_d.pop_front());
    end
    check({name, " reached halt"}, halts == 2);
    check({name, " no stores left over"}, dq_a.size() == 0 && rq_a.size() == 0);
    $display("%-15s cycles=%0d instructions=%0d CPI=%0.2f jumps=%0d mispredicts=%0d stalls=%0d rd hit %0d/%0d wr hit %0d/%0d",
             name, perf.cycles, perf.retired, real'(perf.cycles) / real'(perf.retired),
             perf.jumps, perf.mispredicts, perf.hazard_stalls,
             perf.rd_hits, perf.rd_hits + perf.rd_misses, perf.wr_hits, perf.wr_hits + perf.wr_misses);
    $display("%-15s base machine: cycles=%0d CPI=%0.2f speedup=%0.2f", name, base,
             real'(base) / real'(perf.retired), real'(base) / real'(perf.cycles));
    check({name, " faster than the base machine"}, base > longint'(perf.cycles));
  endtask

  function automatic int fib(int n);
    int a = 0, b = 1, t;
    for (int i = 0; i < n; i++) begin t = a + b; a = b; b = t; end
    return a;
  endfunction

  // the 8x11 bitmap the output kernel draws, top row first, bit 0 leftmost
  localparam word_t ZGLYPH[11] = '{63, 51, 49, 24, 12, 6, 35, 51, 63, 0, 0};

  initial begin
    word_t acc;
    int    tot;
    bit    ok;
    word_t screen_exp[8192];

    run_prog("loop", hack_workloads_pkg::loop(), hack_workloads_pkg::LOOP_HALT, 2_000_000, 1);
    check("loop count", dut.u_mem.u_ram.mem[2] == 16'd10000);

    run_prog("array_fill", hack_workloads_pkg::array_fill(), hack_workloads_pkg::ARRAY_FILL_HALT, 2_000_000, 2);
    ok = 1;
    for (int i = 2048; i < 12048; i++) ok &= (dut.u_mem.u_ram.mem[i] == 16'd1);
    check("array_fill contents", ok && dut.u_mem.u_ram.mem[12048] == fill_word(12048, 2));

    run_prog("function_calls", hack_workloads_pkg::function_calls(), hack_workloads_pkg::FUNCTION_CALLS_HALT, 10_000_000, 3);
    // function i returns (i+1) + (i mod 3)
    tot = 0;
    for (int i = 0; i < 7; i++) tot += (i + 1) + (i % 3);
    check("function_calls total", dut.u_mem.u_ram.mem[10] == word_t'(tot * 1000));

    run_prog("fib_head", hack_workloads_pkg::fib_head(), hack_workloads_pkg::FIB_HEAD_HALT, 40_000_000, 4);
    check("fib_head fib(23)", dut.u_mem.u_ram.mem[1] == word_t'(fib(23)) && fib(23) == 28657);
    check("fib_head stack balanced", dut.u_mem.u_ram.mem[0] == 16'd256);

    run_prog("fib_tail", hack_workloads_pkg::fib_tail(), hack_workloads_pkg::FIB_TAIL_HALT, 1_000_000, 5);
    check("fib_tail fib(23)", dut.u_mem.u_ram.mem[1] == 16'd28657);
    check("fib_tail stack balanced", dut.u_mem.u_ram.mem[0] == 16'd256);

    run_prog("long_if", hack_workloads_pkg::long_if(), hack_workloads_pkg::LONG_IF_HALT, 20_000_000, 6);
    acc = 0;
    for (int i = 10000; i > 0; i--) acc += ((i & 31) < 20) ? word_t'((i & 31) + 1) : 16'hFFFF;
    check("long_if total", dut.u_mem.u_ram.mem[4] == acc);

    run_prog("mathematics", hack_workloads_pkg::mathematics(), hack_workloads_pkg::MATHEMATICS_HALT, 5_000_000, 7);
    acc = 0;
    for (int i = 10000; i > 0; i--) begin
      acc = word_t'(4 * (int'(acc) + i) - (i & 255));
      acc = acc | word_t'(i);
    end
    check("mathematics result", dut.u_mem.u_ram.mem[2] == acc);

    run_prog("memory_read", hack_workloads_pkg::memory_read(), hack_workloads_pkg::MEMORY_READ_HALT, 5_000_000, 8);
    // RAM[3] (pointer) and RAM[4] (sum) change while they are read
    acc = 0;
    for (int i = 0; i < 24576; i++)
      if (i == 3) acc += 16'd3;
      else if (i == 4) acc += acc;
      else acc += fill_word(i, 8);
    check("memory_read sum", dut.u_mem.u_ram.mem[4] == acc);

    run_prog("memory_write", hack_workloads_pkg::memory_write(), hack_workloads_pkg::MEMORY_WRITE_HALT, 5_000_000, 9);
    ok = 1;
    for (int i = 2048; i < 16384; i++) ok &= (dut.u_mem.u_ram.mem[i] == word_t'(i));
    for (int i = 0; i < 8191; i++) ok &= (dut.u_mem.u_screen.mem[i] == word_t'(16384 + i));
    check("memory_write contents", ok && dut.u_mem.u_screen.mem[8191] == fill_word(24575, 9));

    kbd = 16'h005A;
    run_prog("memory_access", hack_workloads_pkg::memory_access(), hack_workloads_pkg::MEMORY_ACCESS_HALT, 5_000_000, 10);
    acc = 0;
    for (int i = 0; i < 2048; i++)
      if (i == 3) acc += 16'd3;
      else if (i == 4) acc += acc;
      else acc += fill_word(i, 10);
    ok = (dut.u_mem.u_ram.mem[4] == acc) && (dut.u_mem.u_ram.mem[5] == 16'h005A);
    for (int i = 2048; i < 16384; i++) ok &= (dut.u_mem.u_ram.mem[i] == word_t'(i));
    for (int i = 0; i < 8191; i++) ok &= (dut.u_mem.u_screen.mem[i] == word_t'(16384 + i));
    check("memory_access results", ok);
    kbd = 16'd0;

    run_prog("objects", hack_workloads_pkg::objects(), hack_workloads_pkg::OBJECTS_HALT, 1_000_000, 12);
    // sum of 3i for i = 1..100; one block reused, left on the free list
    check("objects total", dut.u_mem.u_ram.mem[10] == 16'd15150);
    check("objects heap", dut.u_mem.u_ram.mem[11] == 16'd2048 && dut.u_mem.u_ram.mem[12] == 16'd2051 &&
                          dut.u_mem.u_ram.mem[2048] == 16'd0 && dut.u_mem.u_ram.mem[2049] == 16'd2 &&
                          dut.u_mem.u_ram.mem[0] == 16'd256);

    run_prog("text_output", hack_workloads_pkg::text_output(), hack_workloads_pkg::TEXT_OUTPUT_HALT, 5_000_000, 11);
    // character c sits on text line c/64, column c%64; each text line is 11
    // pixel rows of 32 words, and even columns use the low byte of a word
    for (int i = 0; i < 8192; i++) screen_exp[i] = fill_word(16384 + i, 11);
    for (int c = 0; c < 100; c++)
      for (int r = 0; r < 11; r++) begin
        tot = (c / 64) * 352 + r * 32 + (c % 64) / 2;
        if (c % 2 == 0) screen_exp[tot] = {screen_exp[tot][15:8], ZGLYPH[r][7:0]};
        else            screen_exp[tot] = {ZGLYPH[r][7:0], screen_exp[tot][7:0]};
      end
    ok = 1;
    for (int i = 0; i < 8192; i++) ok &= (dut.u_mem.u_screen.mem[i] == screen_exp[i]);
    check("output screen contents", ok);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
