// tb_hack_computer: end-to-end test of the Hack computer at its default
// parameters (full size: 32K ROM, 16K RAM, 8K screen, 16-line 2-way caches,
// gshare 16, 32-entry target buffer).
//
// It loads each test program through the cartridge port, fills the data
// memory with a known pattern (in the design and in an instruction-level
// reference model), runs the program to its final self-jump and checks every
// retired instruction (address and word, in order), the A and D registers
// after each, and every data memory store (address and value, in order)
// against the reference. The hand-written programs also have their results
// checked against values worked out by hand. Random programs (straight-line
// code with forward conditional jumps, random stores across the memory map)
// stress forwarding and the caches. At the end it checks that each mechanism
// of the design happened: half flushes, flushes, correct and wrong
// predictions, A, D and M forwarding, hazard stalls, overlapped jump and write
// back, and cache hits and misses on both memory units.
module tb_hack_computer;
  import hack_pkg::*;
  import hack_progs_pkg::prog_t;
  import hack_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic prog_we = 0;
  addr_t prog_addr = 0;
  word_t prog_data = 0;
  word_t kbd = 16'd75;
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
    #50_000_000;
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

  // totals over all runs
  int tot_half, tot_flush, tot_jumps, tot_mis, tot_fa, tot_fd, tot_fm, tot_haz, tot_ovl;
  int tot_rh, tot_rm, tot_wh, tot_wm;

  HackRef ref_m;

  // random program: straight-line code with forward jumps, ending in a self-jump
  function automatic prog_t random_prog(int len);
    prog_t p;
    logic [6:0] comps [28] = '{7'b0101010, 7'b0111111, 7'b0111010, 7'b0001100, 7'b0110000,
      7'b1110000, 7'b0001101, 7'b0110001, 7'b1110001, 7'b0001111, 7'b0110011, 7'b1110011,
      7'b0011111, 7'b0110111, 7'b1110111, 7'b0001110, 7'b0110010, 7'b1110010, 7'b0000010,
      7'b1000010, 7'b0010011, 7'b1010011, 7'b0000111, 7'b1000111, 7'b0000000, 7'b1000000,
      7'b0010101, 7'b1010101};
    int r, tgt;
    bit landing [int];   // addresses some jump lands on: no jump word there
    while (p.size() < len) begin
      r = $urandom_range(99);
      if (landing.exists(p.size() + 1)) r = 50;
      if (r < 35) begin
        case ($urandom_range(9))
          0:       p.push_back(16'(16384 + $urandom_range(15)));
          1:       p.push_back(16'(24576 + $urandom_range(2)));
          default: p.push_back(16'($urandom_range(47)));
        endcase
      end else if (r < 85 || p.size() + 2 > len) begin
        p.push_back({3'b111, comps[$urandom_range(27)], 3'($urandom_range(7)), 3'b000});
      end else begin
        tgt = p.size() + 2 + $urandom_range(5);
        if (tgt > len) tgt = len;
        landing[tgt] = 1;
        p.push_back(16'(tgt));
        p.push_back({3'b111, comps[$urandom_range(27)], 3'($urandom_range(7)), 3'($urandom_range(1, 7))});
      end
    end
    p.push_back(16'(len));
    p.push_back(16'hEA87);   // 0;JMP
    return p;
  endfunction

  task automatic run_prog(string name, prog_t p, int halt_pc, int max_cycles, int seed);
    step_t s;
    word_t dq_a[$], rq_a[$];
    word_t dq_d[$], rq_d[$];
    int halts = 0, cyc = 0, wchk = 0;
    logic [14:0] wa;
    word_t wd;
    ref_m = new();
    ref_m.kbd = kbd;
    rst = 1;
    @(negedge clk);
    foreach (p[i]) begin
      prog_we = 1; prog_addr = addr_t'(i); prog_data = p[i]; ref_m.rom[i] = p[i];
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < 16384; i++) begin
      dut.u_mem.u_ram.mem[i] = word_t'(i * 37 + seed);
      ref_m.mem[i] = word_t'(i * 37 + seed);
    end
    for (int i = 0; i < 8192; i++) begin
      dut.u_mem.u_screen.mem[i] = word_t'(i * 11 + seed);
      ref_m.mem[16384 + i] = word_t'(i * 11 + seed);
    end
    @(negedge clk);
    rst = 0;
    while (halts < 2 && cyc < max_cycles) begin
      @(negedge clk);
      cyc++;
      if (retire) begin
        // registers before this retirement
        check({name, " A"}, a_reg == ref_m.A);
        check({name, " D"}, d_reg == ref_m.D);
        s = ref_m.step();
        check({name, " retire pc"}, retire_pc == s.pc);
        check({name, " retire instr"}, retire_instr == s.instr);
        if (retire_pc != s.pc && failures < 20)
          $display("  %s: dut pc %0d ref pc %0d", name, retire_pc, s.pc);
        if (s.wr) begin rq_a.push_back({1'b0, s.waddr}); rq_d.push_back(s.wdata); end
        if (retire_pc == addr_t'(halt_pc)) halts++;
      end
      if (mem_we) begin dq_a.push_back({1'b0, mem_waddr}); dq_d.push_back(mem_wdata); end
      while (dq_a.size() > 0 && rq_a.size() > 0) begin
        if ((dq_a[0] != rq_a[0] || dq_d[0] != rq_d[0]) && failures < 20)
          $display("  %s: store dut %0d<=%h ref %0d<=%h (last retired pc %0d)",
                   name, dq_a[0], dq_d[0], rq_a[0], rq_d[0], retire_pc);
        check({name, " store addr"}, dq_a.pop_front() == rq_a.pop_front());
        check({name, " store data"}, dq_d.pop_front() == rq_d.pop_front());
        wchk++;
      end
    end
    check({name, " reached halt"}, halts == 2);
    check({name, " no stores left over"}, dq_a.size() == 0 && rq_a.size() == 0);
    $display("%-10s cycles=%0d retired=%0d CPI=%0.2f stores=%0d jumps=%0d mispredicts=%0d flushes=%0d half_flushes=%0d",
             name, perf.cycles, perf.retired, real'(perf.cycles) / real'(perf.retired), wchk,
             perf.jumps, perf.mispredicts, perf.flushes, perf.half_flushes);
    $display("%-10s fwdA=%0d fwdD=%0d fwdM=%0d hazard_stalls=%0d overlap=%0d rd hit/miss=%0d/%0d wr hit/miss=%0d/%0d",
             name, perf.fwd_a, perf.fwd_d, perf.fwd_m, perf.hazard_stalls, perf.overlap,
             perf.rd_hits, perf.rd_misses, perf.wr_hits, perf.wr_misses);
    tot_half += perf.half_flushes; tot_flush += perf.flushes; tot_jumps += perf.jumps;
    tot_mis += perf.mispredicts; tot_fa += perf.fwd_a; tot_fd += perf.fwd_d; tot_fm += perf.fwd_m;
    tot_haz += perf.hazard_stalls; tot_ovl += perf.overlap;
    tot_rh += perf.rd_hits; tot_rm += perf.rd_misses; tot_wh += perf.wr_hits; tot_wm += perf.wr_misses;
  endtask

  initial begin
    prog_t p;
    for (int i = 0; i < 32768; i++) dut.u_rom.mem[i] = '0;

    run_prog("sum_fill", hack_progs_pkg::sum_fill(), hack_progs_pkg::SUM_FILL_HALT, 100000, 1);
    check("sum_fill RAM[2]=210", dut.u_mem.u_ram.mem[2] == 16'd210);
    check("sum_fill RAM[5]=820", dut.u_mem.u_ram.mem[5] == 16'd820);
    check("sum_fill RAM[6]=kbd", dut.u_mem.u_ram.mem[6] == kbd);
    check("sum_fill RAM[339]=1", dut.u_mem.u_ram.mem[339] == 16'd1);

    run_prog("calls", hack_progs_pkg::calls(), hack_progs_pkg::CALLS_HALT, 100000, 2);
    check("calls RAM[12]=14", dut.u_mem.u_ram.mem[12] == 16'd14);
    check("calls RAM[14]=105", dut.u_mem.u_ram.mem[14] == 16'd105);
    check("calls RAM[11]=5", dut.u_mem.u_ram.mem[11] == 16'd5);
    screen_addr = 13'd0;
    #1 check("calls screen word 0 all set", screen_data == 16'hFFFF);

    for (int k = 0; k < 6; k++) begin
      p = random_prog(300);
      for (int i = 0; i < p.size() + 4; i++) dut.u_rom.mem[i] = '0;
      run_prog($sformatf("random%0d", k), p, p.size() - 1, 200000, 10 + k);
    end

    $display("totals: half_flush=%0d flush=%0d jumps=%0d mispredict=%0d fwdA=%0d fwdD=%0d fwdM=%0d hazard=%0d overlap=%0d rd=%0d/%0d wr=%0d/%0d",
             tot_half, tot_flush, tot_jumps, tot_mis, tot_fa, tot_fd, tot_fm, tot_haz, tot_ovl,
             tot_rh, tot_rm, tot_wh, tot_wm);
    check("half flush happened", tot_half > 0);
    check("flush happened", tot_flush > 0);
    check("correct prediction happened", tot_jumps > tot_mis);
    check("misprediction happened", tot_mis > 0);
    check("A forwarded", tot_fa > 0);
    check("D forwarded", tot_fd > 0);
    check("M forwarded", tot_fm > 0);
    check("hazard stall happened", tot_haz > 0);
    check("jump and write back overlapped", tot_ovl > 0);
    check("reader hit", tot_rh > 0);
    check("reader miss", tot_rm > 0);
    check("writer hit", tot_wh > 0);
    check("writer miss", tot_wm > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
