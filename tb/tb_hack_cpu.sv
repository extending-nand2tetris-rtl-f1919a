// tb_hack_cpu: the pipelined CPU against uncached memory that always takes
// the main memory time (14-cycle reads, 15-cycle writes), modelled here.
//
// First it runs the "calls" test program and 20 random programs. For each,
// it checks every retirement and the A and D registers against the
// instruction-level reference model, and the final memory contents. The
// random programs mix constants, register and M computations, stores and
// forward conditional jumps, so A, D and M forwarding and wrong predictions
// happen often. Then it runs straight-line code and checks the spacing of
// retirements, which the stage costs fix: 1 cycle for back-to-back
// A-instructions, 4 for register C-instructions (operand fetch 1 + compute 3),
// 17 for reads of M (14 + 3) and 15 for writes of M (write back bound).
module tb_hack_cpu;
  import hack_pkg::*;
  import hack_ref_pkg::*;

  localparam int RL = 14, WL = 15;

  logic clk = 0, rst = 1;
  addr_t rom_addr, rd_addr, wr_addr, retire_pc;
  word_t rom_instr, rd_data, wr_data, retire_instr, a_reg, d_reg;
  logic rd_req, rd_done, wr_req, wr_done, retire;
  cpu_evt_t evt;

  word_t rom [32768];
  word_t mem [32768];
  int rcnt = 0, wcnt = 0;
  addr_t ra_q, wa_q;
  word_t wd_q;
  int checks = 0, failures = 0;

  hack_cpu dut (.clk, .rst, .rom_addr, .rom_instr, .rd_req, .rd_addr, .rd_done, .rd_data,
    .wr_req, .wr_addr, .wr_data, .wr_done, .retire, .retire_pc, .retire_instr,
    .a_reg, .d_reg, .evt);

  always #5 clk = ~clk;
  assign rom_instr = rom[rom_addr];

  // fixed-latency memory: done in the last of RL (WL) cycles counted from the request
  assign rd_done = (rcnt == 1);
  assign rd_data = (ra_q < 24576) ? mem[ra_q] : '0;   // keyboard (no key) and unmapped read 0
  assign wr_done = (wcnt == 1);
  always @(posedge clk) begin
    if (rcnt > 0) rcnt <= rcnt - 1;
    else if (rd_req) begin rcnt <= RL - 1; ra_q <= rd_addr; end
    if (wcnt > 0) begin
      wcnt <= wcnt - 1;
      if (wcnt == 1 && wa_q < 24576) mem[wa_q] <= wd_q;
    end else if (wr_req) begin wcnt <= WL - 1; wa_q <= wr_addr; wd_q <= wr_data; end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", w, $time); end
  endtask

  HackRef ref_m;

  // random program: straight-line code with forward jumps, ending in a self-jump;
  // data addresses 0..31 and the first screen words
  function automatic hack_progs_pkg::prog_t random_prog(int len);
    hack_progs_pkg::prog_t p;
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
        p.push_back(($urandom_range(4) == 0) ? 16'(16384 + $urandom_range(7)) : 16'($urandom_range(31)));
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

  task automatic run_ref(string name, hack_progs_pkg::prog_t p, int halt_pc, int seed);
    step_t s;
    int halts = 0, cyc = 0;
    rst = 1;
    ref_m = new();
    foreach (rom[i]) rom[i] = 0;
    foreach (p[i]) begin rom[i] = p[i]; ref_m.rom[i] = p[i]; end
    for (int i = 0; i < 24576; i++) begin
      mem[i] = word_t'(i * 5 + seed); ref_m.mem[i] = word_t'(i * 5 + seed);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    while (halts < 2 && cyc < 100000) begin
      @(negedge clk);
      cyc++;
      if (retire) begin
        if ((a_reg != ref_m.A || d_reg != ref_m.D) && failures < 4)
          $display("  %s: before pc %0d (%h): A %h/%h D %h/%h (dut/ref)", name, retire_pc,
                   retire_instr, a_reg, ref_m.A, d_reg, ref_m.D);
        chk({name, " A"}, a_reg == ref_m.A);
        chk({name, " D"}, d_reg == ref_m.D);
        s = ref_m.step();
        chk({name, " retire pc"}, retire_pc == s.pc && retire_instr == s.instr);
        if (retire_pc == addr_t'(halt_pc)) halts++;
      end
    end
    chk({name, " reached its end"}, halts == 2);
    repeat (20) @(negedge clk);
    for (int i = 0; i < 24576; i++) if (mem[i] != ref_m.mem[i]) chk({name, " memory matches"}, 0);
  endtask

  initial begin
    hack_progs_pkg::prog_t p;
    int cyc, last_cyc;
    int gap [int];
    // ---- programs checked against the reference ----
    run_ref("calls", hack_progs_pkg::calls(), hack_progs_pkg::CALLS_HALT, 0);
    chk("RAM[14] = 105", mem[14] == 16'd105);
    for (int k = 0; k < 20; k++) begin
      p = random_prog(200);
      run_ref($sformatf("random%0d", k), p, p.size() - 1, k + 1);
    end

    // ---- timing ----
    rst = 1;
    foreach (rom[i]) rom[i] = 0;
    rom[0] = 16'h0000;                               // @0
    for (int i = 1; i <= 6; i++) rom[i] = 16'hE7D0;  // D=D+1
    rom[7] = 16'd20;                                 // @20
    for (int i = 8; i <= 11; i++) rom[i] = 16'hFC10; // D=M
    for (int i = 12; i <= 15; i++) rom[i] = 16'hE308; // M=D
    for (int i = 16; i <= 19; i++) rom[i] = 16'(i - 15); // @1..@4
    rom[20] = 16'd20;                                // @20
    rom[21] = 16'hEA87;                              // 0;JMP
    mem[20] = 16'd77;
    repeat (3) @(negedge clk);
    rst = 0;
    cyc = 0; last_cyc = 0;
    while (cyc < 2000) begin
      @(negedge clk);
      cyc++;
      if (retire && retire_pc <= 19) begin
        gap[int'(retire_pc)] = cyc - last_cyc;
        last_cyc = cyc;
      end
    end
    for (int i = 2; i <= 6; i++)   chk($sformatf("C-instruction every 4 cycles (pc %0d: %0d)", i, gap[i]), gap[i] == 4);
    for (int i = 9; i <= 11; i++)  chk($sformatf("M read every 17 cycles (pc %0d: %0d)", i, gap[i]), gap[i] == 17);
    for (int i = 13; i <= 15; i++) chk($sformatf("M write every 15 cycles (pc %0d: %0d)", i, gap[i]), gap[i] == 15);
    for (int i = 17; i <= 19; i++) chk($sformatf("A-instruction every cycle (pc %0d: %0d)", i, gap[i]), gap[i] == 1);
    chk("D after the sequence", d_reg == 16'd77);
    chk("RAM[20] after the sequence", mem[20] == 16'd77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
