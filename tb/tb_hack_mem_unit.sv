// tb_hack_mem_unit: a memory unit in front of the Hack data memory. Checks the
// access times (1 cycle on a hit, 14 for a read miss, 15 for a write miss),
// the data returned, write-through to main memory, that the keyboard is
// never cached, and that an update from the other unit refreshes a cached word.
// Then 4000 random reads and writes over a few sets' worth of addresses (plus
// screen, keyboard and unmapped addresses), mixed with updates from the other
// unit, are checked against a model of the 2-way FIFO cache and of memory: the
// hit or miss and its exact time, the hit and miss event outputs, the data read
// and the data written through.
module tb_hack_mem_unit;
  import hack_pkg::*;
  logic clk = 0, rst = 1, req = 0, we = 0, upd_en = 0;
  addr_t addr = 0, upd_addr = 0;
  word_t wdata = 0, upd_data = 0, rdata, kbd = 16'd140;
  logic busy, done, hit_evt, miss_evt;
  addr_t mem_raddr, mem_waddr;
  word_t mem_rdata, mem_wdata, screen_data;
  logic mem_we;
  int checks = 0, failures = 0;

  hack_mem_unit dut (.clk, .rst, .req, .we, .addr, .wdata, .busy, .done, .rdata,
    .hit_evt, .miss_evt, .upd_en, .upd_addr, .upd_data,
    .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wdata);
  hack_memory mem (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(mem_raddr),
    .rdata(mem_rdata), .kbd, .screen_addr(13'd0), .screen_data);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  // one access; returns its length in cycles and the data read
  task automatic access(input logic w, input addr_t a, input word_t d, output int cyc, output word_t r);
    req = 1; we = w; addr = a; wdata = d;
    cyc = 1;
    #1;
    while (!done && cyc < 40) begin
      @(negedge clk); req = 0; cyc++; #1;
    end
    r = rdata;
    @(negedge clk);
    req = 0;
  endtask

  initial begin
    int c;
    word_t r;
    for (int i = 0; i < 64; i++) begin
      mem.u_ram.mem[i] = word_t'(1000 + i);
    end
    repeat (2) @(negedge clk);
    rst = 0;
    access(0, 15'd5, 0, c, r);
    chk("read miss takes 14 cycles", c == 14);
    chk("read miss data", r == 16'd1005);
    access(0, 15'd5, 0, c, r);
    chk("read hit takes 1 cycle", c == 1);
    chk("read hit data", r == 16'd1005);
    access(1, 15'd9, 16'hAAAA, c, r);
    chk("write miss takes 15 cycles", c == 15);
    chk("write reached memory", mem.u_ram.mem[9] == 16'hAAAA);
    access(1, 15'd9, 16'hBBBB, c, r);
    chk("write hit takes 1 cycle", c == 1);
    chk("write hit reached memory", mem.u_ram.mem[9] == 16'hBBBB);
    access(0, 15'd9, 0, c, r);
    chk("read after write hits", c == 1 && r == 16'hBBBB);
    // same set (index = low 3 bits): 5, 13, 21 -> 5 is evicted (FIFO, 2 ways)
    access(0, 15'd13, 0, c, r);
    access(0, 15'd21, 0, c, r);
    chk("third address of a set misses", c == 14 && r == 16'd1021);
    access(0, 15'd5, 0, c, r);
    chk("oldest line was evicted", c == 14);
    // update from the other unit
    upd_en = 1; upd_addr = 15'd21; upd_data = 16'h5555;
    @(negedge clk);
    upd_en = 0;
    access(0, 15'd21, 0, c, r);
    chk("updated line hits with new data", c == 1 && r == 16'h5555);
    // keyboard is never cached
    access(0, KBD_ADDR, 0, c, r);
    chk("keyboard read", c == 14 && r == 16'd140);
    kbd = 16'd141;
    access(0, KBD_ADDR, 0, c, r);
    chk("keyboard read again is a miss with the new key", c == 14 && r == 16'd141);
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- random accesses against a cache and memory model ----
  localparam int SETS = 8, WAYS = 2;
  addr_t q [SETS][$];       // addresses held per set, oldest first
  word_t model [addr_t];    // expected contents of every address touched

  function automatic word_t mem_now(addr_t a);
    if (a < 16384) return mem.u_ram.mem[a[13:0]];
    if (a < 24576) return mem.u_screen.mem[a[12:0]];
    if (a == KBD_ADDR) return kbd;
    return '0;
  endfunction

  function automatic bit cached(addr_t a);
    foreach (q[int'(a) % SETS][i]) if (q[int'(a) % SETS][i] == a) return 1;
    return 0;
  endfunction

  task automatic random_phase();
    int c, nh = 0, nm = 0;
    word_t r, d;
    addr_t a;
    logic w, exp_hit, saw_hit, saw_miss;
    // start from an empty cache
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < 64; i++) model[addr_t'(i)] = mem_now(addr_t'(i));
    for (int n = 0; n < 4000; n++) begin
      if ($urandom_range(9) == 0) begin
        // the other unit writes RAM (memory and this cache are both updated)
        a = addr_t'($urandom_range(47)); d = 16'($urandom);
        mem.u_ram.mem[a[13:0]] = d; model[a] = d;
        upd_en = 1; upd_addr = a; upd_data = d;
        @(negedge clk);
        upd_en = 0;
        continue;
      end
      case ($urandom_range(19))
        0:       a = addr_t'(16384 + $urandom_range(15));
        1:       a = KBD_ADDR;
        2:       a = addr_t'(24577 + $urandom_range(100));
        default: a = addr_t'($urandom_range(47));
      endcase
      w = 1'($urandom_range(1)); d = 16'($urandom);
      exp_hit = (a < KBD_ADDR) && cached(a);
      req = 1; we = w; addr = a; wdata = d;
      #1;
      saw_hit = hit_evt; saw_miss = miss_evt;
      c = 1;
      while (!done && c < 40) begin @(negedge clk); req = 0; c++; #1; end
      r = rdata;
      @(negedge clk);
      req = 0;
      checks++;
      if (saw_hit != exp_hit || saw_miss != !exp_hit ||
          c != (exp_hit ? 1 : (w ? 15 : 14)) ||
          (!w && r != (model.exists(a) ? model[a] : mem_now(a)))) begin
        failures++;
        if (failures < 20)
          $display("FAIL random access %0d: %s %0d hit %0b/%0b cycles %0d data %h", n,
                   w ? "write" : "read", a, saw_hit, exp_hit, c, r);
      end
      if (w && a < KBD_ADDR) model[a] = d;
      if (w) chk("write reached memory", a >= KBD_ADDR || mem_now(a) == d);
      // cache model: a miss on a RAM or screen address allocates a line
      if (!exp_hit && a < KBD_ADDR) begin
        if (q[int'(a) % SETS].size() == WAYS) void'(q[int'(a) % SETS].pop_front());
        q[int'(a) % SETS].push_back(a);
      end
      if (exp_hit) nh++; else nm++;
    end
    chk("random phase had hits and misses", nh > 500 && nm > 500);
    $display("random phase: %0d hits, %0d misses", nh, nm);
  endtask
endmodule
