// tb_hack_wb_unit: self-checking test of the write-back unit.
//
// Random instructions enter write back with random destinations, results
// and addresses. A small model of the writer memory unit answers each write
// request after a random delay (0 for a hit, 14 more cycles for a miss), and
// the testbench commits each instruction a random number of cycles after
// both its write has finished and at least one cycle has passed (standing
// for a jump running alongside). It checks:
// - exactly one write request per instruction that writes M, with the right
//   address and data, and none otherwise;
// - that fin rises exactly in the cycle the write completes (at once without
//   an M destination);
// - that A and D take the result on commit only, and only when they are
//   destinations.
module tb_hack_wb_unit;
  import hack_pkg::*;

  logic  clk = 0, rst = 1;
  logic  start = 0, valid = 0, dest_a = 0, dest_d = 0, dest_m = 0, commit = 0;
  word_t value = 0;
  addr_t maddr = 0;
  logic  wr_req, wr_done, fin;
  addr_t wr_addr;
  word_t wr_data, a_reg, d_reg;

  int checks = 0, failures = 0;

  hack_wb_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // writer memory model: done after `delay` further cycles
  int mem_left = -1;
  assign wr_done = (mem_left == 0);

  word_t ea = 0, ed = 0;   // expected A and D
  int    delay, reqs, wait_c, done_cyc, cyc;

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    chk("A reset", a_reg == 0);
    chk("D reset", d_reg == 0);
    for (int n = 0; n < 2000; n++) begin
      // the cycle in which the instruction moves into write back
      start  = 1; valid = 0;
      dest_a = 1'($urandom_range(1)); dest_d = 1'($urandom_range(1)); dest_m = 1'($urandom_range(1));
      value  = 16'($urandom); maddr = 15'($urandom);
      delay  = ($urandom_range(1) == 1) ? 0 : 14;
      wait_c = $urandom_range(3);
      reqs = 0; done_cyc = -1; cyc = 0;
      @(negedge clk);
      start = 0; valid = 1;
      forever begin
        #1;
        if (wr_req) begin
          reqs++;
          chk("write address", wr_addr == maddr);
          chk("write data", wr_data == value);
          if (mem_left < 0) mem_left = delay;
          #1;
        end
        chk("fin timing", fin == (!dest_m || done_cyc >= 0 || wr_done));
        if (wr_done) done_cyc = cyc;
        commit = fin && cyc >= wait_c;
        @(posedge clk);
        #1;
        if (mem_left >= 0) mem_left--;
        if (commit) break;
        chk("A held until commit", a_reg == ea);
        chk("D held until commit", d_reg == ed);
        @(negedge clk);
        cyc++;
      end
      if (dest_a) ea = value;
      if (dest_d) ed = value;
      chk("A after commit", a_reg == ea);
      chk("D after commit", d_reg == ed);
      chk("one request per M write", reqs == (dest_m ? 1 : 0));
      if (dest_m) chk("write takes its time", done_cyc == delay);
      @(negedge clk);
      commit = 0; valid = 0;
      mem_left = -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
