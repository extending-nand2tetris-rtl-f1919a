// tb_hack_gshare: random lookups and confirmations compared with a model of
// gshare: index = (pc XOR history) mod 16, 2-bit saturating counters starting
// at 1, taken when the counter is 2 or more, history shifted left with the
// new outcome at bit 0.
module tb_hack_gshare;
  import hack_pkg::*;
  logic clk = 0, rst = 1, taken, upd_en = 0, upd_taken = 0;
  addr_t pc = 0;
  logic [3:0] idx, upd_idx = 0;
  int checks = 0, failures = 0;
  int ctr [16];
  logic [3:0] ghr;

  hack_gshare dut (.clk, .rst, .pc, .taken, .idx, .upd_en, .upd_idx, .upd_taken);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ctr[i]) ctr[i] = 1;
    ghr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      pc = addr_t'($urandom_range(200));
      upd_en = 1'($urandom_range(1));
      upd_idx = 4'($urandom);
      upd_taken = ($urandom_range(9) < 7);
      #1;
      checks++;
      if (idx !== (pc[3:0] ^ ghr) || taken !== (ctr[pc[3:0] ^ ghr] >= 2)) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%0d idx=%0d taken=%0d", pc, idx, taken);
      end
      @(posedge clk);
      if (upd_en) begin
        if (upd_taken && ctr[upd_idx] < 3) ctr[upd_idx]++;
        if (!upd_taken && ctr[upd_idx] > 0) ctr[upd_idx]--;
        ghr = {ghr[2:0], upd_taken};
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
