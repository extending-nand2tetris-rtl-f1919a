// tb_hack_target_pred: random lookups (with allocation) and confirmations on
// the 32-entry target buffer compared with a model: misses predict 0 and enter
// the address (target 0, counter 1) at the back of a FIFO, evicting the front
// when full; a right target raises the counter (max 3), a wrong one lowers it
// and replaces the target when it reaches 0, setting the counter to 1.
module tb_hack_target_pred;
  import hack_pkg::*;
  localparam int E = 32;
  logic clk = 0, rst = 1, alloc = 0, hit, conf_en = 0;
  addr_t pc = 0, target, conf_pc = 0, conf_target = 0;
  int checks = 0, failures = 0, evictions = 0, replaced = 0;

  addr_t fifo [$];
  addr_t tgt [addr_t];
  int    cnt [addr_t];

  hack_target_pred dut (.clk, .rst, .pc, .alloc, .hit, .target, .conf_en, .conf_pc, .conf_target);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit in_buf;
    addr_t old;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 6000; n++) begin
      pc = addr_t'($urandom_range(40));
      alloc = 1'($urandom_range(1));
      conf_en = 1'($urandom_range(1));
      conf_pc = addr_t'($urandom_range(40));
      if (conf_pc == pc) conf_en = 0;
      conf_target = addr_t'(conf_pc * 2 + (($urandom_range(4) == 0) ? 1 : 0));
      in_buf = tgt.exists(pc);
      #1;
      checks++;
      if (hit !== in_buf || target !== (in_buf ? tgt[pc] : addr_t'(0))) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%0d hit=%0d target=%0d", pc, hit, target);
      end
      @(posedge clk);
      if (conf_en && tgt.exists(conf_pc)) begin
        if (tgt[conf_pc] == conf_target) begin
          if (cnt[conf_pc] < 3) cnt[conf_pc]++;
        end else if (cnt[conf_pc] <= 1) begin
          tgt[conf_pc] = conf_target; cnt[conf_pc] = 1; replaced++;
        end else cnt[conf_pc]--;
      end
      if (alloc && !in_buf) begin
        if (fifo.size() == E) begin
          old = fifo.pop_front();
          tgt.delete(old); cnt.delete(old); evictions++;
        end
        fifo.push_back(pc); tgt[pc] = 0; cnt[pc] = 1;
      end
      @(negedge clk);
    end
    checks++;
    if (evictions == 0 || replaced == 0) failures++;
    $display("evictions=%0d replaced=%0d", evictions, replaced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
