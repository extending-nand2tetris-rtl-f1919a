// tb_hack_decode_unit: checks the decoded fields of random instructions
// against the Hack bit layout, that A-instructions and C-instructions without
// jump bits are never predicted taken, that unconditional jumps are always
// predicted taken, that a conditional jump becomes predicted taken after it
// is confirmed taken, and that the target is learned from confirmations.
module tb_hack_decode_unit;
  import hack_pkg::*;
  logic clk = 0, rst = 1, predict_en = 0;
  word_t instr = 0;
  addr_t pc = 0, pred_target;
  dec_t dec;
  logic pred_taken;
  logic [3:0] pred_idx;
  logic conf_en = 0, conf_cond = 0, conf_taken = 0;
  addr_t conf_pc = 0, conf_target = 0;
  logic [3:0] conf_idx = 0;
  int checks = 0, failures = 0;

  hack_decode_unit dut (.clk, .rst, .instr, .pc, .predict_en, .dec, .pred_taken, .pred_target,
    .pred_idx, .conf_en, .conf_cond, .conf_pc, .conf_idx, .conf_taken, .conf_target);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s instr=%h", w, instr); end
  endtask

  initial begin
    logic [3:0] idx;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      instr = 16'($urandom);
      #1;
      chk("type", dec.is_c == instr[15]);
      if (!instr[15]) begin
        chk("constant", dec.constant == {1'b0, instr[14:0]});
        chk("A-instruction writes nothing else", !dec.dest_d && !dec.dest_m && !dec.is_jump);
        chk("A-instruction not predicted", !pred_taken);
      end else begin
        chk("a bit", dec.a == instr[12]);
        chk("alu bits", dec.ctrl == alu_ctrl_t'(instr[11:6]));
        chk("dest", {dec.dest_a, dec.dest_d, dec.dest_m} == instr[5:3]);
        chk("jump", dec.jump == instr[2:0]);
        chk("reads D", dec.uses_x == !instr[11]);
        chk("reads M", dec.uses_m == (instr[12] && !instr[9]));
        if (instr[2:0] == 3'b111) chk("JMP predicted taken", pred_taken);
        if (instr[2:0] == 3'b000) chk("no jump not predicted", !pred_taken);
      end
    end
    // train a conditional jump at pc 40 (D;JGT) taken to target 7
    instr = 16'hE301; pc = 15'd40;
    for (int k = 0; k < 6; k++) begin
      #1;
      idx = pred_idx;
      predict_en = 1;
      @(negedge clk);
      predict_en = 0;
      conf_en = 1; conf_cond = 1; conf_pc = 15'd40; conf_idx = idx; conf_taken = 1; conf_target = 15'd7;
      @(negedge clk);
      conf_en = 0;
    end
    #1;
    chk("trained jump predicted taken", pred_taken);
    chk("trained target", pred_target == 15'd7);
    // unconditional jump at a new address: first target prediction is 0
    instr = 16'hEA87; pc = 15'd90;
    #1;
    chk("unknown target predicts 0", pred_taken && pred_target == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
