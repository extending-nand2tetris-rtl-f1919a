// tb_hack_alu_unit: checks that the compute sub-stage finishes exactly LAT
// (3) cycles after start, pulses done once, and returns the ALU result of the
// operands captured at start even when the inputs change afterwards.
module tb_hack_alu_unit;
  import hack_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  word_t x = 0, y = 0, out;
  alu_ctrl_t ctrl = '0;
  logic busy, done, zr, ng;
  int checks = 0, failures = 0;

  hack_alu_unit dut (.clk, .rst, .start, .x, .y, .ctrl, .busy, .done, .out, .zr, .ng);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    word_t a, b;
    int lat;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 50; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      x = a; y = b; ctrl = alu_ctrl_t'(6'b000010);  // x+y
      if (n % 2 == 1) ctrl = alu_ctrl_t'(6'b010011);      // x-y
      start = 1;
      @(negedge clk);
      start = 0;
      x = 16'($urandom); y = 16'($urandom);          // must not matter
      lat = 1;
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      chk("latency is 3 cycles", lat == 3);
      chk("result", out == ((n % 2 == 1) ? a - b : a + b));
      chk("zr", zr == (out == 0));
      @(negedge clk);
      chk("done is a single pulse", !done && !busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
