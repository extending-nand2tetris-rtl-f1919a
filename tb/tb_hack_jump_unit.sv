// tb_hack_jump_unit: checks all eight jump codes against negative, zero and
// positive results: the taken decision, and the cycle count (4 for an
// unconditional jump, 6 for a conditional one not taken, 10 taken).
module tb_hack_jump_unit;
  import hack_pkg::*;
  logic clk = 0, rst = 1, start = 0, zr = 0, ng = 0;
  logic [2:0] jump = 0;
  logic busy, done, taken;
  int checks = 0, failures = 0;

  hack_jump_unit dut (.clk, .rst, .start, .jump, .zr, .ng, .busy, .done, .taken);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_t;
    int lat, exp_lat;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int j = 1; j < 8; j++) begin
      for (int s = 0; s < 3; s++) begin   // 0 negative, 1 zero, 2 positive
        jump = 3'(j); ng = (s == 0); zr = (s == 1);
        case (j)
          1: exp_t = (s == 2);            // JGT
          2: exp_t = (s == 1);            // JEQ
          3: exp_t = (s != 0);            // JGE
          4: exp_t = (s == 0);            // JLT
          5: exp_t = (s != 1);            // JNE
          6: exp_t = (s != 2);            // JLE
          default: exp_t = 1;             // JMP
        endcase
        exp_lat = (j == 7) ? 4 : (exp_t ? 10 : 6);
        start = 1;
        @(negedge clk);
        start = 0; zr = 0; ng = 0;
        lat = 1;
        while (!done && lat < 30) begin @(negedge clk); lat++; end
        checks++;
        if (taken !== exp_t || lat != exp_lat) begin
          failures++;
          $display("FAIL j=%0d s=%0d taken=%0d lat=%0d expected %0d/%0d", j, s, taken, lat, exp_t, exp_lat);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
