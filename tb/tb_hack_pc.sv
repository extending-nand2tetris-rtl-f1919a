// tb_hack_pc: random reset, load and increment requests against a model of
// the program counter's priority (reset, then load, then increment, else hold).
module tb_hack_pc;
  import hack_pkg::*;
  logic clk = 0, reset = 1, load = 0, inc = 0;
  addr_t in = 0, out, model = 0;
  int checks = 0, failures = 0;

  hack_pc dut (.clk, .reset, .load, .inc, .in, .out);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      reset = ($urandom_range(30) == 0);
      load  = ($urandom_range(3) == 0);
      inc   = ($urandom_range(1) == 0);
      in    = addr_t'($urandom);
      @(posedge clk);
      if (reset) model = 0; else if (load) model = in; else if (inc) model = model + 1;
      @(negedge clk);
      checks++;
      if (out !== model) begin
        failures++;
        if (failures < 10) $display("FAIL out=%0d expected %0d", out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
