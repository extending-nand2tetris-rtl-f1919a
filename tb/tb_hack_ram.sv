// tb_hack_ram: random writes and reads on both read ports of a RAM8 and a
// RAM16K bank, compared with a model array; writes only happen with load.
module tb_hack_ram;
  import hack_pkg::*;
  logic clk = 0;
  logic load8 = 0, load = 0;
  logic [2:0]  wa8 = 0, ra8 = 0, rb8 = 0;
  logic [13:0] wa = 0, ra = 0, rb = 0;
  word_t in = 0, o8, o8b, o, ob;
  word_t m8 [8];
  word_t m [logic [13:0]];
  int checks = 0, failures = 0;

  hack_ram #(.N(3))  ram8  (.clk, .load(load8), .waddr(wa8), .in, .raddr(ra8), .out(o8), .raddr2(rb8), .out2(o8b));
  hack_ram           ram16 (.clk, .load, .waddr(wa), .in, .raddr(ra), .out(o), .raddr2(rb), .out2(ob));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); load8 = 1; wa8 = 3'(i); in = word_t'(i * 3 + 1); m8[i] = in;
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); load8 = 0; load = 1; wa = 14'(i * 255); in = 16'($urandom); m[14'(i * 255)] = in;
    end
    @(negedge clk); load = 0;
    for (int n = 0; n < 1000; n++) begin
      load8 = 1'($urandom_range(1)); wa8 = 3'($urandom); in = 16'($urandom);
      load = 1'($urandom_range(1)); wa = 14'($urandom_range(63) * 255);
      @(posedge clk);
      if (load8) m8[wa8] = in;
      if (load) m[wa] = in;
      @(negedge clk);
      load8 = 0; load = 0;
      ra8 = 3'($urandom); rb8 = 3'($urandom);
      ra = 14'($urandom_range(63) * 255); rb = 14'($urandom_range(63) * 255);
      #1;
      chk(o8 == m8[ra8]); chk(o8b == m8[rb8]);
      chk(o == m[ra]);    chk(ob == m[rb]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
