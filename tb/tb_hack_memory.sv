// tb_hack_memory: checks the data memory map: RAM and screen words written
// and read back, the screen read port, the keyboard register (reads the kbd
// input, ignores writes) and the unmapped range (reads 0).
module tb_hack_memory;
  import hack_pkg::*;
  logic clk = 0, we = 0;
  addr_t waddr = 0, raddr = 0;
  word_t wdata = 0, rdata, kbd = 16'd131, screen_data;
  logic [12:0] screen_addr = 0;
  word_t model [addr_t];
  int checks = 0, failures = 0;

  hack_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata, .kbd, .screen_addr, .screen_data);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    addr_t a;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a = (i % 2 == 1) ? addr_t'(16384 + $urandom_range(8191)) : addr_t'($urandom_range(16383));
      if (model.exists(a)) a = addr_t'(i);  // keep addresses unique
      we = 1; waddr = a; wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 1; waddr = KBD_ADDR; wdata = 16'hBEEF;          // dropped
    @(negedge clk);
    we = 1; waddr = 15'd30000; wdata = 16'h1234;          // dropped
    @(negedge clk);
    we = 0;
    foreach (model[k]) begin
      raddr = addr_t'(k); #1;
      chk("read back", rdata == model[k]);
      if (k >= 16384) begin
        screen_addr = 13'(k - 16384); #1;
        chk("screen port", screen_data == model[k]);
      end
    end
    raddr = KBD_ADDR; #1;
    chk("keyboard", rdata == 16'd131);
    kbd = 16'd65; #1;
    chk("keyboard follows key", rdata == 16'd65);
    raddr = 15'd30000; #1;
    chk("unmapped reads 0", rdata == 0);
    raddr = 15'd24577; #1;
    chk("above keyboard reads 0", rdata == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
