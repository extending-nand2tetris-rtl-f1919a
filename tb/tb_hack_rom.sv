// tb_hack_rom: loads words through the program port at spread-out addresses
// of the 32K ROM and reads them back on the fetch port.
module tb_hack_rom;
  import hack_pkg::*;
  logic clk = 0, prog_we = 0;
  addr_t prog_addr = 0, addr = 0;
  word_t prog_data = 0, instr;
  word_t model [addr_t];
  int checks = 0, failures = 0;

  hack_rom dut (.clk, .prog_we, .prog_addr, .prog_data, .addr, .instr);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t a;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = addr_t'(i * 109);
      prog_we = 1; prog_addr = a; prog_data = 16'($urandom); model[a] = prog_data;
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 300; i++) begin
      addr = addr_t'(i * 109);
      #1;
      checks++;
      if (instr !== model[addr]) failures++;
    end
    // a disabled write port changes nothing
    prog_addr = 0; prog_data = ~model[0];
    @(negedge clk);
    addr = 0; #1;
    checks++;
    if (instr !== model[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
