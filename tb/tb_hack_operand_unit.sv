// tb_hack_operand_unit: random register and write-back contents; checks that
// A and D come from write back exactly when it writes them, and M is forwarded
// only for a store to the same RAM or screen address.
module tb_hack_operand_unit;
  import hack_pkg::*;
  word_t a_reg, d_reg, wb_value, a_val, d_val, m_val;
  logic wb_valid, wb_dest_a, wb_dest_d, wb_dest_m, m_fwd, fwd_a, fwd_d;
  addr_t wb_maddr;
  int checks = 0, failures = 0, mf = 0;

  hack_operand_unit dut (.a_reg, .d_reg, .wb_valid, .wb_dest_a, .wb_dest_d, .wb_dest_m,
    .wb_value, .wb_maddr, .a_val, .d_val, .m_fwd, .m_val, .fwd_a, .fwd_d);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t ea, ed;
    logic em;
    for (int n = 0; n < 3000; n++) begin
      a_reg = 16'($urandom_range(40)); if (n % 7 == 0) a_reg = 16'(24576 + $urandom_range(3));
      d_reg = 16'($urandom);
      wb_valid = 1'($urandom_range(1)); wb_dest_a = 1'($urandom_range(1));
      wb_dest_d = 1'($urandom_range(1)); wb_dest_m = 1'($urandom_range(1));
      wb_value = 16'($urandom_range(40));
      wb_maddr = addr_t'($urandom_range(40)); if (n % 5 == 0) wb_maddr = a_reg[14:0];
      #1;
      ea = (wb_valid && wb_dest_a) ? wb_value : a_reg;
      ed = (wb_valid && wb_dest_d) ? wb_value : d_reg;
      em = wb_valid && wb_dest_m && wb_maddr == ea[14:0] && ea[14:0] < 24576;
      checks++;
      if (a_val !== ea || d_val !== ed || m_fwd !== em || (em && m_val !== wb_value)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d", n);
      end
      if (em) mf++;
    end
    checks++;
    if (mf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
