// hack_operand_unit: operand selection with forwarding from write back.
//
// Gives the x operand (D), the A value (the y operand when a=0, the M address
// and the jump target) and, when the instruction in write back is storing to
// the same address, the M operand. A value an older instruction still holds in
// write back is taken from it instead of from the register (operand
// forwarding), so an instruction need not wait for that write to finish. The
// fwd_* outputs flag which operands were forwarded. A store to the keyboard
// register or above is not forwarded, since the memory map drops it. The forwarding idea is the
// document's; it is combinational here and used in the operand fetch cycle.
module hack_operand_unit
  import hack_pkg::*;
(
  input  word_t a_reg,
  input  word_t d_reg,
  // instruction in write back
  input  logic  wb_valid,
  input  logic  wb_dest_a,
  input  logic  wb_dest_d,
  input  logic  wb_dest_m,
  input  word_t wb_value,
  input  addr_t wb_maddr,
  // results
  output word_t a_val,
  output word_t d_val,
  output logic  m_fwd,
  output word_t m_val,
  output logic  fwd_a,
  output logic  fwd_d
);
  always_comb begin
    fwd_a = wb_valid & wb_dest_a;
    fwd_d = wb_valid & wb_dest_d;
    a_val = fwd_a ? wb_value : a_reg;
    d_val = fwd_d ? wb_value : d_reg;
    m_fwd = wb_valid & wb_dest_m & (wb_maddr == a_val[AW-1:0]) & (wb_maddr < KBD_ADDR);
    m_val = wb_value;
  end
endmodule
