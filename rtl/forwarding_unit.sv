// forwarding_unit: selects where the execute stage takes its A and B
// operands from. When the instruction one stage ahead (in X->M) writes a
// register that the executing instruction reads, its ALU result is
// forwarded (FWD_XM); otherwise, when the instruction two stages ahead (in
// M->W) writes it, the writeback data is forwarded (FWD_MW); otherwise the
// value read in decode is used (FWD_REG). Register $zero is never forwarded.
// Combinational.
//
// The ports (ForwardA/B, regRa/regRb, XtoM and MtoW RegWrite and
// destination) are those of the LilaK forwarding unit. The priority of the
// nearer instruction and the $zero exception are this design's choices. As
// in the LilaK design the X->M path carries only the ALU result, so a set or
// load result is forwarded only from M->W; programs place a no-op between
// such an instruction and its first user, which the LilaK assembler does.
module forwarding_unit
  import lilak_pkg::*;
(
  input  reg_idx_t reg_ra,
  input  reg_idx_t reg_rb,
  input  logic     xm_reg_write,
  input  reg_idx_t xm_rr,
  input  logic     mw_reg_write,
  input  reg_idx_t mw_rr,
  output fwd_sel_e forward_a,
  output fwd_sel_e forward_b
);

  function automatic fwd_sel_e pick(reg_idx_t r);
    if (r != R_ZERO && xm_reg_write && xm_rr == r) return FWD_XM;
    if (r != R_ZERO && mw_reg_write && mw_rr == r) return FWD_MW;
    return FWD_REG;
  endfunction

  assign forward_a = pick(reg_ra);
  assign forward_b = pick(reg_rb);

endmodule
