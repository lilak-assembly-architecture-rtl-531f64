// execute_stage: the X stage of LilaK.
//
// The forwarding unit compares the source registers of the instruction in
// D->X with the destinations of the two instructions ahead of it; two
// three-input muxes then take each operand from the D->X register (0), the
// ALU result in X->M (1) or the writeback data of M->W (2). ALUSrcA picks
// the forwarded A or CURRENTADDRESS, ALUSrcB the forwarded B or C shifted
// left by one, so that a branch on equal computes PC + 2 + 2*C (the PC + 2
// is already in CURRENTADDRESS). The ALU output, its zero and overflow
// flags and the forwarded A and B (memory address and store data) go to the
// X->M register. Combinational. The muxes, the shift and their order follow
// the LilaK data path; the mux input numbering is this design's reading.
module execute_stage
  import lilak_pkg::*;
(
  input  dx_t      dx,
  input  logic     xm_reg_write,
  input  reg_idx_t xm_rr,
  input  word_t    xm_alu,
  input  logic     mw_reg_write,
  input  reg_idx_t mw_rr,
  input  word_t    mw_data,
  output xm_t      xm,
  output fwd_sel_e forward_a,
  output fwd_sel_e forward_b
);

  word_t fa, fb, op_a, op_b, result;
  logic  zero, overflow;

  forwarding_unit u_fwd (
    .reg_ra      (dx.ra),
    .reg_rb      (dx.rb),
    .xm_reg_write(xm_reg_write),
    .xm_rr       (xm_rr),
    .mw_reg_write(mw_reg_write),
    .mw_rr       (mw_rr),
    .forward_a   (forward_a),
    .forward_b   (forward_b)
  );

  function automatic word_t fwd_mux(fwd_sel_e sel, word_t reg_val, word_t xm_val, word_t mw_val);
    unique case (sel)
      FWD_XM:  return xm_val;
      FWD_MW:  return mw_val;
      default: return reg_val;
    endcase
  endfunction

  assign fa   = fwd_mux(forward_a, dx.a, xm_alu, mw_data);
  assign fb   = fwd_mux(forward_b, dx.b, xm_alu, mw_data);
  assign op_a = dx.ctrl.alu_src_a ? dx.pc : fa;
  assign op_b = dx.ctrl.alu_src_b ? {dx.c[XLEN-2:0], 1'b0} : fb;

  alu u_alu (
    .op      (dx.ctrl.alu_op),
    .a       (op_a),
    .b       (op_b),
    .result  (result),
    .zero    (zero),
    .overflow(overflow)
  );

  always_comb begin
    xm.ctrl     = dx.ctrl;
    xm.alu      = result;
    xm.a        = fa;
    xm.b        = fb;
    xm.pc       = dx.pc;
    xm.seval    = dx.seval;
    xm.taken    = dx.taken;
    xm.zero     = zero;
    xm.overflow = overflow;
    xm.rr       = dx.rr;
    xm.out      = dx.out;
  end

endmodule
