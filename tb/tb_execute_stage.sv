// tb_execute_stage: random D->X words with random X->M and M->W
// destinations. The expected operands are chosen by the forwarding rule
// (X->M ALU result before M->W data, never for $zero) and the expected ALU
// result is computed here for add, subtract, and, or, equal to, and for the
// branch target CURRENTADDRESS + 2*C. Counts each forwarding path.
module tb_execute_stage;
  import lilak_pkg::*;
  dx_t      dx;
  logic     xm_reg_write, mw_reg_write;
  reg_idx_t xm_rr, mw_rr;
  word_t    xm_alu, mw_data;
  xm_t      xm;
  fwd_sel_e forward_a, forward_b;
  int       checks = 0, failures = 0;
  int       fwd_xm_seen = 0, fwd_mw_seen = 0;

  execute_stage dut (.*);

  function automatic word_t pick(reg_idx_t r, word_t v);
    if (r != 0 && xm_reg_write && xm_rr == r) return xm_alu;
    if (r != 0 && mw_reg_write && mw_rr == r) return mw_data;
    return v;
  endfunction

  task automatic expect_eq(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      word_t ea, eb, er;
      int    kind;
      dx = '0;
      dx.a = word_t'($urandom); dx.b = word_t'($urandom); dx.c = word_t'($urandom);
      dx.pc = word_t'($urandom); dx.seval = word_t'($urandom);
      dx.ra = 4'($urandom_range(0, 3)); dx.rb = 4'($urandom_range(0, 3)); dx.rr = 4'($urandom);
      dx.taken = 1'($urandom); dx.out = word_t'($urandom);
      xm_reg_write = 1'($urandom); mw_reg_write = 1'($urandom);
      xm_rr = 4'($urandom_range(0, 3)); mw_rr = 4'($urandom_range(0, 3));
      xm_alu = word_t'($urandom); mw_data = word_t'($urandom);
      kind = $urandom_range(0, 5);
      case (kind)
        0: dx.ctrl.alu_op = ALU_ADD;
        1: dx.ctrl.alu_op = ALU_SUB;
        2: dx.ctrl.alu_op = ALU_AND;
        3: dx.ctrl.alu_op = ALU_OR;
        4: dx.ctrl.alu_op = ALU_EQ;
        default: begin dx.ctrl.alu_op = ALU_ADD; dx.ctrl.alu_src_a = 1; dx.ctrl.alu_src_b = 1; end
      endcase
      #1;
      ea = pick(dx.ra, dx.a);
      eb = pick(dx.rb, dx.b);
      case (kind)
        0: er = ea + eb;
        1: er = ea - eb;
        2: er = ea & eb;
        3: er = ea | eb;
        4: er = (ea == eb) ? 16'd1 : 16'd0;
        default: er = dx.pc + 2 * dx.c;
      endcase
      expect_eq(xm.alu, er, "ALU result");
      expect_eq(xm.a, ea, "forwarded A");
      expect_eq(xm.b, eb, "forwarded B");
      expect_eq(word_t'(xm.zero), word_t'(er == 0), "zero flag");
      expect_eq(xm.pc ^ xm.seval ^ xm.out, dx.pc ^ dx.seval ^ dx.out, "pass-through");
      expect_eq(word_t'({xm.rr, xm.taken}), word_t'({dx.rr, dx.taken}), "pass-through rr/taken");
      if (forward_a == FWD_XM || forward_b == FWD_XM) fwd_xm_seen++;
      if (forward_a == FWD_MW || forward_b == FWD_MW) fwd_mw_seen++;
    end
    checks += 2;
    if (fwd_xm_seen == 0) begin failures++; $display("FAIL no X->M forwarding"); end
    if (fwd_mw_seen == 0) begin failures++; $display("FAIL no M->W forwarding"); end
    $display("forwarded from X->M %0d times, from M->W %0d times", fwd_xm_seen, fwd_mw_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
