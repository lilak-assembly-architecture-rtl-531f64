// tb_forwarding_unit: exhaustive over source register, X->M and M->W
// destinations and their write enables (for ra and rb separately); the
// expected select is worked out from the rule "nearest writer wins,
// $zero is never forwarded".
module tb_forwarding_unit;
  import lilak_pkg::*;
  reg_idx_t reg_ra, reg_rb, xm_rr, mw_rr;
  logic     xm_reg_write, mw_reg_write;
  fwd_sel_e forward_a, forward_b;
  int       checks = 0, failures = 0;

  forwarding_unit dut (.*);

  function automatic logic [1:0] expect_sel(int r);
    if (r != 0 && xm_reg_write && int'(xm_rr) == r) return 2'd1;
    if (r != 0 && mw_reg_write && int'(mw_rr) == r) return 2'd2;
    return 2'd0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++)
      for (int x = 0; x < 16; x++)
        for (int m = 0; m < 16; m++)
          for (int w = 0; w < 4; w++) begin
            reg_ra = 4'(r); reg_rb = 4'(15 - r);
            xm_rr = 4'(x); mw_rr = 4'(m);
            xm_reg_write = w[0]; mw_reg_write = w[1];
            #1;
            checks++;
            if (forward_a !== fwd_sel_e'(expect_sel(r)) || forward_b !== fwd_sel_e'(expect_sel(15 - r))) begin
              failures++;
              if (failures < 10) $display("FAIL r=%0d x=%0d m=%0d w=%0d a=%0d b=%0d", r, x, m, w, forward_a, forward_b);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
