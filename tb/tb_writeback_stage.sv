// tb_writeback_stage: random M->W words; checks the MemToReg selection
// (value, ALU, memory, A), the RegData selection of CURRENTADDRESS, the
// RegDest selection of $ra, the PC write enable (PCSrc or taken branch)
// and target (ALU result for a taken branch, otherwise A), and the
// pass-through of flags and output tap.
module tb_writeback_stage;
  import lilak_pkg::*;
  mw_t      mw;
  logic     reg_write, pc_write, zero, overflow;
  reg_idx_t wr_addr;
  word_t    wr_data, fwd_data, pc_target, out_value;
  int       checks = 0, failures = 0;

  writeback_stage dut (.*);

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
      word_t sel;
      mw = '0;
      mw.alu = word_t'($urandom); mw.a = word_t'($urandom); mw.mem = word_t'($urandom);
      mw.pc = word_t'($urandom); mw.seval = word_t'($urandom); mw.out = word_t'($urandom);
      mw.rr = 4'($urandom); mw.taken = 1'($urandom); mw.zero = 1'($urandom); mw.overflow = 1'($urandom);
      mw.ctrl.reg_write = 1'($urandom); mw.ctrl.reg_dest = 1'($urandom);
      mw.ctrl.reg_data = 1'($urandom); mw.ctrl.pc_src = 1'($urandom);
      mw.ctrl.mem_to_reg = mem_to_reg_e'($urandom_range(0, 3));
      #1;
      case (int'(mw.ctrl.mem_to_reg))
        0: sel = mw.seval;
        1: sel = mw.alu;
        2: sel = mw.mem;
        default: sel = mw.a;
      endcase
      expect_eq(fwd_data, sel, "MemToReg mux");
      expect_eq(wr_data, mw.ctrl.reg_data ? mw.pc : sel, "RegData mux");
      expect_eq(word_t'(wr_addr), mw.ctrl.reg_dest ? 16'd1 : word_t'(mw.rr), "RegDest mux");
      expect_eq(word_t'(reg_write), word_t'(mw.ctrl.reg_write), "RegWrite");
      expect_eq(word_t'(pc_write), word_t'(mw.ctrl.pc_src | mw.taken), "PC write");
      if (pc_write) expect_eq(pc_target, mw.taken ? mw.alu : mw.a, "PC target");
      expect_eq(out_value, mw.out, "output");
      expect_eq(word_t'({zero, overflow}), word_t'({mw.zero, mw.overflow}), "flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
