// tb_decode_stage: writes random values into the registers through the
// writeback port while presenting random instructions, and checks the
// decoded D->X word against a shadow register file: A, B, C read from
// fields [11:8], [7:4], [3:0], the A == B branch-taken flag for branch on
// equal, the sign-extended [11:4], CURRENTADDRESS, the register numbers,
// the $in input register, the output tap (register 9) and a few control
// bits per opcode.
module tb_decode_stage;
  import lilak_pkg::*;
  logic     clk = 0, rst = 1, wb_reg_write;
  reg_idx_t wb_addr;
  word_t    wb_data, in_value;
  fd_t      fd;
  dx_t      dx;
  int       checks = 0, failures = 0;
  word_t    shadow [16];
  int       taken_seen = 0;

  decode_stage dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h (instr %h)", what, got, exp, fd.instr);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wb_reg_write = 0; wb_addr = 0; wb_data = 0; in_value = 0;
    fd = '{instr: 16'hF000, pc: '0};
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] op;
      word_t      ra_v, rb_v;
      op = 4'($urandom);
      fd.instr = {op, 12'($urandom)};
      // make equal operands likely for branches
      if (n % 3 == 0) fd.instr[7:4] = fd.instr[11:8];
      fd.pc = word_t'($urandom);
      #1;
      ra_v = shadow[fd.instr[11:8]];
      rb_v = shadow[fd.instr[7:4]];
      expect_eq(dx.a, ra_v, "A");
      expect_eq(dx.b, rb_v, "B");
      expect_eq(dx.c, shadow[fd.instr[3:0]], "C");
      expect_eq(dx.seval, word_t'(signed'(fd.instr[11:4])), "sign-extended value");
      expect_eq(dx.pc, fd.pc, "CURRENTADDRESS");
      expect_eq(word_t'({dx.ra, dx.rb, dx.rr}), word_t'(fd.instr[11:0]), "register numbers");
      expect_eq(word_t'(dx.taken), word_t'(op == 4'hD && ra_v == rb_v), "branch taken");
      expect_eq(dx.out, shadow[9], "output tap");
      expect_eq(word_t'({dx.ctrl.reg_write, dx.ctrl.mem_write, dx.ctrl.mem_read, dx.ctrl.pc_src}),
                word_t'({!(op inside {4'hA, 4'hB, 4'hD, 4'hF}), op == 4'hB, op == 4'hC, op inside {4'hA, 4'hE}}),
                "control bits");
      if (dx.taken) taken_seen++;
      wb_reg_write = 1'($urandom);
      wb_addr      = 4'($urandom);
      wb_data      = word_t'($urandom_range(0, 3));
      in_value     = word_t'($urandom_range(0, 3));
      @(negedge clk);
      if (wb_reg_write && wb_addr != 0 && wb_addr != 5) shadow[wb_addr] = wb_data;
      shadow[5] = in_value;
    end
    checks++;
    if (taken_seen == 0) begin failures++; $display("FAIL no taken branch decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
