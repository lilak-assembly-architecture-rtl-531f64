// tb_fetch_stage: loads a word pattern through the load port, releases
// reset and checks that the PC starts at 0 and steps by 2 each clock, that
// fd carries MEM[PC] and PC + 2, that a pc_write loads the target on the
// next edge (and wins over the increment), and that reset returns PC to 0.
module tb_fetch_stage;
  import lilak_pkg::*;
  logic       clk = 0, rst = 1, pc_write, load_we;
  word_t      pc_target, pc, load_data, exp_pc;
  fd_t        fd;
  logic [8:0] load_addr;
  int         checks = 0, failures = 0;

  fetch_stage dut (.*);

  always #5 clk = ~clk;

  function automatic word_t pattern(int i);
    return word_t'(i * 16'h3C5B + 16'h0101);
  endfunction

  task automatic expect_state(input word_t p);
    checks++;
    if (pc !== p || fd.pc !== word_t'(p + 2) || fd.instr !== pattern(int'(p[9:1]))) begin
      failures++;
      $display("FAIL pc=%h fd.pc=%h instr=%h exp pc %h", pc, fd.pc, fd.instr, p);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_write = 0; pc_target = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 9'(i); load_data = pattern(i);
    end
    @(negedge clk);
    load_we = 0;
    rst = 0;
    exp_pc = 0;
    for (int n = 0; n < 2000; n++) begin
      expect_state(exp_pc);
      pc_write  = ($urandom_range(0, 9) == 0);
      pc_target = word_t'($urandom_range(0, 511) * 2);
      if (n == 1000) rst = 1;
      @(negedge clk);
      if (rst)           exp_pc = 0;
      else if (pc_write) exp_pc = pc_target;
      else               exp_pc = exp_pc + 2;
      rst = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
