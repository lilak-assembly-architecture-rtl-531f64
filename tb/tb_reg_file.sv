// tb_reg_file: random writes and reads of the register file checked against
// a shadow array. Also checks that $zero reads 0, that $in follows the input
// word one clock later and ignores writes, that a write is visible only
// after the clock edge, that the output port shows register 9, and reset.
module tb_reg_file;
  import lilak_pkg::*;
  logic     clk = 0, rst = 1;
  reg_idx_t rd_addr1, rd_addr2, rd_addr3, wr_addr;
  word_t    rd_data1, rd_data2, rd_data3, wr_data, in_value, out_value;
  logic     reg_write;
  int       checks = 0, failures = 0;
  word_t    shadow [16];

  reg_file dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_write = 0; wr_addr = 0; wr_data = 0; in_value = '0;
    rd_addr1 = 0; rd_addr2 = 0; rd_addr3 = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 1; i < 16; i++) begin
      rd_addr1 = 4'(i); #1;
      expect_eq(rd_data1, '0, "reset value");
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // check three reads against the shadow (state after the last edge)
      rd_addr1 = 4'($urandom); rd_addr2 = 4'($urandom); rd_addr3 = 4'($urandom);
      #1;
      expect_eq(rd_data1, shadow[rd_addr1], "read1");
      expect_eq(rd_data2, shadow[rd_addr2], "read2");
      expect_eq(rd_data3, shadow[rd_addr3], "read3");
      expect_eq(out_value, shadow[9], "output register");
      // schedule a write and a new input word for the next edge
      reg_write = 1'($urandom);
      wr_addr   = (n % 5 == 0) ? 4'd9 : 4'($urandom);
      wr_data   = word_t'($urandom);
      in_value  = word_t'($urandom);
      rd_addr1 = wr_addr; #1;
      expect_eq(rd_data1, shadow[wr_addr], "no write before edge");
      if (reg_write && wr_addr != 0 && wr_addr != 5) shadow[wr_addr] = wr_data;
      shadow[5] = in_value;
    end
    @(negedge clk);
    rst = 1; reg_write = 0; in_value = '0;
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) begin
      rd_addr2 = 4'(i); #1;
      expect_eq(rd_data2, '0, "cleared by reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
