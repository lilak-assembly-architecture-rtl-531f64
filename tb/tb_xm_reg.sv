// tb_xm_reg: drives random xm_t words into the stage register and checks
// that each appears on q one clock later, that q holds between edges, and
// that a synchronous reset loads the no-op value.
module tb_xm_reg;
  import lilak_pkg::*;
  logic clk = 0, rst = 1;
  xm_t  d, q, prev;
  int   checks = 0, failures = 0;

  xm_reg dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  function automatic xm_t rand_word();
    logic [$bits(xm_t)-1:0] v;
    for (int i = 0; i < $bits(xm_t); i += 32) v = {v, 32'($urandom)};
    return xm_t'(v);
  endfunction

  task automatic expect_q(input xm_t exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, q, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = rand_word();
    @(negedge clk);
    expect_q('0, "reset value");
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      prev = rand_word();
      d = prev;
      @(negedge clk);
      expect_q(prev, "captured");
      d = rand_word();
      #2;
      expect_q(prev, "held between edges");
      if (n == 500) begin
        rst = 1;
        @(negedge clk);
        expect_q('0, "reset value");
        rst = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
