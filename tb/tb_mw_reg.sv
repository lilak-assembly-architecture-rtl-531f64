// tb_mw_reg: drives random mw_t words into the stage register and checks
// that each appears on q one clock later, that q holds between edges, and
// that a synchronous reset loads the no-op value.
module tb_mw_reg;
  import lilak_pkg::*;
  logic clk = 0, rst = 1;
  mw_t  d, q, prev;
  int   checks = 0, failures = 0;

  mw_reg dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  function automatic mw_t rand_word();
    logic [$bits(mw_t)-1:0] v;
    for (int i = 0; i < $bits(mw_t); i += 32) v = {v, 32'($urandom)};
    return mw_t'(v);
  endfunction

  task automatic expect_q(input mw_t exp, input string what);
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
