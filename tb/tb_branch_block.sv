// tb_branch_block: all 16 opcodes with equal high and low; only branch on
// equal (opcode 13) with equal high may be taken.
module tb_branch_block;
  logic [3:0] op;
  logic       equal, taken;
  int         checks = 0, failures = 0;

  branch_block dut (.op(op), .equal(equal), .taken(taken));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++)
      for (int e = 0; e < 2; e++) begin
        op = 4'(o); equal = 1'(e);
        #1;
        checks++;
        if (taken !== (o == 13 && e == 1)) begin
          failures++;
          $display("FAIL op=%0d equal=%0d taken=%b", o, e, taken);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
