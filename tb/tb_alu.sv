// tb_alu: self-checking test of the ALU. Directed corner cases (overflow of
// add and subtract, divide by zero, -32768 / -1, signed compares) and 2000
// random operand pairs for every operation, each compared with a reference
// written with 32-bit integer arithmetic.
module tb_alu;
  import lilak_pkg::*;

  alu_op_e op;
  word_t   a, b, result;
  logic    zero, overflow;
  int      checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .result(result), .zero(zero), .overflow(overflow));

  function automatic void reference(input alu_op_e o, input word_t x, input word_t y,
                                    output word_t r, output logic ov);
    int sx, sy, s;
    sx = int'(signed'(x));
    sy = int'(signed'(y));
    ov = 1'b0;
    case (o)
      ALU_ADD: begin s = sx + sy; r = word_t'(s); ov = (s > 32767) || (s < -32768); end
      ALU_SUB: begin s = sx - sy; r = word_t'(s); ov = (s > 32767) || (s < -32768); end
      ALU_MUL: r = word_t'(sx * sy);
      ALU_DIV: begin
        if (sy == 0) r = 16'hFFFF;
        else begin s = sx / sy; r = word_t'(s); end
      end
      ALU_AND: r = x & y;
      ALU_OR:  r = x | y;
      ALU_LT:  r = (sx < sy) ? 16'd1 : 16'd0;
      ALU_GT:  r = (sx > sy) ? 16'd1 : 16'd0;
      ALU_EQ:  r = (x == y) ? 16'd1 : 16'd0;
      default: r = '0;
    endcase
  endfunction

  task automatic check(input alu_op_e o, input word_t x, input word_t y);
    word_t r; logic ov;
    op = o; a = x; b = y;
    #1;
    reference(o, x, y, r, ov);
    checks++;
    if (result !== r || overflow !== ov || zero !== (r == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h ov=%b z=%b exp %h ov=%b", o, x, y, result, overflow, zero, r, ov);
    end
  endtask

  localparam alu_op_e OPS [9] = '{ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV, ALU_AND, ALU_OR, ALU_LT, ALU_GT, ALU_EQ};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(ALU_ADD, 16'h7FFF, 16'h0001);
    check(ALU_ADD, 16'h8000, 16'hFFFF);
    check(ALU_ADD, 16'h0003, 16'hFFFD);
    check(ALU_SUB, 16'h8000, 16'h0001);
    check(ALU_SUB, 16'h0005, 16'h0005);
    check(ALU_DIV, 16'h1234, 16'h0000);
    check(ALU_DIV, 16'h8000, 16'hFFFF);
    check(ALU_DIV, 16'hFFF9, 16'h0002);
    check(ALU_MUL, 16'hFFFF, 16'hFFFF);
    check(ALU_LT,  16'hFFFF, 16'h0001);
    check(ALU_GT,  16'hFFFF, 16'h0001);
    check(ALU_EQ,  16'h00AB, 16'h00AB);
    for (int i = 0; i < 2000; i++)
      foreach (OPS[k]) check(OPS[k], word_t'($urandom), (i % 7 == 0) ? word_t'($urandom_range(0, 3)) : word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
