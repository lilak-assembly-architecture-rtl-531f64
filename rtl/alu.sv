// alu: the LilaK arithmetic and logic unit (execute stage).
//
// Computes ALURESULT = A op B for the nine computational operations of the
// instruction set: add, subtract, multiply, divide, and, or, less than,
// greater than and equal to. The comparisons give 1 or 0. The unit also
// drives the two flags shown on the ALU of the data path, zero and overflow.
// Purely combinational; the result is registered by the X->M stage register.
//
// The operation list and the two flags follow the LilaK definition. These
// are this design's choices, as the definition leaves them open: operands
// are two's-complement signed (the set value is sign-extended), multiply
// keeps the low 16 bits of the product, divide truncates toward zero and
// gives 16'hFFFF for a zero divisor and -32768 for -32768 / -1, and/or act
// bitwise, and overflow is raised only by a signed overflow of add or
// subtract.
module alu
  import lilak_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output logic    zero,
  output logic    overflow
);

  logic signed [XLEN-1:0] sa, sb;
  logic signed [2*XLEN-1:0] prod;
  assign sa   = signed'(a);
  assign sb   = signed'(b);
  assign prod = sa * sb;

  always_comb begin
    result   = '0;
    overflow = 1'b0;
    unique case (op)
      ALU_ADD: begin
        result   = a + b;
        overflow = (a[XLEN-1] == b[XLEN-1]) && (result[XLEN-1] != a[XLEN-1]);
      end
      ALU_SUB: begin
        result   = a - b;
        overflow = (a[XLEN-1] != b[XLEN-1]) && (result[XLEN-1] != a[XLEN-1]);
      end
      ALU_MUL: result = prod[XLEN-1:0];
      ALU_DIV: begin
        if (b == '0)
          result = '1;
        else if (a == {1'b1, {(XLEN-1){1'b0}}} && b == '1)
          result = a;
        else
          result = word_t'(sa / sb);
      end
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_LT:  result = word_t'(sa < sb);
      ALU_GT:  result = word_t'(sa > sb);
      ALU_EQ:  result = word_t'(a == b);
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
