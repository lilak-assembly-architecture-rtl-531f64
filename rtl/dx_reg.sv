// dx_reg: the D->X stage register. Captures the decoded control word (its W,
// M and X groups), the three register operands A, B, C, CURRENTADDRESS, the
// sign-extended value, the branch-taken flag, the register numbers used by
// forwarding and the output-register tap on every rising clock edge. A
// synchronous reset clears it, which is a no-op (no register, memory or PC
// write). Register placement follows the LilaK data path; the reset
// behaviour is this design's choice.
module dx_reg
  import lilak_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dx_t  d,
  output dx_t  q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
