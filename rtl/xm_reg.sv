// xm_reg: the X->M stage register. Captures the control word, the
// ALU result and flags, the forwarded operands A (address, jump target) and B
// (store data), CURRENTADDRESS, the sign-extended value, the branch-taken
// flag, the destination number and the output tap on every rising edge. A
// synchronous reset clears it, which is a no-op (no register, memory or PC
// write). Register placement follows the LilaK data path; the reset
// behaviour is this design's choice.
module xm_reg
  import lilak_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  xm_t  d,
  output xm_t  q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
