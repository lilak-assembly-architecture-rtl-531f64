// mw_reg: the M->W stage register (MtoWRegFile). Captures the control word,
// the ALU result and flags, register A, the memory read data,
// CURRENTADDRESS, the sign-extended value, the branch-taken flag, the
// destination number and the output tap on every rising edge. A synchronous
// reset clears it, which is a no-op (no register or PC write). Its contents
// follow the port list of the LilaK MtoWRegFile; the reset behaviour is this
// design's choice.
module mw_reg
  import lilak_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  mw_t  d,
  output mw_t  q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
