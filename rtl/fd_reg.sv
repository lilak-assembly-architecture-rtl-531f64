// fd_reg: the F->D stage register. Captures the fetched instruction and its
// PC + 2 on every rising clock edge; a synchronous reset loads a no-op
// (opcode 15) so that nothing reaches decode before the first fetch. There
// is no stall or flush input: the LilaK pipeline handles hazards in its
// assembler. The register sits between the stages as in the LilaK data
// path; the reset value is this design's choice.
module fd_reg
  import lilak_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  fd_t  d,
  output fd_t  q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '{instr: {OP_NOP, 12'h000}, pc: '0};
    else     q <= d;
  end

endmodule
