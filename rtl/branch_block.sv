// branch_block: decides in the decode stage whether a branch-on-equal is
// taken. It combines the opcode with the output of the A == B comparator
// (BRANCH = A == B) and flags the instruction as a taken branch; the flag
// travels with the instruction and redirects the PC in writeback.
// Combinational. The block and its two inputs (op, equal) are those of the
// LilaK data path; producing one taken flag is this design's reading of it.
module branch_block
  import lilak_pkg::*;
(
  input  logic [3:0] op,
  input  logic       equal,
  output logic       taken
);

  assign taken = (opcode_e'(op) == OP_BEQ) && equal;

endmodule
