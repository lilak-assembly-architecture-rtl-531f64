// control_unit: decodes the 4-bit opcode INSTRDATA[15:12] into the control
// signals that travel down the pipeline in the W, M and X groups of the
// stage registers. Combinational.
//
//   computational ops  RegWrite, MemToReg=ALU, ALUop=op
//   set                RegWrite, MemToReg=sign-extended value
//   load               RegWrite, MemRead, MemToReg=memory
//   store              MemWrite
//   jump               PCSrc (PC <- A in writeback)
//   jumpandlink        PCSrc, RegWrite, RegDest=$ra, RegData=CURRENTADDRESS
//   branch on equal    Branch, ALUSrcA=CURRENTADDRESS, ALUSrcB=C<<1, ALUop=add
//   15 (unused)        no-op
//
// What each instruction does follows the LilaK RTL summary; the signal names
// are those of the LilaK data path. The bit encodings are this design's
// choices, except that for set the result matches the control values the
// LilaK designers checked (MemRead=0, MemWrite=0, RegWrite=1, RegDest=0,
// RegData=0, PCSrc=0, MemToReg=0).
module control_unit
  import lilak_pkg::*;
(
  input  logic [3:0] op,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (opcode_e'(op))
      OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_LT, OP_GT, OP_EQ: begin
        ctrl.reg_write  = 1'b1;
        ctrl.mem_to_reg = WB_ALU;
        ctrl.alu_op     = alu_op_e'(op);
      end
      OP_SET: begin
        ctrl.reg_write  = 1'b1;
        ctrl.mem_to_reg = WB_SEVAL;
      end
      OP_LOAD: begin
        ctrl.reg_write  = 1'b1;
        ctrl.mem_read   = 1'b1;
        ctrl.mem_to_reg = WB_MEM;
      end
      OP_STORE: ctrl.mem_write = 1'b1;
      OP_JUMP:  ctrl.pc_src    = 1'b1;
      OP_JAL: begin
        ctrl.pc_src    = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.reg_dest  = 1'b1;
        ctrl.reg_data  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch    = 1'b1;
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = 1'b1;
        ctrl.alu_op    = ALU_ADD;
      end
      default: ctrl = CTRL_NOP;
    endcase
  end

endmodule
