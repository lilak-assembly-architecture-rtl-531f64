// writeback_stage: the W stage of LilaK, built from the four muxes and the
// OR gate of the LilaK full circuit.
//
//   MemToReg mux (4:1): 0 sign-extended value, 1 ALU result, 2 memory data,
//                       3 register A (no instruction selects it)
//   RegData mux (2:1):  0 MemToReg mux, 1 CURRENTADDRESS (jumpandlink)
//   RegDest mux:        0 rr field INSTRDATA[3:0], 1 $ra
//   PCData mux:         taken branch -> ALU result (PC + 2 + 2*C),
//                       otherwise register A (jump, jumpandlink)
//   PC write enable:    PCSrc OR taken branch
//
// The MemToReg mux output is also the value forwarded from M->W to the
// execute stage. Combinational: the register write and the PC load happen
// on the next rising edge in reg_file and fetch_stage. The flags and the
// output tap are passed out of the processor here. The set of muxes and
// their sources follow the LilaK RTL summary's W row and data path; the
// select encodings are this design's choices.
module writeback_stage
  import lilak_pkg::*;
(
  input  mw_t      mw,
  output logic     reg_write,
  output reg_idx_t wr_addr,
  output word_t    wr_data,
  output word_t    fwd_data,
  output logic     pc_write,
  output word_t    pc_target,
  output word_t    out_value,
  output logic     zero,
  output logic     overflow
);

  word_t mem_to_reg_data;

  always_comb begin
    unique case (mw.ctrl.mem_to_reg)
      WB_SEVAL: mem_to_reg_data = mw.seval;
      WB_ALU:   mem_to_reg_data = mw.alu;
      WB_MEM:   mem_to_reg_data = mw.mem;
      default:  mem_to_reg_data = mw.a;
    endcase
  end

  assign fwd_data  = mem_to_reg_data;
  assign wr_data   = mw.ctrl.reg_data ? mw.pc : mem_to_reg_data;
  assign wr_addr   = mw.ctrl.reg_dest ? R_RA : mw.rr;
  assign reg_write = mw.ctrl.reg_write;
  assign pc_write  = mw.ctrl.pc_src | mw.taken;
  assign pc_target = mw.taken ? mw.alu : mw.a;
  assign out_value = mw.out;
  assign zero      = mw.zero;
  assign overflow  = mw.overflow;

endmodule
