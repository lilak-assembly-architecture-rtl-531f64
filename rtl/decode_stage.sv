// decode_stage: the D stage of LilaK.
//
// From the instruction in F->D it reads A = REG[INSTRDATA[11:8]],
// B = REG[INSTRDATA[7:4]] and C = REG[INSTRDATA[3:0]] from the register
// file, compares A == B, decodes the opcode into the control word, lets the
// branch block mark a taken branch on equal, sign-extends INSTRDATA[11:4]
// and passes CURRENTADDRESS (the PC + 2 of the instruction) on, all
// combinationally into the D->X register. The register file also takes the
// writeback stage's write (on the rising edge), the external input word for
// $in, and shows the output register. This is the LilaK RTL summary's D row
// and the decode part of its data path. The compare uses the values read
// here, without forwarding, as in the LilaK data path.
module decode_stage
  import lilak_pkg::*;
#(
  parameter reg_idx_t OUT_REG = R_FR0
) (
  input  logic     clk,
  input  logic     rst,
  input  fd_t      fd,
  input  logic     wb_reg_write,
  input  reg_idx_t wb_addr,
  input  word_t    wb_data,
  input  word_t    in_value,
  output dx_t      dx
);

  word_t    a, b, c, seval, out_value;
  ctrl_t    ctrl;
  logic     taken;
  reg_idx_t ra, rb, rr;

  assign ra = fd.instr[11:8];
  assign rb = fd.instr[7:4];
  assign rr = fd.instr[3:0];

  reg_file #(.OUT_REG(OUT_REG)) u_regs (
    .clk      (clk),
    .rst      (rst),
    .rd_addr1 (ra),
    .rd_addr2 (rb),
    .rd_addr3 (rr),
    .rd_data1 (a),
    .rd_data2 (b),
    .rd_data3 (c),
    .reg_write(wb_reg_write),
    .wr_addr  (wb_addr),
    .wr_data  (wb_data),
    .in_value (in_value),
    .out_value(out_value)
  );

  control_unit u_ctrl (.op(fd.instr[15:12]), .ctrl(ctrl));

  branch_block u_branch (.op(fd.instr[15:12]), .equal(a == b), .taken(taken));

  sign_extend u_sext (.value(fd.instr[11:4]), .extended(seval));

  always_comb begin
    dx.ctrl  = ctrl;
    dx.a     = a;
    dx.b     = b;
    dx.c     = c;
    dx.pc    = fd.pc;
    dx.seval = seval;
    dx.taken = taken;
    dx.ra    = ra;
    dx.rb    = rb;
    dx.rr    = rr;
    dx.out   = out_value;
  end

endmodule
