// lilak_cpu: the LilaK ("LilaKiller") processor, a five-stage in-order
// pipelined 16-bit load-store machine with 16-bit instructions.
//
//   fetch_stage -> fd_reg -> decode_stage -> dx_reg -> execute_stage
//     -> xm_reg -> data_memory -> mw_reg -> writeback_stage
//
// One stage per clock; once full, five instructions are in flight and one
// completes per cycle. Writeback writes the register file and, for jump,
// jumpandlink and a taken branch on equal, loads the PC. The forwarding unit
// in execute covers dependences at distance one (ALU results) and two (any
// writeback value). There is no stall, flush or hazard-detection logic: as
// in the LilaK design, the assembler places no-ops so that (a) the four
// instructions after a jump or branch are no-ops or may execute, (b) a set
// or load result is not used by the next instruction, and (c) a value is
// not read by the third instruction after its producer (the register file
// writes at the end of writeback, after decode has read it).
//
// Interface: clk, synchronous active-high rst (PC = 0, pipeline emptied,
// registers cleared). in_value feeds the input register $in; out_value is
// the output register (default $fr0) as carried down the pipeline, so it
// lags the register by three cycles. zero and overflow are the ALU flags of
// the instruction in writeback. The imem_* port writes the instruction
// memory, one word per cycle, and is used while rst is held. The data
// memory has no outside port. Parameters: IMEM_ADDR_BITS and DMEM_ADDR_BITS
// (9: 512 words each), OUT_REG.
module lilak_cpu
  import lilak_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_BITS = 9,
  parameter int unsigned DMEM_ADDR_BITS = 9,
  parameter reg_idx_t    OUT_REG        = R_FR0
) (
  input  logic                      clk,
  input  logic                      rst,
  input  word_t                     in_value,
  output word_t                     out_value,
  output logic                      zero,
  output logic                      overflow,
  output word_t                     pc,
  input  logic                      imem_we,
  input  logic [IMEM_ADDR_BITS-1:0] imem_addr,
  input  word_t                     imem_data
);

  fd_t      fd_d, fd_q;
  dx_t      dx_d, dx_q;
  xm_t      xm_d, xm_q;
  mw_t      mw_d, mw_q;
  logic     wb_reg_write, pc_write;
  reg_idx_t wb_addr;
  word_t    wb_data, fwd_data, pc_target, mem_rdata;
  fwd_sel_e forward_a, forward_b;

  fetch_stage #(.IMEM_ADDR_BITS(IMEM_ADDR_BITS)) u_fetch (
    .clk      (clk),
    .rst      (rst),
    .pc_write (pc_write),
    .pc_target(pc_target),
    .fd       (fd_d),
    .pc       (pc),
    .load_we  (imem_we),
    .load_addr(imem_addr),
    .load_data(imem_data)
  );

  fd_reg u_fd (.clk(clk), .rst(rst), .d(fd_d), .q(fd_q));

  decode_stage #(.OUT_REG(OUT_REG)) u_decode (
    .clk         (clk),
    .rst         (rst),
    .fd          (fd_q),
    .wb_reg_write(wb_reg_write),
    .wb_addr     (wb_addr),
    .wb_data     (wb_data),
    .in_value    (in_value),
    .dx          (dx_d)
  );

  dx_reg u_dx (.clk(clk), .rst(rst), .d(dx_d), .q(dx_q));

  execute_stage u_execute (
    .dx          (dx_q),
    .xm_reg_write(xm_q.ctrl.reg_write),
    .xm_rr       (xm_q.rr),
    .xm_alu      (xm_q.alu),
    .mw_reg_write(mw_q.ctrl.reg_write),
    .mw_rr       (mw_q.rr),
    .mw_data     (fwd_data),
    .xm          (xm_d),
    .forward_a   (forward_a),
    .forward_b   (forward_b)
  );

  xm_reg u_xm (.clk(clk), .rst(rst), .d(xm_d), .q(xm_q));

  data_memory #(.ADDR_BITS(DMEM_ADDR_BITS)) u_dmem (
    .clk      (clk),
    .mem_read (xm_q.ctrl.mem_read),
    .mem_write(xm_q.ctrl.mem_write),
    .addr     (xm_q.a),
    .wdata    (xm_q.b),
    .rdata    (mem_rdata)
  );

  always_comb begin
    mw_d.ctrl     = xm_q.ctrl;
    mw_d.alu      = xm_q.alu;
    mw_d.a        = xm_q.a;
    mw_d.mem      = mem_rdata;
    mw_d.pc       = xm_q.pc;
    mw_d.seval    = xm_q.seval;
    mw_d.taken    = xm_q.taken;
    mw_d.zero     = xm_q.zero;
    mw_d.overflow = xm_q.overflow;
    mw_d.rr       = xm_q.rr;
    mw_d.out      = xm_q.out;
  end

  mw_reg u_mw (.clk(clk), .rst(rst), .d(mw_d), .q(mw_q));

  writeback_stage u_wb (
    .mw       (mw_q),
    .reg_write(wb_reg_write),
    .wr_addr  (wb_addr),
    .wr_data  (wb_data),
    .fwd_data (fwd_data),
    .pc_write (pc_write),
    .pc_target(pc_target),
    .out_value(out_value),
    .zero     (zero),
    .overflow (overflow)
  );

endmodule
