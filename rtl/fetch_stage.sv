// fetch_stage: the F stage of LilaK. Holds the program counter, reads the
// instruction at PC from the instruction memory and advances the PC.
//
// Each rising edge the PC becomes, in priority order: 0 during reset; the
// writeback target when the instruction in writeback redirects the PC
// (jump, jumpandlink, taken branch on equal); otherwise PC + 2. The stage
// outputs INSTRDATA = MEM[PC] and PC + 2, which the decode stage names
// CURRENTADDRESS. The PC adder, the reset mux with constant 0 and the PCSrc
// mux follow the LilaK data path. There is no stall or flush: a redirect
// takes effect from writeback, so the four instructions after a jump or
// branch are executed, and programs fill those slots (the LilaK assembler
// inserts no-ops). The memory load port passes through to instr_mem.
module fetch_stage
  import lilak_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_BITS = 9
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      pc_write,
  input  word_t                     pc_target,
  output fd_t                       fd,
  output word_t                     pc,
  input  logic                      load_we,
  input  logic [IMEM_ADDR_BITS-1:0] load_addr,
  input  word_t                     load_data
);

  word_t pc_q, pc_plus2, instr;

  assign pc_plus2 = pc_q + word_t'(2);

  always_ff @(posedge clk) begin
    if (rst)           pc_q <= '0;
    else if (pc_write) pc_q <= pc_target;
    else               pc_q <= pc_plus2;
  end

  instr_mem #(.ADDR_BITS(IMEM_ADDR_BITS)) u_imem (
    .clk      (clk),
    .pc       (pc_q),
    .instr    (instr),
    .load_we  (load_we),
    .load_addr(load_addr),
    .load_data(load_data)
  );

  assign fd.instr = instr;
  assign fd.pc    = pc_plus2;
  assign pc       = pc_q;

endmodule
