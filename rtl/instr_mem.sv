// instr_mem: the instruction memory, 2**ADDR_BITS 16-bit words.
//
// The PC is a byte address and every instruction is one 16-bit word, so the
// fetch port reads word pc[ADDR_BITS:1] combinationally (INSTRDATA =
// MEM[PC]); bit 0 of the PC is ignored and PC bits above the memory are not
// decoded. The load port writes one word per rising clock edge and is how a
// program (the assembler's output) is placed in memory before reset is
// released. Contents are not reset.
//
// The read behaviour follows the LilaK RTL summary. The size (512 words,
// the same as the data memory's 9-bit address) and the load port are this
// design's choices; the LilaK definition gives a 16-bit address bus and
// loads the program into memory from a file.
module instr_mem
  import lilak_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 9
) (
  input  logic                 clk,
  input  word_t                pc,
  output word_t                instr,
  input  logic                 load_we,
  input  logic [ADDR_BITS-1:0] load_addr,
  input  word_t                load_data
);

  word_t mem [2**ADDR_BITS];

  always_ff @(posedge clk)
    if (load_we) mem[load_addr] <= load_data;

  assign instr = mem[pc[ADDR_BITS:1]];

endmodule
