// data_memory: the memory stage of LilaK, 2**ADDR_BITS 16-bit words.
//
// The 16-bit byte address (register A) is first reduced to a word address
// (the address-preparation step): word = addr[ADDR_BITS:1]. A store writes
// B into that word on the rising clock edge (MEM[A] = B). A load reads it
// combinationally (MEMOUT = MEM[A]) so that the value is captured by the
// M->W stage register at the end of the memory stage. The write enable is
// MemWrite AND NOT MemRead. Contents are not reset.
//
// Follows the LilaK data path: a 9-bit word address (512 words), the
// address-preparation block and the inverter/AND write enable. That the
// preparation drops address bit 0 (word-aligned byte addresses) and that the
// read is combinational rather than through a registered RAM port are this
// design's choices.
module data_memory
  import lilak_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 9
) (
  input  logic  clk,
  input  logic  mem_read,
  input  logic  mem_write,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata
);

  word_t                mem [2**ADDR_BITS];
  logic [ADDR_BITS-1:0] word_addr;
  logic                 we;

  assign word_addr = addr[ADDR_BITS:1];
  assign we        = mem_write & ~mem_read;

  always_ff @(posedge clk)
    if (we) mem[word_addr] <= wdata;

  assign rdata = mem[word_addr];

endmodule
