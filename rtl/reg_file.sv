// reg_file: the LilaK register file, sixteen 16-bit registers.
//
// Three combinational read ports (read register 1/2/3 -> A, B, C) and one
// write port that writes on the rising clock edge when reg_write is high.
// Register 0 ($zero) always reads 0 and ignores writes. Register 5 ($in) is
// the input register: it loads the external input word on every clock edge
// and program writes to it are ignored. The output port shows register
// OUT_REG continuously; the pipeline carries it to the processor's output.
// A synchronous reset clears every register.
//
// The register count, width, $zero and $in, the three read ports and the
// input and output ports follow the LilaK register table and data path.
// Which register drives the output is not fixed there; this design uses
// $fr0 (register 9, the first procedure return register) by default. A value
// written in a cycle is readable from the next cycle on: the file has no
// internal write-to-read bypass, as in the LilaK data path.
module reg_file
  import lilak_pkg::*;
#(
  parameter reg_idx_t OUT_REG = R_FR0
) (
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t rd_addr1,
  input  reg_idx_t rd_addr2,
  input  reg_idx_t rd_addr3,
  output word_t    rd_data1,
  output word_t    rd_data2,
  output word_t    rd_data3,
  input  logic     reg_write,
  input  reg_idx_t wr_addr,
  input  word_t    wr_data,
  input  word_t    in_value,
  output word_t    out_value
);

  word_t regs [16];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      if (reg_write && wr_addr != R_ZERO && wr_addr != R_IN)
        regs[wr_addr] <= wr_data;
      regs[R_IN] <= in_value;
    end
  end

  assign rd_data1  = (rd_addr1 == R_ZERO) ? '0 : regs[rd_addr1];
  assign rd_data2  = (rd_addr2 == R_ZERO) ? '0 : regs[rd_addr2];
  assign rd_data3  = (rd_addr3 == R_ZERO) ? '0 : regs[rd_addr3];
  assign out_value = regs[OUT_REG];

endmodule
