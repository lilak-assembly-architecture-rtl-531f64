// sign_extend: widens the 8-bit value of a V-type (set) instruction,
// INSTRDATA[11:4], to a 16-bit two's-complement word by copying bit 7 into
// bits 15:8 (LOADVALUE = SIGNEXTEND[INSTRDATA[11:4]]). Combinational.
// The 8-to-16 widths and the field follow the LilaK data path.
module sign_extend
  import lilak_pkg::*;
(
  input  logic [7:0] value,
  output word_t      extended
);

  assign extended = {{(XLEN-8){value[7]}}, value};

endmodule
