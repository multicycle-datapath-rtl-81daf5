// Sign extension of the 16-bit immediate field IR[15-0] to 32 bits.
//
// Copies bit 15 into the upper 16 bits. The result feeds input 2 of the
// ALUSrcB multiplexer (effective addresses of lw and sw) and the shift-left-2
// unit (branch offsets). Purely combinational.
module sign_extend
  import mc_pkg::*;
(
  input  logic [15:0] imm,
  output word_t       ext
);

  assign ext = {{(XLEN-16){imm[15]}}, imm};

endmodule
