// Shift left by two bit positions.
//
// Turns a sign-extended branch offset counted in words into one counted in
// bytes (multiply by 4); the result feeds input 3 of the ALUSrcB multiplexer
// so the ALU can add it to PC + 4. Purely combinational: the two low bits of
// the output are zero and the rest are input bits, so a synthesis report
// lists its outputs as wired to its input.
module shift_left_2
  import mc_pkg::*;
(
  input  word_t a,
  output word_t y
);

  assign y = {a[XLEN-3:0], 2'b00};

endmodule
