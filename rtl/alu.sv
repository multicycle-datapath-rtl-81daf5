// Arithmetic-logic unit: the single ALU of the multicycle datapath.
//
// Because the PC increment and the branch-target adder are gone, this one
// unit does all the arithmetic, in different cycles of an instruction: PC + 4
// in the fetch cycle, the branch target PC + 4 + (offset << 2), effective
// addresses for lw and sw, register-register arithmetic, and the equality
// test of beq through its Zero output (result == 0). The operation set and
// its 3-bit encoding (alu_op_t: AND, OR, add, subtract, set-on-less-than,
// signed) are this design's choice, following the usual MIPS ALU control.
// Combinational; an unused code gives zero.
module alu
  import mc_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_t op,
  output word_t   result,
  output logic    zero
);

  always_comb begin
    unique case (op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = ($signed(a) < $signed(b)) ? word_t'(1) : '0;
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
