// Instruction register.
//
// Loads the word read from memory on the rising clock edge when ir_write
// (IRWrite) is high and holds it for the rest of the instruction, so the
// register specifiers and the immediate stay valid while the memory is reused
// for data. The fields are the MIPS ones: op [31-26], rs [25-21],
// rt [20-16], rd [15-11], immediate [15-0]; funct [5-0] is also brought out
// for the control unit. Reset to zero (synchronous, active low) is this
// design's choice.
module instruction_register
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ir_write,
  input  word_t       mem_data,
  output word_t       ir,
  output logic [5:0]  op,
  output reg_idx_t    rs,
  output reg_idx_t    rt,
  output reg_idx_t    rd,
  output logic [15:0] imm,
  output logic [5:0]  funct
);

  always_ff @(posedge clk) begin
    if (!rst_n)        ir <= '0;
    else if (ir_write) ir <= mem_data;
  end

  assign op    = ir[31:26];
  assign rs    = ir[25:21];
  assign rt    = ir[20:16];
  assign rd    = ir[15:11];
  assign imm   = ir[15:0];
  assign funct = ir[5:0];

endmodule
