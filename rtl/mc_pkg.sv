// Shared types and constants of the multicycle MIPS-style datapath.
//
// The datapath is 32 bits wide with 5-bit register specifiers, as the
// instruction fields [25-21], [20-16] and [15-11] imply. The select codes of
// ALUSrcB (0..3) and of the 2-to-1 multiplexers (0/1) follow the input
// numbering of the datapath drawing. The ALU function codes are this design's
// own choice: the classic MIPS ALU-control encoding (AND, OR, add, subtract,
// set-on-less-than). The control bundle ctrl_t gathers every control signal
// the datapath takes, so an external control unit drives it as one value.
package mc_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned RIDX  = 5;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RIDX-1:0] reg_idx_t;

  // ALU function (the ALUOp input of the ALU).
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_t;

  // Second ALU operand (ALUSrcB), numbered as the multiplexer inputs.
  typedef enum logic [1:0] {
    SRCB_B      = 2'd0,   // register B
    SRCB_FOUR   = 2'd1,   // constant 4
    SRCB_IMM    = 2'd2,   // sign-extended immediate
    SRCB_IMM_SH = 2'd3    // sign-extended immediate shifted left by 2
  } alu_src_b_t;

  // Every control signal of the datapath.
  typedef struct packed {
    logic       pc_write;     // PCWrite: load PC
    logic       i_or_d;       // IorD: 0 = PC, 1 = ALUOut drives the memory address
    logic       mem_read;     // MemRead
    logic       mem_write;    // MemWrite
    logic       ir_write;     // IRWrite: load instruction register
    logic       reg_dst;      // RegDst: 0 = IR[20-16], 1 = IR[15-11]
    logic       mem_to_reg;   // MemToReg: 0 = ALUOut, 1 = MDR
    logic       reg_write;    // RegWrite
    logic       alu_src_a;    // ALUSrcA: 0 = PC, 1 = register A
    alu_src_b_t alu_src_b;    // ALUSrcB
    alu_op_t    alu_op;       // ALU function
    logic       pc_source;    // PCSource: 0 = ALU result, 1 = ALUOut
  } ctrl_t;

endpackage
