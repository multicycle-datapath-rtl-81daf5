// Behavioural control sequencer for simulating the multicycle datapath.
//
// This is a testbench model, not part of the design: the datapath's control
// unit is left open, and this model only supplies a plausible control
// sequence so that whole programs can run. It steps through the five stages
// one per clock cycle and skips those an instruction does not need:
//   FETCH  : memory read at PC into IR; ALU computes PC + 4 (ALUSrcA=0,
//            ALUSrcB=1) and the PC loads it (PCSource=0, PCWrite).
//   DECODE : A and B capture the source registers; the ALU computes the branch
//            target PC + 4 + (offset << 2) (ALUSrcB=3) into ALUOut.
//   EXEC   : R-type: A op B; lw/sw: A + sign-extended offset;
//            beq: A - B, and the PC loads ALUOut (PCSource=1) if Zero is set.
//   MEM    : lw reads memory at ALUOut into MDR; sw writes B there.
//   WB     : R-type writes ALUOut to rd; lw writes MDR to rt.
// So beq takes 3 cycles, R-type and sw 4, lw 5. Supported: add, sub, and, or,
// slt (opcode 0, funct 0x20/0x22/0x24/0x25/0x2a), lw (0x23), sw (0x2b),
// beq (0x04). Opcode 0x3f stops the sequencer (HALT) so a testbench can tell
// that a program ended. `fetch` is high in every FETCH cycle.
module control_sequencer_model
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  input  logic       zero,
  output ctrl_t      ctrl,
  output logic       fetch,
  output logic       halted
);

  localparam logic [5:0] OP_RTYPE = 6'h00, OP_LW = 6'h23, OP_SW = 6'h2b,
                         OP_BEQ = 6'h04, OP_HALT = 6'h3f;

  typedef enum logic [2:0] {S_FETCH, S_DECODE, S_EXEC, S_MEM, S_WB, S_HALT} state_t;
  state_t state, next;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= next;
  end

  function automatic alu_op_t rtype_op(logic [5:0] f);
    case (f)
      6'h20:   return ALU_ADD;
      6'h22:   return ALU_SUB;
      6'h24:   return ALU_AND;
      6'h25:   return ALU_OR;
      default: return ALU_SLT;
    endcase
  endfunction

  always_comb begin
    ctrl           = '0;
    ctrl.alu_src_b = SRCB_B;
    ctrl.alu_op    = ALU_ADD;
    next           = state;
    unique case (state)
      S_FETCH: begin
        ctrl.mem_read  = 1'b1;
        ctrl.ir_write  = 1'b1;
        ctrl.alu_src_b = SRCB_FOUR;
        ctrl.pc_write  = 1'b1;
        next           = S_DECODE;
      end
      S_DECODE: begin
        ctrl.alu_src_b = SRCB_IMM_SH;
        next = (opcode == OP_HALT) ? S_HALT : S_EXEC;
      end
      S_EXEC: begin
        ctrl.alu_src_a = 1'b1;
        if (opcode == OP_RTYPE) begin
          ctrl.alu_op = rtype_op(funct);
          next        = S_WB;
        end else if (opcode == OP_BEQ) begin
          ctrl.alu_op    = ALU_SUB;
          ctrl.pc_source = 1'b1;
          ctrl.pc_write  = zero;
          next           = S_FETCH;
        end else begin
          ctrl.alu_src_b = SRCB_IMM;
          next           = S_MEM;
        end
      end
      S_MEM: begin
        ctrl.i_or_d = 1'b1;
        if (opcode == OP_SW) begin
          ctrl.mem_write = 1'b1;
          next           = S_FETCH;
        end else begin
          ctrl.mem_read = 1'b1;
          next          = S_WB;
        end
      end
      S_WB: begin
        ctrl.reg_write = 1'b1;
        if (opcode == OP_RTYPE) ctrl.reg_dst = 1'b1;
        else                    ctrl.mem_to_reg = 1'b1;
        next = S_FETCH;
      end
      default: next = S_HALT;
    endcase
  end

  assign fetch  = (state == S_FETCH);
  assign halted = (state == S_HALT);

endmodule
