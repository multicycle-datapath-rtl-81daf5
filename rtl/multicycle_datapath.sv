// Multicycle MIPS-style datapath.
//
// An instruction is executed as a sequence of one-cycle stages (fetch and PC
// increment, register read, ALU operation, memory access, register write
// back) and uses only the stages it needs. Hardware is shared between stages:
//   * one unified memory holds instructions and data; the IorD multiplexer
//     addresses it with the PC (fetch) or with ALUOut (lw/sw);
//   * one ALU replaces the PC incrementer and the branch-target adder; the
//     ALUSrcA multiplexer picks PC or A, the ALUSrcB multiplexer picks B, 4,
//     the sign-extended immediate or that immediate shifted left by 2;
//   * values needed in a later cycle are kept in the instruction register
//     (written under IRWrite), the memory data register MDR, A and B (register
//     file outputs) and ALUOut, the last four loading every cycle;
//   * the PC loads under PCWrite from the PCSource multiplexer: the ALU result
//     (PC + 4 computed in the fetch cycle) or ALUOut (a branch target computed
//     in an earlier cycle).
// Write register comes from IR[20-16] or IR[15-11] (RegDst), register write
// data from ALUOut or MDR (MemToReg), memory write data from B.
//
// Interface: every control signal arrives in the ctrl struct, one setting
// per cycle; opcode, funct and the ALU Zero flag go back to the control unit,
// which is not part of this module; pc and the instruction register ir are
// brought out for observation. All state changes on the rising edge of
// clk; rst_n is synchronous and active low. The loader port writes program
// and data words into the memory before the processor is started; it is this
// design's addition, as are the memory size MEM_WORDS and the reset PC.
module multicycle_datapath
  import mc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024,
  parameter word_t       RESET_PC  = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl,
  input  logic       ld_en,
  input  word_t      ld_addr,
  input  word_t      ld_data,
  output logic [5:0] opcode,
  output logic [5:0] funct,
  output logic       zero,
  output word_t      pc,
  output word_t      ir
);

  word_t    pc_next, mem_addr, mem_rdata;
  localparam word_t FOUR = word_t'(4);

  word_t    mdr, a_q, b_q, alu_out_q;
  word_t    rd1, rd2, wb_data;
  word_t    imm_ext, imm_sh, src_a, src_b, alu_result;
  reg_idx_t rs, rt, rd, wr_reg;
  logic [15:0] imm;

  // Program counter and memory address selection.
  pc_register #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .pc_write(ctrl.pc_write), .pc_next, .pc
  );

  mux2 #(.WIDTH(XLEN)) u_iord_mux (
    .sel(ctrl.i_or_d), .d0(pc), .d1(alu_out_q), .y(mem_addr)
  );

  unified_memory #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk, .mem_read(ctrl.mem_read), .mem_write(ctrl.mem_write),
    .addr(mem_addr), .wdata(b_q), .rdata(mem_rdata),
    .ld_en, .ld_addr, .ld_data
  );

  // Instruction register and memory data register.
  instruction_register u_ir (
    .clk, .rst_n, .ir_write(ctrl.ir_write), .mem_data(mem_rdata),
    .ir, .op(opcode), .rs, .rt, .rd, .imm, .funct
  );

  data_register #(.WIDTH(XLEN)) u_mdr (.clk, .rst_n, .d(mem_rdata), .q(mdr));

  // Register file with its write-register and write-data selection.
  mux2 #(.WIDTH(RIDX)) u_regdst_mux (
    .sel(ctrl.reg_dst), .d0(rt), .d1(rd), .y(wr_reg)
  );

  mux2 #(.WIDTH(XLEN)) u_memtoreg_mux (
    .sel(ctrl.mem_to_reg), .d0(alu_out_q), .d1(mdr), .y(wb_data)
  );

  register_file u_rf (
    .clk, .rst_n, .ra1(rs), .ra2(rt), .wa(wr_reg), .wd(wb_data),
    .we(ctrl.reg_write), .rd1, .rd2
  );

  data_register #(.WIDTH(XLEN)) u_a (.clk, .rst_n, .d(rd1), .q(a_q));
  data_register #(.WIDTH(XLEN)) u_b (.clk, .rst_n, .d(rd2), .q(b_q));

  // Immediate handling.
  sign_extend  u_sext (.imm, .ext(imm_ext));
  shift_left_2 u_sl2  (.a(imm_ext), .y(imm_sh));

  // The single ALU and its operand selection.
  mux2 #(.WIDTH(XLEN)) u_srca_mux (
    .sel(ctrl.alu_src_a), .d0(pc), .d1(a_q), .y(src_a)
  );

  mux4 #(.WIDTH(XLEN)) u_srcb_mux (
    .sel(ctrl.alu_src_b), .d0(b_q), .d1(FOUR), .d2(imm_ext), .d3(imm_sh),
    .y(src_b)
  );

  alu u_alu (
    .a(src_a), .b(src_b), .op(ctrl.alu_op), .result(alu_result), .zero
  );

  data_register #(.WIDTH(XLEN)) u_aluout (
    .clk, .rst_n, .d(alu_result), .q(alu_out_q)
  );

  // Next PC.
  mux2 #(.WIDTH(XLEN)) u_pcsrc_mux (
    .sel(ctrl.pc_source), .d0(alu_result), .d1(alu_out_q), .y(pc_next)
  );

  // The memory cannot be read and written in the same cycle.
  a_mem_rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.mem_read && ctrl.mem_write));

endmodule
