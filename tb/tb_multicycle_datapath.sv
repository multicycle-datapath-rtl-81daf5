// End-to-end testbench of the multicycle datapath at its default size.
//
// The datapath is driven by control_sequencer_model and runs whole programs
// loaded through the memory loader port. Results are compared with an
// instruction-level reference model written here, independent of the RTL:
// final register file and memory contents, and the cycle count of every
// instruction (beq 3, R-type 4, sw 4, lw 5 cycles: one cycle per stage used).
//   Program 1 (directed): the two example instructions lw $t0, -4($sp) and
//     add $s4, $t1, $t2, sub/and/or/slt, sw, a branch not taken, a forward
//     branch taken and a counting loop closed by a backward branch.
//   Program 2 (random): 300 instructions drawn with the gcc mix of
//     48% arithmetic, 22% loads, 11% stores and 19% branches; reports the
//     measured cycles per instruction.
// Each datapath mechanism must occur at least once: memory addressed by PC
// and by ALUOut, each ALUSrcB input, each RegDst and MemToReg choice, PC
// loaded from the ALU result and from ALUOut, a branch taken and not taken,
// and the IR holding its word while IRWrite is low.
module tb_multicycle_datapath;
  import mc_pkg::*;

  localparam int MEM_WORDS = 1024;           // the datapath's default size
  localparam int DATA_BASE = 32'h800;        // data area (word 512)
  localparam logic [5:0] OP_LW = 6'h23, OP_SW = 6'h2b, OP_BEQ = 6'h04, OP_HALT = 6'h3f;
  localparam logic [5:0] F_ADD = 6'h20, F_SUB = 6'h22, F_AND = 6'h24, F_OR = 6'h25, F_SLT = 6'h2a;

  logic clk = 0, rst_n = 0, ld_en = 0;
  word_t ld_addr = '0, ld_data = '0, pc, ir;
  ctrl_t ctrl;
  logic [5:0] opcode, funct;
  logic zero, fetch, halted;

  multicycle_datapath dut (
    .clk, .rst_n, .ctrl, .ld_en, .ld_addr, .ld_data, .opcode, .funct, .zero, .pc, .ir
  );

  control_sequencer_model u_ctl (
    .clk, .rst_n, .opcode, .funct, .zero, .ctrl, .fetch, .halted
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ instruction helpers
  function automatic word_t r_type(logic [5:0] f, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, f};
  endfunction
  function automatic word_t i_type(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // ------------------------------------------------------- reference model
  word_t prog [MEM_WORDS];          // initial memory image
  word_t rmem [MEM_WORDS];          // reference memory
  word_t rreg [32];                 // reference registers
  int    n_arith, n_lw, n_sw, n_beq, n_taken;
  longint ref_cycles;

  function automatic int widx(word_t a);
    return int'(a[31:2]) % MEM_WORDS;
  endfunction

  task automatic run_reference();
    word_t rpc, in, a, b, r, ea;
    int steps;
    foreach (rmem[i]) rmem[i] = prog[i];
    foreach (rreg[i]) rreg[i] = '0;
    rpc = '0; steps = 0; ref_cycles = 0;
    n_arith = 0; n_lw = 0; n_sw = 0; n_beq = 0; n_taken = 0;
    forever begin
      in = rmem[widx(rpc)];
      rpc = rpc + 4;
      a = rreg[in[25:21]]; b = rreg[in[20:16]];
      ea = a + {{16{in[15]}}, in[15:0]};
      if (in[31:26] == OP_HALT) begin ref_cycles += 2; break; end
      case (in[31:26])
        6'h00: begin
          case (in[5:0])
            F_ADD:   r = a + b;
            F_SUB:   r = a - b;
            F_AND:   r = a & b;
            F_OR:    r = a | b;
            default: r = (longint'($signed(a)) < longint'($signed(b))) ? 1 : 0;
          endcase
          if (in[15:11] != 0) rreg[in[15:11]] = r;
          n_arith++; ref_cycles += 4;
        end
        OP_LW: begin
          if (in[20:16] != 0) rreg[in[20:16]] = rmem[widx(ea)];
          n_lw++; ref_cycles += 5;
        end
        OP_SW: begin
          rmem[widx(ea)] = b;
          n_sw++; ref_cycles += 4;
        end
        default: begin  // beq
          n_beq++; ref_cycles += 3;
          if (a == b) begin
            rpc = rpc + ({{16{in[15]}}, in[15:0]} << 2);
            n_taken++;
          end
        end
      endcase
      steps++;
      if (steps > 20000) begin
        failures++; $display("reference model did not halt"); break;
      end
    end
  endtask

  // ---------------------------------------------------- mechanism counters
  int m_fetch_pc, m_data_addr, m_srcb [4], m_regdst [2], m_memtoreg [2];
  int m_pc_alu, m_pc_aluout, m_br_not_taken, m_ir_hold, m_mem_write;
  logic counting = 0;

  always @(posedge clk) if (counting && rst_n) begin
    if ((ctrl.mem_read || ctrl.mem_write) && !ctrl.i_or_d) m_fetch_pc++;
    if ((ctrl.mem_read || ctrl.mem_write) &&  ctrl.i_or_d) m_data_addr++;
    if (ctrl.mem_write) m_mem_write++;
    m_srcb[ctrl.alu_src_b]++;
    if (ctrl.reg_write) begin
      m_regdst[ctrl.reg_dst]++;
      m_memtoreg[ctrl.mem_to_reg]++;
    end
    if (ctrl.pc_write && !ctrl.pc_source) m_pc_alu++;
    if (ctrl.pc_write &&  ctrl.pc_source) m_pc_aluout++;
    if (ctrl.pc_source && !ctrl.pc_write) m_br_not_taken++;
    if (!ctrl.ir_write && !halted) m_ir_hold++;
  end

  // Instruction register must not change while IRWrite is low.
  word_t ir_prev;
  logic  ir_we_prev = 0;
  always @(posedge clk) begin
    if (counting && rst_n && !ir_we_prev && cycle > 2) begin
      checks++;
      if (ir !== ir_prev) begin failures++; $display("IR changed without IRWrite"); end
    end
    #1 ir_prev = ir; ir_we_prev = ctrl.ir_write;
  end

  // Per-instruction cycle count: at each FETCH the IR still holds the
  // previous instruction; the cycles since the previous FETCH must be one per
  // stage that instruction uses.
  longint last_fetch;
  logic   seen_fetch;
  int     cyc_fail;
  longint dut_instr;
  always @(posedge clk) if (counting && rst_n && fetch) begin
    if (seen_fetch) begin
      int expc;
      case (ir[31:26])
        6'h00:   expc = 4;
        OP_LW:   expc = 5;
        OP_SW:   expc = 4;
        default: expc = 3;
      endcase
      checks++;
      dut_instr++;
      if (cycle - last_fetch != longint'(expc)) begin
        failures++; cyc_fail++;
        $display("instruction %h took %0d cycles, expected %0d", ir, cycle - last_fetch, expc);
      end
    end
    seen_fetch = 1;
    last_fetch = cycle;
  end

  // --------------------------------------------------------- run a program
  task automatic run_program(string name);
    longint start;
    run_reference();
    rst_n = 0;
    for (int i = 0; i < MEM_WORDS; i++) begin
      ld_en = 1; ld_addr = word_t'(4 * i); ld_data = prog[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
    seen_fetch = 0; dut_instr = 0; cyc_fail = 0;
    @(posedge clk); #1;
    rst_n = 1; counting = 1;
    start = cycle;
    while (!halted && cycle - start < 100000) @(posedge clk);
    #1;
    counting = 0;
    checks++;
    if (!halted) begin failures++; $display("%s: did not halt", name); end
    for (int i = 1; i < 32; i++) begin
      checks++;
      if (dut.u_rf.regs[i] !== rreg[i]) begin
        failures++; $display("%s: r%0d = %h expected %h", name, i, dut.u_rf.regs[i], rreg[i]);
      end
    end
    for (int i = 0; i < MEM_WORDS; i++) begin
      checks++;
      if (dut.u_mem.mem[i] !== rmem[i]) begin
        failures++; $display("%s: mem[%0d] = %h expected %h", name, i, dut.u_mem.mem[i], rmem[i]);
      end
    end
    checks++;
    if (cycle - start - 1 != ref_cycles) begin
      failures++; $display("%s: %0d cycles, expected %0d", name, cycle - start - 1, ref_cycles);
    end
    checks++;
    if (dut_instr != longint'(n_arith + n_lw + n_sw + n_beq)) begin
      failures++; $display("%s: %0d instructions timed, expected %0d", name, dut_instr, n_arith + n_lw + n_sw + n_beq);
    end
    $display("%s: %0d instructions (%0d arith, %0d lw, %0d sw, %0d beq, %0d taken) in %0d cycles, CPI %.3f, %.2f ns per instruction at 2 ns per cycle",
             name, n_arith + n_lw + n_sw + n_beq, n_arith, n_lw, n_sw, n_beq, n_taken, ref_cycles - 2,
             real'(ref_cycles - 2) / real'(n_arith + n_lw + n_sw + n_beq),
             2.0 * real'(ref_cycles - 2) / real'(n_arith + n_lw + n_sw + n_beq));
  endtask

  // ----------------------------------------------------------- programs
  task automatic directed_program();
    int p;
    foreach (prog[i]) prog[i] = '0;
    // data: [0] = stack pointer value, [1] = 7, [2] = -3, [3] = loop count, [4] = 1
    prog[DATA_BASE/4 + 0] = DATA_BASE + 32'h40;
    prog[DATA_BASE/4 + 1] = 32'd7;
    prog[DATA_BASE/4 + 2] = 32'hffff_fffd;
    prog[DATA_BASE/4 + 3] = 32'd5;
    prog[DATA_BASE/4 + 4] = 32'd1;
    prog[DATA_BASE/4 + 15] = 32'h1234_5678;   // the word at -4($sp)
    p = 0;
    prog[p++] = i_type(OP_LW, 29, 0, DATA_BASE + 0);    // lw  $sp, data+0($0)
    prog[p++] = i_type(OP_LW,  9, 0, DATA_BASE + 4);    // lw  $t1, 7
    prog[p++] = i_type(OP_LW, 10, 0, DATA_BASE + 8);    // lw  $t2, -3
    prog[p++] = i_type(OP_LW,  8, 29, -4);              // lw  $t0, -4($sp)
    prog[p++] = r_type(F_ADD, 20,  9, 10);              // add $s4, $t1, $t2
    prog[p++] = r_type(F_SUB, 11,  9, 10);              // sub $t3, $t1, $t2
    prog[p++] = r_type(F_AND, 12,  9, 10);              // and $t4, $t1, $t2
    prog[p++] = r_type(F_OR,  13,  9, 10);              // or  $t5, $t1, $t2
    prog[p++] = r_type(F_SLT, 14, 10,  9);              // slt $t6, $t2, $t1
    prog[p++] = i_type(OP_SW, 20, 29, 0);               // sw  $s4, 0($sp)
    prog[p++] = i_type(OP_BEQ, 10, 9, 5);               // beq $t1, $t2, +5 (not taken)
    prog[p++] = i_type(OP_BEQ,  9, 9, 1);               // beq $t1, $t1, +1 (taken)
    prog[p++] = r_type(F_ADD, 15,  9, 9);               // skipped
    prog[p++] = i_type(OP_LW, 16, 0, DATA_BASE + 12);   // lw  $s0, 5
    prog[p++] = i_type(OP_LW, 17, 0, DATA_BASE + 16);   // lw  $s1, 1
    // loop: s2 += t1; s0 -= 1; if s0 == 0 exit; branch back
    prog[p++] = r_type(F_ADD, 18, 18,  9);              // add $s2, $s2, $t1
    prog[p++] = r_type(F_SUB, 16, 16, 17);              // sub $s0, $s0, $s1
    prog[p++] = i_type(OP_BEQ,  0, 16, 1);              // beq $s0, $0, exit
    prog[p++] = i_type(OP_BEQ,  0,  0, -4);             // beq $0, $0, loop
    prog[p++] = i_type(OP_SW, 18, 29, 4);               // exit: sw $s2, 4($sp)
    prog[p++] = {OP_HALT, 26'h0};
  endtask

  task automatic random_program(int n);
    int k;
    foreach (prog[i]) prog[i] = '0;
    for (int i = 0; i < 64; i++) prog[DATA_BASE/4 + i] = $urandom_range(0, 7);
    for (int i = 0; i < n; i++) begin
      k = $urandom_range(0, 99);
      if (k < 48) begin                                // arithmetic 48%
        logic [5:0] f [5] = '{F_ADD, F_SUB, F_AND, F_OR, F_SLT};
        prog[i] = r_type(f[$urandom_range(0, 4)], $urandom_range(0, 15),
                         $urandom_range(0, 15), $urandom_range(0, 15));
      end else if (k < 70) begin                       // loads 22%
        prog[i] = i_type(OP_LW, $urandom_range(0, 15), 0, DATA_BASE + 4 * $urandom_range(0, 63));
      end else if (k < 81) begin                       // stores 11%
        prog[i] = i_type(OP_SW, $urandom_range(0, 15), 0, DATA_BASE + 4 * $urandom_range(0, 63));
      end else begin                                   // branches 19%
        int off;
        off = $urandom_range(0, 3);
        if (i + 1 + off > n) off = n - i - 1;
        prog[i] = i_type(OP_BEQ, $urandom_range(0, 15), $urandom_range(0, 15), off);
      end
    end
    prog[n] = {OP_HALT, 26'h0};
  endtask

  task automatic check_mechanisms();
    string names [13] = '{"fetch addressed by PC", "data access addressed by ALUOut", "memory write",
      "ALUSrcB=0 (B)", "ALUSrcB=1 (4)", "ALUSrcB=2 (immediate)", "ALUSrcB=3 (shifted immediate)",
      "RegDst=0", "RegDst=1", "MemToReg=0", "MemToReg=1", "PC from ALU result", "PC from ALUOut"};
    int counts [13];
    counts = '{m_fetch_pc, m_data_addr, m_mem_write, m_srcb[0], m_srcb[1], m_srcb[2], m_srcb[3],
               m_regdst[0], m_regdst[1], m_memtoreg[0], m_memtoreg[1], m_pc_alu, m_pc_aluout};
    foreach (names[i]) begin
      checks++;
      $display("mechanism %-32s %0d", names[i], counts[i]);
      if (counts[i] == 0) begin failures++; $display("mechanism never exercised: %s", names[i]); end
    end
    checks += 2;
    $display("mechanism %-32s %0d", "branch not taken", m_br_not_taken);
    $display("mechanism %-32s %0d", "IR held (IRWrite low)", m_ir_hold);
    if (m_br_not_taken == 0) begin failures++; $display("mechanism never exercised: branch not taken"); end
    if (m_ir_hold == 0) begin failures++; $display("mechanism never exercised: IR held"); end
  endtask

  initial begin
    m_fetch_pc = 0; m_data_addr = 0; m_mem_write = 0; m_pc_alu = 0; m_pc_aluout = 0;
    m_br_not_taken = 0; m_ir_hold = 0;
    foreach (m_srcb[i]) m_srcb[i] = 0;
    m_regdst = '{0, 0}; m_memtoreg = '{0, 0};
    repeat (2) @(posedge clk);

    directed_program();
    run_program("directed");
    // Values worked out by hand for the directed program.
    checks += 5;
    if (rreg[8]  != 32'h1234_5678) begin failures++; $display("reference: $t0 wrong"); end
    if (rreg[20] != 32'd4)         begin failures++; $display("reference: $s4 wrong"); end
    if (rreg[18] != 32'd35)        begin failures++; $display("reference: loop sum wrong"); end
    if (rreg[15] != 32'd0)         begin failures++; $display("reference: skipped instruction ran"); end
    if (rmem[DATA_BASE/4 + 16] != 32'd4) begin failures++; $display("reference: sw wrong"); end

    random_program(300);
    run_program("gcc-mix random");

    check_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
