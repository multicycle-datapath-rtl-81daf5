// Self-checking testbench for instruction_register: random words are offered
// every cycle with IRWrite random; the held word must change only when
// IRWrite was high, and the op/rs/rt/rd/imm/funct fields must be the MIPS
// bit ranges of the held word.
module tb_instruction_register;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, ir_write = 0;
  word_t mem_data = '0, ir, model;
  logic [5:0] op, funct;
  reg_idx_t rs, rt, rd;
  logic [15:0] imm;
  int checks = 0, failures = 0;

  instruction_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    check("reset", ir, '0);
    rst_n = 1; model = '0;
    for (int i = 0; i < 200; i++) begin
      ir_write = ($urandom_range(0, 2) == 0);
      mem_data = $urandom();
      @(posedge clk); #1;
      if (ir_write) model = mem_data;
      mem_data = $urandom();
      check("ir", ir, model);
      check("op", 32'(op), 32'(model >> 26));
      check("rs", 32'(rs), 32'((model >> 21) & 31));
      check("rt", 32'(rt), 32'((model >> 16) & 31));
      check("rd", 32'(rd), 32'((model >> 11) & 31));
      check("imm", 32'(imm), model & 32'hffff);
      check("funct", 32'(funct), model & 32'h3f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
