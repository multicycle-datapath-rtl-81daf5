// Self-checking testbench for register_file: 500 random cycles of writes and
// reads on both ports against a reference array. Register 0 must stay zero,
// reads must be combinational and a write must be visible the next cycle.
module tb_register_file;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  reg_idx_t ra1 = '0, ra2 = '0, wa = '0;
  word_t wd = '0, rd1, rd2;
  word_t model [32];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 500; i++) begin
      ra1 = reg_idx_t'($urandom()); ra2 = reg_idx_t'($urandom());
      wa  = reg_idx_t'($urandom()); wd = $urandom(); we = ($urandom_range(0, 1) == 1);
      #1;
      checks += 2;
      if (rd1 !== model[ra1]) begin failures++; $display("cycle %0d rd1[%0d]=%h expected %h", i, ra1, rd1, model[ra1]); end
      if (rd2 !== model[ra2]) begin failures++; $display("cycle %0d rd2[%0d]=%h expected %h", i, ra2, rd2, model[ra2]); end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
