// Self-checking testbench for pc_register: random PCWrite and next-PC values
// are applied for 200 cycles; the PC must follow a reference register that
// loads only when PCWrite was high, and reset must give RESET_PC.
module tb_pc_register;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0, pc_write = 0;
  word_t pc_next = '0, pc, model;
  int checks = 0, failures = 0;
  localparam word_t RST = 32'h0000_0040;

  pc_register #(.RESET_PC(RST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (pc !== RST) begin failures++; $display("reset: pc=%h", pc); end
    rst_n = 1; model = RST;
    for (int i = 0; i < 200; i++) begin
      pc_write = ($urandom_range(0, 1) == 1);
      pc_next  = $urandom();
      @(posedge clk); #1;
      if (pc_write) model = pc_next;
      checks++;
      if (pc !== model) begin failures++; $display("cycle %0d: pc=%h expected %h", i, pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
