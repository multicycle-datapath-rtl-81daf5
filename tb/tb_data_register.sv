// Self-checking testbench for data_register (MDR, A, B, ALUOut): the output
// must equal the input of the previous cycle every cycle, with no enable, and
// reset must clear it.
module tb_data_register;
  logic clk = 0, rst_n = 0;
  logic [31:0] d = 32'hdead_beef, q, prev;
  int checks = 0, failures = 0;

  data_register #(.WIDTH(32)) dut (.*);

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
    checks++; if (q !== '0) begin failures++; $display("reset: q=%h", q); end
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      d = $urandom(); prev = d;
      @(posedge clk); #1;
      d = $urandom();
      checks++;
      if (q !== prev) begin failures++; $display("cycle %0d: q=%h expected %h", i, q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
