// Self-checking testbench for sign_extend: the extremes and 300 random
// immediates; the result, read as a signed 32-bit number, must equal the
// immediate read as a signed 16-bit number.
module tb_sign_extend;
  import mc_pkg::*;
  logic [15:0] imm;
  word_t ext;
  int checks = 0, failures = 0;

  sign_extend dut (.*);

  task automatic try(logic [15:0] v);
    int signed expv;
    imm = v; #1;
    expv = int'($signed(v));
    checks++;
    if ($signed(ext) != expv) begin failures++; $display("imm=%h ext=%h expected %0d", v, ext, expv); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(16'h0000); try(16'h7fff); try(16'h8000); try(16'hffff); try(16'hfffc);
    for (int i = 0; i < 300; i++) try(16'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
