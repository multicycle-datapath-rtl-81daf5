// Self-checking testbench for shift_left_2: for 300 random words and a few
// sign-extended branch offsets the output must equal the input times 4
// (modulo 2^32).
module tb_shift_left_2;
  import mc_pkg::*;
  word_t a, y;
  int checks = 0, failures = 0;

  shift_left_2 dut (.*);

  task automatic try(word_t v);
    a = v; #1;
    checks++;
    if (y !== word_t'(v * 4)) begin failures++; $display("a=%h y=%h expected %h", v, y, word_t'(v * 4)); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32'h0000_0001); try(32'hffff_ffff); try(32'hffff_fffe); try(32'h0000_7fff);
    for (int i = 0; i < 300; i++) try($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
