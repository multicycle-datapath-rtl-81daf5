// Self-checking testbench for mux4 (the ALUSrcB selector): each select value
// 0..3 with random data on all four inputs.
module tb_mux4;
  logic [1:0]  sel;
  logic [31:0] d0, d1, d2, d3, y;
  logic [31:0] d [4];
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      foreach (d[k]) d[k] = $urandom();
      d0 = d[0]; d1 = d[1]; d2 = d[2]; d3 = d[3];
      sel = 2'(i);
      #1;
      checks++;
      if (y !== d[sel]) begin failures++; $display("sel=%0d y=%h expected %h", sel, y, d[sel]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
