// Self-checking testbench for mux2 at the 32-bit width of the datapath and at
// the 5-bit width of the RegDst selector: random inputs and select values.
module tb_mux2;
  logic        sel;
  logic [31:0] d0, d1, y;
  logic [4:0]  e0, e1, z;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut   (.sel, .d0, .d1, .y);
  mux2 #(.WIDTH(5))  dut_n (.sel, .d0(e0), .d1(e1), .y(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      sel = 1'(i); d0 = $urandom(); d1 = $urandom(); e0 = 5'($urandom()); e1 = 5'($urandom());
      #1;
      checks += 2;
      if (y !== (sel ? d1 : d0)) begin failures++; $display("sel=%b y=%h", sel, y); end
      if (z !== (sel ? e1 : e0)) begin failures++; $display("sel=%b z=%h", sel, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
