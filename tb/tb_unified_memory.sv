// Self-checking testbench for unified_memory at a reduced size of 64 words:
// the memory is filled through the loader port, then 400 random cycles mix
// reads (MemRead), writes (MemWrite) and idle cycles, compared with a
// reference array. Checks that reads are combinational, that rdata is zero
// while MemRead is low, that byte-address bits [1:0] are ignored and that a
// write shows in the next cycle.
module tb_unified_memory;
  import mc_pkg::*;
  localparam int N = 64;
  logic clk = 0, mem_read = 0, mem_write = 0, ld_en = 0;
  word_t addr = '0, wdata = '0, rdata, ld_addr = '0, ld_data = '0;
  word_t model [N];
  int checks = 0, failures = 0, nwrites = 0, nreads = 0;

  unified_memory #(.MEM_WORDS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      ld_en = 1; ld_addr = word_t'(4 * i); ld_data = $urandom(); model[i] = ld_data;
      @(posedge clk); #1;
    end
    ld_en = 0;
    for (int i = 0; i < 400; i++) begin
      int w;
      w = $urandom_range(0, N - 1);
      addr = word_t'(4 * w) | word_t'($urandom_range(0, 3));
      case ($urandom_range(0, 2))
        0: begin mem_read = 1; mem_write = 0; end
        1: begin mem_read = 0; mem_write = 1; end
        default: begin mem_read = 0; mem_write = 0; end
      endcase
      wdata = $urandom();
      #1;
      checks++;
      if (rdata !== (mem_read ? model[w] : '0)) begin
        failures++; $display("cycle %0d read word %0d: got %h expected %h", i, w, rdata, mem_read ? model[w] : '0);
      end
      if (mem_read) nreads++;
      @(posedge clk);
      if (mem_write) begin model[w] = wdata; nwrites++; end
      #1;
    end
    mem_write = 0; mem_read = 1;
    for (int i = 0; i < N; i++) begin
      addr = word_t'(4 * i); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("final word %0d: got %h expected %h", i, rdata, model[i]); end
    end
    checks++;
    if (nreads == 0 || nwrites == 0) begin failures++; $display("no reads or writes exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
