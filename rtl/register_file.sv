// Register file: NREGS registers of 32 bits, two read ports, one write port.
//
// Read data 1 and Read data 2 follow Read register 1 and 2 combinationally,
// so they are ready within the register-read stage and captured in A and B at
// its end. The write of wd into register wa happens on the rising clock edge
// when we (RegWrite) is high. Register 0 always reads as zero and ignores
// writes, as in MIPS; that, and clearing all registers on the synchronous
// active-low reset, are choices of this design.
module register_file
  import mc_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t ra1,
  input  reg_idx_t ra2,
  input  reg_idx_t wa,
  input  word_t    wd,
  input  logic     we,
  output word_t    rd1,
  output word_t    rd2
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0 && 32'(wa) < NREGS) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0 || 32'(ra1) >= NREGS) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0 || 32'(ra2) >= NREGS) ? '0 : regs[ra2];

endmodule
