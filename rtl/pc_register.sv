// Program counter.
//
// A 32-bit register that loads pc_next on the rising clock edge only when
// pc_write (PCWrite) is high. Because instructions take a variable number of
// cycles, the PC is not updated every cycle; the enable is what the datapath
// specifies. The synchronous, active-low reset value RESET_PC is this
// design's choice (the start address is not specified).
module pc_register
  import mc_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pc_write,
  input  word_t pc_next,
  output word_t pc
);

  always_ff @(posedge clk) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (pc_write) pc <= pc_next;
  end

endmodule
