// Unified instruction and data memory (Princeton organisation).
//
// One word-organised array of MEM_WORDS 32-bit words serves both instruction
// fetch and lw/sw data accesses; the IorD multiplexer in front of it chooses
// whether the PC or ALUOut supplies the byte address. Reads are combinational:
// rdata shows the addressed word while mem_read (MemRead) is high, and zero
// otherwise. Writes take effect on the rising clock edge when mem_write
// (MemWrite) is high. Addresses are byte addresses; bits [1:0] are ignored
// (word accesses only) and the word index wraps at MEM_WORDS.
//
// The loader port (ld_en, ld_addr, ld_data) is this design's addition: it
// writes a word on the clock edge and has priority over mem_write, so a
// program can be placed in memory before the processor runs. The size, the
// combinational read and the loader are choices of this design; only the
// single shared memory and its MemRead/MemWrite controls are specified.
module unified_memory
  import mc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic  clk,
  input  logic  mem_read,
  input  logic  mem_write,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata,
  input  logic  ld_en,
  input  word_t ld_addr,
  input  word_t ld_data
);

  localparam int unsigned AW = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1;

  word_t mem [MEM_WORDS];

  logic [AW-1:0] widx, lidx;
  assign widx = AW'(addr[XLEN-1:2] % MEM_WORDS);
  assign lidx = AW'(ld_addr[XLEN-1:2] % MEM_WORDS);

  always_ff @(posedge clk) begin
    if (ld_en)          mem[lidx] <= ld_data;
    else if (mem_write) mem[widx] <= wdata;
  end

  assign rdata = mem_read ? mem[widx] : '0;

endmodule
