// Two-input multiplexer, WIDTH bits wide.
//
// y = d0 when sel is 0, d1 when sel is 1. The datapath uses five of them:
// IorD (memory address: PC or ALUOut), ALUSrcA (first ALU operand: PC or A),
// RegDst (write register: IR[20-16] or IR[15-11]), MemToReg (register write
// data: ALUOut or MDR) and PCSource (next PC: ALU result or ALUOut).
// Combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
