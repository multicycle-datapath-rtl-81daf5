// Intermediate register without a write enable.
//
// Used for the memory data register (MDR), the register-file output latches
// A and B, and ALUOut. Each loads its input on every rising clock edge and so
// holds a value produced in one cycle for use in the next cycle of the same
// instruction; none of them needs a write-control signal. The synchronous,
// active-low clear to zero is this design's choice.
module data_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
