// Four-input multiplexer, WIDTH bits wide: the ALUSrcB selector.
//
// y = d0, d1, d2 or d3 for sel = 0..3. In the datapath the inputs are
// register B (arithmetic), the constant 4 (PC increment), the sign-extended
// immediate (effective addresses) and the sign-extended immediate shifted
// left by 2 (branch targets), in that order. Combinational.
module mux4 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [WIDTH-1:0] d3,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (sel)
      2'd0: y = d0;
      2'd1: y = d1;
      2'd2: y = d2;
      2'd3: y = d3;
    endcase
  end

endmodule
