// bf_mux: 2:1 multiplexer, the MUX1_1B / MUX1_4B / MUX1_8B cells of the
// carry-select adders (WIDTH 1, 4 or 8).
//
// c = sel ? b : a. Purely combinational. The cell names and widths follow the
// adder schematics; which input a high select picks is this design's choice:
// in the adders, a carries the "carry-in = 0" result and b the "carry-in = 1"
// result, so the real carry can drive sel directly.
module bf_mux #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] c
);
  always_comb c = sel ? b : a;
endmodule
