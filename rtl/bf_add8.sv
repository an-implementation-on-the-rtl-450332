// bf_add8: 8-bit carry-select adder (the PJ_CSA_8B cell).
//
// {cout, s} = a + b + c. The low nibble is one 4-bit ripple-carry adder fed by
// the carry-in c. The high nibble is computed twice in parallel, once with a
// carry-in of 0 and once with 1; the low nibble's carry-out then picks the
// right high-nibble sum through a 4-bit mux and the right carry-out through a
// 1-bit mux. This is the cell count the adder section gives (three ripple
// adders, one 4-bit mux, one 1-bit mux); the wiring of the select lines is
// the usual carry-select arrangement. Purely combinational.
module bf_add8 (
  input  logic       c,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] s,
  output logic       cout
);
  logic       c_lo;
  logic [3:0] s_hi0, s_hi1;
  logic       c_hi0, c_hi1;

  bf_rca4 u_lo  (.c(c),    .a(a[3:0]), .b(b[3:0]), .s(s[3:0]), .co(c_lo));
  bf_rca4 u_hi0 (.c(1'b0), .a(a[7:4]), .b(b[7:4]), .s(s_hi0),  .co(c_hi0));
  bf_rca4 u_hi1 (.c(1'b1), .a(a[7:4]), .b(b[7:4]), .s(s_hi1),  .co(c_hi1));

  bf_mux #(.WIDTH(4)) u_mux_s (.sel(c_lo), .a(s_hi0), .b(s_hi1), .c(s[7:4]));
  bf_mux #(.WIDTH(1)) u_mux_c (.sel(c_lo), .a(c_hi0), .b(c_hi1), .c(cout));
endmodule
