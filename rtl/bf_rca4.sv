// bf_rca4: 4-bit ripple-carry adder (the RCA1_4B cell of the 8-bit adder).
//
// {co, s} = a + b + c. The carry ripples through four full adders, bit 0
// first; each full adder is written out as sum = a ^ b ^ cin and
// carry = majority(a, b, cin). Purely combinational.
module bf_rca4 (
  input  logic       c,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] s,
  output logic       co
);
  logic [4:0] carry;

  assign carry[0] = c;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    assign s[i]       = a[i] ^ b[i] ^ carry[i];
    assign carry[i+1] = (a[i] & b[i]) | (a[i] & carry[i]) | (b[i] & carry[i]);
  end
  assign co = carry[4];
endmodule
