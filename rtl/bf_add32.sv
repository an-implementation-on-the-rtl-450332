// bf_add32: the proposed 32-bit adder, used twice in the F function.
//
// {cout, s} = a + b (no carry-in; Blowfish adds modulo 2**32 and ignores cout).
// Byte 0 is one 8-bit adder with a carry-in of 0. Bytes 1, 2 and 3 are each
// computed by two 8-bit adders, one assuming a carry-in of 0 and one assuming
// 1, and an 8-bit mux picks the sum once the carry out of the byte below is
// known: seven 8-bit adders and three 8-bit muxes, as the adder section
// describes. The carry passed from byte to byte is selected the same way by
// a 1-bit mux per byte; those three small muxes are this design's reading of
// "the output carry was connected to input 8bit carry". Each 8-bit adder is
// itself a carry-select adder (bf_add8), so the critical path is one 4-bit
// ripple plus one mux per nibble boundary. Purely combinational.
module bf_add32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] s,
  output logic        cout
);
  logic [3:1] carry;          // carry into byte i
  logic [7:0] s0 [1:3];       // byte sums assuming carry-in 0
  logic [7:0] s1 [1:3];       // byte sums assuming carry-in 1
  logic [3:1] c0, c1;         // byte carry-outs for both assumptions
  logic       c_byte0;

  bf_add8 u_b0 (.c(1'b0), .a(a[7:0]), .b(b[7:0]), .s(s[7:0]), .cout(c_byte0));
  assign carry[1] = c_byte0;

  for (genvar i = 1; i < 4; i++) begin : g_byte
    bf_add8 u_add0 (.c(1'b0), .a(a[8*i +: 8]), .b(b[8*i +: 8]), .s(s0[i]), .cout(c0[i]));
    bf_add8 u_add1 (.c(1'b1), .a(a[8*i +: 8]), .b(b[8*i +: 8]), .s(s1[i]), .cout(c1[i]));
    bf_mux #(.WIDTH(8)) u_mux_s (.sel(carry[i]), .a(s0[i]), .b(s1[i]), .c(s[8*i +: 8]));
    if (i < 3) begin : g_carry
      bf_mux #(.WIDTH(1)) u_mux_c (.sel(carry[i]), .a(c0[i]), .b(c1[i]), .c(carry[i+1]));
    end else begin : g_cout
      bf_mux #(.WIDTH(1)) u_mux_c (.sel(carry[i]), .a(c0[i]), .b(c1[i]), .c(cout));
    end
  end
endmodule
