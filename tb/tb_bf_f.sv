// tb_bf_f: checks the round function. The testbench plays the four S-boxes
// (random tables answering bf_f's address outputs) and compares fxl with
// ((S0[a] + S1[b]) ^ S2[c]) + S3[d] computed with integer arithmetic, and
// checks that each byte of the input addresses the right box.
module tb_bf_f;
  import bf_pkg::*;
  word_t   xl, fxl;
  s_addr_t a0, a1, a2, a3;
  word_t   d0, d1, d2, d3;
  word_t   tab [4][256];
  word_t   want;
  int checks = 0, failures = 0;

  bf_f dut (
    .xl,
    .sbox0_addr(a0), .sbox1_addr(a1), .sbox2_addr(a2), .sbox3_addr(a3),
    .sbox0_data(d0), .sbox1_data(d1), .sbox2_data(d2), .sbox3_data(d3),
    .fxl
  );

  assign d0 = tab[0][a0];
  assign d1 = tab[1][a1];
  assign d2 = tab[2][a2];
  assign d3 = tab[3][a3];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 256; i++) tab[s][i] = $urandom;
    tab[0][8'h12] = 32'hFFFF_FFFF; tab[1][8'h34] = 32'h0000_0001;  // carry through all bytes
    for (int i = 0; i < 20000; i++) begin
      xl = (i == 0) ? 32'h1234_5678 : $urandom;
      #1;
      want = 32'((64'(tab[0][xl[31:24]]) + 64'(tab[1][xl[23:16]])) % 64'h1_0000_0000);
      want = want ^ tab[2][xl[15:8]];
      want = 32'((64'(want) + 64'(tab[3][xl[7:0]])) % 64'h1_0000_0000);
      checks += 2;
      if (fxl !== want) begin
        failures++;
        if (failures < 10) $display("FAIL xl=%h got %h want %h", xl, fxl, want);
      end
      if ({a0, a1, a2, a3} !== xl) begin
        failures++;
        if (failures < 10) $display("FAIL addresses %h %h %h %h for xl=%h", a0, a1, a2, a3, xl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
