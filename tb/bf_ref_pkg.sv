// bf_ref_pkg: a plain behavioural Blowfish used by the testbenches as the
// reference. It keeps its own copy of the P-array and S-boxes, does the
// additions with the '+' operator, and runs the textbook key schedule and
// block functions. load_pi() reads the initial pi words; the testbenches also
// check published known-answer vectors, which pins those words down
// independently of the RTL.
package bf_ref_pkg;
  typedef logic [31:0] word_t;
  typedef logic [63:0] block_t;

  word_t pi_w [1042];
  word_t P    [18];
  word_t S    [4][256];

  task automatic load_pi();
    $readmemh("rtl/bf_pi_init.hex", pi_w);
  endtask

  function automatic word_t f(word_t x);
    return ((S[0][x[31:24]] + S[1][x[23:16]]) ^ S[2][x[15:8]]) + S[3][x[7:0]];
  endfunction

  function automatic block_t enc(block_t b);
    word_t l = b[63:32], r = b[31:0], t;
    for (int i = 0; i < 16; i++) begin
      l = l ^ P[i];
      r = f(l) ^ r;
      t = l; l = r; r = t;
    end
    t = l; l = r; r = t;
    r = r ^ P[16];
    l = l ^ P[17];
    return {l, r};
  endfunction

  function automatic block_t dec(block_t b);
    word_t l = b[63:32], r = b[31:0], t;
    for (int i = 17; i > 1; i--) begin
      l = l ^ P[i];
      r = f(l) ^ r;
      t = l; l = r; r = t;
    end
    t = l; l = r; r = t;
    r = r ^ P[1];
    l = l ^ P[0];
    return {l, r};
  endfunction

  // kw[0..n-1] are the key words, first key byte in kw[0][31:24].
  function automatic void key_schedule(word_t kw [18], int n);
    block_t b = '0;
    for (int i = 0; i < 18; i++) P[i] = pi_w[i] ^ kw[i % n];
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 256; i++) S[s][i] = pi_w[18 + 256*s + i];
    for (int i = 0; i < 18; i += 2) begin
      b = enc(b); P[i] = b[63:32]; P[i+1] = b[31:0];
    end
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 256; i += 2) begin
        b = enc(b); S[s][i] = b[63:32]; S[s][i+1] = b[31:0];
      end
  endfunction
endpackage
