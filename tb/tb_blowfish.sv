// tb_blowfish: end-to-end test of the whole Blowfish engine at its default
// size (448-bit key port). It schedules keys through the host interface and
// encrypts and decrypts blocks, comparing with published known-answer
// vectors and with a behavioural reference model. It also checks the
// key-schedule and block latencies, and makes each mechanism of the design
// happen at least once, counting each:
//   key schedules, encryptions, decryptions, short keys that wrap around the
//   18 subkeys, the full 448-bit key, out-of-range key sizes, and new_data /
//   new_key requests ignored while busy.
module tb_blowfish;
  import bf_pkg::*;
  localparam int KW = 14;
  localparam int KS_EDGES  = 1042 + 1 + 521 * 20;
  localparam int BLK_EDGES = 19;

  logic             clk = 0, rst_n = 0;
  logic             new_key = 0, new_data = 0, encrypt = 1;
  logic [32*KW-1:0] key = '0;
  logic [3:0]       key_size = 4'd2;
  block_t           data_in = '0, data_out;
  logic             ready;

  int checks = 0, failures = 0;
  int n_sched = 0, n_enc = 0, n_dec = 0, n_wrap = 0, n_full = 0, n_clamp = 0;
  int n_ign_data = 0, n_ign_key = 0;

  blowfish dut (.clk, .rst_n, .new_key, .key, .key_size, .new_data, .encrypt,
                .data_in, .data_out, .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Schedule key k of ks words through the host port (n_eff words used),
  // poking an ignored new_data and new_key request in the middle.
  task automatic schedule(logic [32*KW-1:0] k, logic [3:0] ks, int n_eff);
    bf_ref_pkg::word_t kw [18];
    int e;
    @(negedge clk);
    key = k; key_size = ks; new_key = 1;
    @(negedge clk);
    new_key = 0; key = '0; key_size = 4'd1;
    e = 0;
    while (!ready) begin
      if (e == 3000) begin
        new_data = 1; data_in = 64'h1; @(negedge clk); new_data = 0; n_ign_data++;
      end else if (e == 9000) begin
        new_key = 1; @(negedge clk); new_key = 0; n_ign_key++;
      end else begin
        @(negedge clk);
      end
      e++;
    end
    check($sformatf("key schedule took %0d edges, want %0d", e, KS_EDGES), e == KS_EDGES);
    for (int i = 0; i < 14; i++) kw[i] = k[32*KW-1 - 32*i -: 32];
    bf_ref_pkg::key_schedule(kw, n_eff);
    n_sched++;
    if (18 % n_eff != 0) n_wrap++;
    if (n_eff == KW) n_full++;
  endtask

  task automatic block(block_t din, logic e, output block_t dout);
    int n;
    @(negedge clk);
    data_in = din; encrypt = e; new_data = 1;
    @(negedge clk);
    new_data = 0; data_in = '0; encrypt = ~e;
    n = 0;
    while (!ready) begin @(negedge clk); n++; end
    check($sformatf("block took %0d edges, want %0d", n, BLK_EDGES), n == BLK_EDGES);
    dout = data_out;
    if (e) n_enc++; else n_dec++;
  endtask

  task automatic kat(logic [63:0] k, block_t pt, block_t ct);
    logic [32*KW-1:0] kk;
    block_t got, back;
    kk = '0; kk[32*KW-1 -: 64] = k;
    schedule(kk, 4'd2, 2);
    block(pt, 1'b1, got);
    check($sformatf("KAT key %h: got %h want %h", k, got, ct), got === ct);
    block(ct, 1'b0, back);
    check($sformatf("KAT key %h decrypt: got %h want %h", k, back, pt), back === pt);
  endtask

  initial begin
    logic [32*KW-1:0] k;
    block_t pt, ct, back;
    bf_ref_pkg::load_pi();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("not ready after reset", !ready);

    kat(64'h0000000000000000, 64'h0000000000000000, 64'h4EF997456198DD78);
    kat(64'hFFFFFFFFFFFFFFFF, 64'hFFFFFFFFFFFFFFFF, 64'h51866FD5B85ECB8A);
    kat(64'h1111111111111111, 64'h1111111111111111, 64'h2466DD878B963C9D);
    kat(64'hFEDCBA9876543210, 64'h0123456789ABCDEF, 64'h0ACEAB0FC6A0A28D);

    // every key length from 32 to 448 bits, random key, random blocks
    for (int n = 1; n <= KW; n++) begin
      for (int i = 0; i < KW; i++) k[32*i +: 32] = $urandom;
      schedule(k, 4'(n), n);
      for (int i = 0; i < 8; i++) begin
        pt = {$urandom, $urandom};
        block(pt, 1'b1, ct);
        check($sformatf("key %0d words: enc %h got %h want %h", n, pt, ct, bf_ref_pkg::enc(pt)),
              ct === bf_ref_pkg::enc(pt));
        block(ct, 1'b0, back);
        check($sformatf("key %0d words: dec round trip", n), back === pt);
      end
    end

    // key_size 0 means the whole key port
    schedule(k, 4'd0, KW);
    n_clamp++;
    block(64'h0123_4567_89AB_CDEF, 1'b1, ct);
    check("key_size 0 uses all 14 words", ct === bf_ref_pkg::enc(64'h0123_4567_89AB_CDEF));

    $display("INFO schedules=%0d enc=%0d dec=%0d wrap=%0d full=%0d clamp=%0d ign_data=%0d ign_key=%0d",
             n_sched, n_enc, n_dec, n_wrap, n_full, n_clamp, n_ign_data, n_ign_key);
    check("key schedule happened", n_sched > 0);
    check("encryption happened", n_enc > 0);
    check("decryption happened", n_dec > 0);
    check("short key wrapped over the subkeys", n_wrap > 0);
    check("448-bit key scheduled", n_full > 0);
    check("out-of-range key size seen", n_clamp > 0);
    check("data request ignored while busy", n_ign_data > 0);
    check("key request ignored while busy", n_ign_key > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
