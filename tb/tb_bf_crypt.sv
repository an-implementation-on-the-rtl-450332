// tb_bf_crypt: runs the encryption core against subkeys and S-boxes set up
// by the reference key schedule. The testbench plays the P-array (answering
// parray_addr) and the F function. It checks published known-answer vectors,
// random blocks against the reference in both directions, the 18-cycle
// latency from go to done, and a go issued in the done cycle.
module tb_bf_crypt;
  import bf_pkg::*;
  import bf_ref_pkg::P, bf_ref_pkg::f, bf_ref_pkg::enc, bf_ref_pkg::dec;
  import bf_ref_pkg::key_schedule, bf_ref_pkg::load_pi;

  logic    clk = 0, rst_n = 0, go = 0, encrypt = 1, done;
  block_t  ptext = '0, ctext;
  p_addr_t parray_addr;
  word_t   parray_data, xl_to_f, fxl_from_f;
  int checks = 0, failures = 0, back_to_back = 0;

  bf_crypt dut (.clk, .rst_n, .go, .encrypt, .ptext, .parray_addr, .parray_data,
                .xl_to_f, .fxl_from_f, .done, .ctext);

  assign parray_data = (parray_addr < 18) ? P[parray_addr] : 32'h0;
  assign fxl_from_f  = f(xl_to_f);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Start one block; return its result and the number of rising clock edges
  // from the one that takes go to the one that raises done.
  task automatic run(block_t pt, logic e, output block_t ct, output int lat);
    int k;
    @(negedge clk);
    go = 1; ptext = pt; encrypt = e;
    @(negedge clk);
    k = 1;
    go = 0; ptext = {$urandom, $urandom};   // inputs are sampled only with go
    while (!done) begin
      @(negedge clk);
      k++;
    end
    lat = k - 1;
    ct = ctext;
  endtask

  task automatic expect_eq(string what, block_t got, block_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic kat(logic [63:0] k, block_t pt, block_t want);
    bf_ref_pkg::word_t kw [18];
    block_t ct, back;
    int lat;
    foreach (kw[i]) kw[i] = '0;
    kw[0] = k[63:32]; kw[1] = k[31:0];
    key_schedule(kw, 2);
    run(pt, 1'b1, ct, lat);
    expect_eq($sformatf("KAT key %h", k), ct, want);
    checks++;
    if (lat != 18) begin failures++; $display("FAIL latency %0d", lat); end
    run(ct, 1'b0, back, lat);
    expect_eq($sformatf("KAT decrypt key %h", k), back, pt);
  endtask

  initial begin
    block_t ct, pt, back;
    int lat;
    bf_ref_pkg::word_t kw [18];
    load_pi();
    repeat (3) @(negedge clk);
    rst_n = 1;
    kat(64'h0000000000000000, 64'h0000000000000000, 64'h4EF997456198DD78);
    kat(64'hFFFFFFFFFFFFFFFF, 64'hFFFFFFFFFFFFFFFF, 64'h51866FD5B85ECB8A);
    kat(64'h3000000000000000, 64'h1000000000000001, 64'h7D856F9A613063F2);
    kat(64'h0123456789ABCDEF, 64'h1111111111111111, 64'h61F9C3802281B096);
    kat(64'hFEDCBA9876543210, 64'h0123456789ABCDEF, 64'h0ACEAB0FC6A0A28D);
    // random 448-bit key, random blocks
    foreach (kw[i]) kw[i] = $urandom;
    key_schedule(kw, 14);
    for (int i = 0; i < 200; i++) begin
      pt = {$urandom, $urandom};
      run(pt, 1'b1, ct, lat);
      expect_eq("random encrypt", ct, enc(pt));
      run(ct, 1'b0, back, lat);
      expect_eq("random decrypt", back, pt);
    end
    // back-to-back: go in the done cycle
    @(negedge clk); go = 1; ptext = 64'h0123_4567_89AB_CDEF; encrypt = 1;
    @(negedge clk); go = 0;
    while (!done) @(negedge clk);
    expect_eq("first of pair", ctext, enc(64'h0123_4567_89AB_CDEF));
    go = 1; ptext = 64'hFEDC_BA98_7654_3210;
    @(negedge clk); go = 0;
    repeat (17) @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL back-to-back block done early"); end
    @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL back-to-back block not done after 18 cycles"); end
    else back_to_back++;
    expect_eq("second of pair", ctext, enc(64'hFEDC_BA98_7654_3210));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
