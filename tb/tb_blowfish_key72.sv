// tb_blowfish_key72: the engine built for keys of up to 72 bytes
// (KEY_WORDS = 18, one key word per subkey). Schedules an 18-word key, a
// 9-word key and a 2-word known-answer key through the host port, and
// checks encryption and decryption against the reference model, plus the
// key-schedule length, which does not depend on the key size.
module tb_blowfish_key72;
  import bf_pkg::*;
  localparam int KW = 18;
  localparam int KS_EDGES = 1042 + 1 + 521 * 20;

  logic             clk = 0, rst_n = 0;
  logic             new_key = 0, new_data = 0, encrypt = 1;
  logic [32*KW-1:0] key = '0;
  logic [4:0]       key_size = 5'd18;
  block_t           data_in = '0, data_out;
  logic             ready;
  int checks = 0, failures = 0;

  blowfish #(.KEY_WORDS(KW)) dut (.clk, .rst_n, .new_key, .key, .key_size, .new_data,
                                  .encrypt, .data_in, .data_out, .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic schedule(logic [32*KW-1:0] k, logic [4:0] ks);
    bf_ref_pkg::word_t kw [18];
    int e = 0;
    @(negedge clk);
    key = k; key_size = ks; new_key = 1;
    @(negedge clk);
    new_key = 0;
    while (!ready) begin @(negedge clk); e++; end
    check($sformatf("key schedule took %0d edges", e), e == KS_EDGES);
    for (int i = 0; i < KW; i++) kw[i] = k[32*KW-1 - 32*i -: 32];
    bf_ref_pkg::key_schedule(kw, int'(ks));
  endtask

  task automatic block(block_t din, logic e, output block_t dout);
    @(negedge clk);
    data_in = din; encrypt = e; new_data = 1;
    @(negedge clk);
    new_data = 0;
    while (!ready) @(negedge clk);
    dout = data_out;
  endtask

  initial begin
    logic [32*KW-1:0] k;
    block_t pt, ct, back;
    bf_ref_pkg::load_pi();
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (k[i]) k[i] = 1'($urandom);
    for (int n = 18; n >= 9; n -= 9) begin
      schedule(k, 5'(n));
      for (int i = 0; i < 10; i++) begin
        pt = {$urandom, $urandom};
        block(pt, 1'b1, ct);
        check($sformatf("%0d-word key: enc %h", n, pt), ct === bf_ref_pkg::enc(pt));
        block(ct, 1'b0, back);
        check($sformatf("%0d-word key: dec", n), back === pt);
      end
    end
    k = '0; k[32*KW-1 -: 64] = 64'hFEDCBA9876543210;
    schedule(k, 5'd2);
    block(64'h0123456789ABCDEF, 1'b1, ct);
    check("KAT FEDCBA9876543210", ct === 64'h0ACEAB0FC6A0A28D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
