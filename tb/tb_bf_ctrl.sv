// tb_bf_ctrl: checks the key-schedule and request controller on its own.
// The controller drives the real pi ROM; the testbench stands in for the
// encryption core (a behavioural model that answers each go with the
// reference encryption of the tables written so far, 18 cycles later) and
// for the tables (the model's table copies take the controller's writes).
// After a key schedule the written tables must equal the reference key
// schedule's. Also checked: the schedule length, ready, data requests in
// both directions with their 19-cycle latency, requests ignored while busy,
// and key_size values outside 1..14 treated as 14.
module tb_bf_ctrl;
  import bf_pkg::*;
  localparam int KW = 14;
  localparam int KS_CYCLES = 1042 + 1 + 521 * 20;

  logic            clk = 0, rst_n = 0;
  logic            new_key = 0, new_data = 0, encrypt = 1;
  logic [32*KW-1:0] key = '0;
  logic [3:0]      key_size = 4'd2;
  block_t          data_in = '0, data_out;
  logic            ready;
  logic            crypt_go, crypt_encrypt, crypt_done;
  block_t          crypt_ptext, crypt_ctext;
  parray_wr_t      p_wr;
  sbox_wr_t        s_wr;
  pi_addr_t        pi_addr;
  word_t           pi_data;

  int checks = 0, failures = 0;
  int n_ignored_data = 0, n_ignored_key = 0, n_clamped = 0;

  bf_ctrl #(.KEY_WORDS(KW)) dut (
    .clk, .rst_n, .new_key, .key, .key_size, .new_data, .encrypt, .data_in, .data_out, .ready,
    .crypt_go, .crypt_encrypt, .crypt_ptext, .crypt_done, .crypt_ctext,
    .p_wr, .s_wr, .pi_addr, .pi_data
  );
  bf_pi_rom u_pi (.addr(pi_addr), .data(pi_data));

  always #5 clk = ~clk;

  // Behavioural encryption core on the reference package's tables.
  int     busy_cnt = 0;
  block_t pending;
  always @(posedge clk) begin
    crypt_done <= 1'b0;
    if (p_wr.we) bf_ref_pkg::P[p_wr.addr] = p_wr.data;
    for (int i = 0; i < 4; i++)
      if (s_wr.we[i]) bf_ref_pkg::S[i][s_wr.addr] = s_wr.data;
    if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) begin crypt_done <= 1'b1; crypt_ctext <= pending; end
      if (crypt_go) begin failures++; $display("FAIL go while model busy"); end
    end else if (crypt_go && rst_n) begin
      pending  <= crypt_encrypt ? bf_ref_pkg::enc(crypt_ptext) : bf_ref_pkg::dec(crypt_ptext);
      busy_cnt <= 18;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Run one key schedule; compare tables with the reference.
  task automatic schedule(logic [32*KW-1:0] k, logic [3:0] ks, int n_eff);
    bf_ref_pkg::word_t kw [18];
    word_t  P_hw [18];
    word_t  S_hw [4][256];
    int     cyc, mism;
    @(negedge clk);
    key = k; key_size = ks; new_key = 1;
    @(negedge clk);
    new_key = 0; key = ~k; key_size = 4'd1;   // latched, so changing them must not matter
    cyc = 1;
    while (!ready) begin
      // a data request while busy must be ignored
      if (cyc == 5000) begin
        new_data = 1;
        @(negedge clk); cyc++;
        new_data = 0;
        n_ignored_data++;
      end else if (cyc == 7000) begin
        new_key = 1;
        @(negedge clk); cyc++;
        new_key = 0;
        n_ignored_key++;
      end else begin
        @(negedge clk); cyc++;
      end
    end
    check($sformatf("key schedule length %0d want %0d", cyc - 1, KS_CYCLES), cyc - 1 == KS_CYCLES);
    P_hw = bf_ref_pkg::P;
    S_hw = bf_ref_pkg::S;
    for (int i = 0; i < 14; i++) kw[i] = k[32*KW-1 - 32*i -: 32];
    bf_ref_pkg::key_schedule(kw, n_eff);
    mism = 0;
    for (int i = 0; i < 18; i++) if (P_hw[i] !== bf_ref_pkg::P[i]) mism++;
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 256; i++) if (S_hw[s][i] !== bf_ref_pkg::S[s][i]) mism++;
    check($sformatf("tables after key schedule (size %0d): %0d words differ", ks, mism), mism == 0);
  endtask

  task automatic request(block_t din, logic e);
    block_t want;
    int     cyc;
    want = e ? bf_ref_pkg::enc(din) : bf_ref_pkg::dec(din);
    @(negedge clk);
    data_in = din; encrypt = e; new_data = 1;
    @(negedge clk);
    new_data = 0; data_in = '0;
    cyc = 1;
    check("ready drops while a block is in flight", !ready);
    while (!ready) begin @(negedge clk); cyc++; end
    check($sformatf("block latency %0d want 19", cyc - 1), cyc - 1 == 19);
    check($sformatf("data_out %h want %h", data_out, want), data_out === want);
  endtask

  initial begin
    logic [32*KW-1:0] k;
    bf_ref_pkg::load_pi();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("not ready before the first key", !ready);
    // a data request before any key is ignored
    new_data = 1; @(negedge clk); new_data = 0; @(negedge clk);
    check("no block started without a key", !ready && dut.state == dut.S_IDLE);

    k = '0; k[32*KW-1 -: 64] = 64'h0123456789ABCDEF;
    schedule(k, 4'd2, 2);
    request(64'h1111111111111111, 1'b1);
    check("KAT 0123456789ABCDEF", data_out === 64'h61F9C3802281B096);
    request(64'h61F9C3802281B096, 1'b0);

    for (int i = 0; i < KW; i++) k[32*i +: 32] = $urandom;
    schedule(k, 4'd14, 14);
    for (int i = 0; i < 20; i++) request({$urandom, $urandom}, 1'(i));

    schedule(k, 4'd5, 5);
    request(64'h0, 1'b1);

    schedule(k, 4'd0, 14);   // out-of-range size: all 14 words
    n_clamped++;
    schedule(k, 4'd15, 14);
    n_clamped++;
    request(64'hFFFF_FFFF_0000_0000, 1'b1);

    check("ignored data request seen", n_ignored_data > 0);
    check("ignored key request seen", n_ignored_key > 0);
    check("clamped key size seen", n_clamped > 0);
    $display("INFO ignored_data=%0d ignored_key=%0d clamped=%0d", n_ignored_data, n_ignored_key, n_clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
