// blowfish: a Blowfish block cipher engine with an on-chip key schedule.
//
// Blowfish encrypts 64-bit blocks with a 32- to 448-bit key. The key is
// first expanded into 18 subkeys (the P-array) and four 256-word S-boxes;
// afterwards each block passes through 16 Feistel rounds, one per clock here.
//
// Host interface (all synchronous to clk, rst_n asynchronous active low):
//   new_key   pulse while idle: latch key / key_size and run the key schedule
//             (ready rises again 11463 rising edges later)
//   key       the key, first key byte in bits [32*KEY_WORDS-1 -: 8]
//   key_size  key length in 32-bit words, 1..KEY_WORDS (14 = 448 bits)
//   new_data  pulse while ready: encrypt (encrypt = 1) or decrypt (0) data_in
//   data_out  result, valid when ready rises again 19 rising edges later
//   ready     idle with a scheduled key
//
// Inside: bf_ctrl runs the key schedule and the host requests, bf_crypt the
// Feistel rounds, bf_f the round function on four bf_sbox memories, bf_parray
// holds the subkeys and bf_pi_rom the initial pi words. The tables have one
// address port each; the controller's write address takes the port while it
// writes, the encryption core's read address otherwise (the two never overlap
// in time). The split into these pieces follows the design's description;
// the handshake and the cycle schedule are this design's choices.
module blowfish
  import bf_pkg::*;
#(
  parameter int unsigned KEY_WORDS = 14,
  localparam int unsigned KS_W = $clog2(KEY_WORDS + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    new_key,
  input  logic [32*KEY_WORDS-1:0] key,
  input  logic [KS_W-1:0]         key_size,
  input  logic                    new_data,
  input  logic                    encrypt,
  input  block_t                  data_in,
  output block_t                  data_out,
  output logic                    ready
);
  logic       crypt_go, crypt_encrypt, crypt_done;
  block_t     crypt_ptext, crypt_ctext;
  p_addr_t    crypt_paddr, p_addr;
  word_t      p_data, xl_to_f, fxl;
  parray_wr_t p_wr;
  sbox_wr_t   s_wr;
  pi_addr_t   pi_addr;
  word_t      pi_data;
  s_addr_t    f_saddr [NUM_SBOXES];
  word_t      s_data  [NUM_SBOXES];

  bf_ctrl #(.KEY_WORDS(KEY_WORDS)) u_ctrl (
    .clk, .rst_n,
    .new_key, .key, .key_size, .new_data, .encrypt, .data_in, .data_out, .ready,
    .crypt_go, .crypt_encrypt, .crypt_ptext, .crypt_done, .crypt_ctext,
    .p_wr, .s_wr, .pi_addr, .pi_data
  );

  bf_pi_rom u_pi (.addr(pi_addr), .data(pi_data));

  bf_crypt u_crypt (
    .clk, .rst_n,
    .go(crypt_go), .encrypt(crypt_encrypt), .ptext(crypt_ptext),
    .parray_addr(crypt_paddr), .parray_data(p_data),
    .xl_to_f, .fxl_from_f(fxl),
    .done(crypt_done), .ctext(crypt_ctext)
  );

  assign p_addr = p_wr.we ? p_wr.addr : crypt_paddr;

  bf_parray u_parray (
    .clk, .we(p_wr.we), .address(p_addr), .data_in(p_wr.data), .data_out(p_data)
  );

  bf_f u_f (
    .xl(xl_to_f),
    .sbox0_addr(f_saddr[0]), .sbox1_addr(f_saddr[1]),
    .sbox2_addr(f_saddr[2]), .sbox3_addr(f_saddr[3]),
    .sbox0_data(s_data[0]),  .sbox1_data(s_data[1]),
    .sbox2_data(s_data[2]),  .sbox3_data(s_data[3]),
    .fxl
  );

  for (genvar i = 0; i < NUM_SBOXES; i++) begin : g_sbox
    s_addr_t addr;
    assign addr = s_wr.we[i] ? s_wr.addr : f_saddr[i];
    bf_sbox u_sbox (
      .clk, .we(s_wr.we[i]), .address(addr), .data_in(s_wr.data), .data_out(s_data[i])
    );
  end
endmodule
