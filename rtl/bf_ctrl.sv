// bf_ctrl: key schedule and request control of the Blowfish core.
//
// new_key (while idle) latches key and key_size and runs the key schedule:
//   1. INIT, one word per cycle for 1042 cycles: P[i] = pi[i] ^ K[i mod n]
//      for the 18 subkeys, then every S-box entry = its pi word. K[j] is the
//      j-th 32-bit word of the key, the first key word being the top 32 bits
//      of the key port, and n = key_size words (1..KEY_WORDS, so 32 to 448
//      bits by default).
//   2. EXPAND: starting from an all-zero block, encrypt 521 times, each time
//      with the previous result, and write each result's two halves over the
//      next two table words, in the same order the pi words were placed
//      (P1,P2, then P3,P4, ..., then S-box 0 entries 0,1, ...).
// new_data (while idle and a key has been scheduled) sends data_in to the
// encryption core, encrypting or decrypting as encrypt says, and data_out
// takes the result.
//
// Timing, counted in rising clock edges after the edge that takes the
// request: ready rises 1042 + 1 + 521 * 20 = 11463 edges after new_key (one
// word per edge for INIT, one edge to start the first block, then 20 edges
// per block: 18 in the core, one to write the left half and one to write the
// right half while the next block starts), and 19 edges after new_data (18 in
// the core, one to latch data_out). ready is high only while idle with a valid
// key. new_key is taken whenever the controller is idle, even before the
// first key, and wins over new_data; both are ignored while busy. A key_size
// of 0 or above KEY_WORDS is treated as KEY_WORDS.
//
// The controller owns all table writes (P-array port and S-box port); the
// encryption core only reads. The algorithm is Blowfish's; the handshake,
// key-word order and cycle schedule are this design's choices.
module bf_ctrl
  import bf_pkg::*;
#(
  parameter int unsigned KEY_WORDS = 14,
  localparam int unsigned KS_W = $clog2(KEY_WORDS + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host side
  input  logic                    new_key,
  input  logic [32*KEY_WORDS-1:0] key,
  input  logic [KS_W-1:0]         key_size,
  input  logic                    new_data,
  input  logic                    encrypt,
  input  block_t                  data_in,
  output block_t                  data_out,
  output logic                    ready,
  // encryption core
  output logic                    crypt_go,
  output logic                    crypt_encrypt,
  output block_t                  crypt_ptext,
  input  logic                    crypt_done,
  input  block_t                  crypt_ctext,
  // table writes
  output parray_wr_t              p_wr,
  output sbox_wr_t                s_wr,
  // pi table
  output pi_addr_t                pi_addr,
  input  word_t                   pi_data
);
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_EXP_GO, S_EXP_WAIT, S_EXP_WR1, S_DATA} state_t;

  state_t                  state;
  logic [32*KEY_WORDS-1:0] key_q;
  logic [KS_W-1:0]         nwords;     // key length in words, 1..KEY_WORDS
  logic [KS_W-1:0]         kidx;       // key word used for the current subkey
  pi_addr_t                widx;       // table word being written
  block_t                  lr;         // last key-schedule ciphertext
  logic                    key_valid;

  logic                    wr_en;
  word_t                   wr_data;
  word_t                   key_word;
  logic                    take_key, take_data;
  logic [PI_ADDR_W-2:0]    sidx;       // word index within the S-box bank

  assign take_key  = (state == S_IDLE) && new_key;
  assign take_data = (state == S_IDLE) && !new_key && new_data && key_valid;
  assign ready     = (state == S_IDLE) && key_valid;

  assign key_word  = key_q[32*KEY_WORDS-1 - 32*kidx -: 32];
  assign pi_addr   = widx;

  // Encryption core requests: a data block, or the next key-schedule block.
  always_comb begin
    crypt_go      = take_data || (state == S_EXP_GO) ||
                    (state == S_EXP_WR1 && widx != pi_addr_t'(PI_WORDS - 1));
    crypt_encrypt = (state == S_IDLE) ? encrypt : 1'b1;
    crypt_ptext   = (state == S_IDLE) ? data_in : lr;
  end

  // The word written this cycle, and where it goes.
  always_comb begin
    wr_en   = 1'b0;
    wr_data = '0;
    unique case (state)
      S_INIT:     begin wr_en = 1'b1; wr_data = (widx < pi_addr_t'(P_ENTRIES)) ? pi_data ^ key_word : pi_data; end
      S_EXP_WAIT: begin wr_en = crypt_done; wr_data = crypt_ctext[63:32]; end
      S_EXP_WR1:  begin wr_en = 1'b1; wr_data = lr[31:0]; end
      default: ;
    endcase
    sidx      = (PI_ADDR_W-1)'(widx - pi_addr_t'(P_ENTRIES));
    p_wr.we   = wr_en && (widx < pi_addr_t'(P_ENTRIES));
    p_wr.addr = widx[P_ADDR_W-1:0];
    p_wr.data = wr_data;
    s_wr.we   = '0;
    if (wr_en && widx >= pi_addr_t'(P_ENTRIES))
      s_wr.we[sidx[PI_ADDR_W-2 -: 2]] = 1'b1;
    s_wr.addr = sidx[S_ADDR_W-1:0];
    s_wr.data = wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      key_q     <= '0;
      nwords    <= KS_W'(KEY_WORDS);
      kidx      <= '0;
      widx      <= '0;
      lr        <= '0;
      key_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (take_key) begin
            key_q     <= key;
            nwords    <= (key_size == '0 || key_size > KS_W'(KEY_WORDS)) ? KS_W'(KEY_WORDS) : key_size;
            kidx      <= '0;
            widx      <= '0;
            lr        <= '0;
            key_valid <= 1'b0;
            state     <= S_INIT;
          end else if (take_data) begin
            state <= S_DATA;
          end
        end
        S_INIT: begin
          if (kidx == nwords - 1'b1) kidx <= '0;
          else                       kidx <= kidx + 1'b1;
          if (widx == pi_addr_t'(PI_WORDS - 1)) begin
            widx  <= '0;
            state <= S_EXP_GO;
          end else begin
            widx <= widx + 1'b1;
          end
        end
        S_EXP_GO: state <= S_EXP_WAIT;
        S_EXP_WAIT: begin
          if (crypt_done) begin
            lr    <= crypt_ctext;
            widx  <= widx + 1'b1;
            state <= S_EXP_WR1;
          end
        end
        S_EXP_WR1: begin
          if (widx == pi_addr_t'(PI_WORDS - 1)) begin
            widx      <= '0;
            key_valid <= 1'b1;
            state     <= S_IDLE;
          end else begin
            widx  <= widx + 1'b1;
            state <= S_EXP_WAIT;   // the next block was started this cycle
          end
        end
        S_DATA: begin
          if (crypt_done) begin
            data_out <= crypt_ctext;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The key schedule never writes past the last table word.
  a_widx_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> widx < pi_addr_t'(PI_WORDS))
    else $error("bf_ctrl: table write out of range");
endmodule
