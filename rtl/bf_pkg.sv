// bf_pkg: sizes and types shared by the Blowfish core.
//
// Blowfish works on 64-bit blocks split into two 32-bit halves, runs a 16-round
// Feistel network, and keeps its key-dependent state in an 18-entry P-array and
// four 256-entry S-boxes of 32-bit words (18 + 1024 = 1042 words, 4168 bytes).
// Those numbers are the algorithm's own. The layout of the combined
// "pi word index" (0..17 for P, then S-box 0..3, 256 words each) is the order
// in which the key schedule fills the tables.
package bf_pkg;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned BLOCK_W     = 64;
  localparam int unsigned NUM_ROUNDS  = 16;
  localparam int unsigned P_ENTRIES   = 18;
  localparam int unsigned NUM_SBOXES  = 4;
  localparam int unsigned S_ENTRIES   = 256;
  localparam int unsigned PI_WORDS    = P_ENTRIES + NUM_SBOXES * S_ENTRIES;  // 1042
  localparam int unsigned P_ADDR_W    = 5;
  localparam int unsigned S_ADDR_W    = 8;
  localparam int unsigned PI_ADDR_W   = 11;

  typedef logic [WORD_W-1:0]    word_t;
  typedef logic [BLOCK_W-1:0]   block_t;
  typedef logic [P_ADDR_W-1:0]  p_addr_t;
  typedef logic [S_ADDR_W-1:0]  s_addr_t;
  typedef logic [PI_ADDR_W-1:0] pi_addr_t;

  // One write port into the S-box bank: which box, which entry, what word.
  typedef struct packed {
    logic [NUM_SBOXES-1:0] we;
    s_addr_t               addr;
    word_t                 data;
  } sbox_wr_t;

  // One write port into the P-array.
  typedef struct packed {
    logic    we;
    p_addr_t addr;
    word_t   data;
  } parray_wr_t;
endpackage
