// bf_crypt: the Blowfish encryption core, a 16-round Feistel network run one
// round per clock cycle.
//
// A pulse on go (while idle) loads ptext as {XL, XR} and samples encrypt.
// Each of the next 16 cycles reads one subkey from the P-array
// (parray_addr -> parray_data), forms xl_to_f = XL ^ P, sends it to the F
// function, and updates XR' = F(xl_to_f) ^ XR, then swaps the halves. Two
// more cycles undo the last swap and whiten: XR ^= P17, then XL ^= P18. For
// decryption (encrypt low) the same network is run with the subkeys in
// reverse order (P18 .. P3, then P2 and P1). done is high for one cycle,
// exactly 18 cycles after the cycle in which go was taken, and ctext holds the
// result {XL, XR} from then until the next go. A go in the done cycle starts
// the next block at once.
//
// The port list follows the encryption-core block diagram (ptext,
// parray_data, fxl_from_f, clk, encrypt, go in; parray_addr, xl_to_f, done,
// ctext out); rst_n (asynchronous, active low) and the one-round-per-cycle
// schedule are this design's choices.
module bf_crypt
  import bf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    go,
  input  logic    encrypt,
  input  block_t  ptext,
  output p_addr_t parray_addr,
  input  word_t   parray_data,
  output word_t   xl_to_f,
  input  word_t   fxl_from_f,
  output logic    done,
  output block_t  ctext
);
  typedef enum logic {IDLE, RUN} state_t;

  state_t  state;
  word_t   xl, xr;
  p_addr_t step;      // 0..15 rounds, 16 = XR ^= P17, 17 = XL ^= P18
  logic    enc;

  // Subkey for this step: P[step] for encryption, P[17 - step] for decryption.
  assign parray_addr = enc ? step : p_addr_t'(P_ENTRIES - 1) - step;
  assign xl_to_f     = xl ^ parray_data;
  assign ctext       = {xl, xr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      xl    <= '0;
      xr    <= '0;
      step  <= '0;
      enc   <= 1'b1;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (go) begin
            {xl, xr} <= ptext;
            enc      <= encrypt;
            step     <= '0;
            state    <= RUN;
          end
        end
        RUN: begin
          if (step < p_addr_t'(NUM_ROUNDS)) begin
            // Round with the swap folded in.
            xl <= fxl_from_f ^ xr;
            xr <= xl_to_f;
          end else if (step == p_addr_t'(NUM_ROUNDS)) begin
            // Undo the last swap, XR ^= P17 (P2 when decrypting).
            xl <= xr;
            xr <= xl_to_f;
          end else begin
            // XL ^= P18 (P1 when decrypting).
            xl <= xl_to_f;
          end
          if (step == p_addr_t'(P_ENTRIES - 1)) begin
            done  <= 1'b1;
            state <= IDLE;
          end
          step <= step + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A start request while a block is in flight is a protocol error.
  a_no_go_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (state == RUN) |-> !go)
    else $error("bf_crypt: go asserted while busy");
endmodule
