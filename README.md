# Blowfish block cipher engine in SystemVerilog

Blowfish is a 64-bit block cipher. It takes a key of 32 to 448 bits. Almost all
of its strength comes from key-dependent tables: an 18-word subkey array (the
P-array) and four 256-word S-boxes, 4168 bytes in all. Computing those tables
from the key is expensive. Once they exist, each block goes through 16 Feistel
rounds built only from table lookups, 32-bit additions and XORs.

This RTL puts the whole algorithm in hardware. That covers the key schedule
(filling the tables from the digits of pi and the key) as well as encryption and
decryption. It is a compact design, not a pipelined one: one Feistel round per
clock, one read port per table, and one shared round-function circuit. The
round function's two 32-bit additions use a carry-select adder built from
4-bit ripple-carry cells. That adder is the design's one speed optimisation.

## The algorithm as built

A block is split into two 32-bit halves, XL (the upper 32 bits) and XR.

```
for i = 1..16:   XL = XL ^ P[i];   XR = F(XL) ^ XR;   swap(XL, XR)
swap(XL, XR);    XR = XR ^ P[17];  XL = XL ^ P[18]
F(x) = ((S0[x[31:24]] + S1[x[23:16]]) ^ S2[x[15:8]]) + S3[x[7:0]]    (mod 2^32)
```

Decryption is the same network with the subkeys in reverse order (P18 ... P3,
then P2 and P1).

The key schedule:

1. Load P1..P18, then S0[0..255], S1, S2 and S3, with the hex digits of the
   fraction of pi. P1 gets `243F6A88`.
2. XOR the key into P1..P18, one 32-bit key word per subkey. The key words
   repeat as often as needed to cover all 18.
3. Encrypt an all-zero block. Write the result over P1 and P2. Encrypt that
   result and write it over P3 and P4. Continue in the same order through
   every S-box entry. That takes 521 encryptions in all.

## Block structure

```
                 +------------------------- blowfish --------------------------+
 new_key, key,   |  bf_ctrl  ----- table writes ------+-----------+            |
 key_size  ----> |  (key schedule,                    v           v            |
 new_data,       |   host requests) <-- bf_pi_rom  bf_parray   bf_sbox x4      |
 encrypt,        |     |  go/ptext   ^ done/ctext      | P[i]     ^ addr | data|
 data_in         |     v             |                 v          |      v     |
 data_out,ready  |  bf_crypt ---- xl_to_f ------------------->  bf_f           |
      <--------- |  (Feistel rounds) <------------ fxl ---------  (2 x bf_add32)|
                 +--------------------------------------------------------------+
```

| module | role |
|---|---|
| `blowfish` | top; wires everything and muxes each table's single address port |
| `bf_ctrl` | key schedule and host handshake; the only writer of the tables |
| `bf_crypt` | Feistel core, one round per clock, encrypt or decrypt |
| `bf_f` | round function F: four lookups, add, xor, add |
| `bf_parray` | 18 x 32 register file, synchronous write, asynchronous read |
| `bf_sbox` | 256 x 32 memory, synchronous write, asynchronous read (x4) |
| `bf_pi_rom` | the 1042 initial pi words, read from `rtl/bf_pi_init.hex` |
| `bf_add32` | 32-bit carry-select adder: 7 x `bf_add8` + 8-bit muxes |
| `bf_add8` | 8-bit carry-select adder: 3 x `bf_rca4` + 4-bit and 1-bit mux |
| `bf_rca4` | 4-bit ripple-carry adder |
| `bf_mux` | 2:1 mux, width 1, 4 or 8 |
| `bf_pkg` | sizes, word/block types, table write-port structs |

### Who owns the tables

Each table has a single address port. Only `bf_ctrl` writes and only the core
reads, and never in the same cycle. So the top drives the port with the write
address whenever the write enable is high, and with the reader's address
otherwise. This holds because the controller writes only while the core is
idle. The one exception is the right half of a key-schedule result, which is
written in the same cycle the next block is started. That is safe because the
core's first table read comes one cycle later.

### The round datapath (`bf_crypt`, `bf_f`)

During a round, `bf_crypt` drives `parray_addr` with the current step. The
P-array returns the subkey in the same cycle, and `xl_to_f = XL ^ P` goes to
`bf_f`. Its four byte fields address the four S-boxes directly. The S-box
outputs pass through adder, XOR and adder, and `fxl` comes back to the core.
On the clock edge the core stores `XR' = fxl ^ XR` and swaps the halves.

The whole chain, from the P-array read to the second adder, is combinational
within one cycle. It is the critical path, which is why the adder matters.

There are 18 steps per block:

- 16 rounds.
- One step that undoes the last swap and applies P17.
- One step that applies P18.

The last two steps are separate because only one subkey can be read per cycle.

### The carry-select adder (`bf_add32`, `bf_add8`, `bf_rca4`)

The adder uses the same idea at two levels:

- **8 bits:** a 4-bit ripple-carry adder adds the low nibble with the real
  carry-in. Two more 4-bit ripple adders add the high nibble in parallel, one
  assuming a carry-in of 0 and one assuming 1. The low nibble's carry-out then
  picks the high sum (4-bit mux) and the carry-out (1-bit mux).
- **32 bits:** byte 0 is one 8-bit adder with a carry-in of 0. Bytes 1 to 3
  each have two 8-bit adders, for carry-in 0 and 1. An 8-bit mux picks the sum
  by the carry coming out of the byte below. That makes seven 8-bit adders and
  three 8-bit sum muxes. A 1-bit mux per byte forwards the selected carry.

All the ripple adders work at the same time. The delay is one 4-bit ripple plus
a chain of small muxes, instead of a 32-bit ripple. The original work reports
that this arrangement gives about 1.4x the speed of a plain carry-select adder,
at about 1.06x the area. Those figures were not measured for this RTL. A
synthesis tool given `a + b` may choose its own adder architecture, so the
explicit structure matters only where the netlist is kept as written.

## Host interface and timing (`blowfish`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `new_key` | in | 1 | one-cycle pulse while idle: latch `key`/`key_size`, start the key schedule |
| `key` | in | 448 | key; the first key byte is `key[447:440]`, key word j is `key[447-32j -: 32]` |
| `key_size` | in | 4 | key length in 32-bit words, 1..14; 0 or 15 means 14 |
| `new_data` | in | 1 | one-cycle pulse while `ready`: process `data_in` |
| `encrypt` | in | 1 | 1 = encrypt, 0 = decrypt (sampled with `new_data`) |
| `data_in` | in | 64 | block, `{XL, XR}` |
| `data_out` | out | 64 | last result; holds until the next result |
| `ready` | out | 1 | idle, and a key has been scheduled |

Cycle counts are in rising clock edges, counted from the edge that samples the
request:

- **Key schedule:** `ready` rises 11463 edges after `new_key`.
  - 1042 edges load the tables, one word per edge.
  - 1 edge starts the first block.
  - 521 blocks take 20 edges each.
- **One block:** `ready` rises 19 edges after `new_data`, with `data_out`
  valid. That is 18 edges in the core plus one to latch the result.
- **Throughput:** one block every 20 edges.
- **Ignored requests:** `new_key` and `new_data` are ignored while busy, and
  `new_data` is ignored before the first key. If both are raised in the same
  idle cycle, `new_key` wins.
- **Latching:** `key` and `key_size` are captured when `new_key` is taken, so
  the host does not need to hold them.

The key-length parameter `KEY_WORDS` (default 14, which is 448 bits) sizes the
`key` port and the `key_size` field. `KEY_WORDS = 18` accepts 72-byte keys,
which cover the whole P-array without repetition.

## The pi table

`rtl/bf_pi_init.hex` holds 1042 lines of 8 hex digits. Line k is the 32-bit
word `floor(frac(pi) * 2^(32(k+1))) mod 2^32`. In other words, the hex
expansion of pi after the point, cut into words, most significant first. Lines
0..17 initialise P1..P18. Lines 18 + 256s + i initialise entry i of S-box s.
The table is right if the known-answer vectors below pass.

`$readmemh` opens the file by the relative path `rtl/bf_pi_init.hex`, so run
simulations from the directory that holds `rtl/` and `tb/`.

## Choices this design makes

The cipher itself follows Blowfish exactly. The following are this design's own
choices:

- **Handshake and counts:** the host handshake (`new_key`/`new_data`/`ready`),
  how `key_size` is encoded, and every cycle count.
- **Table timing:** asynchronous reads from the P-array and S-boxes, which
  gives one round per clock. On an FPGA the S-boxes then map to distributed
  RAM or registers, not block RAM. A version for synchronous-read RAM would
  need a second cycle per round.
- **F has no clock:** the round function is combinational.
- **Key-word order:** key words are taken from the top of the `key` port
  downwards.
- **Decryption:** the core has an `encrypt` input, and the design reads it as
  running the same network with the subkeys reversed.
- **Adder carry muxes:** the carry between the bytes of the 32-bit adder is
  picked by three 1-bit muxes, which are not part of the seven-adder and
  three-mux count.
- **Reset:** the only reset is asynchronous and covers the control state. The
  table contents are not reset.

## Verification

Each module has a self-checking testbench in `tb/`. `tb/bf_ref_pkg.sv` is a
plain behavioural Blowfish: its own tables, `+` for the additions, and the
textbook key schedule. The testbenches compare against it and against
published known-answer vectors (for example, key `0123456789ABCDEF` with
plaintext `1111111111111111` gives `61F9C3802281B096`).

| testbench | what it checks |
|---|---|
| `tb_bf_rca4`, `tb_bf_add8` | exhaustive, against integer addition |
| `tb_bf_add32` | carry-chain corner cases plus 200k random pairs |
| `tb_bf_mux` | widths 1 and 8, both select values |
| `tb_bf_sbox`, `tb_bf_parray` | write, read-back, no write with `we` low, out-of-range P addresses |
| `tb_bf_f` | 20k random inputs on random tables, and the byte-to-box addressing |
| `tb_bf_crypt` | known-answer vectors, 200 random blocks both ways, 18-edge latency, back-to-back blocks |
| `tb_bf_ctrl` | every table word after a key schedule against the reference, schedule length, 19-edge block latency, ignored requests, `key_size` clamping |
| `tb_blowfish` | end to end, at default parameters |
| `tb_blowfish_key72` | the engine with `KEY_WORDS = 18`: 18- and 9-word keys, and a known-answer vector |

`tb_bf_ctrl` uses a behavioural stand-in for the core.

`tb_blowfish` runs these cases:

- Four known-answer keys.
- Every key length from 1 to 14 words, with random keys and blocks encrypted
  and decrypted.
- `key_size = 0`.
- Requests sent while busy.

It counts each mechanism and fails if any never occurred. It takes about a
second.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if the design hangs. To run one with Verilator, from the project root:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/bf_pkg.sv tb/bf_ref_pkg.sv tb/tb_blowfish.sv --top-module tb_blowfish
./obj_dir/Vtb_blowfish
```

Replace `tb_blowfish` with any other testbench name. Verilator's `-Wall` lint
reports two things that are intended and left in place:

- The carries dropped by the modulo-2^32 additions in `bf_f`.
- `rst_n` used both as an asynchronous reset and in the assertions'
  `disable iff`.

## Not covered

- **Timing and area:** the original work reports gate-level figures for its
  adder and system: about 57.7 MHz for the adder, against 28.5 MHz for ripple
  carry and 50.2 MHz for a plain carry-select adder, and about 51 MHz for the
  whole system. Those depend on the original technology and were not
  reproduced.
- **Gate-level netlist:** the design was verified at RTL only.
