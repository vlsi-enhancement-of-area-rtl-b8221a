# Area-lean iterative AES-128 with shared-key link and storage

This design encrypts a 128-bit block with AES-128, sends the ciphertext to a
decryption unit that holds the same (symmetric) key, recovers the plaintext and
stores it in a memory buffer. It keeps area small in three ways:

* **One round per clock.** There is one round datapath per unit, and a
  feedback register around it. Ten round datapaths unrolled would be ten times
  larger.
* **Table lookups.** Every nonlinear or GF(2^8) operation is a table lookup:
  S-Box ROMs, 256x8 "multiply by a constant" ROMs for MixColumns and 16x1 ROMs
  for the 4-input XORs. On an FPGA these map onto LUTs and block memory.
* **A counter as the only controller.** Each unit's control is a single 4-bit
  round counter. It steps the on-the-fly key generation and the round datapath
  together, so there is no separate controller.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It passes
`verilator --lint-only -Wall` and the slang front end of yosys.

## Block structure

```
                    securityenabled_NFT
  start ──► control_logic ──enc_start──► aesc1 : aes_cipher ──aes_encod──┐
                 ▲   │                       (key_gen, round_counter,     │
        enc_done ┘   └──dec_start──┐          ShiftRows wiring, sub_bytes,│
                                   ▼          mix_columns)                │
                         aesd1 : aes_decipher ◄───────────────────────────┘
                           (key_gen, round_counter, round_key_store,
                            inv_mix_columns, sub_bytes#(1), InvShiftRows wiring)
                                   │ aes_decod
                 mem_we ──────────►▼
                         mem1 : mem13_and  ──► mem (read port)
```

| Module | Role |
|---|---|
| `aes_pkg` | Shared types (`state_t`, `word_t`, `byte_t`), `NROUNDS`, the functions that compute the ROM tables when the design is elaborated, and `shift_rows()` |
| `aes_sbox` | 256x8 S-Box ROM, or the inverse S-Box with `INVERSE=1` |
| `sub_bytes` | 16 S-Box ROMs across the state |
| `gf_mul_rom` | 256x8 ROM giving `MULT * x` in GF(2^8) |
| `xor4_rom` | 16x1 ROM giving the XOR of 4 bits |
| `mix_columns` | MixColumns from x2/x3 ROMs and XOR ROMs |
| `inv_mix_columns` | InvMixColumns from x9/x11/x13/x14 ROMs and XOR ROMs |
| `rcon_rom` | Round constants, addressed by the round counter |
| `key_gen` | 128-bit key register; makes the next round key each enabled clock |
| `round_counter` | The 4-bit counter that controls a unit |
| `round_key_store` | 11 x 128-bit register file for decryption's reversed key order |
| `aes_cipher` | Encryption module |
| `aes_decipher` | Decryption module |
| `mem13_and` | Buffer for the recovered blocks |
| `control_logic` | Sequences encrypt, decrypt and store |
| `securityenabled_NFT` | Top level |

## State layout

The 128-bit state follows the byte order of the AES standard (FIPS-197):

* Byte 0 is bits `[127:120]`.
* Byte `i` sits in row `i % 4`, column `i / 4`.

So a test vector written as one hex string goes straight onto a port.

## The encryption loop (`aes_cipher`)

```
 data_reg ──► XOR(round key) ──► ShiftRows ──► S-Box ──► MixColumns ──┐
    ▲               │                              │                  ▼
    │               └──► cipher (after key 10)     └──────────────► MUX ──┐
    └──────────────────────────────────────────────────────────────────────┘
```

ShiftRows is pure wiring: the function `aes_pkg::shift_rows()` routes bytes
and adds no logic. It comes before SubBytes in this loop. The two operations commute, so
the result is standard AES. The register holds the state *before*
AddRoundKey, which is why the ciphertext is taken from the XOR output.

The 4-bit `round_counter` (`count`) controls everything:

| Edge after `start` | `count` before edge | Action |
|---|---|---|
| 0 (start edge) | – | `data_reg <= data`, key register `<= key`, `count <= 0` |
| 1 … 9 | 0 … 8 | `data_reg <= MixColumns(SubBytes(ShiftRows(data_reg ^ rk[count])))`, next round key |
| 10 | 9 | same, but the mux bypasses MixColumns (final round) |
| 11 | 10 (`last`) | `cipher <= data_reg ^ rk[10]`, `done` pulses |

* **Latency:** `done` comes 11 clock edges after the start edge.
* **Throughput:** one block per 12 cycles if `start` is raised again the
  cycle after `done`.
* `cipher` holds its value until the next result.
* A `start` while `busy` is ignored.

## Key generation (`key_gen`, `rcon_rom`)

The key register holds round key `i` as words `w0..w3`. Round key `i+1` is:

```
t   = SubWord(RotWord(w3)) ^ {rcon[i], 24'h0}
w0' = w0 ^ t;  w1' = w1 ^ w0';  w2' = w2 ^ w1';  w3' = w3 ^ w2'
```

* RotWord costs no logic: the bytes of `w3` are wired to the four S-Box ROMs
  in rotated order.
* `rcon` is read from a 16-entry ROM addressed by the same counter. Entry `i`
  is x^i: 01, 02, … 80, 1b, 36. Entries 10–15 are zero.
* `load` takes priority over `en`.

## Decryption and its reversed key order (`aes_decipher`)

The decryption unit uses the inverse of each function:

```
data_reg ─► XOR(stored key) ─► InvMixColumns ─► MUX ─► InvSubBytes ─► InvShiftRows ─► data_reg
```

Decryption needs round key 10 first, but `key_gen` can only step forward.
Decryption therefore has two phases of the same counter:

1. **KEYS** (11 edges): starting from the cipher key, `key_gen` steps
   forward. Round keys 0…10 are written into `round_key_store` at address
   `count`.
2. **DEC** (11 edges): in step `k` = 0…9:

   ```
   data_reg <= InvShiftRows(InvSubBytes(M(data_reg ^ rk[10-k])))
   ```

   Here `M` is the identity for `k = 0` (the mux bypasses InvMixColumns)
   and InvMixColumns afterwards. In step 10, `text <= data_reg ^ rk[0]`.

This order is the standard inverse cipher, with the XOR/InvMixColumns pair
placed at the start of each loop iteration. It is correct because
InvMixColumns is applied *after* the round key is added.

* **Latency:** `done` comes 22 edges after the start edge.
* A `start` while `busy` is ignored in either phase.

## MixColumns built from ROMs

For each column `a0..a3`:

```
MixColumns:     b_r = 2·a_r ⊕ 3·a_(r+1) ⊕   a_(r+2) ⊕   a_(r+3)
InvMixColumns:  b_r = 14·a_r ⊕ 11·a_(r+1) ⊕ 13·a_(r+2) ⊕ 9·a_(r+3)
```

Indices are taken mod 4.

* **Products:** every state byte drives one 256x8 ROM per coefficient that
  is not 1: two per byte for encryption, four per byte for decryption.
* **Sums:** bit `k` of `b_r` is the XOR of the four bit-`k` products, read
  from a 16x1 ROM whose contents are `16'h6996`.

This gives 32 multiplier ROMs and 128 XOR ROMs for encryption, and 64
multiplier ROMs and 128 XOR ROMs for decryption.

### Where the ROM contents come from

The tables are not typed in. Functions in `aes_pkg` compute them when the
design is elaborated, and each result is a 2048-bit constant:

* `sbox_table(inverse)` builds exp/log tables of the generator 3 and computes
  `inverse(x) = 3^(255 − log3 x)`, with `inverse(0) = 0`. It then applies the
  AES affine map `b ⊕ rotl(b,1..4) ⊕ 63`. For the inverse table it applies
  the inverse affine map `rotl(x,1) ⊕ rotl(x,3) ⊕ rotl(x,6) ⊕ 05` first.
* `gf_mul_table(c)` computes `c·x` by shift-and-add with reduction
  polynomial `x^8+x^4+x^3+x+1`.

Synthesis sees constant tables. An FPGA flow maps them onto LUTs or ROM.

## Top level: sequence and memory

`control_logic` has four states:

| State | What happens |
|---|---|
| IDLE | `start` → pulse `enc_start` |
| ENC | wait for `enc_done` → pulse `dec_start` |
| DEC | wait for `dec_done` → pulse `mem_we` |
| STORE | pulse `done` |

* **Latency:** `done` comes **38 clock edges** after the start edge.
* When `done` is seen, the recovered block is already in memory.
* Assertions in `control_logic` and the top check that a unit reports `done`
  only when it was launched, and that the two units never run together.

`mem13_and` is a buffer of `DEPTH` 128-bit words:

* A write stores the block at `wr_ptr`, which then advances.
* After the last word the pointer wraps to 0 and overwrites the oldest
  block. `wrapped` goes high at the first wrap.
* Reads are combinational at `raddr`.
* Reset clears the pointer, the wrap flag and the contents.

### Top-level ports (`securityenabled_NFT`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `start` | in | 1 | one-cycle pulse: run one encrypt → decrypt → store pass |
| `data_in` | in | 128 | plaintext block |
| `key` | in | 128 | shared key, used by both units |
| `mem_rd_addr` | in | log2(MEM_DEPTH) | memory read address |
| `aes_encod` | out | 128 | ciphertext, held |
| `aes_decod` | out | 128 | recovered text, held |
| `mem` | out | 128 | memory word at `mem_rd_addr` |
| `mem_wr_ptr` | out | log2(MEM_DEPTH) | next address to be written |
| `mem_wrapped` | out | 1 | buffer has wrapped |
| `busy` | out | 1 | a pass is running |
| `done` | out | 1 | one-cycle pulse: pass finished and block stored |

Parameter: `MEM_DEPTH` (default 16).

`data_in` and `key` must stay stable from `start` until `done`:

* the encryption unit loads them at its own start;
* the decryption unit reads `key` again when it starts.

## How far it can be trusted

Each module has a self-checking testbench in `tb/`. Expected values come from
two sources:

* published FIPS-197 vectors: Appendix A.1 key expansion, Appendix B round
  states and ciphertext, Appendix C.1;
* `tb/aes_ref_pkg.sv`, a behavioural AES model written independently of the
  RTL. Its S-Box comes from the p/q inverse walk, not exp/log tables, and it
  works on byte arrays.

The testbenches check:

| Scope | Checks |
|---|---|
| ROM tables | every entry |
| Combinational blocks | the published states plus hundreds of random states |
| `aes_cipher`, `aes_decipher` | 32 blocks each; exact latency (11 and 22 edges); `start` ignored while busy |
| Top (`tb_securityenabled_NFT`, default parameters) | 42 complete passes and 2 aborted by reset: ciphertext against the model, decrypted text equals plaintext, 38-edge latency, every memory word |

The top test also counts how often each mechanism occurs and fails if one
never does:

* MixColumns bypass in the final round;
* InvMixColumns bypass in the first decryption round;
* round-key storing;
* memory wrap-around;
* `start` ignored while busy;
* reset in the middle of a pass, followed by a clean pass.

Sample vector: `data_in = …0123`, `key = …0456` encrypts to
`e5748eb536880f418b70d061a969fbee` and decrypts back to `…0123`.

Not verified:

* timing closure;
* gate count and power on any technology.

## Design choices and departures

* **One key generator per unit.** The architecture treats key generation as
  a unit shared by encryption and decryption. Here each unit has its own
  `key_gen` and counter. This lets both units be instantiated separately and
  keep their own timing. It costs one extra key register and four extra
  S-Box ROMs.
* **Memory model.** The storage is meant as low-cost memory, such as DRAM.
  Here it is a plain register array of 16 words with a circular write
  pointer. Depth, wrap-around and read timing are this design's choices. No
  DRAM refresh or timing is modelled.
* **Only AES-128.** AES-192 and AES-256 keys are not supported: the key
  register and key schedule are 128 bits wide and the counter stops at
  10 rounds.
* **This design's own choices.** These are not given by the architecture:
  * handshake signals `start`, `busy`, `done`;
  * the ignore-start-while-busy rule;
  * synchronous active-high reset;
  * the exact cycle schedule;
  * the STORE state;
  * the memory read port.

## Simulating

Packages must come first on the command line. Everything else is found by
module name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_securityenabled_NFT.sv \
    --top-module tb_securityenabled_NFT -o sim
./obj_dir/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. The
end-to-end test runs in well under a second. To run another testbench, swap in
`tb_<module>.sv` and its top-module name.

Lint a single module:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/aes_pkg.sv rtl/<module>.sv
```

Suggested starting points for changes:

* **A larger buffer:** change `MEM_DEPTH`.
