# Blowfish crypto-processor with WDDL round logic

This is a hardware Blowfish engine. It encrypts and decrypts 64-bit blocks under a key of up to
448 bits. The XOR gates of its Feistel rounds are built in Wave Dynamic Differential Logic (WDDL),
a logic style meant to resist differential power analysis (DPA). In WDDL every signal travels as
a complementary pair of wires. Before each evaluation, all the wires are discharged to 0. As a
result, the number of rising wires in every evaluation is the same whatever the data is, so the
supply current tells an attacker less about the key.

The design follows the paper "Performance Analysis of Secure Integrated Circuits using Blowfish
Algorithm" (Global Journal of Computer Science and Technology, vol. 13, 2013). It implements the
configuration that paper favours, "Modified Blowfish with WDDL": the cipher uses a parallel
modulo adder and WDDL gates. The sections below say where this RTL follows the paper and where
the choices are its own.

## Using the processor

| port | width | meaning |
|---|---|---|
| `clk` | 1 | clock; everything is rising-edge triggered |
| `rst_n` | 1 | asynchronous reset, active low |
| `key` | 448 | key; a shorter key is padded with zeros. Byte 0 is `key[447:440]` |
| `key_load` | 1 | starts a key initialization; the key is captured in that cycle |
| `data_in` | 64 | plaintext (encrypt) or ciphertext (decrypt); read only when `start` is accepted |
| `encrypt` | 1 | 1 = encrypt, 0 = decrypt; sampled with `data_in` |
| `start` | 1 | starts one block; honoured only while `ready` = 1 |
| `data_out` | 64 | result; changes only during key initialization and in the cycle `ready` rises |
| `ready` | 1 | a key is loaded and no block is in flight |

After reset, no key is loaded and `ready` is 0. Pulse `key_load` to load a key; `ready` rises
18,758 clock edges later. After that, each `start` accepted while `ready` = 1 lowers `ready`.
`ready` rises again 34 edges after the edge that took `start`, and in that same cycle `data_out`
holds the result. A `start` while `ready` = 0 is ignored. `key_load` while `ready` = 1 replaces
the key. The P-array and S-boxes computed for a key stay in place, so any number of blocks can
follow one key initialization.

The block is split into halves L = `data_in[63:32]` and R = `data_in[31:0]`. This is the usual
big-endian Blowfish convention, so the standard test vectors apply directly. One example: with
the all-zero key, plaintext 0 encrypts to `4EF997456198DD78`.

## Key initialization

Blowfish keys the cipher with 1042 words of 32 bits:

- the P-array: 18 subkeys, P0 to P17;
- four S-boxes: 256 words each, S0 to S3.

The processor keeps these words in one address space, and every stage of key initialization
walks it in the same order: P0..P17, then S0[0..255], S1, S2, S3. Word index `w` means P`w` if
`w` < 18. Otherwise it means S-box `(w-18)/256`, entry `(w-18)%256`.

1. **Copy** (1042 cycles). `bf_init_rom` holds the fixed starting values: the fractional hex
   digits of pi, 32 bits at a time. They are copied one word per cycle into `subkey_unit`
   (the P-array) and into the four `sbox_ram`s.
2. **Key XOR** (1 cycle). The key is read as 14 words, K0 = `key[447:416]` to
   K13 = `key[31:0]`. Each P[i] becomes P[i] ^ K[i mod 14], so P14 to P17 reuse K0 to K3.
3. **Expansion** (521 blocks of 34 cycles). A block that starts at all zeros is encrypted with
   the tables as they are at that moment. The two result words overwrite the next two table
   words: first P0 and P1, then P2 and P3, and so on up to S3[254] and S3[255]. The result is
   also the plaintext of the next encryption. After a block finishes, its first word is written
   in the done cycle. Its second word is written in the next cycle, and the next encryption
   starts in that same cycle. No table word changes while a block is in the rounds; an
   assertion checks this.

`data_out` shows each intermediate block of step 3. This is why the port is described as
changing "during key initialization". When the last pair is written, `ready` rises.

## The round and its WDDL gates

`bf_cipher` runs a single `bf_round` sixteen times. One round computes

    xl = L ^ P[i]
    L' = R ^ F(xl)
    R' = xl
    F(x) = ((S0[x[31:24]] + S1[x[23:16]]) ^ S2[x[15:8]]) + S3[x[7:0]]    (mod 2^32)

Encryption uses P0 to P15 in the rounds. It then undoes the last swap and whitens the result:
`{R16 ^ P17, L16 ^ P16}`. Decryption is the same hardware with the subkeys taken in reverse
order: P17 down to P2 in the rounds, then `{R16 ^ P0, L16 ^ P1}`. So one datapath serves both
directions, and `encrypt` only sets the order of the subkey index.

**WDDL gates.** WDDL works on pairs of wires: a true rail t and a false rail f.

- In the evaluation phase, a pair holds (x, ~x).
- In the precharge phase, a pair holds (0, 0).

Every WDDL gate uses only positive gates (AND and OR), so all-zero inputs give all-zero outputs.
The precharge zeros therefore sweep through the logic like a wave.

- The WDDL AND is an AND on the true rails and an OR on the false rails (`wddl_and`).
- The WDDL OR is the dual (`wddl_or`).
- The WDDL XOR (`wddl_xor`) combines two WDDL ANDs and one WDDL OR: XOR = (a & ~b) | (~a & b).
  Inverting a signal only swaps its rails, so it costs no gate.
- `wddl_precharge` is the entry point. It turns a single-rail bit into a pair, and forces the
  pair to (0, 0) while `pre` = 1.
- `wddl_xor_word` builds a W-bit XOR from these pieces. It also computes `balanced`: the rails
  must be all zero in precharge and exact complements in evaluation. `bf_cipher` asserts
  `balanced` on every clock edge.

**What is WDDL here.** Each round has three XORs: the subkey XOR, the XOR inside F and the XOR
of F into R. All three are WDDL XORs. The two modulo adders, the S-box lookups and the final
whitening are ordinary single-rail logic. The paper says the design uses WDDL but not which
parts; this split is this design's choice.

**Precharge timing.** In the paper, the clock level is the phase: clock high is precharge and
clock low is evaluation. This design keeps a single rising-edge clock instead. A flop drives
`pre`, and each round takes two cycles:

- a precharge cycle (`pre` = 1, nothing stored);
- an evaluation cycle (`pre` = 0, L and R take the new halves).

While the cipher is idle, the WDDL region stays precharged. With these two cycles per round, a
block takes 16 × 2 + 1 cycles in `bf_cipher` and 34 from `start` to `ready` at the top. The
parameter `WDDL` (default 1) can be set to 0, which holds `pre` low and gives one cycle per
round. That option exists for comparison only.

**A limit of the WDDL gates.** This RTL gives the WDDL structure and checks it in simulation.
The DPA resistance, however, depends on the netlist keeping both rails and the positive gates.
A logic synthesizer will normally merge a gate pair whose outputs are complementary, or reduce
them. To build an actual WDDL circuit, keep the hierarchy of `wddl_and`, `wddl_or` and
`wddl_xor`, stop the tool from optimizing across them, and route the rails as balanced pairs.
This design does none of that.

## Modulo adder

`mod_adder` adds two residues modulo M using two adders that work in parallel:

- S1 = X + Y;
- S2 = X + Y + m, where m = 2^W − M.

If S2 carries out of W bits, then X + Y ≥ M, and the low bits of S2 are the reduced sum.
Otherwise S1 is already the reduced sum. So a single carry picks the result, with no
comparator after the additions. This is the paper's "modified" adder, and it is what "Modified
Blowfish" is read to mean. Blowfish only needs M = 2^32, where m = 0 and both adders agree. The
parameter M exists because the structure is general, and the testbench also exercises it at
M = 2^16 + 1 and M = 1000.

## Files

All files are in `rtl/`, one module or package per file.

| file | role |
|---|---|
| `blowfish_pkg.sv` | sizes (16 rounds, 18 subkeys, 4×256 S-boxes, 448-bit key), the types `word_t`, `block_t`, `key_t`, `parray_t`, the struct `sbox_wr_t` and the enum `dir_e` |
| `blowfish_processor.sv` | top: key-initialization / operation state machine, table write port, handshake |
| `bf_cipher.sv` | iterated encrypt/decrypt unit, round counter, precharge phase, whitening |
| `bf_round.sv` | one Feistel round, WDDL XORs |
| `feistel_f.sv` | round function F with the four S-boxes |
| `sbox_ram.sv` | 256×32 S-box, asynchronous read, synchronous write |
| `subkey_unit.sv` | P-array (18×32 flops), single-cycle key XOR |
| `bf_init_rom.sv`, `blowfish_init.hex` | the 1042 pi words |
| `mod_adder.sv` | parallel modulo adder |
| `wddl_precharge.sv`, `wddl_and.sv`, `wddl_or.sv`, `wddl_xor.sv`, `wddl_xor_word.sv` | WDDL gates |

`blowfish_init.hex` holds word n of the fractional part of pi in hexadecimal: digits 8n+1 to
8n+8 after the point, one word per line. `bf_init_rom` reads it with a path relative to the
directory the simulator runs in, `rtl/blowfish_init.hex`. So run simulations from the directory
that contains `rtl/`, or change that path.

Storage at the default sizes: 32,768 bits of S-box RAM, 576 flop bits of P-array, 448 bits of
captured key, and the cipher's 64-bit state and 64-bit output register.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/bf_model_pkg.sv` is a plain
software model of Blowfish, including the full key schedule. Several testbenches compare
against it.

- `tb_blowfish_processor` runs the top at its default parameters. It loads five keys and
  checks:
  - the published zero-key vector;
  - three vectors for random 56-byte keys, computed by an independent software
    implementation;
  - random blocks against the model.

  It also checks the cycle counts above and that `start` is ignored while busy. It watches
  `data_out` on every cycle, and counts each mechanism (key initialization, key reload,
  encryption, decryption, ignored start, precharge cycles, back-to-back blocks). The run takes
  about 95,000 cycles, well under a second.
- `tb_bf_cipher` runs a WDDL unit and a single-rail unit side by side with random tables. It
  checks results, encryption/decryption round trips, latency (33 and 17 cycles), and 16
  precharge cycles per block.
- The other testbenches check each piece exhaustively or with random inputs. One of them checks
  the pi table against the published P-array and S-box constants.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/blowfish_pkg.sv tb/bf_model_pkg.sv tb/tb_blowfish_processor.sv \
        --top-module tb_blowfish_processor -o sim
    ./obj_dir/sim

Replace the testbench name to run another one. The packages must come first on the command
line.

## Where this design departs from the paper or fills gaps

- **Timing.** The paper reports delays in nanoseconds for its FPGA netlists: 73.985 ns to
  encrypt and 76.337 ns in total for Modified Blowfish with WDDL, against 98.663 ns and
  99.395 ns for plain Blowfish. It gives no cycle counts, and no such figure is reproduced
  here. This design is iterative and uses 34 cycles per block. Nothing in it is tuned to match
  those delays.
- **Precharge.** The phase comes from a flop and takes a whole cycle, not half of the clock
  (see above).
- **Extent of WDDL.** Only the round XORs are WDDL.
- **Handshake.** The paper names `ready` and says when `data_in` is read and when `data_out`
  changes. `start`, `key_load`, `rst_n`, capturing the key and the reset state are this
  design's own.
- **Key schedule.** The paper describes the key XOR into the P-array and refers to generating
  the S-box contents from the key. The full standard Blowfish expansion is implemented, and
  standard vectors confirm it. Key words are big-endian, and the key is always 56 bytes (zero
  padding included). A short key padded with zeros therefore does not give the same subkeys as
  standard Blowfish with that short key, which repeats the short key instead.
- **Memories.** S-boxes read asynchronously, which suits LUT RAM or flops. With synchronous
  block RAM, F would need one more pipeline cycle per round.
- **Not built.** The three comparison implementations of the paper: unmodified Blowfish with
  and without WDDL, and modified Blowfish without WDDL. `WDDL = 0` comes close to the last one.
