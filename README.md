# Streaming AES kernel for an FPGA accelerator (ECB, CTR, XTS)

This RTL is an AES accelerator kernel that encrypts or decrypts a buffer in
the accelerator's global memory (DDR) at one 128-bit block per clock. It
follows the final AES design of the study "Evaluating OpenCL Programming
Practices for FPGAs: a case study on symmetric block ciphers". That study
wrote the kernel in OpenCL and had a high-level-synthesis compiler turn it
into hardware. Its best kernel had four properties:

* One "single work item": one loop walks through all the blocks, so there is
  no data-parallel replication.
* The AES round loop is unrolled completely, so a new block can start every
  clock. Initiation interval (II) 1 means one loop iteration starts per clock.
* The expanded key is copied from global memory into flip-flops once, at the
  start of every run.
* It uses the "small" AES style: S-box lookups instead of T-tables.

The host CPU runs the key schedule. It double-buffers the transfers: it
refills one set of buffers while the kernel works on the other set.

This RTL builds that hardware directly, without going through OpenCL: a run
controller, two fully unrolled AES pipelines, a round-key register file and
an XTS tweak generator. It supports AES-128, -192 and -256, and five
operations: ECB encrypt, ECB decrypt, CTR, XTS encrypt and XTS decrypt.
XTS includes ciphertext stealing, for messages whose last block is only
1 to 127 bits long.

## A run of the kernel

The host writes these things into global memory:

* the round keys;
* the input buffer;
* for XTS, the round keys of the second key.

It then sets the run arguments on `aes_kernel` and pulses `start`. The
arguments are `mode`, `num_rounds`, `n_blocks`, `tail_bits`, the buffer and
key addresses, and `iv`.

The kernel works through these steps:

1. **Key copy.** It reads `num_rounds + 1` round keys from `key1_base`, one
   128-bit word per round key. For XTS it also reads the same number from
   `key2_base`. The words go into `round_key_regs`. Every pipeline stage has
   its own wires to these registers, so there are no memory reads in the
   datapath.
2. **Tweak seed (XTS only).** It sends the sector number `iv` once through
   the forward pipeline with key 2. The result, E_key2(i), is loaded into
   `xts_tweak_gen`.
3. **Streaming.** Input words are read from `in_base + j` and go through the
   cipher pipeline. Each result goes to `out_base + j`. Reads start during
   the key copy, so the memory latency is paid only once.
4. **`done`.** It pulses for one clock after the last write. `busy` is high
   for the whole run.

What each mode computes, with M_j the input word and O_j the output word:

| mode           | output                                           | pipeline |
|----------------|--------------------------------------------------|----------|
| `MODE_ECB_ENC` | O_j = E_k1(M_j)                                  | forward  |
| `MODE_ECB_DEC` | O_j = D_k1(M_j)                                  | inverse  |
| `MODE_CTR`     | O_j = E_k1(IV + j) xor M_j                       | forward  |
| `MODE_XTS_ENC` | O_j = E_k1(M_j xor T_j) xor T_j                  | forward  |
| `MODE_XTS_DEC` | O_j = D_k1(M_j xor T_j) xor T_j                  | inverse  |

Here T_j = E_k2(i) · α^j in GF(2^128), with the field polynomial
x^128 + x^7 + x^2 + 1. CTR is its own inverse, so it serves for both
directions.

## The cipher pipelines (`aes_enc_pipe`, `aes_dec_pipe`)

Each pipeline has 15 register stages:

* Stage 0 adds the first round key.
* Stages 1 to 14 each hold one AES round.

The round count is a run-time value, as it was in the study: the
three-copies-with-constant-rounds variant was slower and was dropped. Each
block therefore carries its round count down the pipeline.

In the forward pipeline, stage r does one of three things:

* a full round (SubBytes, ShiftRows, MixColumns, AddRoundKey) while r < Nr;
* the final round, without MixColumns, at r = Nr;
* nothing but a register copy when r > Nr.

The inverse pipeline puts its idle stages first instead. Its stage k uses
round key 14 − k whatever Nr is, so every stage reads one fixed key
register. In both pipelines the latency is 15 clocks for every key length.

Besides its round count, each block carries:

* a key-set select: key 1 for data, key 2 for the tweak seed;
* a side-band word: the message word in CTR, the tweak in XTS, plus a tag
  that says what to do with the result.

The final XOR is applied at the exit using that side-band word. `en` stalls
the whole pipeline at once. It goes low only when a result is waiting for
`wr_ready`.

## The S-box and byte order (`aes_pkg`)

Nothing in the design is a pasted table. The S-box is computed at
elaboration: the inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, then the AES
affine map (xor with rotations by 1–4, then xor with 0x63). The inverse
S-box is made by inverting that table. Synthesis turns each lookup into a
256×8 ROM: 16 per round, so 448 ROMs across both pipelines.

Byte conventions:

* A block is `logic [127:0]`, and bits 127:120 are its first byte in memory.
* The AES state is filled column by column.
* Round key r is words 4r..4r+3 of the expanded key, with word 4r in bits
  127:96.
* The CTR counter is the whole block read as a big-endian integer, and it
  wraps modulo 2^128.
* The XTS tweak is read as a little-endian number, as in IEEE 1619.
  Multiplying by α is a one-bit left shift, with 0x87 folded back into the
  low byte.

## XTS ciphertext stealing

This is the least obvious part of the kernel.

When `tail_bits` is not 0 in an XTS mode, the buffer holds `n_blocks` full
blocks and then one partial block, m = `n_blocks`. The partial block's
`tail_bits` bits sit at the top of its 128-bit word, and the rest of the word
is ignored.

Let m−1 be the last full block:

1. Blocks 0 … m−2 stream through as usual.
2. Block m−1 also goes through the pipeline, but its tag is *capture*. Its
   result X is stored in a register and not written to memory.
3. The partial block cannot enter the pipeline until X comes out. It is then
   completed with X's trailing 128 − `tail_bits` bits. This hybrid block goes
   through the pipeline and is written to index m−1.
4. The first `tail_bits` bits of X are written to index m, with the rest of
   that word set to zero.

The two directions differ only in which tweak each of the last two blocks
uses:

* Encryption uses T_{m−1} for block m−1 and T_m for the hybrid block.
* Decryption swaps them: T_m for block m−1, and T_{m−1} for the hybrid.

`xts_tweak_gen` shows T_j and T_{j+1} at the same time. The kernel keeps
T_{m−1} in `t_save` until the hybrid block is sent.

Waiting for X empties the pipeline once, so a run with a partial block costs
about 15 clocks more.

## Memory interface and timing

The memory interface has three valid/ready channels:

* read requests (`rd_req_*`);
* in-order read responses (`rd_rsp_*`);
* writes (`wr_*`).

Data is in 128-bit words, and all addresses are word addresses. The kernel
keeps requesting until every key and data word has been asked for. It takes
responses at one per clock whenever the pipeline can move.

When memory returns one word per clock, a run of n blocks takes about
n + (Nr+1) + memory latency + 15 clocks. XTS adds about 16 clocks for the
tweak seed, and stealing adds about 16 more. A 200-block ECB run with a
1-clock memory takes 229 clocks. A 4 MB run with a 240-clock memory takes
262,412 clocks for 262,144 blocks. At the 254.84 MHz that the study
reported for its final AES kernel, this is about 4.07 GB/s. The study's own
measurements were limited to about 1.5 GB/s by the PCI-E link to the host,
which is outside this RTL.

Size after generic synthesis of `aes_kernel`: about 10,600 flip-flops and
448 S-box ROMs of 2 kbit each. The numbers are dominated by the two
15-stage pipelines (the inverse one is about 2.7 times larger in logic
because of InvMixColumns) and by 2 × 15 round-key registers.

## Where this RTL departs from the study, and what is not here

* **One kernel for all five operations.** The study split the five
  operations over three OpenCL programs to keep its compile times
  manageable. Here a `mode` input selects the operation in one kernel.
* **Memory port.** The study's board has a 512-bit DDR4 port with a latency
  of 240 clocks, behind the vendor's load/store units. Here the port is one
  128-bit word wide, with plain valid/ready handshakes.
* **Own choices.** The study leaves these open, and this RTL picks them:
  - the argument list;
  - the pipeline's stage layout;
  - CTR byte order (big-endian);
  - XTS byte order (little-endian), and bit-granular stealing with a
    zero-filled last word;
  - asynchronous active-low reset.
* **Not built:**
  - the host program with double buffering, and the key schedule;
  - the DDR memory and the PCI-E link;
  - the study's rejected alternatives: the T-table AES variants, the
    channel-based dispatcher/worker/collector design, and the multi-worker
    replicas;
  - the eight other ciphers the study benchmarked (DES, Camellia, CAST5,
    CLEFIA, HIGHT, MISTY1, PRESENT, SEED). Their round functions, S-boxes and
    key schedules come from their own standards, which this design does not
    reproduce.

## Verification

Each testbench checks itself and prints one `TB_RESULT checks=… failures=…`
line. They compare against `tb/aes_ref_pkg.sv`, a separate AES model. That
model builds its S-box by a different method (walking powers of the
generator 3) and works on byte arrays. It also contains the host's key
expansion and byte-level CTR and XTS models. The published answers below
check the model itself as well as the RTL.

| testbench | what it shows |
|-----------|---------------|
| `tb_aes_enc_pipe`, `tb_aes_dec_pipe` | FIPS-197 answers for all three key lengths; random blocks with random key sets and random stalls; latency exactly 15 enabled clocks; one block per clock |
| `tb_round_key_regs` | reset, addressed writes, ignored out-of-range writes |
| `tb_xts_tweak_gen` | multiplication by α against a byte-wise model and two hand-worked values; load priority |
| `tb_aes_kernel` | end to end with default parameters: FIPS-197 through the kernel; IEEE 1619 XTS-AES-128 vector 1; every mode × key length with random lengths and partial blocks; memory latency 1 to 240; random hold-offs on all three channels; an XTS round trip; host-side double buffering with the host writing the other buffer set during a run; a timing bound. It counts stalls, read hold-offs, tweak seeds, stealing on encrypt and on decrypt, key-2 loads and buffer switches, and fails if any count is zero. |
| `tb_aes_kernel_payload` | the study's benchmark case at default parameters: one 4 MB AES-128 ECB encryption through a 240-clock memory. Every block is checked, and the run must stay within n + 274 clocks. |

The benchmark swept payloads from 4 MB up to about 120 MB. Only the 4 MB
point is simulated. Larger payloads exercise nothing more, because the kernel
keeps no per-payload state beyond its 32-bit counters.

To run one testbench with plain Verilator (`gmem_model` is the memory model
that the kernel testbenches use):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/gmem_model.sv \
  tb/tb_aes_kernel.sv --top-module tb_aes_kernel -Mdir obj
./obj/Vtb_aes_kernel
```

For a block testbench, list `rtl/aes_pkg.sv`, `tb/aes_ref_pkg.sv`, the
block's file and its testbench. `verilator --lint-only -Wall` with
`rtl/aes_pkg.sv` and a module's file lints that module.

## Files

* `rtl/aes_pkg.sv`: block type, mode and tag enums, S-box generation, round
  functions, GF(2^128) multiplication by α.
* `rtl/aes_enc_pipe.sv`, `rtl/aes_dec_pipe.sv`: forward and inverse
  pipelines.
* `rtl/round_key_regs.sv`: round-key register file.
* `rtl/xts_tweak_gen.sv`: running XTS tweak.
* `rtl/aes_kernel.sv`: top level, made of the run controller, the memory
  handshakes, mode handling and ciphertext stealing.
* `tb/aes_ref_pkg.sv`: reference model.
* `tb/gmem_model.sv`: global memory model.
* `tb/tb_*.sv`: the testbenches.
