# Blowfish and TEA block ciphers in SystemVerilog

Two symmetric 64-bit block ciphers, each built as a small iterative core for FPGA or
ASIC use:

* **Blowfish**: a 16-round Feistel cipher with a 32- to 448-bit key. Its round
  function reads four key-dependent S-boxes of 256 x 32 bits. It also uses an 18-word
  subkey array (the P-array). Both are derived from the key by a costly key schedule
  that runs the cipher itself 521 times.
* **TEA** (Tiny Encryption Algorithm): a 128-bit key and a round built only from
  32-bit additions, shifts and XORs. There are no tables and no key schedule. Here it
  runs 16 rounds, two per clock.

The two cores are unrelated. The top level, `tea_blowfish_top`, places them side by
side. They share only the clock and the reset, and each keeps its own ports.

## Blowfish

### The round

A block is split into a left half L (bits 63:32) and a right half R (bits 31:0). Round
i (0..15) computes:

```
x  = L ^ P[i]
L' = R ^ F(x)
R' = x
F(x) = ((S0[x[31:24]] + S1[x[23:16]]) ^ S2[x[15:8]]) + S3[x[7:0]]     (mod 2^32)
```

After round 15 the last swap is undone and the two remaining subkeys are XORed in:
`out = {R ^ P[17], L ^ P[16]}`. Decryption is the same datapath with the P-array read
backwards: P[17] in the first round, and P[1] and P[0] at the end.

`blowfish_core` does one round per clock. It keeps L, R and a 4-bit round counter in
registers. The round subkey is picked combinationally from the P-array, which is held in
registers and visible in full (`blowfish_parray`). The four S-box reads are asynchronous,
so a round fits in one clock. The critical path runs from the L register through the
P XOR, an S-box read, two adders and an XOR, back to the registers. `blowfish_f` is the
adder/XOR tree.

### The tables and the key schedule

This is the part that takes the most time, and the part most worth understanding before
you change anything.

The P-array and the four S-boxes are treated as one linear table of 1042 words: P[0..17]
first, then S-box 0..3 with 256 words each. `blowfish_pkg::tbl_map()` turns a linear
index into "P word n" or "S-box s, entry e". The table starts from the fractional
hexadecimal digits of pi, 8 digits per word (0x243F6A88, 0x85A308D3, ...). These are
held in `blowfish_pi_rom`, which loads them from `rtl/blowfish_pi.hex` (1042 lines,
word i = bits 32i..32i+31 after the binary point of pi).

`blowfish_keysched` then works in two passes:

1. **INIT**, 1042 clocks. It copies the table from the ROM, one word per clock. Each of
   the 18 P words is XORed with the next four key bytes, taken big-endian. The key is
   reused from its first byte whenever it runs out, so a 5-byte key gives
   `k0 k1 k2 k3`, then `k4 k0 k1 k2`, and so on.
2. **EXPAND**, 521 encryptions. It starts from an all-zero block and encrypts it with
   the table as it stands at that moment. The left half goes to the next table word and
   the right half to the one after it. The result is then encrypted again. This repeats
   until all 1042 words, P first and then every S-box entry, have been replaced. Later
   encryptions therefore already use the S-box entries rewritten by earlier ones.

The key schedule has no round engine of its own. It borrows the one in `blowfish_core`,
always in encryption mode, and the cipher's ports are closed while it runs. Each
encryption costs 20 clocks: a start clock, 16 rounds, a done clock, and two clocks to
write the two halves through the single table write port.

### Ports and timing (`blowfish`)

| signal | meaning |
|---|---|
| `key_load_i`, `key_i[447:0]`, `key_len_i[5:0]` | start a key schedule. Key byte 0 is in bits 447:440. The length is in bytes, 4..56, and values outside that range are clamped. Accepted while `key_load_ready_o` is high. |
| `key_ready_o` | low from `key_load_i` until the tables are ready. The key schedule takes **11463 clocks** (1 + 1042 + 521 x 20). |
| `in_valid_i`, `in_ready_o`, `in_decrypt_i`, `in_block_i[63:0]` | valid/ready input of one block. `in_ready_o` is high only with a key ready and the round engine idle. A request must be held with stable data until it is taken; an assertion checks this. |
| `out_valid_o`, `out_block_o[63:0]` | one-clock strobe with the result. The block stays on `out_block_o` afterwards. |

A block taken in cycle 0 gives `out_valid_o` in cycle 17. The next block can be taken in
that same cycle, so the rate is one 64-bit block per 17 clocks. A new key can be loaded
at any time the round engine is idle; it replaces the old tables completely.

The S-box contents are not reset. Nothing reads them before the key schedule has
written every entry, because `in_ready_o` stays low until then.

## TEA

### The round

The block is split into y (bits 63:32) and z (bits 31:0), and the key into k0..k3 (k0 in
bits 127:96). With `sum` the round's multiple of delta = 0x9E3779B9, which is
(sqrt(5) - 1) * 2^31:

```
encrypt:  y += ((z << 4) + k0) ^ (z + sum) ^ ((z >> 5) + k1)
          z += ((y << 4) + k2) ^ (y + sum) ^ ((y >> 5) + k3)      (uses the new y)
decrypt:  z -= ((y << 4) + k2) ^ (y + sum) ^ ((y >> 5) + k3)
          y -= ((z << 4) + k0) ^ (z + sum) ^ ((z >> 5) + k1)
```

`tea_round` is one such full round, both halves, in combinational logic. `decrypt_i`
switches the two outer adders to subtractors and swaps the order of the halves. The
inner `+ sum` always adds.

### The core (`tea_core`)

`tea_core` chains `ROUNDS_PER_CYCLE` copies of `tea_round`, 2 by default, and iterates
them `ROUNDS / ROUNDS_PER_CYCLE` times, 16 / 2 = 8 by default. The running sum lives in a
register:

* For encryption it starts at 0, and copy r of the chain uses `sum + (r+1)*delta`.
* For decryption it starts at `ROUNDS * delta`, and copy r uses `sum - r*delta`.

After each clock the register moves on by `ROUNDS_PER_CYCLE * delta`.

Ports: `start_i` is taken while `busy_o` is low, together with `decrypt_i`, `key_i` and
`block_i`, which are all captured. `done_o` pulses with the result on `block_o`.
Latency is `1 + ROUNDS/ROUNDS_PER_CYCLE` clocks from start to done, which is **9 clocks**
at the defaults. The core is not pipelined, so the rate is one block per 9 clocks.

The number of rounds is a parameter. Classic TEA uses 32 rounds (64 Feistel half-rounds);
`ROUNDS = 32` gives that cipher bit for bit. The default of 16 is the round count this
design targets. More rounds per clock shorten the latency and lengthen the
combinational path in proportion.

## How the numbers compare with the reference implementation

The design was built to match a published hand-written FPGA implementation of both
ciphers on a Spartan-6 (-3 speed grade). That implementation reports these figures:

| | latency | clock | throughput |
|---|---|---|---|
| TEA, 16 rounds | 9 cycles | 296.76 MHz | 2116.4 Mbit/s (= 64 bits per 9 cycles) |
| Blowfish | 13568 cycles | 197.24 MHz | 75.73 Mbit/s |

How this design compares:

* **TEA** matches the 9-cycle latency: one load clock plus two rounds per clock.
* **Blowfish** does not reproduce the 13568-cycle figure. Here the key schedule takes
  11463 clocks and a block takes 17. No breakdown of the reference figure is available,
  and 75.73 Mbit/s at 197.24 MHz works out to about 167 clocks per block. Neither figure
  follows from a one-round-per-clock engine.

Nothing here has been synthesised for an FPGA, so clock rates and resource counts are
not known for this RTL.

## Choices made in this design

These points are not fixed by the algorithms and were decided here:

* one Blowfish round per clock, with asynchronous S-box reads and the P-array in
  registers;
* one table write port, written one word per clock, so 20 clocks per key-schedule
  encryption;
* Blowfish keys in whole bytes, 4..56;
* both TEA halves use the same sum. The two mixing functions differ only in their key
  words;
* the handshakes: valid/ready in and a strobe out for Blowfish, start/busy/done for
  TEA;
* asynchronous active-low reset of all control and data registers, with the S-box
  memories left unreset;
* bit orders: y or L in bits 63:32, key word or byte 0 in the most significant bits.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tea_round` | random rounds against a reference written from the equations; decrypting undoes encrypting |
| `tb_tea_core` | 16/2 and 32/4 configurations against a loop-per-round model; the 32-round all-zero vector `41EA3A0A 94BAA940`; decryption round trip; 9-clock latency; one block every 9 clocks when fed back to back |
| `tb_blowfish_f` | hand-worked carry cases and random words |
| `tb_blowfish_sbox`, `tb_blowfish_parray` | memory behaviour against a model, including read-during-write and reset |
| `tb_blowfish_pi_rom` | published Blowfish initial words at the table boundaries, plus an XOR and a sum over all 1042 words |
| `tb_blowfish_core` | random tables, against a software model of the Feistel network; decryption; 17-clock latency |
| `tb_blowfish_keysched` | every table write, for 5-byte and 56-byte keys, against a model, using a stand-in round engine; the encryption count |
| `tb_blowfish` | standard test vectors (all-zero key and block gives `4EF99745 6198DD78`; all-ones gives `51866FD5 B85ECB8A`; key `30000000 00000000` with block `10000000 00000001` gives `7D856F9A 613063F2`), plus 16- and 56-byte keys; decryption; 11463-clock key schedule; held requests |
| `tb_tea_blowfish_top` | end to end at the default sizes: two key schedules (a rekey), back-to-back Blowfish blocks that have to wait on `in_ready` and come out 17 clocks apart, both directions, and TEA running at the same time. It counts each of these events and fails if one never happened. |

To run one with Verilator, from the repository root (the ROM reads
`rtl/blowfish_pi.hex` by that relative path):

```
verilator --binary --timing --assert -Irtl --top-module tb_tea_blowfish_top \
    rtl/blowfish_pkg.sv rtl/tea_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/tb_tea_blowfish_top.sv
./obj_dir/Vtb_tea_blowfish_top
```

Swap in another `tb/*.sv` and its module name to run the other testbenches. The full
end-to-end test runs in a few seconds, most of that being the build.

## Files

| file | contents |
|---|---|
| `rtl/blowfish_pkg.sv`, `rtl/tea_pkg.sv` | constants, types, table address map |
| `rtl/blowfish.sv` | Blowfish cipher: tables, key schedule, round engine |
| `rtl/blowfish_core.sv`, `rtl/blowfish_f.sv` | round engine and F function |
| `rtl/blowfish_parray.sv`, `rtl/blowfish_sbox.sv`, `rtl/blowfish_pi_rom.sv`, `rtl/blowfish_pi.hex` | subkey registers, S-box memory, initial-value ROM |
| `rtl/blowfish_keysched.sv` | key schedule controller |
| `rtl/tea_core.sv`, `rtl/tea_round.sv` | TEA core and round |
| `rtl/tea_blowfish_top.sv` | both ciphers side by side |
