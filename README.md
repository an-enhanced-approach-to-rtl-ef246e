# 128-bit Blowfish with ROM S-boxes

This is a Blowfish cipher engine for a 128-bit data path, made for small FPGA
footprints. It has three main ideas:

* **Two 64-bit Blowfish cores run side by side.** A 128-bit block is cut into
  two standard 64-bit Blowfish blocks, and each half gets its own core. Both
  cores run in lockstep under the same key and mode.
* **The S-boxes are read-only memories.** The four 256 x 32-bit Blowfish
  S-boxes sit in synchronous ROM banks of 512 words, each bank holding two
  S-boxes. Both cores share the one set of banks.
* **One Feistel round per clock.** A 128-bit block takes 19 clocks from the
  edge that samples `start` to the edge that raises `done`, so one engine
  delivers 128 bits every 19 clocks.

The top level, `blowfish_loopback`, is the arrangement the engine is evaluated
in. An encrypting engine feeds a decrypting engine under the same key. The
ciphertext is brought out, and the output of the second engine must equal the
plaintext.

```
blowfish_loopback
  start, key, data_in
        │
        ▼
  ┌─ blowfish128, mode = encrypt ────────────────────────────┐
  │  blowfish_divider ──[63:0]───► blowfish_core (lo) ──┐     │
  │   (input regs)    ──[127:64]─► blowfish_core (hi) ──┤     │
  │                        ▲  ▲                         ▼     │
  │                   sbox_shared               output register│
  │                (2 x sbox_rom512)             {hi, lo}      │
  └───────────────────────────────────────────────────┬──────┘
                                                      │ cipher_out, cipher_valid
                                                      ▼
  ┌─ blowfish128, mode = decrypt (same structure) ───────────┐
  └───────────────────────────────────────────────────┬──────┘
                                                      ▼
                                               data_out, done
```

## The cipher as built

Each core computes the standard Blowfish data path on a 64-bit block, with
L = bits 63:32 and R = bits 31:0:

```
for i = 0..15:  L ^= P[i];  R ^= F(L);  swap(L, R)
swap(L, R);  R ^= P[16];  L ^= P[17]
F(x) = ((S1[x[31:24]] + S2[x[23:16]]) ^ S3[x[15:8]]) + S4[x[7:0]]   (mod 2^32)
```

Decryption is the same loop with the P-array read backwards (P[17] first).

**Key handling differs from standard Blowfish.** The S-boxes are ROM and
cannot be rewritten, so the usual key expansion is not run. That expansion
encrypts 521 times to overwrite the P-array and all four S-boxes. Here the
128-bit key enters only through the P-array:

```
P[i] = P_INIT[i] xor K[i mod 4],   K0 = key[127:96], K1 = key[95:64], ...
```

`P_INIT` and the S-box contents are the standard Blowfish initial values, that
is, the hexadecimal digits of the fractional part of pi. The first 18 32-bit
words (`243F6A88 85A308D3 ...`) are `P_INIT`, and the next 1024 words are
S1..S4 in that order. For any key, the ciphertext therefore does **not** match
a standard Blowfish implementation. With F, the rounds and the S-box values
taken as given, the design is exactly the cipher above, and the testbenches
check it against an independent model of that cipher. The S-box images hold
the standard values: used with the full standard key expansion, they
reproduce the standard Blowfish known answer (key `0000000000000000`,
block `0000000000000000` → `4EF997456198DD78`).

The two halves of a 128-bit block are independent 64-bit Blowfish blocks
under the same key, and nothing mixes them. In effect this is ECB over the two
halves.

## Hiding the ROM read inside a round

This is the part of the timing that is hardest to see from the code. The ROM
banks register their output on the rising edge, so a lookup costs one clock.
A round can still finish every clock, because the core always gives the ROM
the value it is *about to load* into its L register, not the value L holds
now:

| edge (core) | L register gets          | ROM captures S(·) of      | uses                          |
|-------------|--------------------------|---------------------------|-------------------------------|
| 0 (`go`)    | `L0 ^ P[0]`              | `L0 ^ P[0]`               | input whitening               |
| 1 … 15      | `(R ^ F(L)) ^ P[r+1]`    | the same new value        | F(L) from the ROM output      |
| 16          | (no load)                | (don't care)              | `dout = {L ^ P[17], (R ^ F(L)) ^ P[16]}`, `done` |

So the combinational path in each cycle is: ROM output register → F
(add, xor, add) → xor with R → xor with the next subkey → ROM address and
L register. The subkeys come combinationally from the registered key
(`blowfish_parray`). Each core needs three of them per cycle: the next
subkey, plus P[16] and P[17] for the last round.

## The 128-bit engine and its 19 clocks

`blowfish128` contains:

* `blowfish_divider`, which registers `data_in`, `key` and `mode` when `start`
  is high and the engine is idle. It presents `[63:0]` to the low core and
  `[127:64]` to the high core, pulses `go`, and holds everything until the
  cores finish.
* Two `blowfish_core` instances.
* One `sbox_shared`. It has two `sbox_rom512` banks with four read ports each,
  which is two lookups per bank per core per clock.
* An output register that forms `data_out = {high core, low core}` and
  pulses `done`.

Count the edge that samples `start` as edge 1. Edge 1 is the divider, edge 2
the input whitening (core edge 0), edges 3 … 18 the 16 rounds, and edge 19
the output register. `done` is a one-cycle pulse after edge 19. `busy` falls
at the same edge, so a new `start` presented in the cycle of `done` is
accepted on the next edge. A `start` while `busy` is ignored and reported by
a one-cycle `dropped` pulse.

Throughput is 128 bits per 19 clocks, i.e. 6.74 bits/clock. At 322 MHz that
would be about 2.17 Gbit/s. The design has not been placed and routed here,
so no clock frequency is claimed.

## The loopback top

`blowfish_loopback` chains two `blowfish128` engines. One has `mode` tied to
encrypt and the other to decrypt, and each has its own S-box ROMs.
`cipher_valid` (the first engine's `done`) starts the second engine with
`cipher_out` as its input. A small register keeps the key of the block in
the first stage, so the second stage gets the right key even when the next
block has already started.

The two engines form a two-stage pipeline:

* `cipher_valid` comes 19 edges after `start`, and `done` 38 edges after it.
* A new block may start on the edge after `cipher_valid`, so blocks can enter
  every 19 clocks. Two blocks are then in flight at once.
* The second engine is always free when a ciphertext arrives. Two assertions
  check this.

## Interfaces

All control is synchronous to `clk` with asynchronous active-low `rst_n`.

| module | ports |
|--------|-------|
| `blowfish_loopback` (top) | `start`, `key[127:0]`, `data_in[127:0]` → `cipher_out[127:0]`, `cipher_valid`, `data_out[127:0]`, `done`, `busy`, `dropped` |
| `blowfish128` | `start`, `mode` (`MODE_ENCRYPT`=0 / `MODE_DECRYPT`=1), `key`, `data_in` → `data_out`, `done`, `busy`, `dropped` |
| `blowfish_core` | `go`, `decrypt`, `key`, `din[63:0]` (held stable) → `dout`, `done`, `busy`; `sb_addr[31:0]` out, `sb_data` (S1..S4) in |
| `sbox_shared` | `addr[NCORES][32]` → `sdata[NCORES][4][32]`, one clock later |
| `sbox_rom512` | `addr[NPORTS][9]` → `data[NPORTS][32]`, registered |
| `blowfish_parray` | `key`, `decrypt`, `idx[NREAD][5]` → `subkey[NREAD][32]`, combinational |
| `blowfish_f` | `s[4][32]` → `f[32]`, combinational |

Shared types and constants (`word_t`, `sbox_out_t`, `mode_e`, `P_INIT`,
`LATENCY`) live in `blowfish_pkg`.

## S-box storage

A 512-word ROM can hold only two of the four 256-word S-boxes. This design
therefore uses two 512 x 32-bit banks:

* `rtl/sbox_bank0.hex` holds S1 (words 0–255) and S2 (256–511).
* `rtl/sbox_bank1.hex` holds S3 and S4.

Each file has one 32-bit word per line, and the ROM address is
{S-box select, byte}. Word *j* of S-box *k* (k = 0..3) is 32-bit word
18 + 256·k + j of the pi fraction, counting from 0.

The ROM is inferred from an array with `$readmemh`. `INIT_FILE` is given
relative to the project root, so simulate from there. Two details about
synthesis:

* Four read ports per bank mean that an FPGA tool will replicate block RAMs.
  True dual-port RAM would need two copies per bank.
* Some open-source synthesis front ends ignore `$readmemh`, treat the array
  as uninitialised and remove it. A size report from such a flow shows no
  memory bits.

## Departures and open points

* **Key schedule.** As described above, there is no Blowfish key expansion,
  only `P_INIT xor key`. The S-boxes are constant.
* **ROM organisation.** The method specifies a 512 x 32-bit ROM with a
  registered output. Four 256-entry S-boxes need 1024 words, so the store is
  built as two such banks. Their port count (4) is this design's choice.
* **Key size.** The key is 128 bits, not the 448 bits Blowfish allows.
* **Structure and timing choices.** The iterative core (one round per clock),
  the start/busy/done/dropped handshake, the reset, and the division of the
  19 clocks into stages are all this design's. They were chosen to meet the
  19-clock latency.
* **Separate ROMs in the loopback.** Each engine in the loopback has its own
  S-box ROMs. Sharing them would need eight read ports per bank.
* **Not built: the baselines.** The two S-box schemes this design is compared
  against are not built. One is a single 1024 x 32 ROM. The other uses four
  256 x 32 register files with an output multiplexer.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The reference model, `tb/bf_ref_pkg.sv`, is a plain behavioural Blowfish
with its own copy of `P_INIT`. It reads the same S-box images.

| testbench | what it checks |
|-----------|----------------|
| `tb_sbox_rom512` | published S-box words (S1[0]=D1310BA6, S1[255]=6E85076A, S2[0], S2[255]); 1000 cycles of random reads on 4 ports, with 1-clock latency |
| `tb_sbox_shared` | byte-to-S-box mapping on both core ports, S3[0], S4[0], S4[255], 1-clock latency |
| `tb_blowfish_f` | hand-worked vectors with carries out of bit 31, and 2000 random vectors |
| `tb_blowfish_parray` | zero key gives the pi words; all steps, both directions, random keys |
| `tb_blowfish_core` | known answer (below), random encryption and decryption against the model, round trip, 17-edge core latency, `go` ignored while busy |
| `tb_blowfish_divider` | capture, split, hold while busy, `dropped`, release on `cores_done` |
| `tb_blowfish128` | known answer, random encryption and decryption, round trip, 19-edge latency, 10 back-to-back blocks in exactly 190 clocks; counts encryption, decryption, mode switches, dropped starts and back-to-back starts |
| `tb_blowfish_loopback` | 100 blocks through the top at its default configuration: each ciphertext against the model, each output equal to its plaintext, 19/38-edge latencies; counts overlap of two blocks, dropped starts and back-to-back starts |

The known answer for this cipher, with key `0123456789ABCDEF FEDCBA9876543210`
and block `0123456789ABCDEF`, is `794359D976C38D2B`. It was computed with an
independent software model.

To run a testbench with Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/blowfish_pkg.sv tb/bf_ref_pkg.sv tb/tb_blowfish_loopback.sv \
    --top-module tb_blowfish_loopback
./obj_dir/Vtb_blowfish_loopback
```

Replace `tb_blowfish_loopback` with any other testbench name. Each run takes
well under a second.

## Changing it

* Another S-box or P-array initialisation: replace the two hex images
  (512 lines each) and `P_INIT` in `blowfish_pkg`. Also replace `PI_P` in
  the reference model.
* A different key mapping: `blowfish_parray` is the only place the key is
  used, apart from the reference model's `subkey` function.
* More or fewer parallel cores: `sbox_shared` takes `NCORES` and scales its
  read ports. `blowfish128` wires two cores by hand.
