# RC6-Cascade: a 320-bit RC6-style block cipher core

RC6-Cascade widens RC6 to a 320-bit block. RC6 applies its round many times to
one 128-bit state. This design instead wires ten small Feistel networks into a
triangle. Each network is called an F-function, and each is built from two RC6
rounds on 16-bit words. The plaintext enters as five 64-bit parts, P1..P5. Each
part flows through the triangle and mixes with the others. The ciphertext leaves
as five 64-bit parts, C1..C5.

This RTL holds the complete core:

- the key schedule, which turns a 128-bit key into 40 subkeys;
- the encrypter, a cascade of ten F-functions;
- the decrypter, a mirrored cascade of ten inverse F-functions;
- a controller that sequences key generation, encryption and decryption.

Each F-function is iterative: one RC6 round datapath is used twice. F-functions
whose inputs are ready run at the same time.

## The cascade

The ten F-functions sit in a lower triangle: four columns, with rows `c..4` in
column `c`. Every cell has two 64-bit inputs and two 64-bit outputs:

- **In1** comes from above and **In2** from the left;
- **Out1** goes down and **Out2** goes right.

```
 P1 ──In1─┐
 P2 ─In2─[F1]──Out2────────┐In1
          │Out1             ▼
 P3 ─In2─[F2]──Out2──In2─[F5]──Out2─────────┐In1
          │                 │Out1            ▼
 P4 ─In2─[F3]──Out2──In2─[F6]──Out2──In2─[F8]──Out2───────┐In1
          │                 │                │Out1       ▼
 P5 ─In2─[F4]──Out2──In2─[F7]──Out2──In2─[F9]──Out2─In2─[F10]──Out2── C5
          │Out1             │Out1            │Out1       │Out1
          C1                C2               C3          C4
```

The general rule, for the cell in column `c` and row `r`:

| input | column 1 | column c > 1, diagonal (r = c) | column c > 1, below the diagonal |
|---|---|---|---|
| In1 | P1 (row 1) or Out1 of the cell above | Out2 of cell (c-1, r-1) | Out1 of the cell above |
| In2 | P(r+1) | Out2 of cell (c-1, r) | Out2 of cell (c-1, r) |

`Cc` is Out1 of the bottom cell of column `c`, and C5 is Out2 of F10. Cells are
numbered column by column, F1..F10. Cell `Fn` uses the subkeys
`S[4(n-1) .. 4(n-1)+3]`.

In the triangle, a cell's depth is `c + r - 1`. Cells of equal depth (one
anti-diagonal) are independent. The longest path runs through seven cells,
F1, F2, F3, F4, F7, F9 and F10, so an encryption costs seven F-function times,
not ten.

**Decryption** undoes the cells in reverse order, starting with F10. The inverse
of cell (c, r) takes that cell's (Out1, Out2) and returns its (In1, In2). Its
inputs come from the inverse cells that consumed those outputs:

- Out1 is `Cc` in row 4, else the recovered In1 of cell (c, r+1);
- Out2 is C5 for F10, the recovered In1 of cell (c+1, r+1) on the diagonal, and
  the recovered In2 of cell (c+1, r) elsewhere.

`rc6c_pkg::cell_idx(c, r)` turns a position into a cell number. Both cascades
are written as a generate loop over `(c, r)` that applies these rules.

## The F-function and its RC6 round

Each F-function is a two-round Feistel network on two 64-bit halves. Let
L = In1, R = In2, and let `G` be one RC6 round:

```
X = L ^ G(R, S[4n],   S[4n+1])      round 1, then the halves swap
Y = R ^ G(X, S[4n+2], S[4n+3])      round 2
Out1 = Y,  Out2 = X
```

`G` treats a 64-bit half as the RC6 state A|B|C|D of four 16-bit words, with A
in bits 63:48. With lg w = 4 and all arithmetic modulo 2^16:

```
t = (B*(2B+1)) <<< 4          u = (D*(2D+1)) <<< 4
A = ((A ^ t) <<< u) + s_a     C = ((C ^ u) <<< t) + s_c
(A, B, C, D) = (B, C, D, A)
```

The data-dependent rotations use the low four bits of `t` and `u`. There is no
pre- or post-whitening: each round adds only its own two subkeys.

**Inverse.** The structure is Feistel, so the inverse needs no inverse of `G`.
The same datapath, with the two subkey pairs swapped, maps (Y, X) back to
(L, R). `rc6c_ffunc` therefore has one parameter, `INVERSE`, that only swaps
the pairs. For a half written into register `a` in round 1 and `b` in round 2,
both directions compute `a ^= G(b)` and then `b ^= G(a)`.

**Timing of one F-function.** The two rounds share one `rc6c_round` instance,
which holds two 16x16 multipliers. The unit works as follows:

- the `start` pulse loads the halves;
- the next clock computes round 1, and the one after computes round 2;
- `ready` rises three clocks after `start`.

`ready` then stays high, and the outputs stay held, until the next `start`.

## Key schedule

`rc6c_key_schedule` is the RC6 key expansion with w = 16 and t = 40 subkeys:

```
L[0..c-1] = key as 16-bit words (key byte k = key[8k+7:8k], little-endian words)
S[i] = 0xB7E1 + i*0x9E37
A = B = i = j = 0
repeat 3*max(c, 40) times:
    A = S[i] = (S[i] + A + B) <<< 3
    B = L[j] = (L[j] + A + B) <<< (A + B)
    i = (i+1) mod 40;  j = (j+1) mod c
```

It performs one mixing step per clock, so a 128-bit key (c = 8) takes 120
steps. The subkeys sit in registers, and both cascades read them in parallel.
`KEY_BYTES` sets the key length. The default is 16 bytes; 32 bytes gives a
256-bit key. The step count stays 120 for any key of up to 80 bytes.

## Control and timing

`rc6c_top` has three request inputs and four status outputs:

| port | meaning |
|---|---|
| `start_key_gen` | expand `key` into the subkeys |
| `start_encryption` | encrypt `text_in` (P1 in `text_in[0]`) |
| `start_decryption` | decrypt `text_in` (C1 in `text_in[0]`) |
| `key_ready` | the subkeys are valid |
| `ready` | the last encryption/decryption has finished; `text_out` holds its result |
| `enc_dec` | 1 when `text_out` is a ciphertext, 0 when it is a plaintext |
| `busy` | an operation is running |

The controller (`rc6c_controller`) is a four-state FSM: IDLE, KEYGEN, ENC and
DEC. It accepts a request only in IDLE. Key generation has priority over
encryption, and encryption over decryption. Encryption and decryption are
accepted only once `key_ready` is high. Requests made at any other time are
ignored and not queued. Engine start pulses leave the controller in the same
clock as the request.

`key` and `text_in` are sampled in the request clock and need not be held
afterwards. Inside each cascade, a cell starts in the clock after both of its
producers report done. Each depth level therefore costs three clocks.

| operation | request to done |
|---|---|
| F-function (`start` to `ready`) | 3 clocks |
| key generation (`start_key_gen` to `key_ready`) | 122 clocks (121 in the schedule + 1 in the controller) |
| encryption or decryption (request to `ready`) | 23 clocks (1 + 3 × 7 in the cascade + 1 in the controller) |
| back-to-back blocks | 24 clocks per 40-byte block, including the request clock |

Reset is synchronous and active high. It clears `key_ready`, `ready` and every
cell's state.

## Word size

The RC6 word size is a parameter, `W`, of every module. The supported values
are 16 (the default), 32 and 64, for which RC6 defines its magic constants.
Changing `W` scales the following:

- each part becomes 4W bits and the block 20W bits (640 bits at W = 32, 1280 at
  W = 64);
- the subkeys become W bits wide;
- the rotation widths and the magic constants (`rc6c_pkg::magic_p/magic_q`)
  change with W.

The structure and all latencies stay the same.

## Decisions not fixed by the cipher's description

The cipher's own description fixes the following:

- the 320-bit block in five 64-bit parts;
- the triangle of ten F-functions and its In/Out wiring;
- the two-round Feistel F-function with XOR combining and 16-bit subkeys;
- the RC6 round structure;
- 40 subkeys from an RC6-style key schedule;
- a 128-bit key;
- the four control signals;
- an iterative F-function.

Everything else is a choice made here and should be reviewed before the core is
relied on:

- **Key schedule.** The cipher is said to use RC6's key schedule "with some
  modifications", which are not specified. This core uses the unmodified RC6
  schedule, so it will not interoperate with any implementation that applies
  those modifications.
- **Bit and word order.** This covers the A|B|C|D word order in a half and the
  key byte order. It also covers the mapping of In1/In2 onto the Feistel
  halves: In1 is the half combined with the round output in round 1.
- **Cell numbering**, and thus which subkeys each cell uses (column by column).
- **Whitening.** The F-function has no pre- or post-whitening.
- **Combining operation.** XOR is used: the diagram of the F-function shows XOR,
  although one sentence describes the combination as an addition.
- **The inverse F-function and the decrypter's wiring.** These are derived from
  the encrypter; they are not described in their own right.
- **The handshake and timing.** This covers the start/ready handshake, the
  controller's states and priorities, the shared `text_in`/`text_out` ports, the
  output multiplexer and every latency above.
- **The key port.** The published block symbols show a 16-bit key port; the text
  asks for 128 bits, and the evaluation uses 256. The default follows the text.
  Set `KEY_BYTES = 2` for the symbol's port, or `32` for the evaluation's key.

The example ciphertext published for the original core (a 16-bit all-zero key
and the counting plaintext 0001 0002 ... 0014) is **not** reproduced. It depends
on the unspecified schedule changes and orderings above.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values in
`tb/rc6c_tb_vec_pkg.sv` and in the testbenches came from a separate software
model of the cipher, not from this RTL.

| testbench | what it checks |
|---|---|
| `tb_rc6c_round` | 8 model vectors; 2000 random inputs against a behavioural model written in the testbench |
| `tb_rc6c_ffunc` | 6 model vectors; forward then inverse round trips on 100 random inputs; 3-clock latency; outputs and `ready` held |
| `tb_rc6c_key_schedule` | all 40 subkeys for two 16-byte keys, a 2-byte key and a 255-byte key; 121- and 385-clock latencies; `key` needed only at start; reset during a run |
| `tb_rc6c_encrypter` / `tb_rc6c_decrypter` | three blocks under two subkey sets; 22-clock latency; inputs needed only at start; results held |
| `tb_rc6c_controller` | start pulses, flags, priority, and requests ignored while busy or without a key, against engine models |
| `tb_rc6c_top` | end to end at default parameters: see below |
| `tb_rc6c_workloads` | 256-bit key: known answer, key avalanche, NIST independence tests and bulk encryption (see below) |
| `tb_rc6c_word_sizes` | W = 32 and W = 64: known answers, decryption back, the same latencies |

`tb_rc6c_top` runs the whole core at its default parameters:

- two keys;
- model-checked encryptions and decryptions;
- 20 random round trips.

It also counts each mechanism and fails if one never occurs: key generation,
encryption, decryption, a switch of `enc_dec`, a request ignored while busy, a
request ignored for lack of a key, and an operation shorter than ten serial
F-functions (which shows that F-functions ran in parallel).

`tb_rc6c_workloads` repeats, in simulation, the kinds of evaluation the cipher
was assessed with:

- **Avalanche:** one key bit flipped, 15 times. Between 142 and 175 of the 320
  bits change, 0.505 on average.
- **Independence:** three NIST SP 800-22 tests on P xor C for 20 pseudo-random
  blocks: frequency (monobit), runs and forward cumulative sums. The
  significance level is 0.01, and at most one block may fail each test. With the
  fixed generator seed, one block fails the cumulative-sums test and none fails
  the others.
- **Bulk encryption:** 10,000 bytes (250 blocks) in 6,000 clocks.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/rc6c_pkg.sv tb/rc6c_tb_vec_pkg.sv tb/tb_rc6c_top.sv --top-module tb_rc6c_top
./obj_dir/Vtb_rc6c_top
```

Replace `tb_rc6c_top` with any other testbench name. Each one runs in well
under a second.

## Size

Coarse synthesis of `rc6c_top` at the default parameters gives about 1,100
word-level cells and 4,000 flip-flop bits. Most of the flip-flops are the two
64-bit halves held in each of the 20 F-functions. The rest are the input
latches and the 40 × 16-bit subkey registers. Each F-function carries two
16×16 multipliers, 40 in the whole core. Every F-function holds its own result
registers, so both cascades keep their last outputs until restarted.

## Files

| file | contents |
|---|---|
| `rtl/rc6c_pkg.sv` | shared constants, RC6 magic constants, `cell_idx` |
| `rtl/rc6c_round.sv` | combinational RC6 round on four W-bit words |
| `rtl/rc6c_ffunc.sv` | iterative two-round Feistel F-function (`INVERSE` for decryption) |
| `rtl/rc6c_key_schedule.sv` | 40-subkey RC6 key expansion, one step per clock |
| `rtl/rc6c_encrypter.sv` | triangle of ten F-functions |
| `rtl/rc6c_decrypter.sv` | mirrored triangle of ten inverse F-functions |
| `rtl/rc6c_controller.sv` | request sequencing FSM |
| `rtl/rc6c_top.sv` | the complete core |
| `tb/rc6c_tb_vec_pkg.sv` | reference keys, subkeys, plaintexts and ciphertexts |
| `tb/tb_*.sv` | the testbenches listed above |
