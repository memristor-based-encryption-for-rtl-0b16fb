# Read-only 1T1R-crossbar GIFT-128 cipher

A lightweight block cipher for a severely size- and power-limited implant
transceiver, organised the way a memristor crossbar would compute it. The
cipher is GIFT-128: a 128-bit block, a 128-bit key, and 40 rounds. Each round
has three steps:

- SubCells: a 4-bit S-box on each of the 32 nibbles.
- PermBits: a fixed bit permutation.
- AddRoundKey: XOR of round-key and round-constant bits.

The main idea is that **no memory cell is ever written during encryption**.
Each nibble has its own slice. The slice keeps the S-box table and the key
and constant bits of *every* round in 1T1R memristor crossbars, which are
programmed once per session. A whole round of a slice is then a single
non-destructive read:

- one wordline picks the S-box row;
- a second wordline picks the row of the current round;
- sense amplifiers on the shared bitlines add the key bits by XOR.

There is no key-schedule hardware. The host computes all round keys ahead
of time. The only state that changes during encryption is a 4-bit output
register per slice.

This RTL is the digital, cycle-level version of that architecture. Each
memristor is modelled as one stored bit (low-resistance state = 1), and each
sense amplifier as a threshold on the number of conducting cells. The result
is bit-exact GIFT. It matches the published GIFT-128 and GIFT-64 test vectors.

## Architecture

```
                 round_counter (6-bit T-FF counter, start/busy/done)
                        |
                 addr_dec_6to40 ---- round wordline rk_wl[39:0] --------+
                                                                          |
 pt --+                                                                   |
      |mux (round 1)   +------------------- gift_slice j (x32) ----------+-----+
      +--> nib_in ---> | addr_dec_4to16 -> S-box xbar 16x4 ----+ bitlines       |
      |                |                   RC/RK xbar 40x2/3 ---+--> 4 sense amps|--> out reg -+
      |                +------------------------------------------------------+              |
      |                                                                                        |
      +<------------------------ PermBits wiring  (bit i -> bit P(i)) <------------------------+
                                            |
                                            +--> ct
```

| module | role |
|---|---|
| `gift_1t1r_cipher` | top level: 32 slices, the round selector, the permutation wiring, the programming port |
| `gift_slice` | one nibble: the S-box decoder, two crossbars, four sense amplifiers and the output register |
| `xbar_1t1r` | the 1T1R cell array, used for both the 16x4 S-box and the 40x2 or 40x3 key/constant unit |
| `bl_sense_amp` | dual sense amplifier: an XOR of two cells on a bitline, or a plain read-out |
| `addr_dec_4to16` | the S-box wordline decoder: 2-bit NAND predecoders, then a NOR final stage |
| `addr_dec_6to40` | the round wordline decoder shared by all slices: three 2-bit predecoders and two NOR stages |
| `round_counter` | the toggle-flip-flop round counter and the start/done sequencing |
| `gift_pkg` | the S-box, the permutation, the key and constant schedules, and the crossbar image for programming |

Every slice reads the same round row in the same cycle, so one counter and
one 6-to-40 decoder drive the round wordlines of all 32 slices. There are
32 4-to-16 decoders, one per slice.

## Why the key bits are stored "pre-permuted"

This is the part that takes some thought. In GIFT, AddRoundKey comes
*after* PermBits. A slice, however, must add the key on its own bitlines,
which carry the S-box output *before* the permutation. With P the bit
permutation and K_r the vector that round r XORs into the state (round-key
bits plus round-constant bits):

```
state_{r+1} = P(S(state_r)) xor K_r  =  P( S(state_r) xor P^-1(K_r) )
```

So slice bit s of round r stores K_r[P(s)]: the key bit of the position
that bit s will be wired to. `gift_pkg::rk_row(key, r, nbits)` returns that
image for one round row of all slices. The slice outputs then go through the
hardwired permutation into the slices' inputs for the next round. The
ciphertext is the permuted output register, i.e. the value that would feed
round 41.

GIFT's permutation keeps each bit at the same index inside its nibble; it
only moves the bit to a different nibble. So key bits land on the same
nibble bits before and after the permutation:

- bits 1 and 2 of every nibble for GIFT-128;
- bits 0 and 1 for GIFT-64.

Round-constant bits sit on bit 3 of seven slices for GIFT-128:
slices 3, 7, 11, 15, 19, 23 and 28. These are the slices whose bit 3 is
permuted to state positions 3, 7, ..., 23 and 127. Only these seven slices
get a third RC/RK column and an XOR sense amplifier on bit 3. Their crossbar
is 40x3; all other slices have a 40x2 crossbar with plain read-out amplifiers
on bits 0 and 3.

Each RC/RK row is 3 bits per slice: `{bit 3 (constant), upper key bit, lower
key bit}`. In a slice with no constant bit, the top bit is ignored.

## Bitline sensing (dual sense amplifier)

In a column, the selected S-box cell and the selected round-key cell conduct
in parallel onto one bitline. The bitline level therefore reflects how many
of the two are in the low-resistance state (0, 1 or 2). Two sense amplifiers
compare it with fixed references:

- the AND amplifier fires when both cells conduct;
- the NOR amplifier fires when neither does.

A NOR gate of the two gives the XOR. The analog references (0.45 V for AND,
0.43 V for NOR) become the thresholds "2 cells" and "0 cells" in the RTL.
Columns without a key bit use only the NOR-referenced amplifier, inverted.
All amplifier outputs are 0 outside the read pulse. In silicon, the read
pulse also switches the bitline power-gating transistors.

## Interface and timing (`gift_1t1r_cipher`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (10 MHz target); asynchronous active-low reset of the registers. The crossbars are not reset |
| `sb_we`, `sb_waddr`, `sb_wdata` | in | 1, 4, 4 | write S-box row `sb_waddr` (input value) of every slice with `sb_wdata` |
| `rk_we`, `rk_waddr`, `rk_wdata` | in | 1, 6, 3*NSLICE | write round row `rk_waddr` of all RC/RK crossbars; slice j uses `rk_wdata[3j+2:3j]` |
| `start`, `pt` | in | 1, BLOCK_BITS | start an encryption; `pt` only needs to be valid in the `start` cycle |
| `busy` | out | 1 | rounds 2..40 in progress; `start` is ignored while it is high |
| `done` | out | 1 | one-cycle pulse, 40 cycles after `start` (4 us at 10 MHz) |
| `ct` | out | BLOCK_BITS | ciphertext, valid from `done` until the next `start` |
| `round_idx` | out | 6 | round row currently selected |

Cycle by cycle:

- The cycle in which `start` is high reads round 1 straight from `pt`.
- Each clock edge stores one round in the slice output registers.
- After the 40th edge, `done` rises and `ct` is final.
- A new `start` is accepted in the `done` cycle, so blocks can run back to
  back, one every 40 cycles.
- Programming is only possible while idle. An assertion flags writes while
  `busy`, and the write enables are gated off during a run.

Programming a session key takes 16 S-box writes and 40 round-row writes.
The row data for round r is:

```systemverilog
row = gift_pkg::rk_row(key, r, 128);   // key[127:0] = k7||...||k0
rk_wdata = row[3*32-1:0];
sb_wdata = gift_pkg::sbox(sb_waddr);
```

In hardware this is done by the host once per session. The functions are
plain SystemVerilog, so they also serve as a reference for host software.

## Configuration

`BLOCK_BITS` is the only parameter of the top.

- 128 (the default) is GIFT-128: 32 slices and 40 rounds.
- 64 is GIFT-64: 16 slices, 28 rounds, and key bits on nibble bits 0 and 1.

All other sizes follow from it. The crossbar and decoder modules take their
sizes as parameters (`ROWS`, `COLS`, `NOUT`, `ROUNDS`).

## Departures and modelling choices

- **Analog parts are abstract.** The RTL does not model resistance levels,
  sense margins, wire R/C, the HfO2 device model, the 4x-upsized final
  decoder gates or the bitline power-gating transistors. The read pulse
  `rd_en` stands in for wordline drive and power gating.
- **Permutation between slices.** The design description says both that
  each output bit is wired to another nibble's S-box input and that a
  slice's output is fed back to its own input. Only the first reproduces
  GIFT, so the slices are linked through the permutation wiring.
- **S-box direction.** One sentence calls it the "inverted" S-box, but the
  substitution table and the worked slice example use the forward GIFT
  S-box. The forward S-box is what gets programmed.
- **One crossbar or two.** The S-box rows and the round rows are one
  crossbar with shared bitlines in the original drawing. Here they are two
  `xbar_1t1r` instances whose column outputs meet in one sense amplifier,
  which is the same read.
- **This design's own choices:**
  - the decoder enable inputs;
  - the programming port, with row-wide writes and the S-box broadcast to
    all slices;
  - the start/busy/done handshake;
  - the register reset.
- **The counter.** The round counter is a synchronous toggle-flip-flop
  counter with a synchronous clear after the last round. The exact
  transistor-level counter circuit was not available.
- **Not built:**
  - the Scouting-Logic current- and voltage-mode XOR amplifiers, which are
    alternatives to the dual sense amplifier;
  - key transport and session-key agreement;
  - the plaintext and ciphertext I/O serialisation of a CMOS reference
    design;
  - the surrounding implant system.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_gift_1t1r_cipher` | Default size, end to end. Covers: the published GIFT-128 vectors (zero key and plaintext -> `cd0bd738388ad3f668b15a36ceb6ff92`; key = plaintext = `fedcba9876543210fedcba9876543210` -> `8422241a6dbf5a9346af468409ee0152`); 16 random blocks under 4 random session keys against a textbook reference model (`tb/gift_ref_pkg.sv`); 40-cycle latency; `start` ignored while busy; back-to-back blocks; re-keying. It also counts each mechanism (writes, plaintext reads, fed-back rounds, AND and NOR amplifier firings, constant XORs, ignored starts, re-keys) |
| `tb_gift64_cipher` | `BLOCK_BITS=64`: the GIFT-64 vectors (`f62bc3ef34f775ac`, `c1b71f66160ff587`), random blocks, 28-cycle latency, and the permutation against the GIFT-64 table |
| `tb_gift_slice` | The worked example (`1010` with key bits 0 gives `1011`; `0001` with key bits 1 gives `1100`); 200 random rounds with and without a constant column |
| `tb_xbar_1t1r` | Programming and reading both geometries; no read without a wordline or read pulse; a rewrite does not disturb other rows |
| `tb_bl_sense_amp` | Truth tables of the XOR and read-out modes |
| `tb_addr_dec_4to16`, `tb_addr_dec_6to40` | Exhaustive decode, with and without enable |
| `tb_round_counter` | Row sequence, `first`/`busy`/`done`, 40-cycle latency, ignored and back-to-back starts |

The reference model shares no code with the datapath. It runs the key
schedule round by round and applies AddRoundKey after the permutation.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/gift_pkg.sv tb/gift_ref_pkg.sv tb/tb_gift_1t1r_cipher.sv \
    --top-module tb_gift_1t1r_cipher -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_*.sv` and its top-module name to run that test.
Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/gift_pkg.sv rtl/<module>.sv`.

The remaining lint warnings are intentional:

- one unused constant bit in slices without a constant column;
- the unused AND/NOR taps of the read-out amplifiers;
- the reset, which is used asynchronously in the registers and synchronously
  in `disable iff` of the assertions.
