# Pipelined AES-128 coprocessor with dual-edge (SDDO) datapath

An AES-128 engine meant to sit next to a host processor and take the
block-cipher work off it. It encrypts and decrypts in the same hardware, and
a stream of blocks can mix the two freely. Throughput comes from two
choices:

1. **Full outer-round pipelining.** Each of the eleven AES round steps
   (initial AddRoundKey, nine full rounds, final round) has its own
   combinational round logic and its own stage register. Eleven blocks are in
   flight at once. A new block can enter every time the stage registers load.
2. **Single Datapath Dual Output (SDDO).** The stage registers load on
   *both* clock edges. The same round logic then processes a block in each
   half of the clock period, so the pipeline delivers two results per clock.
   The cost is a second set of stage flip-flops. The round logic, which is
   most of the area, is not duplicated.

The whole datapath is plain logic: the S-box is computed in GF(2^8), not read
from a table or a memory macro, so the RTL does not depend on any vendor's
RAM or LUT features.

| configuration | blocks per clock | bits per clock | latency |
|---|---|---|---|
| `SDDO = 1` (default) | 2 | 256 | 11 edges = 5.5 clocks |
| `SDDO = 0` (plain pipeline) | 1 | 128 | 11 clocks |

The design target is a throughput above 1 Gbit/s. With SDDO that needs a
clock of only 3.9 MHz. At 100 MHz the default configuration moves
25.6 Gbit/s. The SDDO architecture is reported to double the throughput of
the plain pipeline for about 7% more FPGA resources. How fast the round
logic can be clocked depends on the technology. With SDDO, one round has to
fit in half a clock period.

## How a block moves through the pipeline

A pipeline slot (`aes_pkg::slot_t`) is `{valid, mode, data[127:0]}`. The
mode bit (`MODE_ENC` = 0, `MODE_DEC` = 1) travels with the block. Each stage
picks its round key and the direction of its transforms from that bit:

| stage | module | encryption | decryption (Equivalent Inverse Cipher) |
|---|---|---|---|
| 0 | `aes_round_init` | `^ ek[0]` | `^ dk[0]` |
| 1..9 | `aes_round_mid` | SubBytes, ShiftRows, MixColumns, `^ ek[r]` | InvSubBytes, InvShiftRows, InvMixColumns, `^ dk[r]` |
| 10 | `aes_round_final` | SubBytes, ShiftRows, `^ ek[10]` | InvSubBytes, InvShiftRows, `^ dk[10]` |

Decryption uses FIPS-197's *Equivalent Inverse Cipher*. Its steps come in
the same order as encryption, which is why one datapath with a direction
input serves both. The price is a second set of round keys:

    dk[0] = ek[10],   dk[r] = InvMixColumns(ek[10-r]) for r = 1..9,   dk[10] = ek[0]

Every stage gets both `ek[r]` and `dk[r]` and selects by the block's mode.
An encryption can therefore follow a decryption on the very next edge, with
no flush.

Byte order follows FIPS-197. Byte 0 of a block or key is in bits
`[127:120]`. Byte *k* is row *k mod 4*, column *k / 4* of the state, so each
32-bit word is one column.

## The dual-edge stage register (`sddo_reg`)

Loading on both edges is the core of the SDDO scheme, and it is easy to get
wrong. The obvious circuit is a rising-edge flop, a falling-edge flop and a
multiplexer switched by the clock. It puts the clock into the data path, and
when the clock switches, the mux races against the flops it selects between.
This design uses the XOR form of a double-edge flip-flop instead:

    rising edge:   q_rise <= d ^ q_fall
    falling edge:  q_fall <= d ^ q_rise
    q = q_rise ^ q_fall

After a rising edge `q = d ^ q_fall ^ q_fall = d`. After a falling edge
`q = q_rise ^ d ^ q_rise = d`. Only flop outputs change `q`, so it changes
just after an edge, like an ordinary register. Synchronous reset clears both
halves, so `q = 0`. With `SDDO = 0` the module is a plain rising-edge
register, and the whole coprocessor becomes the ordinary pipelined design.

Timing consequence: each stage has half a clock period from one edge to the
next. For static timing, the paths `q_rise -> q_fall` and `q_fall -> q_rise`
are half-cycle paths.

## Load enable replay (`le_delay_reg`)

The control unit (`aes_ctrl`) is an ordinary rising-edge state machine. It
grants input with one load enable `le` per clock. The datapath, however,
takes a block at every edge. If the falling edge sampled `le` directly, it
could see a value that the control unit had only just changed.
`le_delay_reg` fixes this by storing the `le` that each rising edge used and
*replaying* it for the falling edge that follows. The rising slot at edge *t*
and the falling slot half a clock later always share one grant.

Its output `le_slot` is the enable for the *next* loading edge, and it is
exported as `in_ready`. The register tracks which edge comes next with one
rising-edge and one falling-edge flop (`ph_rise <= ~ph_fall`,
`ph_fall <= ph_rise`). It does not use the clock as a data signal.

A consequence the host must know about: after the edge that makes the
control unit stop granting (for example, the edge that samples `key_load`),
one more block is still taken, at the falling edge. It belongs to the old
grant and is processed with the old key.

## Round keys (`keygen`)

`keygen` runs the forward AES-128 key schedule one round per clock. It stores
all eleven encryption keys `ek[0..10]`, because every pipeline stage needs its
key all the time. As each key is produced, one shared InvMixColumns unit turns
it into the matching decryption key and writes it into the reversed table
`dk`. Ten clocks after `start`, both tables are complete and `done` pulses.

The key is first captured into a holding register (`key_capture`). A new key
can thus be accepted while blocks that still use the old tables are
draining. If capture and start happen in the same clock, the expansion uses
`key_in` directly.

## Control unit (`aes_ctrl`)

| state | meaning | `le` | `key_ready` |
|---|---|---|---|
| IDLE | no key yet | 0 | 1 |
| KEYEXP | key being expanded (10 clocks) | 0 | 0 |
| RUN | streaming | 1 | 1 |
| DRAIN | new key waiting, old blocks still in flight | 0 | 1 |

A `key_load` in RUN goes to DRAIN. The key tables are overwritten only once
no valid block is in any stage, so no block ever sees round keys from two
different keys. A `key_load` during KEYEXP is ignored, and `key_ready` is low
then.

## Host interface and timing (`aes_sddo_coprocessor`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_load`, `key_in` | in | 1, 128 | new cipher key, sampled at a rising edge when `key_ready` |
| `key_ready` | out | 1 | a `key_load` would be accepted |
| `in_valid`, `in_mode`, `in_data` | in | 1, 1, 128 | block offered for the next loading edge |
| `in_ready` | out | 1 | the next edge takes a valid block |
| `out_valid`, `out_mode`, `out_data` | out | 1, 1, 128 | result, held until the next edge |
| `busy` | out | 1 | blocks in flight or key expansion running |

- With `SDDO = 1`, inputs are sampled at every edge. Change them only just
  after an edge. `in_ready` also changes only just after an edge.
- A block is taken at an edge if `in_valid` and `in_ready` are both high just
  before it. Its result appears just after the 11th loading edge that follows,
  counting the edge that took it. Results leave in the order the blocks
  entered.
- After reset, or after a `key_load`, `in_ready` stays low for the drain (if
  any) plus about 11 clocks of key expansion.

## Files

`rtl/`, bottom up:

| file | content |
|---|---|
| `aes_pkg.sv` | types (`block_t`, `slot_t`, `aes_mode_e`), `NR`, `NKEYS`, GF(2^8) `xtime`/`gf_mul` |
| `subbytes_byte.sv`, `subbytes.sv` | S-box / inverse S-box of one byte and of the state |
| `shift_rows.sv` | ShiftRows / InvShiftRows |
| `mix_column_word.sv`, `mix_columns.sv` | MixColumns / InvMixColumns of one column and of the state |
| `sddo_reg.sv` | dual-edge (or single-edge) stage register |
| `aes_round_init.sv`, `aes_round_mid.sv`, `aes_round_final.sv` | the three kinds of pipeline stage |
| `aes128_pipe_core.sv` | the 11-stage pipeline |
| `keygen.sv` | round key generator with encryption and decryption tables |
| `aes_ctrl.sv` | control unit |
| `le_delay_reg.sv` | load enable replay for the falling edge |
| `aes_sddo_coprocessor.sv` | top level |

The S-box computes the multiplicative inverse as x^254. The addition chain
is x^3, x^7, x^15, x^31, x^63, x^127, x^254 (seven squarings and six
multiplications). Encryption then applies the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. Decryption first
applies the inverse affine map `rotl(s,1) ^ rotl(s,3) ^ rotl(s,6) ^ 0x05`,
then the same inverter.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`). It also
has `tb_aes128_pipe_core_single.sv` for the `SDDO = 0` pipeline, and
`aes_ref_pkg.sv`, an independent reference model. The model builds its S-box
from a brute-force inverse search. For decryption it uses the straight
Inverse Cipher, not the Equivalent one. So it checks the RTL's key reversal
and InvMixColumns key conversion as well as the round logic.

## Simulating

With Verilator 5:

    verilator --binary --timing --top-module tb_aes_sddo_coprocessor \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_sddo_coprocessor.sv
    ./obj_dir/Vtb_aes_sddo_coprocessor

Each testbench prints `TB_RESULT checks=N failures=M`. To run another one,
substitute its name. Building the full-coprocessor testbench takes a few
minutes, because Verilator flattens about 180 computed S-boxes. The
simulation itself takes well under a second.

`tb_aes_sddo_coprocessor` runs the top level at its default parameters:

- It checks that blocks are refused before a key is loaded.
- It loads the FIPS-197 Appendix C.1 key and checks its known answer in both
  directions.
- It sends a 64-block burst and requires results on 64 consecutive edges,
  i.e. two per clock.
- It streams random mixed encryptions and decryptions with idle slots.
- It changes to the Appendix B key while blocks are in flight and checks
  that key's known answer.
- It changes the key once more with the pipeline already empty.

Every result is checked against the reference model, together with its mode,
its order and its exact 11-edge latency. The test also counts stalls,
clocks with two results, mode switches, drain edges and idle slots, and it
fails if any of these never occurred.

## Where this RTL makes its own choices

The overall structure follows the SDDO pipelined AES-128 architecture:

- the S-box, ShiftRows, MixColumns and key generator as separate units;
- a full outer-round pipeline of initial, middle and final round modules;
- a control unit;
- registers that load on both edges;
- a load-enable delay register that replays the enable for the falling edge;
- encryption and decryption in one core through the Equivalent Inverse
  Cipher.

The following details are choices made for this implementation:

- the XOR-type double-edge register, and phase tracking by flops instead of
  by the clock;
- the host handshake (`in_valid`/`in_ready` per edge, `key_load`/`key_ready`);
- the four-state control unit, including the drain before a key change and
  the rule that one grant covers a rising edge and the following falling
  edge;
- the key generator timing (one round per clock), stored encryption and
  decryption key tables, and the key holding register;
- the S-box inverter built as an x^254 exponentiation. A composite-field
  inverter would be smaller and would drop in behind the same ports.
- a mode bit carried per block, so that encryption and decryption can be
  interleaved;
- synchronous active-low reset of all state, including the datapath.

Not included:

- The non-pipelined, iterative AES-128 coprocessor. It is the baseline the
  pipelined designs were measured against, not part of this design.
- AES-192 and AES-256.
- Any bus wrapper (memory-mapped registers, DMA) for a specific host.

## Size

Coarse synthesis of the full top level with Yosys gives about 68 000
word-level cells and 5 953 flip-flop bits. The flip-flops are:

- 2 x 11 x 130 for the dual-edge stage registers;
- 22 x 128 for the key tables;
- the key generator's working and holding registers;
- control.

A single 11-stage pipeline with `SDDO = 0` needs 11 x 130 fewer flip-flop
bits and the same round logic.
