# Byte-serial AES-128 encryption core with a gated clock

This is a very small AES-128 encryption engine for battery-powered wireless
nodes. Instead of a 128-bit round datapath it has one **8-bit** datapath
that handles one state byte per clock. It has one S-box for the data and one
for the key schedule, and a single 8-bit counter as its whole controller. A
block is loaded in 16 cycles and the result is ready **160 cycles** after the
first load cycle. The 16 ciphertext bytes are then shifted out in 16 more
cycles, and the last round is computed while they leave. One input,
`start_in`, gates the core's clock, so an idle core has no clock activity.

The architecture (block set, port names, controller decodes, clock gate,
composite-field S-box, logic-minimised round constant, 160-cycle budget)
follows the paper *An Ultra-Low Power AES Encryption Core in 65nm SOTB CMOS
Process*. The paper does not give the internal organisation of the data
units or the exact cycle plan. Those parts were designed here and are marked
as such below and in each file's header.

## The byte loop

```
            data_in ──┐                       key_in
                      v                          v
  ┌──────────────> P2S converter ──> XOR <── key expansion (S-box 2, Rcon)
  │                                   │            │ new key byte
  │                                   v            v
  │                         byte permutation ─> S-box 1 ──> XOR ──> data_out
  │                                                │
  └──────────── 4 bytes ──── MixColumns <──────────┘
```

Each cycle the byte permutation unit hands out one state byte in
ShiftRows order. S-box 1 substitutes it and the MixColumns unit
accumulates it. Every fourth cycle a finished column goes in parallel into
the parallel-to-serial (P2S) converter. The converter returns it one byte
per cycle through the AddRoundKey XOR into the byte permutation unit. While
loading, the converter passes `data_in` instead, so the plaintext gets the
initial AddRoundKey (with `key_in`) on the same XOR. The final round has no
MixColumns: S-box 1's output plus the newest round-key byte is `data_out`.

## The counter schedule

Everything is decoded from one 8-bit counter (`aes_controller`).
`counter[7:4]` is the round index and `counter[3:0]` the byte step: bits
[3:2] give the column and bits [1:0] the row.

| counter  | what happens                                                        |
|----------|---------------------------------------------------------------------|
| 0–15     | load: state byte k = `data_in ^ key_in`, key byte k into key register |
| 16–31    | round 1 reads the loaded state; its results are written from 20 on |
| 16r–16r+15 | round r reads state r-1 and writes state r from 16r+4 to 16r+19 |
| 159      | `comp` rises (end of the 160-cycle budget)                         |
| 160–175  | round 10, needs `unload_in`: ciphertext byte j on `data_out` at 160+j |

The counter rules follow the paper. While below 16 it counts only while
`load_in & start_in`. Once above 158 it counts only while `unload_in`. In
between it counts while `start_in`. Whenever it does not count it returns to
0. The decoded outputs are also the paper's: `busy_out` = counter > 15,
`comp` = counter > 158, MixColumns enable = busy, MixColumns "shift"
(accumulate) = row ≠ 0, P2S select = counter > 19, and the round
index passed on = busy ? counter[7:4] : 0. The paper's `key_shift_in` is
`~load_in`.

## Overlapping rounds: the byte permutation unit

This is the least obvious part of the design. Rounds are only 16 cycles
long, but MixColumns adds 4 cycles of latency: a byte read at cycle t
returns as its MixColumns result at t+4. Round r+1 therefore begins reading
state r while the last column of state r is still being written. ShiftRows
makes this possible. The first column round r+1 needs is made of
`s[0][0], s[1][1], s[2][2], s[3][3]`, and all but the last were written
early in round r. The last one, `s[3][3]`, is written in the very cycle
round r+1 needs it, so it is passed straight through from the unit's input
to its output. Every other byte is already stored.

`aes_byte_permutation` keeps the state in 16 byte slots and moves no data
to perform ShiftRows; it renames slots instead. The byte wanted at counter
t = 16r + 4c + i (column c, row i) is row i, column (c+i) mod 4 of the
previous state. In this cycle plan that byte was written exactly

    d(t) = base − 4·i + (c + i ≥ 4 ? 16 : 0),   base = 16 in round 1, 12 afterwards

cycles earlier. Round 1 reads the loaded state, which was written without
the 4-cycle MixColumns delay. While loading, byte k goes to slot k. In a
round, the arriving byte goes into the slot being read in the same cycle,
read before write. The slot to read at t is therefore the one that was read
at t − d(t), or slot t − d(t) for a byte of the loaded state. Depth 0 is
the pass-through. A constant function in the module evaluates this recursion
at elaboration into a small {round, step} → slot table, so the table is
derived and not typed in. From round 2 on the schedule repeats every three
rounds and uses 12 slots, because four bytes are always in flight through
MixColumns and the converter.

## Key schedule on the fly

`aes_key_expansion` keeps the key in a 16-byte shift register and produces
byte j of round key r in the cycle with counter 16r + j:

    K_r[j] = K_{r-1}[j] ^ K_r[j-4]                                     (j ≥ 4)
    K_r[j] = K_{r-1}[j] ^ S(K_{r-1}[12 + (j+1) mod 4]) ^ (j = 0 ? Rcon(r) : 0)

`K_{r-1}[j]` is 16 cycles old and `K_r[j-4]` is 4 cycles old. The S-box 2
input is 3 cycles old for j = 0..2 and 7 cycles old for j = 3. RotWord is
done by the choice of taps. The newest byte goes to the final-round XOR, so
round key 10 reaches `data_out` as it is made. The byte made 4 cycles
earlier is exactly the one that the MixColumns result of round r needs, so
it feeds the AddRoundKey XOR of rounds 1–9. During loading the XOR takes
`key_in` directly. `aes_rcon` produces 01 02 … 80 1B 36 for r = 1..10 as
hand-minimised sum-of-products logic, using the unused indices as
don't-cares.

## The S-box

`aes_sbox` does not use a lookup table. It maps the byte into the tower
field GF(((2²)²)²) (polynomials z²+z+1, y²+y+{10}, x²+x+{1100}, with the AES
element x mapped to 0x42). It inverts there using GF(2⁴) and GF(2²)
arithmetic. The map back is merged with the linear part of the affine
transform into one 8×8 bit matrix, followed by `^ 0x63`. The paper asks for
a composite-field S-box. The particular polynomials and matrices are this
design's own. The same module is used as S-box 1 and S-box 2.

## MixColumns and the P2S converter

`aes_mixcolumns` adds each incoming byte's contribution to all four outputs
at once. The four accumulators rotate by one place per byte, so each one
always applies the same coefficient (2, 3, 1, 1). On row 0 the rotated-in
value is replaced by zero, which starts a new column without a clear cycle.
The full column is available combinationally with its fourth byte.
`aes_p2s` captures it on that edge (the controller's `load_pa2ser`, an
addition to the paper's signal list) and shifts it out row 0 first.

## Clock gate and host protocol

`aes_clock_gate` is the paper's multiplexer: `clk = start_in ? clk_aes : 1`.
It is glitch-free only if `start_in` changes while `clk_aes` is high, so
drive the core's inputs from logic clocked on the rising edge of `clk_aes`.
To encrypt one block:

1. Keep `start_in` high. Raise `load_in` for 16 cycles, with plaintext byte
   k on `data_in` and key byte k on `key_in` in cycle k (FIPS-197 byte
   order, column-major). Dropping `load_in` early restarts the load.
2. Lower `load_in` (an assertion checks that it stays low while `busy_out`
   is high, because it also switches the key register back to loading).
   `busy_out` is now high.
3. `comp` rises 159 clocks after the first load cycle. `unload_in` must be
   high in that cycle; it may be raised earlier. The ciphertext bytes
   0..15 appear on `data_out` in the 16 following cycles. Lower `unload_in`
   in the last of them, and the core returns to idle (counter 0). If
   `unload_in` is low when `comp` rises, the result is dropped and the core
   goes idle.

`start_in` low at any point freezes the core, and it resumes where it
stopped. Reset (`rst_n`, asynchronous, active low) clears only the counter.
All data registers are written before they are read.

## Where this departs from the paper

- Data-unit internals (byte permutation, MixColumns, P2S, key register
  taps) and the overlapped cycle plan are this design's own.
- The byte permutation unit addresses its 16 slots through a computed
  read schedule (see above). That schedule is decoded from the counter,
  where a hand-built shift-register permutation might be smaller.
- The paper gives the round index feeding Rcon as 0..9. Here round key r is
  produced while `counter[7:4]` = r, so Rcon is decoded for 1..10.
- In the controller drawing, the +1 adder comes after the counter/0
  multiplexer. It is implemented so that a non-counting cycle gives 0, not 1.
  Which comparator drives which select bit of the mode multiplexer was read
  from the signal meanings: loading goes with `load_in`, done goes with
  `unload_in`.
- Round 10 runs during the 16 unload cycles, after the 160 cycles to `comp`.
- The counter does not stop by itself after unloading; `unload_in` must
  drop in the 16th unload cycle.
- Physical implementation (65 nm SOTB or 180 nm standard cells, layout, the
  power numbers) is outside the RTL.

## Verification

Every module has a self-checking testbench in `tb/`, ending with a
`TB_RESULT checks=N failures=M` line. `aes_model_pkg` is an independent
reference model of AES-128 written from FIPS-197 (S-box by exhaustive
inverse search, whole-array rounds). It checks:

- `tb_aes_core`: the FIPS-197 C.1 vector, 11 random blocks and one block
  that completes but is not unloaded, end to end
  at the default configuration. It checks `busy_out`/`comp` timing (comp
  exactly at cycle 159). It also makes each control mechanism happen and
  counts it: clock-gate pauses in the middle of a block, aborted loads,
  early `unload_in`, and a result dropped without unloading.
- `tb_aes_sbox`: all 256 inputs. `tb_aes_rcon`: r = 1..10.
- `tb_aes_controller`: counter and all decodes against a cycle model under
  random inputs.
- `tb_aes_key_expansion`, `tb_aes_byte_permutation`, `tb_aes_mixcolumns`,
  `tb_aes_p2s`, `tb_aes_clock_gate`: each unit against the timing the core
  relies on.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/aes_pkg.sv \
    tb/aes_model_pkg.sv tb/tb_aes_core.sv --top-module tb_aes_core
./obj_dir/Vtb_aes_core
```

## Files

| file | content |
|------|---------|
| `rtl/aes_pkg.sv` | byte type, key size, GF(2^8) doubling |
| `rtl/aes_core.sv` | top level: wiring of the loop, final-round XOR |
| `rtl/aes_controller.sv` | 8-bit counter and decodes |
| `rtl/aes_clock_gate.sv` | `start_in` clock multiplexer |
| `rtl/aes_byte_permutation.sv` | 16-byte state store, ShiftRows by slot renaming, pass-through |
| `rtl/aes_sbox.sv` | tower-field S-box |
| `rtl/aes_mixcolumns.sv` | byte-serial MixColumns |
| `rtl/aes_p2s.sv` | parallel-to-serial converter / `data_in` path |
| `rtl/aes_key_expansion.sv` | on-the-fly key schedule |
| `rtl/aes_rcon.sv` | round-constant logic |
| `tb/aes_model_pkg.sv` | reference AES-128 model |
| `tb/tb_*.sv` | testbenches |
