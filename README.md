# Byte-serial AES MixColumns / InvMixColumns engine

MixColumns is the AES step that multiplies each 4-byte column of the
128-bit state by a fixed 4x4 matrix over GF(2^8). A fully parallel version
needs sixteen constant multipliers and a 128-bit datapath. This design
takes the opposite approach for small, low-cost implementations. It
accepts **one byte per clock** and keeps **four 8-bit row accumulators**.
A single constant multiplier is **shared between the forward and inverse
transforms**. A 32-bit mixed column comes out every 4 cycles and a full
128-bit state every 16 cycles.

The same hardware computes both directions:

| direction      | matrix (circulant, first row) | select `inv` |
|----------------|-------------------------------|--------------|
| MixColumns     | `02 03 01 01`                 | 0            |
| InvMixColumns  | `0E 0B 0D 09`                 | 1            |

## How a column is computed one byte at a time

Write the column as bytes `s0..s3` (row 0 first). Output row `i` is

    s'_i = XOR over k of  M[i][k] * s_k

Each input byte `s_k` therefore contributes one product to every output
row. The engine handles one byte per clock. It computes that byte's four
products and XORs each product into the accumulator of its row (registers
R1..R4, `acc_q` in `mixcol_unit`). After the fourth byte the accumulators
hold the finished column.

Both matrices are circulant, so the entry in row `i`, column `k` is
`C[(k - i) mod 4]`:

- forward: `C = {02, 03, 01, 01}`
- inverse: `C = {0E, 0B, 0D, 09}`

A byte therefore needs only the four products `C[0..3]*s`, whatever its
row. A 4-way rotation multiplexer routes `C[(k-i) mod 4]*s` to row `i`. It
is indexed by the byte position `k` that the control unit supplies.

### The shared constant multiplier (`gf_coef_unit`)

Multiplication by `{02}` ("xtime") is a left shift, followed by an XOR
with `{1B}` when the top bit falls out. Three chained xtime stages give
`2s`, `4s` and `8s`. Every coefficient of both matrices is an XOR of `s`
and those three values. The `4s` and `8s` terms appear only in the
inverse products, so the direction select is just an AND mask on them:

    prod[3] = s       ^ inv&8s          -> 01*s or 09*s
    prod[2] = prod[3] ^ inv&4s          -> 01*s or 0D*s
    prod[1] = prod[3] ^ 2s              -> 03*s or 0B*s
    prod[0] = 2s      ^ inv&(8s ^ 4s)   -> 02*s or 0E*s

The unit is purely combinational. It amounts to three xtime stages, about
six byte-wide XORs and the masks.

## Control and timing (`mixcol_ctrl`)

A 3-bit counter counts the accepted bytes of the current column (0..3).
It supplies the datapath's enable, the byte position, and `last` on the
fourth byte. On that fourth byte's clock edge:

- the finished sums, including the fourth byte's products, load the 32-bit
  output register;
- R1..R4 are cleared.

The next column can start on the very next cycle, so a steady byte stream
produces a column every 4 cycles and a state every 16, with no bubbles. A
second, 2-bit counter tracks the column within the state.

`inv` is sampled on the first byte of each state and held for all 16
bytes. Changing `inv` inside a state has no effect until the next state
begins.

`din_valid` qualifies each byte. While it is low the engine simply waits,
and the accumulators keep their partial sums.

Cycle behaviour of `mixcol_top`, with bytes presented on consecutive
clocks starting at cycle 0:

| event                                   | visible after the edge ending cycle |
|-----------------------------------------|-------------------------------------|
| column 0 in `col_out`, `col_valid` = 1  | 3 (one cycle after byte 3)          |
| column c in `col_out`                   | 4c + 3                              |
| whole state in `state_out`, `state_valid` = 1 | 16 (17 cycles after byte 0)   |
| next state's first byte accepted        | 16, back to back                    |

`col_valid` and `state_valid` are one-cycle pulses. The data registers
hold their values until they are overwritten.

## State assembly (`state_out_reg`)

Each finished column shifts into a 128-bit register. After four columns,
column 0 sits in bits `[127:96]` and byte 0 in `[127:120]`. A 2-bit count
raises `state_valid` with the fourth column.

## Interface (`mixcol_top`)

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | clock, rising edge |
| `rst_n`       | in  | 1     | asynchronous active-low reset of all registers |
| `din_valid`   | in  | 1     | `din` carries a state byte this cycle |
| `din`         | in  | 8     | state byte, FIPS-197 order: s(0,0), s(1,0), s(2,0), s(3,0), s(0,1), ... |
| `inv`         | in  | 1     | 0 MixColumns, 1 InvMixColumns; taken on the first byte of a state |
| `col_valid`   | out | 1     | pulse: `col_out` holds a new column |
| `col_out`     | out | 32    | mixed column, row 0 in `[31:24]` |
| `state_valid` | out | 1     | pulse: `state_out` holds a new state |
| `state_out`   | out | 128   | mixed state, byte 0 in `[127:120]` |

Reset is needed only at power-up. A reset in the middle of a state drops
the partial state, and the next byte is taken as byte 0 of a new state.

## Files

| file | contents |
|------|----------|
| `rtl/aes_mc_pkg.sv`    | byte, column and state types, direction enum, `xtime` |
| `rtl/gf_coef_unit.sv`  | shared forward/inverse constant multiplier |
| `rtl/mixcol_unit.sv`   | R1..R4 accumulators, rotation mux, 32-bit output register |
| `rtl/mixcol_ctrl.sv`   | 3-bit byte counter, column counter, direction latch |
| `rtl/state_out_reg.sv` | 128-bit state collector |
| `rtl/mixcol_top.sv`    | top level |
| `tb/mc_ref_pkg.sv`     | reference model: shift-and-add GF multiply, full matrices |
| `tb/*_tb.sv`           | self-checking testbench for each module |

## Verification

Every testbench checks the design against `mc_ref_pkg`. That package
multiplies bit by bit and applies the full matrices, so it shares no
factoring with the RTL. Each testbench prints
`TB_RESULT checks=N failures=M`. Each also has a watchdog that ends the
run with a failure if the simulation hangs.

- `gf_coef_unit_tb` checks all 256 byte values in both directions, four
  products each. It also checks `{57}*{02} = {AE}`.
- `mixcol_unit_tb` checks the standard test columns
  (`db 13 53 45 -> 8e 4d a1 bc`, `f2 0a 22 5c -> 9f dc 58 9d`, and the
  inverse of the first). It then checks 500 random columns with random
  directions and idle gaps. Each `col_valid` must come exactly one cycle
  after the fourth byte.
- `mixcol_ctrl_tb` compares the control outputs with a cycle-level model
  for 4000 cycles. `din_valid` and `inv` are random in every cycle.
- `state_out_reg_tb` feeds random columns with gaps and checks the
  assembly and the `state_valid` timing.
- `mixcol_top_tb` runs the whole engine and checks the exact value and
  cycle of every column and state. It uses the FIPS-197 Appendix B round-1
  MixColumns state (`d4bf5d30... -> 046681e5...`). It also counts each
  behaviour below and fails if any of them never occurred:
  - back-to-back states, which must take 16 cycles each and 17 from the
    first byte;
  - stalls;
  - direction switches;
  - `inv` toggling inside a state;
  - a reset in the middle of a state;
  - round trips, `InvMixColumns(MixColumns(s)) == s`.

  The top has no parameters, so this test runs the design at its only
  size.

To simulate with Verilator, for example the top:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/aes_mc_pkg.sv tb/mc_ref_pkg.sv tb/mixcol_top_tb.sv \
        --top-module mixcol_top_tb
    ./obj_dir/Vmixcol_top_tb

For another block, use its `*_tb.sv` and top module name instead. Drop
`tb/mc_ref_pkg.sv` for `mixcol_ctrl_tb` and `state_out_reg_tb`, which do
not use it.

## Where this RTL goes beyond, or differs from, the architecture it follows

The architecture fixes these elements:

- the byte-serial dataflow;
- the four accumulator registers, cleared after each fourth byte;
- the 32-bit output register;
- the 3-bit control counter;
- constants built from xtime and XOR;
- multiplexer sharing between the forward and inverse transforms;
- 16 cycles per state.

The following are this implementation's own choices:

- **Factoring of the shared multiplier and the rotation mux.** The
  architecture only says that the units share terms and that the select
  signals pick the polynomials. The specific factoring above is ours.
- **`din_valid` handshake.** The architecture assumes a new byte every
  clock. With `din_valid` held high the behaviour is the same.
- **Per-state direction latch.** This uses the 2-bit column counter. The
  3-bit byte counter only ever uses the values 0..3, and an assertion
  checks this.
- **`state_out_reg`, `col_valid` and `state_valid`.** The architecture only
  states that the complete state is available after 16 cycles. Here the
  state register loads one edge after the last column register, so
  `state_out` appears 17 cycles after the first byte. `col_out` follows
  the fourth byte of its column by one edge.
- **Reset.** The asynchronous active-low reset of every register is ours.
- **Size.** The published FPGA results quote 14 slice flip-flops and 66
  I/O pins on a Spartan-3E xc3s100e. This RTL holds:
  - 32 accumulator bits;
  - a 32-bit column register;
  - a 128-bit state register;
  - counters, direction latch and strobes.

  That is about 200 flip-flops after generic synthesis. With all 174 port
  bits brought to pins, the top would not fit that package. Leave out the
  128-bit `state_out` port and take the columns from `col_out` instead,
  and the engine needs 46 pins.
- **Not included.** SubBytes, ShiftRows, AddRoundKey and key expansion.
  This is only the MixColumns stage of an iterative AES datapath. An AES
  core connects to `din`/`din_valid`/`inv` and to `col_out` or
  `state_out`.
