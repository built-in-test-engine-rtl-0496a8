# Microcode-driven memory BIST engine

Built-in self-test logic usually hard-wires its test algorithm or keeps a set of
algorithms in an on-chip ROM. This engine holds neither. Before each test the
tester shifts one March algorithm into a small register, as a compact
microcode. The engine then runs that algorithm against the memory at the
memory's own clock, one operation per cycle, and compares every read on chip.
Only a pass/fail report goes back to the tester. To run a different algorithm,
the tester shifts in a new one. The on-chip cost is one register as long as the
longest algorithm you intend to run, plus a small state machine, an address
counter and a comparator.

## March tests in brief

A March test is a list of *elements*. Each element has an address order and a
short list of operations. The engine applies all of an element's operations to
one cell, then moves to the next cell in that order, until every cell has been
visited. It then starts the next element.

There are four operations:

- `w0`: write 0
- `w1`: write 1
- `r0`: read and expect 0
- `r1`: read and expect 1

The order is ascending (⇑, address 0 to n‑1) or descending (⇓, the exact
reverse). Example, MATS+:

    ⇕(w0) ⇑(r0,w1) ⇓(r1,w0)

## The microcode

Every field is 3 bits wide. There are two kinds.

**Element header `{AO, D1, D0}`**

- `AO = 1`: ascending address order.
- `AO = 0`: descending address order.
- `D`: the number of idle "hold" cycles (0 to 3) inserted after the element.
  They exist for data-retention checks.

**Operation `{RW1, RW0, EE}`**

- `RW` codes: `00` = r0, `01` = r1, `10` = w0, `11` = w1. Bit 1 means write.
  Bit 0 is the data value, written or expected.
- `EE = 1`: this is the element's last operation. The next field is a new
  header.
- `EE = 0`: another operation of the same element follows.

Because of this layout, an algorithm with *e* elements and *o* operations needs
exactly **3·(e + o)** bits. The bits of MATS+, in the order they are sent:

    100 101 | 100 000 111 | 000 010 101
    hdr w0  | hdr r0  w1  | hdr r1  w0
    ⇑,d=0   | ⇑,d=0       | ⇓,d=0          = 24 bits

Sizes of common algorithms:

| algorithm | elements + operations | bits |
|-----------|-----------------------|------|
| MATS+     | 3 + 5                 | 24   |
| March C-  | 6 + 10                | 48   |
| March B   | 5 + 17                | 66   |
| March G   | 7 + 23                | 90   |

The published bit count for March B is 63. The usual 17-operation form of
March B needs 66 bits. Both fit in the register.

March G needs delays between its last elements. Because a delay follows the
element whose header carries it, the delay before element *k* is coded in the
header of element *k*‑1.

The default register is 90 bits (`REG_BITS`), which is exactly March G.

## Block structure

```
 ate_data_in ──► microcode_reg ──code,len──► instr_decoder ──► BIST status out
                                             │   │   ▲   (done, fail, address, count)
                               init/dir/step │   │   │ err, err_addr
                                             ▼   │   │
                                         addr_gen│ comparator ◄─────────┐
                                             │   │   ▲ expected/address  │
                               row,col       ▼   ▼   │ (from decoder)    │
 sys_en/we/addr/wdata ──────────────────►  mem_mux                       │
                                             │                           │
                                             ▼                           │
                                          mem_array ──► rdata ──► sys_rdata
```

- **`microcode_reg`**: the register file. It is a serial shift register with a
  clear input and a count (`len`) of the bits loaded. After L bits, the first
  bit sent is at index L‑1 and the last at index 0.
- **`instr_decoder`**: the state machine and instruction counter. It reads the
  next 3-bit field at `code[rem-1 -: 3]`, where `rem` is the number of bits not
  yet consumed. It drives the address generator, the memory controls and the
  comparator, and it keeps the fail log.
- **`addr_gen`**: an up/down counter split into row (upper) and column (lower)
  address bits. It raises `at_end` at the last address of the current element.
- **`comparator`**: delays the expected value and the address of each read by
  the memory's one-cycle latency. It then compares them with the read word.
- **`mem_mux`**: gives the memory to the system port, or to the engine while
  the engine is busy.
- **`mem_array`**: the memory under test. It is a single-port synchronous RAM
  with a one-cycle read latency. A stuck-at cell can be switched on with
  parameters.
- **`bist_top`**: wires all of the above together.
- **`bist_pkg`**: the field types, the operation codes and the decoder state
  enum.

## How the decoder walks the algorithm

The states are `IDLE → HDR → OP … → [DLY] → HDR … → FLUSH → DONE`.

- **HDR (1 cycle).**
  - Takes the header.
  - Presets the address generator to address 0 (ascending) or the top address
    (descending).
  - Latches the delay.
  - Records `elem_ops`, the bit position of the element's first operation.
- **OP (one memory operation per clock).**
  - Writes drive an all-0 or all-1 word.
  - Reads pass the expected value and the address to the comparator.
  - After an operation with `EE = 1`:
    - If the address is not the element's last, the address steps and `rem`
      rewinds to `elem_ops`. The same operations then repeat on the next cell.
    - If it is the last address, the decoder moves past the element.
- **DLY (0 to 3 cycles).** The memory sits idle (hold).
- **End of the algorithm.** The algorithm ends when fewer than 3 bits remain.
  One FLUSH cycle lets the last read reach the comparator. Then `bist_done`
  rises.
- **Truncated algorithm.** If the algorithm stops in the middle of an element,
  its final operation closes that element.

**Timing.** An element of *k* operations over *N* words with delay *d* takes
**1 + N·k + d** cycles. From the clock edge that accepts `bist_start` to the
edge that raises `bist_done`, the run takes the sum over all elements plus 2.

Examples on the default 1K-word memory:

| algorithm | cycles |
|-----------|--------|
| MATS+     | 5125   |
| March C-  | 10248  |
| March B   | 17415  |
| March G   | 23567  |

The testbenches check these numbers exactly.

## Failure reporting

The comparator raises `err` in the cycle after a read whose data differs from
the expected value in any bit. It also passes along the address of that read.

The decoder keeps:

- `bist_fail`: sticky.
- `bist_fail_addr`: the first failing address.
- `bist_fail_cnt`: the number of failing reads. It saturates at `CNT_W` bits.

A failure does not stop the test. `bist_start` clears the log.

## Interfaces and handshake

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low
reset.

**Loading an algorithm**

1. Pulse `ate_clear` for one cycle.
2. Hold `ate_shift_en` high for one cycle per bit, presenting the bits on
   `ate_data_in` in sending order.

If more than `REG_BITS` bits are shifted, only the last `REG_BITS` are kept.

**Running it**

1. Pulse `bist_start` for one cycle while the engine is idle or done.
2. `bist_busy` is high from the next cycle until `bist_done`.
3. `bist_done` stays high until the next start.

The loaded algorithm stays in the register, so it can be started again.

**System port**

- `sys_en`, `sys_we`, `sys_addr` and `sys_wdata` reach the memory only while
  `bist_busy` is low. Requests made during a test are dropped.
- `sys_rdata` is the memory output. Read data appears one cycle after the read.

## Parameters

| parameter   | default | meaning |
|-------------|---------|---------|
| `REG_BITS`  | 90      | microcode register length (the longest algorithm, March G) |
| `ROW_W`, `COL_W` | 5, 5 | row and column address bits; 1K words by default |
| `DATA_W`    | 1       | word width; March operations write and expect solid words |
| `CNT_W`     | 16      | width of the fail counter |
| `FAULT_EN`, `FAULT_ADDR`, `FAULT_BIT`, `FAULT_VAL` | off | stuck-at cell in the memory model, for demonstration only |

## What is specified and what is chosen here

These parts follow the published design:

- The block set and the connections between the blocks.
- The serial register loaded from the tester.
- The 3-bit header and operation fields, with their codes and meanings.
- The delay of up to three cycles after an element.
- The instruction counter and the state-machine decoder.
- The up/down address counter with row and column outputs.
- On-chip comparison that reports to the decoder and to the tester.
- The system/BIST multiplexer.

These are choices made for this implementation:

- **Bit order in the register.** The first field sits at the top end.
- **How the end of the algorithm is found.** A bit-count register
  (`len`) plus the rule that fewer than 3 remaining bits ends the test.
- **Decoder states.** The exact state set, including the one-cycle header
  state and the flush cycle.
- **Read timing.** The memory has a one-cycle read latency, and the comparator
  delay matches it.
- **Fail log.** Its contents: first address, a count, and no stop-on-fail.
- **Mux control.** The mux select comes from `busy`, and system requests during
  a test are dropped.
- **Sizes.** Memory size and word width, 1K × 1 by default. The memory is a
  model of the device under test, not part of the engine. The engine works
  with any `ROW_W`/`COL_W`/`DATA_W`.
- **Reset.** Asynchronous reset of all control registers.

Not included:

- Testing several memory banks concurrently. The design names it only as a
  possibility.
- Diagnosis or repair.
- Flash-specific program and erase timing.
- The external tester itself. The testbenches play its role.

## Verification

Each module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|-----------|----------------|
| `tb_microcode_reg` | bit placement, the length count, saturation and clear |
| `tb_addr_gen` | both directions, `at_end`, the row/column split, random init/step traffic |
| `tb_comparator` | random reads with corrupted data; `err` and the failing address land in the right cycle |
| `tb_mem_mux` | random selection of the system side and the BIST side |
| `tb_mem_array` | random traffic against a reference array, and the stuck-at cell |
| `tb_instr_decoder` | the decoder alone, around a behavioural four-word address counter (details below) |
| `tb_bist_top` | end to end with two engines, one good memory and one faulty (details below) |
| `tb_bist_top_full` | the design at its default parameters (details below) |
| `tb_bist_top_sizes` | MATS+ on 1K, 128K and 1M words, each with a stuck-at-0 cell; exact cycle counts (5N+5) and the failing address |

**`tb_instr_decoder`** runs MATS+, March C-, March B, March G and a MATS+
variant with delays 1, 2 and 3. It compares every memory operation with a
reference sequence. It checks the exact cycle counts and the fail log, using
injected error pulses.

**`tb_bist_top`** runs two engines side by side on the same tester inputs. One
has a good 1K memory. The other has a memory with a stuck-at-1 cell. For each
of the four algorithms it checks:

- serial loading, and that the loaded length is 3·(e+o);
- every operation seen on the memory side of the mux;
- the cycle counts;
- pass on the good memory;
- on the faulty memory: the fail flag, the failing address, and the number of
  failing reads predicted from the algorithm;
- that a system write attempted mid-test is dropped;
- the final memory contents, read through the system port.

It also counts that each mechanism occurs: reloads, both address orders,
multi-operation elements, address steps, delay cycles, compared reads, detected
faults, system accesses and blocked requests.

**`tb_bist_top_full`** leaves every parameter at its default. It fills the
90-bit register with March G, runs it, then reloads March C- and runs it.

The testbenches share `tb/bist_tb_pkg.sv`. That package encodes algorithms into
microcode and computes the expected operation sequence, cycle count and
stuck-at failures. It does not use the RTL to do this.

Simulating with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bist_pkg.sv tb/bist_tb_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
