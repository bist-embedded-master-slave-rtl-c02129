# SPI master/slave link with built-in self-test

This is a single-master, single-slave SPI link in which the master can test a
circuit that sits inside the slave, using nothing but the four SPI wires. The
circuit under test (CUT) is a small ALU in the slave. For a self-test, the
master generates pseudo-random bytes with an LFSR and sends them over MOSI. The
slave feeds each byte to its ALU and returns the result over MISO. The master
folds every returned result into a signature register (MISR). At the end it
compares the signature with a stored reference and raises `good` or `faulty`.
Outside a self-test, the same link does ordinary full-duplex byte exchanges.

The structure follows a published BIST-embedded SPI design: 8-bit shift
registers, TPG and ORA in the master, a controller and the CUT in the slave,
255 LFSR patterns, and LFSR/MISR structures that reproduce that design's 4-bit
examples. Where that description stops, this RTL makes its own choices. These
include the ALU's operations, how a byte is split into operands, the 8-bit
polynomials, the timing of the link and the test sequence. They are listed in
[Departures and own choices](#departures-and-own-choices).

```
             spi_with_bist
 ┌───────────────────────────────┐           ┌──────────────────────────────┐
 │ spi_master_node               │   cs_n    │ spi_slave_node               │
 │  test_controller              │ ────────▶ │  spi_slave (engine)          │
 │  tpg_lfsr ─▶ mux ─▶ spi_master│   sclk    │      │ rx byte    ▲ tx byte  │
 │            mas_data ┘   │  ▲  │ ────────▶ │      ▼            │          │
 │                         │  │  │   mosi    │  slave_controller ─────┐     │
 │  ora (misr, ROM, cmp) ◀─┘  │  │ ────────▶ │      │ op,a,b     result│     │
 │                            │  │   miso    │      ▼                 │     │
 │                            └──┼◀───────── │   cut_alu ─────────────┘     │
 └───────────────────────────────┘           └──────────────────────────────┘
```

## How a self-test runs

A self-test is a stream of SPI transfers in which the answer to each pattern
comes back one transfer later. The reason is that SPI is full duplex. While
the master shifts pattern *k* out on MOSI, the slave is already shifting
something back on MISO. The slave cannot know the ALU result for pattern *k*
before it has received all of it, so it returns the result for pattern *k−1*.

In detail, after `s_com` rises with `mode = 1`:

1. The test controller loads the LFSR with its seed (`FF`) and clears the MISR
   and the verdict.
2. It runs **256 transfers** (`NUM_PATTERNS + 1`). Transfer *k* sends LFSR
   pattern *p_k*, and the LFSR steps when the transfer ends.
3. In the slave, the received byte is split into `{op[1:0], a[2:0], b[2:0]}`.
   The ALU result is stored in the clock after the last bit arrives, and it is
   loaded into the slave's shift register at the next `cs_n` fall.
4. The byte the master receives in transfer *k* ≥ 1 is `ALU(p_{k−1})`, and it
   is folded into the MISR. The byte received in transfer 0 is thrown away.
   The 256th transfer exists only to bring back the last answer.
5. The controller pulses `ora_check`. The ORA compares the signature with its
   one-word reference ROM and latches `good`/`faulty`, with `test_valid = 1`.
   `done` pulses at the same time.

The reference signature is not a number someone typed in. `bist_pkg` holds a
fault-free model of the LFSR, the ALU and the MISR, written separately from
the RTL modules. The ORA's `GOLDEN` parameter calls it at elaboration for
`NUM_PATTERNS` patterns. For the default 255 patterns the value is `08`. If
you change the CUT, the polynomials or the pattern count, change the model in
`bist_pkg` as well, and the reference follows.

**Why the MISR uses a different polynomial from the LFSR.** The published
4-bit examples use the same polynomial, x⁴+x³+1, for both registers. Carrying
that over to 8 bits, with x⁸+x⁶+x⁵+x⁴+1 in both, produces a blind spot. A
stuck-at-0 or stuck-at-1 fault on ALU result bit 0, 1, 2, 6 or 7 then gives
exactly the fault-free signature after 255 patterns, so the test cannot see
it (aliasing). The MISR therefore uses x⁸+x⁴+x³+x²+1. With that polynomial,
every one of the 16 single stuck-at faults on the 8 result bits changes the
signature. Both polynomials are primitive.

**Fault hook.** `fault_inject = 1` forces ALU result bit 0 to 0. Its only
purpose is to let a simulation watch the self-test fail. A self-test run with
it reports `faulty` (signature `C7` instead of `08`).

## The SPI link

Each side has one 8-bit shift register, and the two form a ring. The master's
MSB goes out on MOSI into the slave's LSB, and the slave's MSB goes out on
MISO into the master's LSB. After eight bits the two bytes have swapped
places. `cs_n` is active low and is driven by the master, which also makes
`sclk`.

- **Clock modes.** `CPOL` is the idle level of `sclk`. With `CPHA = 0`, data
  is sampled on the leading edge and changed on the trailing edge, and the
  first bit is on the line as soon as `cs_n` falls. With `CPHA = 1`, data is
  changed on the leading edge and sampled on the trailing edge. All four
  modes work; mode 0 is the default. Both nodes must use the same mode, which
  the top enforces by passing one pair of parameters to both.
- **Master timing** (`spi_master`, H = `CLK_DIV` clocks per half period of
  `sclk`):
  - `cs_n` falls one clock after `start`.
  - The first `sclk` edge comes H clocks later, followed by 16 edges H clocks
    apart.
  - `cs_n` rises H clocks after the last edge. At that point `rx_data` is
    valid and `done` pulses, (2·8+2)·H clocks after `start`.
  - The engine then stays busy for a further H clocks with `cs_n` high, so
    the slave can see the deselect.
  - One transfer therefore occupies the link for (2·8+3)·H clocks.
  - A self-test at H = 4 takes 255·77 + 74 = 19 709 clocks.
- **Slave clocking.** The slave does not clock anything on `sclk`. It runs on
  the system clock and passes `cs_n`, `sclk` and `mosi` through two-flop
  synchronisers. It detects `sclk` edges by comparing the synchronised level
  with its previous value. An edge therefore takes effect 3 clocks after it
  appears on the wire, which is why `CLK_DIV` must be at least 4; the top
  stops elaboration otherwise. `miso` is driven 0 while `cs_n` is high. There
  is no tri-state, because the bus has one slave.
- **Normal mode** (`mode = 0`). A rising `s_com` makes one transfer of
  `mas_data` against `slv_data`. Afterwards `mas_out` holds the slave's byte
  and `slv_out` the master's byte. `done` comes 73 clocks after the clock
  that takes the `s_com` edge (H = 4), or up to 3 clocks later if the engine
  is still in its gap after the previous operation.

## Pattern generator and signature register

`tpg_lfsr` is a Fibonacci LFSR. Stages x₁…x_N sit in bits 0…N−1. Each step
moves every stage up by one, and x₁ takes x₀, the XOR of x_N and of every
stage x_k whose coefficient k is set in `POLY`. With `WIDTH = 4`,
`POLY = x⁴+x³+1` and seed `1111`, this is the classic 4-bit example
(x₀ = x₃ ⊕ x₄). It runs 1111, 0111, 0011, 0001, 1000, … through all 15
non-zero states, and the testbench checks all 16 rows of that sequence. The
default is 8 bits with x⁸+x⁶+x⁵+x⁴+1 (taps x₄, x₅, x₆, x₈), which has period
255. An assertion checks that the register never enters the all-zero lock-up
state.

`misr` is an internal-XOR signature register:

- Stage 0 takes `d[0] ⊕ Q[N−1]`.
- Stage i > 0 takes `Q[i−1] ⊕ d[i]`, with `Q[N−1]` also XORed in where
  `POLY[i]` is set.

With 4 bits and x⁴+x³+1, feedback goes into the first and last stage. Feeding
it the four example input streams 0100, 0111, 1011 and 1111 (rightmost bit
first, into stages Q0…Q3) gives 0111, 1101, 0010, 0010, and the testbench
checks this.

## The circuit under test

`cut_alu` is combinational. The slave controller splits each received byte
into `op = byte[7:6]`, `a = byte[5:3]` and `b = byte[2:0]`:

| op | result (8 bits)             |
|----|-----------------------------|
| 00 | a + b                       |
| 01 | a − b (two's complement)    |
| 10 | a · b                       |
| 11 | a ⊕ b                       |

The published design only says that the CUT is an ALU doing an arithmetic
operation. This operation set was chosen so that every pattern bit reaches
the result and a full 8-bit word comes back.

## Modules

| file | role |
|------|------|
| `rtl/bist_pkg.sv` | width, polynomials, seed, pattern count, mode and opcode enums, reference model and `golden_signature()` |
| `rtl/spi_if.sv` | the 4-wire bus as an interface with `master`/`slave` modports |
| `rtl/spi_with_bist.sv` | top: the two nodes and the bus |
| `rtl/spi_master_node.sv` | master side: engine, TPG, input mux, ORA, test controller |
| `rtl/spi_master.sv` | SPI master engine |
| `rtl/tpg_lfsr.sv` | test pattern generator |
| `rtl/ora.sv` | response analyser: MISR, reference ROM, comparator |
| `rtl/misr.sv` | signature register |
| `rtl/test_controller.sv` | sequencer for normal and self-test operations |
| `rtl/spi_slave_node.sv` | slave side: engine, controller, CUT |
| `rtl/spi_slave.sv` | SPI slave engine (oversampling) |
| `rtl/slave_controller.sv` | splits bytes for the CUT, returns results |
| `rtl/cut_alu.sv` | the circuit under test |

Top-level ports of `spi_with_bist`:

- Inputs: `clk`, `rst_n` (synchronous, active low), `mode` (0 exchange,
  1 self-test), `s_com` (rising edge starts an operation), `mas_data`,
  `slv_data`, `fault_inject`.
- Outputs: `mas_out`, `slv_out`, `slv_valid`, `pattern`, `signature`,
  `test_valid`, `good`, `faulty`, `busy`, `done`, and the four bus wires for
  observation.

Parameters: `CLK_DIV` (4), `CPOL` (0), `CPHA` (0) and `NUM_PATTERNS` (255).

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/bist_pkg.sv rtl/spi_if.sv tb/tb_spi_with_bist.sv \
    --top-module tb_spi_with_bist -o sim
./obj_dir/sim
```

Substitute any other testbench name. The testbenches are:

- **`tb_spi_with_bist`**: the whole design at its default parameters.
  - Normal exchanges, including the byte pairs B2/C4 and 24/81, with their
    latency.
  - Two passing self-tests and one with the fault injected.
  - Every byte on MOSI and MISO checked against independent models.
  - It counts each of these mechanisms and fails if one never happened.
- **`tb_spi_with_bist_modes`**: the other three clock modes, with 40-pattern
  self-tests.
- **One testbench per module**, against behavioural SPI partners or
  stand-ins written from the protocol rules: `tb_spi_master` and
  `tb_spi_slave` cover all four modes, `tb_tpg_lfsr` and `tb_misr` cover the
  4-bit example tables, and `tb_cut_alu` is exhaustive.

All runs take well under a second. Every register that is read is reset, so
the results do not depend on power-up values.

## Departures and own choices

Taken from the published description:

- the 8-bit data width and the single shift register per side (MSB to LSB in
  both directions);
- active-low chip select;
- TPG and ORA in the master, and a controller and the CUT in the slave;
- 255 patterns from an 8-bit LFSR;
- the 4-bit LFSR (x₀ = x₃ ⊕ x₄) and the 4-input MISR with their example
  sequences;
- an ORA made of compactor, reference ROM and comparator;
- a test controller that starts the test and evaluates it.

Chosen here, because the description does not give them:

- the ALU operations and the byte layout;
- the 8-bit polynomials, with a different polynomial in the MISR to avoid the
  aliasing described above;
- the seed `FF`;
- the one-transfer answer latency and the resulting 256-transfer run;
- the `sclk` divider, the `cs_n` setup, hold and gap, and mode 0 as the
  default;
- the oversampling slave on a shared system clock;
- the synchronous reset;
- `s_com` acting on its rising edge, with `mode` telling the slave what to do
  (the mode is not sent over SPI);
- the reference signature computed at elaboration;
- the `fault_inject` hook.

Not included:

- The interrupt line, Wishbone bridge and priority arbiter for several
  slaves. These belong to an earlier scheme that the published design is
  compared with; this design has exactly one slave.
- A reference waveform of the published design shows two LFSR values
  exchanged between master and slave. The description does not explain it,
  and it is not modelled beyond the normal-mode byte exchange.
