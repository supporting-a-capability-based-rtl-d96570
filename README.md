# Capability address calculator

In a capability-based machine every memory reference goes through a capability: a
register that names a segment by its *base* and *limit* inside a large, never-reused
virtual address space. An instruction names a capability register, optionally an index
register, and gives a constant offset. The effective address is

    offset_within_address_space = base + index + instruction_offset
    error                       = offset_within_address_space > limit

and the full virtual address is that offset paired with the capability's *address space
number*. Done on a conventional ALU this takes several cycles per reference (and per
instruction fetch, which goes through a program capability too). This RTL implements a
dedicated unit that does the whole computation, including the bounds check, in one cycle,
for the MONADS-PC address format: 32-bit address space numbers and 28-bit offsets.

## Structure

```
capability_address_unit            top: calculator + address space RAM
├── address_calculator             the offset chip
│   ├── acu_control                command / register-number decode, output phase
│   └── bit_slice  x WIDTH         one bit of everything
│       ├── cap_reg_slice          base and limit bits of each capability register
│       ├── index_reg_slice        bits of the index registers, kill-index
│       ├── csa_cell               three-way (carry-save) adder bit
│       ├── cpa_cell               carry-propagate adder bit
│       └── sub_cell               limit subtractor bit
└── address_space_ram              address space number per capability register
acu_pkg                            default sizes, command and output-select enums
```

The address space number needs no arithmetic, so it lives in a small RAM indexed by the
capability register number. All the work is on the offset side.

## The bit slice

The calculator is built as identical one-bit slices placed side by side, so any offset
width is just a parameter (`WIDTH`, default 28). Each slice holds:

* bit *i* of the base and the limit of every capability register (`NCAP`, default 4),
  read through a **base bus** and a **limit bus**;
* bit *i* of every index register (`NIDX`, default 3), read through an **index bus**;
* bit *i* of the offset register;
* one cell each of the three-way adder, the carry-propagate adder and the subtractor.

The buses model precharged lines: they rest at one and a selected register pulls them
low when it holds a zero. In logic terms `bus = &(~sel | reg)`, so the bus carries the
selected register's bit and reads one when nothing is selected. **Kill-index** forces the
index bus to zero, turning the index term off for addressing modes without an index.

Three chains run between neighbouring slices (slice 0 gets the value in brackets):

| chain | carries | into slice 0 |
|---|---|---|
| `csa_carry` | the three-way adder's carry, which has the weight of the next bit | 0 |
| `cpa_carry` | the carry of the carry-propagate adder | 0 |
| `sub_carry` | the not-borrow of `limit + ~offset + 1` | 1 |

## How the addition works

Adding three numbers with two ordinary adders costs two carry propagations. Instead the
first stage is a row of full adders used as 3:2 compressors (carry-save, the Wallace
trick): in each bit the base, index and offset bits produce a sum bit and a carry bit,
with no connection to the neighbouring bit. The sum vector and the carry vector shifted
up by one are then added by a single carry-propagate adder. So only one carry
propagation lies on the path to the address.

The adder cell is a Manchester-style cell: from its two operands it forms *generate*
(both one), *kill* (both zero) and *propagate*; the outgoing carry is set, cleared, or
passed on. The RTL writes this as static logic; a synthesis tool is free to choose the
adder structure.

The bounds check is a second carry chain of the same kind computing `limit - offset` as
`limit + ~offset + 1`. Only its final carry matters: it is zero exactly when
`offset > limit`, and that is the error. The difference bits are not formed. The check
therefore follows the address computation in series; a four-operand tree that checks the
limit in parallel would be faster but is not built.

Overflow: the 28-bit sum wraps modulo 2**28 (the carries out of the top slice are
dropped) and only the limit is checked, not the base. A reference whose
`base + index + offset` wraps past 2**28 lands at a small offset and can pass the
check. The end-to-end test shows this on purpose (capability 3).

## Interface and timing

The chip has one set of `WIDTH` data lines for both directions: the offset goes in,
the result comes out. In the RTL the pad is split into `data_in`, `data_out` and the
drive enable `data_oe`. Besides the lines there are a 4-bit capability register number,
a 2-bit index register number and a 3-bit command (`acu_pkg::acu_cmd_e`):

| command | in the cycle it is presented | in the next cycle |
|---|---|---|
| `CMD_LOAD_BASE`  | base of `cap_no` <= `data_in` | lines free |
| `CMD_LOAD_LIMIT` | limit of `cap_no` <= `data_in` | lines free |
| `CMD_LOAD_INDEX` | index register `idx_no` <= `data_in` | lines free |
| `CMD_CALC`       | offset register <= `data_in` | `data_oe=1`, `data_out` = offset within address space, `error`, `asn_out`, `vaddr_valid=1` |
| `CMD_READ_BASE/LIMIT/INDEX` | - | `data_oe=1`, `data_out` = register value |

```
clk        _/‾\_/‾\_/‾\_/‾\_
cmd         CALC NOP  CALC
data_in     off1      off2
data_oe     ____/‾‾‾\____/‾‾
data_out        addr1     addr2
error           err1      err2
```

Values are captured at the clock edge that closes the cycle in which they are
presented. The register numbers are latched at the same edge, so the output phase sees
stable selects. A load or calculation may not be presented while the unit drives the
lines. An assertion in `acu_control` checks this. Reads need no data, so they can
follow one another every cycle. Calculations can be issued every second cycle.

Register numbers:
* `idx_no = 3` means "no index": it raises kill-index, so the index term is zero.
* `cap_no` has 4 bits but only `NCAP` (4) registers exist. A calculation through
  numbers 4 to 15 raises `error`, and its `data_out` value is meaningless.

`error` is only ever high during the output phase of a calculation.

## Departures and choices

These follow the original chip: the organisation into slices, the precharged-bus read
behaviour, kill-index, the carry-save stage followed by one carry-propagate adder and a
separate subtractor, and the sizes (28-bit offset, 4 capability registers, 3 index
registers, 4-bit and 2-bit register numbers, 32-bit address space number).

These are this design's own choices:
* The command set, its encoding, and the two-phase use of the shared lines.
* Code 3 of the index number means kill-index. Out-of-range capability numbers raise
  `error`.
* Static flip-flops without reset take the place of dynamic registers with refresh
  lines. Precharge and refresh timing are not modelled. Only the control state
  (register numbers, output phase) has an asynchronous active-low reset, `rst_n`.
* The address space RAM is `NCAP` deep, has its own write port (`asn_we`, `asn_in`,
  addressed by `cap_no`), and reads synchronously, so its output lines up with the
  offset.
* Offsets wrap modulo 2**28, as described above.

Not built:
* Scaling of the index from words to bytes, and auto-increment/decrement of the index
  register. The original chip leaves both out too. A host that indexes records must
  load `record_number * record_size` itself.
* The faster parallel limit check described above.
* The pads, the refresh circuitry, and the host processor.

The MONADS-PC processor has 16 capability registers. The default here is the chip's 4.
Setting `NCAP=16` gives all 16, with no other change needed because `cap_no` is already 4
bits wide.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WIDTH`   | 28 | offset width = number of bit slices |
| `NCAP`    | 4  | capability registers (also the depth of the address space RAM) |
| `NIDX`    | 3  | index registers |
| `ASN_W`   | 32 | address space number width |
| `CAPNO_W` | 4  | capability register number width |
| `IDXNO_W` | 2  | index register number width; the codes from `NIDX` up mean "no index" |

At the defaults the top synthesises to about 350 flip-flop bits plus a 4 x 32-bit RAM.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/acu_pkg.sv \
    tb/tb_capability_address_unit.sv --top-module tb_capability_address_unit
./obj_dir/Vtb_capability_address_unit
```

The package must come first. Every other file is found through `-Irtl`. The tests
compare against arithmetic done in the testbench:
* The cell tests are exhaustive.
* The slice and control tests are randomised against bit-level models.
* `tb_address_calculator` runs three configurations side by side through the helper
  `tb/acu_calc_check.sv`: the defaults, `NCAP=16`, and a 4-bit slice (`WIDTH=4`). Each
  makes about 2000 random calculations, with limits placed on and next to the computed
  address, and checks the one-cycle result latency.
* `tb_capability_address_unit` walks an array of 100 twelve-byte records one past its
  end, fetches instructions through a program capability without an index, uses a
  stack capability, and runs random references. It counts that every case occurred:
  in range, limit error, kill-index, invalid register, wrap-around and register
  read-back.
