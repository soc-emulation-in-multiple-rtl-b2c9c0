# AHB bus splitter: one AMBA AHB bus shared by several FPGAs over 32 wires

When an SoC is too large for one FPGA, the usual cut leaves hundreds of
signals crossing the chip boundary. This RTL cuts the design **at its on-chip
bus** instead. Every FPGA keeps a complete copy of one AMBA AHB bus. A *bus
splitter* in each FPGA keeps the copies identical over a link of only 32
shared lines. The link runs faster than the bus: at the default ratio of 5, a
33 MHz link serves a 6.6 MHz bus.

The scheme rests on three properties of a bus like AHB. It follows the
published bus-splitter scheme for multi-FPGA SoC emulation (Yang, Lee, Ki
and Kyung, "SoC Emulation in Multiple FPGA using Bus Splitter").

1. **One master and one slave at a time.** Only the current master drives
   address and control, and only the current slave answers. Each FPGA
   multiplexes its own masters (and its own slaves) onto one set of link
   lines, so the link does not grow with the number of IP blocks.
2. **Reads and writes never overlap.** Write data and read data can share
   the same lines. The direction follows the transfer in its data phase.
3. **The bus is pipelined.** An AHB transfer has an address phase and a
   data phase, and nearly every signal comes from a register. The signals
   can therefore be sent one after another within a bus clock period, four
   32-bit words per period, without waiting on long combinational paths.
   The one exception is the decoder path from HADDR to HSELx, and the word
   order is chosen around it.

## Pins saved

Cut a bus in two without the splitter, and every master and slave on the far
side needs its own wires. Let:

- a = global signals
- b, c = unsharable and sharable control signals per master
- d, e = unsharable and sharable control signals per slave
- W = bus width
- M, S = masters and slaves in the system
- M0, S0 = the masters and slaves in the FPGA that holds the arbiter and
  decoder

Then:

    P_direct   = a + (b + c + 2W)(M - M0 + 1) + (d + e + W)(S - S0 + 1)
    P_bussplit = a + b(M - M0 + 1) + d(S - S0 + 1) + c + e + 2W

For AHB, a = 6, b = 2, c = 13, d = 1 and e = 3. Take W = 32 and four masters
and four slaves on the far side. A direct cut then needs 581 pins. Sharing
the lines as in points 1 and 2 brings this down to 101 (82 % fewer). Each
extra IP block adds only b or d pins instead of about 80.

Time multiplexing (point 3) brings the link down to 32 lines, whatever the
number of masters and slaves. Two more wires carry the common clock and
reset. `ahb_pkg` holds both formulas, and `tb_pin_count` checks these
numbers.

## One bus period on the link

The link clock DCLK runs DIV times faster than the bus (default DIV = 5).
`bs_sequencer` numbers the DCLK cycles of a bus period:

    DCLK cycle     0          1        2                 3           4
    strobe         e1         e2       e3                e4          (spare; hclk_en)
    word on link   arbitration HADDR   control, HSELx,   HWDATA or   nothing driven
                   + requests          response          HRDATA

Every AHB register (arbiter, splitter data-phase registers and the IP blocks
outside) loads on the DCLK edge at the end of cycle 4, when `hclk_en` is
high. Word k is latched on the far side at the end of cycle k-1, so it is
stable there from cycle k on, through the next AHB edge.

Word layout. The field order per word follows the published scheme. The
exact bit bounds are this implementation's choice:

| word | bits | field | driven by |
|---|---|---|---|
| 1 | 31:28 | HMASTER | arbiter side |
| 1 | 27 | HMASTLOCK | arbiter side |
| 1 | 26:24 | unused, 0 | arbiter side |
| 1 | 23:16 | HGRANTx (8 masters) | arbiter side |
| 1 | 15:8 | HLOCKx | side of master x |
| 1 | 7:0 | HBUSREQx | side of master x |
| 2 | 31:0 | HADDR | side of current master (HMASTER) |
| 3 | 31 | HWRITE | side of current master |
| 3 | 30:28 | HSIZE | side of current master |
| 3 | 27:24 | HPROT | side of current master |
| 3 | 23:8 | HSELx (16 slaves) | decoder side |
| 3 | 7 | HREADY | side of data-phase slave |
| 3 | 6:5 | HRESP | side of data-phase slave |
| 3 | 4:3 | HTRANS | side of current master |
| 3 | 2:0 | HBURST | side of current master |
| 4 | 31:0 | HWDATA / HRDATA | data-phase master (write) / data-phase slave (read) |

Why this order works:

- Word 1 carries HMASTER, so both sides know who owns the address phase
  before word 2.
- HADDR goes out in word 2. The decoder, which sits on the central side,
  turns it into HSELx in time for word 3.
- Word 3 also carries the response of the transfer now in its data phase.
- Word 4 carries the data.

The layout fixes the capacity at 8 masters and 16 slaves. Word 3 has no
spare bit.

## Who drives a line

This is the core of `bs_select`. Each partition decides, for each bit of
each word, whether it drives that bit. Both partitions make the same
decision from the same information, so every line has exactly one driver in
every micro-cycle. The information is the partition masks, which are fixed
parameters, plus:

- **HMASTER**, the address-phase owner. The central side has it from its
  arbiter; the other side has it from word 1.
- **HMASTER_d, HSELx_d and HWRITE_d.** These are the owner, the selected
  slave and the direction of the transfer now in its data phase. Each
  partition registers them from its own bus copy on an AHB edge with HREADY
  high. The copies agree, so the registers agree.

The same decision steers the partition's bus copy. A signal whose source is
local comes from the local unit, through the address, write-data and
read-data multiplexers (AC, DW and DR). Otherwise it comes from the word
received in its micro-cycle.

The central partition holds the arbiter, the decoder and a default slave. It
also drives every field that belongs to no one:

- unused bits;
- request bits of master numbers that do not exist;
- the response when no slave is selected.

The top checks with assertions that no line is ever driven twice, and that
every line has a driver in each micro-cycle and none in the spare cycle.

## What an IP block on a split bus must respect

- Everything that crosses the link must come from a register, except HSELx.
  This covers master outputs, HREADYOUT, HRESP and HRDATA. A slave whose
  HREADYOUT is a combinational function of its HSEL or HTRANS inputs will
  not work across the link.
- IP blocks run on DCLK and advance only when `hclk_en` is high. The bus
  clock is a clock enable here, not a second clock.
- DIV must be at least 5. The spare cycle lets the last word arrive before
  the AHB edge that uses it.
- Split and retry transfers are not supported: HSPLITx is not carried over
  the link.

## Modules

All files are in `rtl/`, one module or package per file.

| module | role |
|---|---|
| `soc_emu_top` | two partitions and the wired link; partition 0 is central; every master's and slave's signals are ports |
| `fpga_partition` | one FPGA: sequencer, bus splitter and, if `IS_CENTRAL`, the arbiter, decoder and default slave |
| `bus_splitter` | stage 1 (`bs_select`), word packing, stage 2 (`bs_tx`) and receive (`bs_rx`) |
| `bs_select` | bus copy, AC/DW/DR multiplexers, data-phase registers, per-bit ownership |
| `bs_tx` | puts the active micro-cycle's word on the link; drive enable per bit |
| `bs_rx` | one 32-bit register per micro-cycle |
| `bs_sequencer` | micro-cycle strobes e1..e4 and `hclk_en` |
| `ahb_arbiter` | fixed-priority arbiter; master 0 is highest and the default master |
| `ahb_decoder` | slave j owns addresses with HADDR[31:28] = j |
| `ahb_default_slave` | two-cycle ERROR for transfers to no slave |
| `ahb_pkg` | bus types, link layout, pin-count formulas |

Parameters of `soc_emu_top`:

| parameter | default | meaning |
|---|---|---|
| `NUM_MASTERS` | 3 | masters, at most 8 |
| `NUM_SLAVES` | 3 | slaves, at most 16 |
| `P0_MASTERS` | 8'h01 | masters in the central partition (the others are in partition 1) |
| `P0_SLAVES` | 16'h0003 | slaves in the central partition |
| `DIV` | 5 | DCLK cycles per bus cycle, at least 5 |

The defaults are the published three-master, three-slave example:

- Partition 0 holds the arbiter, the decoder, M1, S1 and S2.
- Partition 1 holds M2, M3 and S3.
- Numbering starts at 0, so M1 is master 0.

The top's ports:

- `m_out[i]` and `s_out[j]` take every master's and slave's outputs.
  Each partition uses only its own entries.
- `bus0` and `bus1` are the two bus copies. Each IP block reads the copy of
  its own partition.
- `link` is the resolved value of the 32 shared lines.
- `link_conflict` marks any line driven by both partitions.

The pads and cable are modelled as a wired OR of the enabled outputs. On an
FPGA, `ext_out` and `ext_oe` of `fpga_partition` go to a bidirectional pad.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_soc_emu_top \
        rtl/ahb_pkg.sv tb/tb_soc_emu_top.sv
    ./obj_dir/Vtb_soc_emu_top

Verilator finds the other files through `-Irtl -Itb`. To test another
block, replace the testbench name in both places.

- `tb_soc_emu_top` runs the top at its default parameters. Three master
  models (`tb/ahb_master_model.sv`) run random bursts. They target every
  slave and also an unmapped region, and they check each read against a
  shadow copy. Three memory slave models (`tb/ahb_slave_model.sv`) insert
  random wait states. On every AHB edge the testbench checks that `bus0`
  and `bus1` agree field by field and that the period is 5 DCLK cycles. It
  also counts the following, and fails any that never happens:
  - transfers for all four pairings of master partition and slave
    partition;
  - reads and writes whose data crosses the link;
  - wait states from slaves on either side;
  - ERROR responses reaching a master in the far partition;
  - one master's address phase overlapping another's data phase;
  - mastership passing between partitions.
- `tb_fpga_partition` runs a central partition holding everything as a
  plain AHB bus, with a second partition that only listens and must mirror
  it.
- `tb_bus_splitter` joins two splitters and drives random register values
  at every source. It checks both bus copies and the single-driver rule.
- `tb_bs_select`, `tb_bs_tx`, `tb_bs_rx`, `tb_bs_sequencer`,
  `tb_ahb_arbiter`, `tb_ahb_decoder` and `tb_ahb_default_slave` compare
  their blocks with independent reference models.
- `tb_three_fpga` puts three partitions on one link. Partition 0 is
  central. The four masters and four slaves are spread across all three
  partitions. The three bus copies must agree on every AHB edge.
- `tb_pin_count` checks the pin-count formulas.

All of them finish in seconds.

## What comes from the published scheme, and what is added

Taken from the scheme:

- cutting at the bus, with the arbiter and decoder in one partition;
- one shared set of lines for all masters and slaves of a partition;
- write and read data sharing the lines;
- a two-stage splitter: selecting the active master and slave, then driving
  per micro-cycle;
- registered HMASTER_d and HSELx_d steering the data-phase multiplexers;
- four 32-bit micro-cycles per bus cycle, in the order above;
- 32 lines, and a 33 MHz link for a 6.6 MHz bus;
- the pin-count model.

This implementation's own choices:

- the exact bit positions;
- carrying HLOCKx and HMASTLOCK;
- per-bit drive ownership as the way to share the lines;
- the spare link cycle and DIV ≥ 5;
- the clock enable in place of a separate bus clock;
- the arbiter policy, the address map and the default slave;
- reset values;
- the wired-OR model of the pads.

The scheme also extends to more than two FPGAs. The ownership rules cover
that: each partition drives only what it holds, and every partition listens
to the same 32 lines. To build more than two, instantiate more
`fpga_partition`s, one with `IS_CENTRAL = 1`, and OR their enabled outputs
onto the link, as `tb_three_fpga` does. `soc_emu_top` itself is the
two-FPGA case.

The emulated SoC's own IP blocks are not part of this RTL:

- the processor, DMA and interrupt controllers;
- the MPEG4 blocks and the memory, camera and LCD controllers;
- the bridges;
- the PC-side transactors and PCI cards.

In the testbenches, generic AHB master and slave models stand in for them.
