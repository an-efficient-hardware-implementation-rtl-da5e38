# Extended and Fast Physical Addressing interfaces

A host computer's I/O space is small and crowded: every expansion card claims
a range of addresses, and two cards that claim overlapping ranges conflict.
The two interfaces here open a *new bus*, with its own address, data and
control lines, behind just a handful of host I/O ports. The size of the new
bus's address space does not depend on the host's address bus at all: the
new-bus address is sent to the interface **as data** and held in a latch.

* **Extended Physical Addressing (EPA)** — `epa_bridge`. The host writes the
  new-bus address to I/O ports, then writes the data to another port; the
  second write appears on the new bus. Three ports, 8-bit data, 16-bit new-bus
  address.
* **Fast Physical Addressing (FPA)** — `fpa_bridge`, the main design. The same
  address-as-data idea, but the words come from host memory by DMA: the
  interface's own address generator walks a memory area and each word read
  becomes either a new-bus address or new-bus data. Four ports, 16-bit data
  and 16-bit new-bus address by default (2^16 = 64K new-bus addresses), and
  the new bus runs at half the memory access rate.

`pa_top` holds both interfaces side by side; they share no signals.

## The FPA data path

```
            system bus                                     new bus
  ad_in ─────┐
             ├─mux(ce)── a ──> fpa_dec ── s1 ──> tlatch (LD16) ──┐
  fpa_ag ────┘  dma_ad          │  │  │  s2 ───────────────────┐ │
     ▲  ▲                       │  db,de                       ▼ ▼
     │  └────── db, de ─────────┘                       bufe ─> ad_out, ad_out_en
     └── ce (also ad_dma_en)                            bufe ─> data_out, data_out_en
  data_in ─────────────────────> tlatch.d, bufe(data).a, fpa_ag.data_in
```

`fpa_dec` has two modes, selected by `ce` (the address generator owns the
system address bus):

| `ce` | address               | output | meaning                                  |
|------|-----------------------|--------|------------------------------------------|
| 0    | 0x301                 | `s1`   | latch is open: `data_in` is the new-bus address |
| 0    | 0x302                 | `s2`   | both new-bus buffers on: a new-bus cycle |
| 0    | 0x303                 | `db`   | `data_in` is the DMA begin position      |
| 0    | 0x304                 | `de`   | `data_in` is the DMA end position        |
| 1    | any with bit 0 = 1    | `s1`   | the memory word is a new-bus address     |
| 1    | any with bit 1 = 1    | `s2`   | the memory word is new-bus data          |

### Host mode

A new-bus cycle costs two I/O writes: the address to 0x301, then the data to
0x302. The latch is transparent while 0x301 is on the bus and keeps the last
word when the host moves to another address. While 0x302 is on the bus the
new bus carries `ad_out` = latched address and `data_out` = `data_in`; at any
other address both are released (`*_en` low).

### DMA mode and the memory layout

This is the part that takes some care. The host software writes the begin
and end of a memory area to 0x303 and 0x304. Once both are recorded, and the
`da` input (DMA allowed) is high, `fpa_ag` takes the system address bus on
the next clock (`ce` = `ad_dma_en` = 1) and issues one address per clock,
begin, begin+1, … end. The memory answers each address on `data_in`. Because
`ce` switches the decoder to its DMA mode, the **two lowest address bits of
each memory word decide what it is**:

| address bits [1:0] | effect on the new bus                                   |
|--------------------|---------------------------------------------------------|
| `00`               | nothing                                                 |
| `01`               | word is latched as the new-bus address                  |
| `10`               | new-bus cycle: latched address, this word as data        |
| `11`               | latched *and* sent: the cycle's address equals its data |

So the software lays out its (address, data) pairs at offsets 1 and 2 of each
group of four words. The `11` case follows directly from the decode equations
and is kept as is; software that wants only clean pairs leaves the words at
offsets 0 and 3 as filler.

`da` is the software's start/stop control: dropping it releases the bus at
once (`ce` follows `da` combinationally) and the generator resumes at the
next address when `da` returns. After the end address the generator forgets
both positions; a new transfer needs a new pair.

### Rate

Each new-bus cycle needs two memory accesses (its address word and its data
word), so with a memory access time `Ta` and one access per clock the new bus
runs at

    Fn = 1 / (2 * Ta)

independent of the host bus frequency. For a 6 ns memory this is 83 MHz, even
behind a 66 MHz host bus. The testbenches check the ratio directly: over a
whole number of four-word groups, new-bus cycles × 2 = memory accesses.

### Bus widths

The new-bus address is as wide as the system data bus (`DW`), so the new bus
has 2^DW addresses:

| system data bus | new-bus data | new-bus addresses | build                              |
|-----------------|--------------|-------------------|------------------------------------|
| 8 bits          | 8 bits       | 256               | `fpa_bridge #(.AW(16), .DW(8))`    |
| 16 bits         | 16 bits      | 64K               | default                            |
| 32 bits         | 32 bits      | 4G                | `fpa_bridge #(.AW(32), .DW(32))`   |

`AW` is the system address bus width; it must be at least 12 bits so that the
ports 0x301–0x304 exist. For `AW` > 16 the host-mode ports are compared with
all `AW` bits. The begin/end positions are `DW` bits wide and are zero-extended
to `AW`, so an 8-bit build can only place its DMA area in the first 256 words.

## The EPA interface

`epa_bridge` sits on an 8-bit ISA-style I/O bus with a 12-bit I/O address,
`aen`, and active-low `ior_n`/`iow_n`. It needs two steps per new-bus cycle:

1. Write the low byte of the 16-bit new-bus address to 0x301 and the high
   byte to 0x303. Each write opens one 8-bit latch while `iow_n` is low. The
   new bus stays released.
2. Write the data to 0x302. While `iow_n` is low the buffers drive
   `data_out` = `data_in`, `ad_out` = the latched address, and `oe` is high.

A read of 0x302 raises `oe` and drives `ad_out` but keeps the write buffers
off: the external device answers on the host data bus itself. Cycles with
`aen` high (the host's own DMA) are ignored. `clk_out` repeats `clk_in` for
the new bus.

## Signal conventions

* **3-state outputs.** The new bus is shared with the device, so the
  interfaces drive it only while enabled. Every 3-state output is a pair:
  a value (zero when off) and an `_en` drive enable. Turn each pair into a
  tri-state pad in the board-level wrapper.
* **The FPA new-bus control bus** is the pair of drive enables:
  `ad_out_en`/`data_out_en` are high exactly during a new-bus cycle, so
  they double as the cycle strobe for the device (the EPA has a separate
  `oe`).
* **The FPA system address bus** is bidirectional on a real board. Here it is
  split: `ad_in` is the host's address, `ad_dma`/`ad_dma_en` the generator's
  drive. The decoder sees `ad_dma` whenever `ad_dma_en` is high.
* **Latches.** The address registers are level-sensitive latches (`tlatch`)
  gated straight from the address decode, as in the original schematic. Lint
  and synthesis report them as latches; that is intended. With their gates
  driven by a decoder, the decoded address must be free of glitches. Either
  hold the address stable while a strobe is active (EPA), or meet the latch's
  timing from the registered `dma_ad` (FPA). If this goes into an FPGA that
  dislikes latches, replace `tlatch` with a register clocked on the falling
  edge of the gate.
* **Reset.** `fpa_bridge` has an asynchronous active-low `rst_n` that clears
  the address generator. The latches have no reset: the new-bus address is
  undefined until it is first written.

## What is specified and what is chosen here

Taken as given: the two-step address-as-data protocol, the port addresses
0x301 and 0x302 of both decoders and 0x303/0x304 of the FPA decoder, the FPA
decode equations (including the DMA-mode use of address bits 0 and 1), the
latch and buffer structure, the port lists and widths of both interfaces,
DMA-fed operation with begin/end positions, and the rate `Fn = 1/(2·Ta)`.

Chosen in this design, where the original description stops at names or
port lists:

* The whole inside of the address generator: arming on the begin/end pair,
  `da` as a pause-able "DMA allowed" input, a one-clock start latency, one
  address per clock counting upwards inclusive of the end (wrapping through
  the top of the address space if end < begin), and disarming at the end.
* EPA port 0x303 as the high address byte, and the use of `aen`,
  `ior_n`/`iow_n`, `oe` and `clk_out` described above.
* The reset, the value/enable form of 3-state outputs, and the split FPA
  address bus.
* DMA only reads memory toward the new bus. Writing into memory from the new
  bus would need a new-bus-to-host data path, which the port lists do not
  have.

## Files

| file | contents |
|------|----------|
| `rtl/pa_pkg.sv`     | port addresses and the FPA select struct |
| `rtl/tlatch.sv`     | transparent latch (LD8/LD16) |
| `rtl/bufe.sv`       | 3-state buffer in value/enable form (BUFE8/BUFE16) |
| `rtl/fpa_dec.sv`    | FPA decoder |
| `rtl/fpa_ag.sv`     | FPA DMA address generator |
| `rtl/fpa_bridge.sv` | FPA interface |
| `rtl/epa_dec.sv`    | EPA decoder |
| `rtl/epa_bridge.sv` | EPA interface |
| `rtl/pa_top.sv`     | both interfaces |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fpa_widths.sv`, `tb/fpa_width_run.sv` | FPA at 8, 16 and 32 bits |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; a watchdog fails it if it hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
    rtl/pa_pkg.sv rtl/tlatch.sv rtl/bufe.sv rtl/fpa_dec.sv rtl/fpa_ag.sv \
    rtl/fpa_bridge.sv rtl/epa_dec.sv rtl/epa_bridge.sv rtl/pa_top.sv \
    tb/tb_pa_top.sv --top-module tb_pa_top -Mdir obj_tb_pa_top
./obj_tb_pa_top/Vtb_pa_top
```

For `tb_fpa_widths`, add `tb/fpa_width_run.sv`. Lint a module with
`verilator --lint-only -Wall rtl/pa_pkg.sv rtl/<files> --top-module <module>`.

What is covered:

* `tb_fpa_dec`, `tb_epa_dec` — every 16-bit address, both FPA modes.
* `tb_fpa_ag` — no start on half a pair, reset, back-to-back areas
  (including a one-word area), start latency, one address per clock, random
  pauses on `da`.
* `tb_fpa_bridge` — host-mode cycles, DMA over aligned, unaligned and random
  areas against a model of the memory layout, and the half-rate check.
* `tb_epa_bridge` — two-step writes, reads, `aen` cycles, unrelated ports.
* `tb_pa_top` — both interfaces at once at the default sizes. It counts each
  mechanism (host latch and cycle, begin/end write, DMA start, address word,
  data word, pause, end; EPA low/high latch, write, read, ignored `aen`
  cycle) and fails if one never occurs. It also reaches new-bus addresses
  0x0000 and 0xFFFF.
* `tb_fpa_widths` — the three widths of the table above.

Not covered: gate-level timing, so neither the latch-timing caution above nor
the 83 MHz figure is proven for any device. The 83 MHz figure is arithmetic
from `Fn = 1/(2·Ta)` and the checked access ratio.
