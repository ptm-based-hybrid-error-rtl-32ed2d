# PTM trace monitor: control-flow error detection for ARM Cortex-A9

A commercial ARM processor cannot be hardened from the inside, but its debug
logic can be put to work. The Program Trace Macrocell (PTM) of a Cortex-A9
already emits, in real time, a compressed record of every change in program
flow. This monitor sits in the programmable logic next to the processor,
reads that record as it leaves the trace port, rebuilds the program counter
(PC) at every branch, and raises an error signal the moment the PC leaves the
address ranges where the application's code is known to live. A processor
that has jumped into the weeds, or hung in an exception handler outside the
application, is caught without touching the processor or its software.

The scheme is hybrid: data errors are left to software, which keeps two copies
of every variable and compares them after each update. This hardware covers
the other half, control-flow errors, which software checks handle poorly.

```
 trace_valid ─┐
 trace_data ──┴─► pft_decoder ──pkt──► pc_follower ──upd──► range_checker ──► error
                  (find packets)       (rebuild PC)         (8 ranges)        violation
                                                                  ▲
 AXI4-Lite ◄─────────────────────► axi_regs ──ranges, enable──────┘
                                   (status, PC, counters)
```

## From trace bytes to packets (`pft_decoder`)

The PTM speaks the ARM Program Flow Trace (PFT) protocol: a stream of
packets, each a header byte and zero or more payload bytes. Packet lengths
vary and are not marked; only by decoding a packet completely does one find
where the next header starts, and some payload bytes (continuation bits, a
flag in a fifth address byte) decide how many bytes follow. One missed byte
and every later byte is misread, so the decoder must recognise and delimit
*every* packet type, even those the monitor ignores.

After reset the decoder knows nothing. It discards bytes until it sees an
A-sync packet (at least five `0x00` bytes and then `0x80`), which can only
appear at a packet boundary. From then on it walks the stream one byte per
clock:

| header                   | packet            | length after the header                         |
|--------------------------|-------------------|-------------------------------------------------|
| `0x00`                   | A-sync            | more `0x00`, ending with `0x80`                 |
| `0x08`                   | I-sync            | 4 address bytes, 1 information byte, `CID_BYTES`|
| `xxxxxxx1`               | branch address    | header is address byte 0; bit 7 continues       |
| `0x72`                   | waypoint update   | 1 to 5 address bytes (+1 info byte)             |
| `1xxxxxx0`               | atom              | none                                            |
| `0x0C` `0x76` `0x66`     | trigger, exception return, ignore | none                            |
| `0x6E`                   | context ID        | `CID_BYTES`                                     |
| `0x3C`                   | VMID              | 1                                               |
| `0x42` `0x46`            | timestamp         | up to 9, bit 7 continues                        |
| anything else            | reserved          | boundaries lost: report and wait for A-sync     |

Address bytes carry a continuation flag in bit 7, up to four of them; a fifth
byte has no flag but names the instruction set and, in bit 6, announces one or
two exception-information bytes (branch) or one information byte (waypoint
update). Cycle-accurate tracing is assumed to be off, so atoms are one byte
and no cycle counts follow. The context ID length is the `CID_BYTES` parameter
and must match the PTM's configuration.

Each packet leaves the decoder as one `pft_pkt_t` (see `ptm_pkg`), one clock
edge after the edge that captured its last byte.

## From packets to the PC (`pc_follower`)

Three packet types move the PC:

* **I-sync** carries the full 32-bit address (bit 0 is the Thumb flag). It is
  the only packet that makes an unknown PC known.
* **Branch address** and **waypoint update** carry a *compressed* address:
  only the low-order bits that changed since the previous address are sent.
  The follower merges them into its current PC.

The compression is the subtle part. The first address byte holds 6 bits, each
further byte 7 bits, and where those bits land depends on the instruction set:

| bytes | ARM state bits replaced | Thumb state bits replaced |
|-------|-------------------------|---------------------------|
| 1     | PC[7:2]                 | PC[6:1]                   |
| 2     | PC[14:2]                | PC[13:1]                  |
| 3     | PC[21:2]                | PC[20:1]                  |
| 4     | PC[28:2]                | PC[27:1]                  |
| 5     | whole PC, fifth byte `x E 0 0 1 PC[31:29]` | whole PC, fifth byte `x E 0 1 PC[31:28]` |

So a four-byte branch in ARM state keeps PC[31:29] from the previous address.
A change of instruction set always comes with a full five-byte address. A
fifth byte naming Jazelle or a reserved state pulses `isa_err` and makes the
PC unknown, as does a reserved header or a loss of synchronisation; the PC
becomes known again at the next I-sync. No PC is reported while it is
unknown, so nothing is checked then.

Atoms (taken/not-taken marks for direct branches) do not move the followed
PC: the PC is updated at waypoints whose target the trace states explicitly,
which is the granularity this monitor checks at.

## Confidence ranges and the error signal (`range_checker`)

Software loads up to eight *confidence ranges*, inclusive address windows
`[lo, hi]` that cover the application's functions, and enables the ones it
uses. Every PC update is compared with all enabled ranges in parallel; if it
lies in none of them, `violation` pulses for one clock and `error` rises and
stays high until software clears it. The first offending PC since the last
clear, the number of offending updates and the number of checked updates
are kept for software. With checking disabled (CTRL bit 0) nothing is flagged.

## Register map (`axi_regs`)

AXI4-Lite slave, 32-bit data, byte strobes honoured, one outstanding read and
one outstanding write, responses always OKAY. Unmapped addresses read zero.

| offset        | name        | access | contents                                           |
|---------------|-------------|--------|----------------------------------------------------|
| `0x00`        | CTRL        | RW     | bit 0: checking enabled (reset 0)                  |
| `0x04`        | RANGE_EN    | RW     | bit i: range i enabled (reset 0)                   |
| `0x08`        | STATUS      | mixed  | 0 error (W1C) · 1 PC known · 2 synchronised · 3 sync was lost (W1C) · 4 unsupported instruction set seen (W1C) |
| `0x0C`        | PC          | RO     | last followed PC                                   |
| `0x10`        | ERR_PC      | RO     | first PC outside all ranges since the last clear   |
| `0x14`        | ERR_COUNT   | RO     | PC updates found outside all ranges                |
| `0x18`        | CHECK_COUNT | RO     | PC updates checked                                 |
| `0x40 + 8i`   | RANGE_LO[i] | RW     | lowest allowed address of range i                  |
| `0x44 + 8i`   | RANGE_HI[i] | RW     | highest allowed address of range i                 |

Typical set-up: write the ranges, write RANGE_EN, write CTRL = 1, then enable
the PTM, funnel and trace port on the processor side.

## Top level (`hw_monitor`) and timing

| port                  | dir | width  | meaning                                            |
|-----------------------|-----|--------|----------------------------------------------------|
| `clk`, `rst_n`        | in  | 1      | clock; asynchronous reset, active low              |
| `trace_valid`         | in  | 1      | a trace byte is present this clock                 |
| `trace_data`          | in  | 8      | trace byte                                         |
| `s_axi_*`             |     |        | AXI4-Lite slave, `ADDR_W`-bit addresses            |
| `error`               | out | 1      | control-flow error seen (sticky)                   |
| `violation`           | out | 1      | pulse per offending PC                             |
| `synced`, `pc_valid`  | out | 1      | decoder synchronised; PC known                     |

| parameter    | default | meaning                                      |
|--------------|---------|----------------------------------------------|
| `NUM_RANGES` | 8       | confidence ranges                            |
| `CID_BYTES`  | 0       | context ID bytes in I-sync and context ID packets (0..4) |
| `ADDR_W`     | 8       | AXI address width (must hold `0x40 + 8*NUM_RANGES`) |

There are four register stages: byte capture, packet decode, PC follow, range
check. `violation` and `error` rise on the third clock edge after the edge that
captures the last byte of the offending packet. The monitor takes one byte
per clock with no back-pressure: its clock must keep up with the trace port.

## Where this design departs from, or adds to, its basis

Taken from the published architecture: the chain PTM → funnel → TPIU → trace
decoder → PC follower → range checking → error signal; the PC rebuilt from
I-sync, branch address and waypoint update packets at every waypoint; up to
eight confidence ranges configured over AXI; an error whenever the PC is in
none of them; a pipelined decoder that delimits every packet type.

Taken from the ARM PFT protocol rather than the architecture description:
header values, payload lengths, the address compression and the five-byte
address format. The exception-information layout (one or two bytes after a
five-byte branch address, exception number in bits [4:1] and [4:0]) and the
waypoint-update address layout (same as a branch address) are this design's
reading of it and should be checked against the protocol specification
before use with a real PTM.

Choices of this design: an 8-bit trace input with a valid qualifier (TPIU
formatter bypassed; the real port width and framing are left to a wrapper),
one clock domain, asynchronous reset, inclusive range bounds with per-range
enables, a sticky error with a separate violation pulse, the register map,
the diagnostic registers, cycle-accurate tracing off, and treating a reserved
header as loss of synchronisation. Loss of synchronisation is reported in
STATUS but does not raise `error`.

Not part of this RTL: the processor, the PTM, the other CoreSight parts
(funnel, TPIU, ITM, FTM), the Zynq EMIO routing, the software data
duplication, the configuration-memory scrubber and the external control
board that watches the error signal.

## Files

| file                       | contents                                      |
|----------------------------|-----------------------------------------------|
| `rtl/ptm_pkg.sv`           | header constants, packet and PC update types  |
| `rtl/pft_decoder.sv`       | packet synchronisation and delimiting         |
| `rtl/pc_follower.sv`       | PC reconstruction                             |
| `rtl/range_checker.sv`     | confidence range check                        |
| `rtl/axi_regs.sv`          | AXI4-Lite registers                           |
| `rtl/hw_monitor.sv`        | top level                                     |
| `tb/pft_enc_pkg.sv`        | PFT encoder used to build test traces         |
| `tb/tb_*.sv`               | one self-checking testbench per module        |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops; a watchdog
ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ptm_pkg.sv tb/pft_enc_pkg.sv rtl/pft_decoder.sv rtl/pc_follower.sv \
    rtl/range_checker.sv rtl/axi_regs.sv rtl/hw_monitor.sv tb/tb_hw_monitor.sv \
    --top-module tb_hw_monitor -o sim
./obj_dir/sim
```

* `tb_pft_decoder`: about 3000 random packets of every type, with context ID
  bytes, idle cycles, junk before the first A-sync and reserved headers
  followed by resynchronisation; every reported packet and its latency are
  compared with what was encoded.
* `tb_pc_follower`: a random ARM/Thumb program walk encoded with the fewest
  address bytes; every PC update must match the walk.
* `tb_range_checker`: random range tables with exact edge probes; verdict,
  sticky error, first offending PC and counters.
* `tb_axi_regs`: random writes with byte strobes, address and data in either
  order, delayed responses; read-back, outputs, sticky bits and the clear.
* `tb_hw_monitor`: the whole monitor at its default parameters: software set-up
  over AXI, twelve phases of encoded program trace with injected control-flow
  errors (targets outside all ranges and inside a disabled range), error
  clears, quiet phases, resynchronisation, and a final run with checking
  disabled. It counts each mechanism and fails if one never happened, and
  checks the end-to-end latency of every violation.
* `tb_matmul_workload`: the monitor watching a modelled trace of a 32x32
  matrix multiplication program (about 111 kB of code, one confidence range
  per function, vectors included). Two fault-free multiplications with timer
  interrupts must raise no error and check exactly the PC updates the program
  made. Then 300 faults are injected by flipping one bit of an interrupt's
  return address; the monitor must flag exactly the flips that leave every
  range (with the whole image covered by ranges, flips of bit 17 and above).

The test traces come from an encoder written from the same reading of the PFT
protocol as the decoder; they show the RTL is self-consistent, not that it
matches a real PTM bit for bit. Capturing a trace from real hardware and
replaying it is the next check to make.
