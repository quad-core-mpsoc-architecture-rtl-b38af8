# Quad-core PicoBlaze MPSoC for a parallel PID controller

A digital PID controller computes, for each error sample E(k),

    U(k) = Kp·E(k) + Ki·I(k) + Kd·D(k)

where I(k) is the running integral of the error and D(k) its derivative. The three
terms do not depend on each other, yet a small microcontroller evaluates them one
after another. This design runs them side by side on four 8-bit PicoBlaze cores
inside an FPGA-style system-on-chip:

* core 0, the **master**, opens the input register for each new sample, starts the
  other cores, collects their results and forms U = P + I + D;
* cores 1, 2 and 3, the **slaves**, each compute one term (P, I or D) in single
  precision floating point and leave it in a shared RAM.

All four cores execute **one** program from **one** shared ROM. Each core finds its
role by reading a 2-bit hardware identifier (HWID) wired into it. Two hardware flags
per core, START and READY, synchronise master and slaves. In the default program the
master restarts the slaves as soon as they report READY and then computes U(k) while
they already work on sample k+1. This is a two-stage software pipeline, and it sets
the loop time by the slower of the two stages rather than by their sum.

The hardware is written in synthesizable SystemVerilog. The PicoBlaze core itself is
the FPGA vendor's IP and is not part of `rtl/`. Each core's bus is a port of the
design, and the testbenches connect a behavioural model of the PicoBlaze
(`tb/kcpsm3_model.sv`) to it.

## Block structure

```
              e_in ──► [R  sample_reg] ──► E(k) to all four EPMs
                           ▲ e_latch (core 0 only)
   ┌──────────────────────────────── mpsoc ───────────────────────────────┐
   │  EPM0 (HWID 0, master)   EPM1 (HWID 1)   EPM2 (HWID 2)   EPM3 (HWID 3) │
   │    │ fetch  │ I/O          │               │               │           │
   │  ┌─┴────────┴──────────────┴───────────────┴───────────────┴──┐       │
   │  │ qp_rom  (1024 x 18, 4 fetch ports)                         │       │
   │  │ qp_ram  (2048 x 8,  4 data ports)          both on clk2x   │       │
   │  │ core_sync (START[3:0], READY[3:0])                         │       │
   │  └────────────────────────────────────────────────────────────┘       │
   └───────────────────────────────► u_out / u_valid (core 0's OUT port) ──┘
```

| Module | Role |
|---|---|
| `pdpid_top` | The controller: `sample_reg` (register R) in front of `mpsoc`. U leaves from core 0. |
| `mpsoc` | Four `epm`s with HWIDs 0..3, `qp_rom`, `qp_ram` and `core_sync`. |
| `epm` | Enhanced PicoBlaze: `epm_out_dec`, `epm_in_mux`, `fpu` and an FPU result/done register, all around one PicoBlaze I/O bus. |
| `epm_out_dec` | Output decoding: turns `OUTPUT` instructions into FPU operands and commands, QP-RAM accesses, START/READY requests, the E latch and the 32-bit U port. |
| `epm_in_mux` | Input multiplexing: picks the `INPUT` byte from FPU result/status, RAM data, the HWID/START/READY status or the bytes of E(k). |
| `fpu` | Four-stage pipelined IEEE-754 binary32 add / subtract / multiply. |
| `qp_ram`, `dp_bram` | Quad-port RAM made of one dual-port block RAM clocked at twice the system clock. |
| `qp_rom` | The same quad-port memory used read-only as the shared program store. |
| `core_sync` | START/READY flag registers. |
| `pdpid_pkg` | Port map, FPU opcodes, widths. |

Two parts are only interfaces here:

* **PicoBlaze core.** Each core's fetch bus (`pb_address`, `pb_instruction`) and I/O
  bus (`pb_port_id`, `pb_out_port`, `pb_write_strobe`, `pb_read_strobe`,
  `pb_in_port`) are ports of `mpsoc` and `pdpid_top`, declared as arrays of four.
* **Clock manager.** The shared memories need `clk2x`, a clock at twice `clk` with
  rising edges aligned to `clk`'s. On an FPGA a DCM/PLL makes it. Here it is an input.

## The quad-port memories

This is the least obvious part of the design. A block RAM has two ports, but the
system needs four, one per core. The memory therefore runs on `clk2x`, which gives
two memory cycles per system cycle:

| clk2x edge | side A serves | side B serves |
|---|---|---|
| mid-cycle (between two `clk` edges) | port 0 | port 2 |
| aligned with the `clk` edge | port 1 | port 3 |

How the edges are told apart: a flip-flop toggles on every `clk` edge, and `clk2x`
copies it. At the aligned edge the copy and the toggle are equal. At the mid-cycle
edge they differ.

Read data is captured differently per port. Ports 0/2 are captured by a `clk`
register at the next `clk` edge. Ports 1/3 are captured by a `clk2x` register at the
next mid-cycle edge. As a result, all four ports look the same from the `clk`
domain: like a synchronous single-port RAM. The address (and write) presented in
cycle n is performed exactly once, and the read data can be sampled at the end of
cycle n+1.

Within one system cycle:

* ports 0/2 are served before ports 1/3, so a read on port 1 or 3 sees a write by
  port 0 or 2 in the same cycle;
* each port reads before it writes (read-first);
* if both sides write the same address on one edge, side B (port 2 or 3) wins.

`tb/qp_ram_tb.sv` checks exactly these rules.

There is a timing cost, which matters only for a real implementation. The ports 1/3
capture registers are written in mid-cycle. Logic that consumes `rdata[1]`/`rdata[3]`
(for example instruction decode on cores 1 and 3) therefore gets half a `clk` period.
Ports 0/2 do not have this limit.

The data RAM is 2048 × 8: one 18-Kbit block RAM used at byte width. The ROM is
1024 × 18, the PicoBlaze program space. `qp_rom` loads its image with `$readmemh`
from `INIT_FILE`, a path relative to the directory the simulator runs in (default
`rtl/pdpid_app.hex`).

## The enhanced PicoBlaze and its port map

The PicoBlaze sees the system only through 256 input and 256 output port numbers.
Multi-byte values move byte by byte, least significant byte first.

| Port | `OUTPUT` (write) | `INPUT` (read) |
|---|---|---|
| 0x00–0x03 | FPU operand A | FPU result |
| 0x04–0x07 | FPU operand B | – |
| 0x08 | FPU command: data[1:0] = 0 add, 1 sub, 2 mul | FPU status: bit 0 = result ready |
| 0x10 / 0x11 | QP-RAM address low / high (11 bits) | – |
| 0x12 | QP-RAM write data (then address + 1) | QP-RAM read data (then address + 1) |
| 0x20 | bit 0: set own READY; bit 1: clear own START | status: [1:0] HWID, [2] own START, [7:4] READY of cores 3..0 |
| 0x21 | master: START mask (bit s starts core s and clears its READY) | – |
| 0x22 | master: open register R (load a new E) | – |
| 0x30–0x33 | U bytes; writing byte 3 updates `u_out` and pulses `u_valid` | E(k) bytes |

Unmapped input ports read 0. The system uses only core 0's writes to 0x21, 0x22 and
0x30–0x33. The same ports on the slaves decode but connect to nothing.

**FPU.** The FPU takes one command per cycle, and the result leaves stage 4 four
clock edges after the command is sampled. The EPM then loads it into a result
register and sets the ready bit, so the status port shows "ready" from the fifth
edge on. A new command clears the bit. Software issues one command, polls the bit
and reads the four result bytes. Arithmetic details:

* rounding is to nearest even;
* subnormal inputs count as zero, and results below the normal range become a signed
  zero;
* infinities propagate;
* NaN inputs, ∞−∞ and 0·∞ give the quiet NaN `0x7FC00000`.

**Synchronisation (`core_sync`).** The master's START write sets the START flags of
the cores in its mask and clears their READY flags. A slave clears its own START
when it takes the sample, and sets READY once its result is in RAM. An assertion
flags a START sent to a core that has not taken the previous one.

## The PID program (ROM image)

`rtl/pdpid_app.hex` is the default image: 156 instruction words in KCPSM3 encoding.
Its memory map in the QP-RAM:

| Address | Contents |
|---|---|
| 0x00 | Kp |
| 0x04 | Ki |
| 0x08 | Kd |
| 0x20 + 4·HWID | slave results, buffer 0 |
| 0x30 + 4·HWID | slave results, buffer 1 (used on alternate samples) |

The gains are single-precision constants in the program (Kp = 1.2, Ki = 0.05,
Kd = 0.3). The master writes them to RAM at start-up.

```
all:    IN  s0,0x20 ; AND s0,3 ; if 0 -> MASTER else -> SLAVE
MASTER: write Kp,Ki,Kd ; open R ; START(0x0E)
loop:   wait until status[7:5] == 111           ; all slaves READY
        open R ; START(0x0E)                    ; slaves go on with k+1
        read P,I,D of sample k from buffer b    ; 12 bytes, auto-increment
        U = (P + I) + D  via FPU ; write U ; b ^= 1 ; loop
SLAVE:  wait for own START ; clear START ; read E(k)
        P task: r = Kp*E
        I task: I = I + E (scratchpad) ; r = Ki*I
        D task: d = E - Eprev ; Eprev = E ; r = Kd*d
        store r at buffer b + 4*HWID ; b ^= 1 ; set READY ; loop
```

Here I(k) = I(k−1) + E(k) and D(k) = E(k) − E(k−1), with the sample period folded
into Ki and Kd.

Two other images in `tb/` run the same algorithm for comparison:

* `pdpid_app_par.hex`: the master sends START only after it has output U, so master
  and slaves never overlap;
* `pdpid_app_seq.hex`: core 0 does everything and cores 1–3 idle.

To use other gains or another program, assemble it with a KCPSM3-compatible
assembler into one 5-digit hex word per line. Then pass the file as `ROM_FILE` to
`pdpid_top`.

### Measured loop times

These are steady-state cycles between two outputs, from `tb/pdpid_workloads_tb.sv`.
The reference numbers come from an earlier implementation of the same scheme with
its own programs. RR is the reduction against the sequential loop. S(4) = Ts/(4·Tm)
is the speed-up per core.

| Program | Loop (this RTL) | RR | S(4) | Reference loop / RR / S(4) |
|---|---|---|---|---|
| sequential, one core | 486 | – | 25% | 698 / – / – |
| parallel | 330 | −32% | 37% | 498 / −28% / 35% |
| software-pipelined (default) | 202 | −58% | 60% | 316 / −55% / 55% |

The ratios agree closely. The absolute counts are lower because the programs differ.
### Data-parallel benchmarks

Two small benchmarks show the gain from splitting plain data work across the cores.
Each one comes as a one-core program (core 0 works, cores 1–3 idle) and a four-core
program. In the four-core program, core c takes items c, c+4, c+8 and so on, so no
core has to compute an offset. The testbench writes the operands straight into the
QP-RAM array while reset is held, releases reset, and counts cycles until every
working core has set READY. Then it checks the results byte by byte.

| Benchmark (testbench) | 1 core | 4 cores | RR | Reference RR |
|---|---|---|---|---|
| 16-byte RAM copy (`pdpid_bench_xfer_tb`) | 287 | 97 | 66% | 75% |
| 32-byte RAM copy | 543 | 161 | 70% | 75% |
| 64-byte RAM copy | 1055 | 289 | 73% | 75% |
| 12 × 8-bit array add (`pdpid_bench_arradd_tb`) | 327 | 91 | 72% | 73% |
| 12 × 16-bit array add | 423 | 117 | 72% | 74% |
| 4-D float vector product (`pdpid_bench_dot4_tb`) | 699 | 371 | 47% | 71% |

The copy moves N bytes (N stored at 0x3F) from 0x40 to 0x80. The array add computes
C = A + B with A at 0x40, B at 0x60 and C at 0x80. The 16-bit version uses
little-endian byte pairs and `ADDCY`. The reference programs were compiled from C and
spend many more cycles on each item. Their fixed start-up cost therefore weighs less,
and the ideal 75% is almost reached. The hand-written loops here (16 cycles per copied
byte) stay further from it at small sizes.

The vector product forms A·B = A0·B0 + … + A3·B3. In the four-core program, core c
multiplies element c on its own FPU, writes the product to 0x60 + 4c and sets READY.
Core 0 waits for cores 1–3 and then adds ((p0 + p1) + p2) + p3. Those three
additions run one after another on one core, which caps the gain at about half. The
testbench checks the sum bit for bit against reference arithmetic done in the same
order.

Not reproduced: the integer multiply/divide arrays and the floating-point 2×2 matrix
benchmark. They need software multiply/divide routines, and the matrix test divides,
which the FPU cannot do.

## How far to trust it

What the testbenches check:

* `fpu_tb`: 20 000 random operations plus special cases, compared bit for bit with
  double-precision reference arithmetic rounded to single, with the exact latency;
* `qp_ram_tb`: random collisions on all four ports, checked against the ordering
  rules above;
* `pdpid_top_tb`: the whole controller at default parameters. It drives a new random
  `e_in` every cycle, so each U depends on the value R held when the master opened it.
  It runs 16 samples and checks every U bit-exactly against a reference PID that is
  fed the latched values and evaluated in the same order. It also checks that START/READY handshakes, FPU use on every core,
  simultaneous QP-RAM accesses and pipelined overlap all occur;
* a testbench for every other module.

Limits:

* **The PicoBlaze is a model.** It executes the KCPSM3 instruction set with two
  clocks per instruction and `INPUT`/`OUTPUT` strobes in the second clock.
  Interrupts are not modelled. Against the real core, check the timing of
  `read_strobe`/`write_strobe` and of `in_port` sampling. The I/O decoders assume a
  strobe one cycle long, with port_id valid while it is high.
* **The clock relationship is assumed, not checked.** `clk2x` must be exactly twice
  `clk` with aligned edges.
* **Reset** is synchronous and active high everywhere. The memories are not reset.
* **Design choices of this RTL:** the port map, the RAM address auto-increment, the
  FPU done flag, the two-buffer result exchange, and the E/U widths (binary32).

## Simulating

Run from the repository root, because the ROM images are read by paths relative to
it:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/pdpid_pkg.sv tb/fp_ref_pkg.sv tb/pdpid_top_tb.sv --top-module pdpid_top_tb
./obj_dir/Vpdpid_top_tb
```

Use `pdpid_workloads_tb` for the three-program comparison, `pdpid_bench_xfer_tb`,
`pdpid_bench_arradd_tb` or `pdpid_bench_dot4_tb` for the benchmarks, or
`<module>_tb` for a single block. Each testbench prints `TB_RESULT checks=N
failures=M` and stops by itself. A watchdog ends a hung run with a failure. `tb/pdpid_harness.sv` holds the
clock/reset generation, the four CPU models, the sample source and the reference PID.
Reuse it to run other programs.
