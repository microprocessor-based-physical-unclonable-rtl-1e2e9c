# Multiplier-based physical unclonable function

A physical unclonable function (PUF) turns the manufacturing variation of one
chip into a chip-specific answer (the *response*) to a question (the
*challenge*). Most PUFs are dedicated circuits (ring oscillators, arbiters)
that cost area and power. This design instead reuses a block that a
microcontroller already has: its 16 x 16 hardware multiplier. The multiplier's
result path is a large combinational circuit whose path delays differ from
chip to chip. When the multiplier works, each output bit switches, and in
silicon it also glitches in a pattern that depends on those delays. Two
counters count the rising edges of two chosen output bits while a program
drives the multiplier. The middle bits of the two counts form a 32-bit
response.

The challenge therefore has two parts:

* the **program** the CPU runs on the multiplier, for instance a long
  multiply-accumulate loop that keeps feeding the result back through the
  adder, and
* the **10 select bits**, 5 per counter, that choose which of the 32 result
  bits each counter watches.

The RTL here contains the multiplier peripheral and the PUF logic around it.
The CPU that runs the program is not included: its peripheral bus is a port
of the top level, and the testbench plays the CPU.

```
                 per_* bus
 CPU (not here) ───────────► hw_multiplier ──mult_out[31:0]──┐
                                                             │ attach (PUF mode only)
                                                             ▼
                                   puf_sel.sel1 ──► puf_mux ──clk──► puf_counter 1 ─┐
                                   puf_sel.sel2 ──► puf_mux ──clk──► puf_counter 2 ─┤
                                                                                    ▼
 puf_en ──────────────────────────────────────────────► puf_ctrl ──► puf_response[31:0]
                                                         (clear, enable,    puf_resp_valid
                                                          attach, capture)
```

## The hardware multiplier peripheral (`hw_multiplier`)

The multiplier is a memory-mapped peripheral with the register model of the
MSP430 family multiplier. The address used to write the first operand picks
the operation. Writing the second operand starts it.

| Address | Register | Access | Meaning |
|---------|----------|--------|---------|
| 0130h | MPY    | R/W | OP1, unsigned multiply |
| 0132h | MPYS   | R/W | OP1, signed multiply |
| 0134h | MAC    | R/W | OP1, unsigned multiply-accumulate |
| 0136h | MACS   | R/W | OP1, signed multiply-accumulate |
| 0138h | OP2    | R/W | second operand; a write starts the operation |
| 013Ah | RESLO  | R/W | result bits 15..0 |
| 013Ch | RESHI  | R/W | result bits 31..16 |
| 013Eh | SUMEXT | R   | result extension, see below |

Inside, a 16 x 16 multiplier (`mult16x16`, signed or unsigned) forms the
product. A 32-bit adder (`adder32`) adds the product to the current
RESHI:RESLO. A 32-bit multiplexer picks the product (MPY, MPYS) or the sum
(MAC, MACS) as the new result. SUMEXT is loaded with the result:

| Operation | SUMEXT |
|-----------|--------|
| MPY  | 0000h |
| MPYS | FFFFh if the result is negative, else 0000h |
| MAC  | 0001h if the addition carried out of bit 31, else 0000h |
| MACS | FFFFh if the result is negative, else 0000h |

OP1 and the operation stay until OP1 is written again, so a series of OP2
writes repeats the operation. In MAC and MACS each repetition adds to the
previous result. That feedback is what makes an accumulate loop a good
challenge program: the result bits keep changing in data-dependent ways.

**Bus.** `per_addr` is a byte address. Accesses must be word aligned; an
assertion checks this. A write is `per_en & per_we` and writes 16 bits;
byte writes are not supported. A read is `per_en & ~per_we`: `per_dout`
shows the register in the same cycle and is 0 otherwise.

**Timing.** OP2 is stored at the end of its write cycle. RESHI, RESLO and
SUMEXT load one edge later. A read in the cycle right after the OP2 write
therefore still returns the old result, and a read one cycle later returns
the new one. RESLO and RESHI can be written to preset an accumulation. If such
a write falls in the cycle in which a result loads, the result wins.

**What the PUF taps.** The output of the 32-bit result multiplexer is brought
out as `mult_out`. This is the value the next load would store. It changes
when an operand, the operation or the result register changes. In MAC/MACS it
changes twice per operation: once when OP2 arrives, and again when the new
result feeds back into the adder.

## The PUF path

**Multiplexers (`puf_mux`).** Each multiplexer is a 32-to-1 selector steered
by 5 select lines: `sel = k` picks bit `k` of the multiplier output. Its
output is not sampled. It is the **clock** of a counter.

**Counters (`puf_counter`).** A 32-bit counter that adds one on each rising
edge of its clock input while its enable is high. A clear input (`clr`,
asynchronous) resets it. Because the clock is a data bit and not a
free-running clock, the counter can only be cleared asynchronously.

**Response.** Bits 24 down to 9 of each counter (16 bits each) form the
32-bit response: counter 1 in `puf_response[31:16]`, counter 2 in
`puf_response[15:0]`. Dropping the low 9 bits discards the least stable part
of the count. Dropping the top bits discards bits that would never be set.

## Normal mode, PUF mode and the measurement window (`puf_ctrl`)

`puf_en` selects the mode. In **normal mode** (`puf_en = 0`) the inputs of
the multiplexers are held at zero, so the PUF logic is detached from the
multiplier and sees no edges. The multiplier works as an ordinary peripheral.
In **PUF mode** a measurement runs. The controller sequences it so that no
count is made while the clear, the enable or the attachment changes
(edges are the rising clock edges at which `puf_en` is sampled):

| Edge | Event |
|------|-------|
| 0 | `puf_en` first sampled high: counters cleared for one cycle, counting enabled |
| 1 | clear released |
| 2 | multiplexers attached to `mult_out`; from here every rising edge of a selected bit counts (if the bit is already 1, attaching it counts as one edge) |
| … | challenge program runs |
| k | `puf_en` sampled low: multiplexers detached and counting disabled at the same edge; counters freeze |
| k+1 | `{cnt1[24:9], cnt2[24:9]}` copied into the response register, `puf_resp_valid` rises |

`puf_resp_valid` stays high until the next measurement starts. The counters
are frozen when they are copied, so moving their value from the counter clock
domains into the `clk` domain is safe. `puf_en` must be synchronous to `clk`.
A sensible challenge program puts the multiplier in a known state (for
example `MPY` with OP1 = OP2 = 0) before raising `puf_en`, so that the
response depends only on the program and the chip.

The select lines must stay stable while `puf_en` is high.

## What simulation can and cannot show

The chip-specific part of this PUF is analog: glitches on the result bits
caused by unequal path delays. Zero-delay RTL simulation has no delays. Each
result bit settles once per clock cycle, so a counter in simulation counts
only the functional rising transitions of its bit. The simulated response is
therefore the same for every "chip". It is still fully defined by the
challenge, which lets the testbench check the logic exactly: it predicts every
counted edge from its own model of the multiplier. Judging the PUF's
uniqueness or reliability needs gate-level simulation with varied delay
annotations, or silicon.

For the same reason the design has no fixed throughput or latency to check
beyond the cycle timing above. The length of a measurement is set by the
challenge program. A 32-bit counter wraps after 2^32 edges. A selected bit
rises at most once per clock cycle in zero-delay operation, so programs up to
2^32 cycles (about 86 s at 50 MHz) cannot wrap.

## Where this design makes its own choices

The overall structure is as described for this PUF: a 32-bit multiplier
output, two multiplexers with 5 select lines each, two 32-bit counters
clocked by the multiplexer outputs, an enable pin, counter bits 9..24, a
32-bit response, and a normal mode in which the PUF logic is detached. The
multiplier's registers, its four operations and its adder/multiplexer
structure also come from that description. The following are choices of this
implementation:

* **Register addresses and SUMEXT contents** follow the MSP430 family
  multiplier.
* **The peripheral bus**, word-only writes, combinational reads, the
  one-cycle result latency and the all-zero reset state.
* **The tapped signal.** "Multiplier output" is taken to be the output of the
  result multiplexer, before the result registers. Tapping the registers
  instead would remove the glitches the PUF relies on.
* **The meaning of "bit 9 to bit 24"** as bit indices counted from 0.
* **The half order** of the response (counter 1 high).
* **The measurement sequencing** in `puf_ctrl`: the clear at the start,
  attaching two cycles after `puf_en` rises, and the capture register. The
  enable pin serves as the mode pin.
* **The response register and port.** In the original scheme the CPU stores
  the response in one of its general purpose registers. Here a dedicated
  register and output port hold it, because the CPU is not part of this RTL.

## Files

| File | Contents |
|------|----------|
| `rtl/mpuf_pkg.sv` | operation enum, register addresses, widths, the select struct `puf_sel_t` |
| `rtl/mult16x16.sv` | signed/unsigned 16 x 16 multiplier |
| `rtl/adder32.sv` | 32-bit accumulate adder with carry out |
| `rtl/hw_multiplier.sv` | the multiplier peripheral |
| `rtl/puf_mux.sv` | 32-to-1 bit selector |
| `rtl/puf_counter.sv` | 32-bit counter clocked by a selected bit |
| `rtl/puf_ctrl.sv` | mode control, counter clear/enable, response register |
| `rtl/mpuf_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

The top level has only fixed sizes, taken from the package. `puf_mux` and
`puf_counter` take their widths as parameters.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog that fails the run
if it hangs. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mpuf_pkg.sv tb/tb_mpuf_top.sv \
          --top-module tb_mpuf_top -Mdir obj_top
./obj_top/Vtb_mpuf_top
```

The other testbenches (`tb_hw_multiplier`, `tb_mult16x16`, `tb_adder32`,
`tb_puf_mux`, `tb_puf_counter`, `tb_puf_ctrl`) build the same way. To lint a
module: `verilator --lint-only -Wall -Irtl rtl/mpuf_pkg.sv rtl/<module>.sv`.

`tb_mpuf_top` runs the design at its real sizes:

1. A normal-mode phase checks a signed multiply through the bus and that the
   PUF stays idle.
2. Fourteen PUF-mode measurements follow, with accumulate-loop programs of up
   to 40,000 operations that switch between all four operations and preset
   the result registers. Some programs start from a clean multiplier state.
   Others start from a dirty state, right as the multiplexers attach.
3. One challenge is repeated, and its response must match.
4. One challenge has both counters on the same bit, and its two halves must
   match.

The testbench counts each of these mechanisms and fails if any of them never
happened. A run takes well under a second.

## Known limits

* Two-state, zero-delay simulation cannot show the glitches that carry the
  chip-specific information (see above).
* The counter clock is a data signal. Synthesis and timing analysis must
  treat the two multiplexer outputs as generated clocks. The clear input of
  each counter is an asynchronous reset driven by a register in the `clk`
  domain, and it is combined with `rst_n`. The lint tool reports that `rst_n`
  is used both synchronously (in the bus-alignment assertion) and
  asynchronously; the assertion only disables itself during reset, so this is
  intended.
* The counter-enable release and the attach both rely on `puf_en` being
  synchronous to `clk`. An asynchronous pin needs a synchroniser in front of
  `puf_ctrl`.
* No CPU, memory, debug interface, clock module, special function registers
  or watchdog are included.
