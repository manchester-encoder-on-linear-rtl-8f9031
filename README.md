# FM0/Manchester memory codec with LFSR addressing

This design line-codes a pseudo-random bit stream with one encoder that can
produce either **FM0** or **Manchester** code. It packs the coded symbols into
16-bit words and stores each word in a small memory at an address taken from a
linear feedback shift register (LFSR). It then reads the word back and decodes
it to the original bits. A word is decoded only if its most significant bit is 1.

The central piece is the shared encoder. FM0 needs state and Manchester does
not, yet both come out of the same handful of gates: one flip-flop, two
multiplexers, one NOT and one XNOR. Everything around it (data source,
framing, memory, controller, decoder) is a small synchronous system that gives
the encoder something to do and checks that what it produced can be recovered.

## The two line codes

Each bit period is split into two halves. The bit clock is high during the
first half and low during the second. A bit therefore becomes two half-bit
symbols, called **A** (first half) and **B** (second half).

* **Manchester**: `code = X xor CLK`. X = 0 is sent as high-then-low, X = 1 as
  low-then-high. There is always a transition in mid-bit.
* **FM0** follows three rules:
  1. X = 0 has a transition between A and B.
  2. X = 1 has no transition between A and B.
  3. There is a transition at every bit boundary.

### FM0 as a four-state machine

The pair (A, B) of the current bit is the FM0 state:

| state | A B |
|-------|-----|
| S1    | 1 1 |
| S2    | 1 0 |
| S3    | 0 1 |
| S4    | 0 0 |

Rule 3 forces the new A to be the inverse of the previous B. Rules 1 and 2 then
fix the new B. This gives:

    A(t) = ~B(t-1)
    B(t) =  X xor B(t-1)
    FM0  =  CLK ? A(t) : B(t)

For example, from S1 (11), X = 0 leads to S3 (01) and X = 1 leads to S4 (00).
The only state that has to be stored is B(t-1), which needs one flip-flop.
The variant with a second flip-flop for A is not needed.

## Shared encoder (`fm0_manchester_encoder`)

    mux2 = mode ? CLK : B(t-1)        MUX_2
    n    = ~mux2                      FM0: A(t)      Manchester: ~CLK
    y    = X xnor n                   FM0: B(t)      Manchester: X xor CLK
    out  = (CLK & mode==FM0) ? n : y  MUX_1
    B    <= y  at the rising edge of CLK

In FM0 mode, `X xnor ~B(t-1)` equals `X xor B(t-1)`. In Manchester mode,
`X xnor ~CLK` equals `X xor CLK`. So the NOT, the XNOR and both muxes are used
in both modes. In Manchester mode the flip-flop is not on the output path, so
the encoder does not reach 100% use of its hardware in that mode. The AND
that gates MUX_1's select with the mode is an addition, and the exact wiring
is this design's own. The equations, the state codes and the parts list are
those of the scheme.

**The bit clock is data.** `out` is a combinational function of the bit
clock, so it changes on both clock edges. `x` must be held for the whole bit
and may change only right after the rising edge, the same edge at which the
flip-flop captures B. Mode 0 selects FM0 and mode 1 selects Manchester. The
reset is synchronous and active high. It clears B(t-1) to 0, so the first bit
after reset starts with A = 1.

## System around the encoder

```
         bit-clock side (bclk)                     system-clock side (clk = 2 x bclk)
 +--------+   +---------------+  x  +---------+ line  +---------------+ word +-------------------+
 |  prsg  |-->| bit_sequencer |---->| encoder |------>| symbol_packer |----->| recollection_ctrl |
 +--------+   +---------------+     +---------+       +---------------+      +-------------------+
     |             enc_rst ------------^                                        |   |      |
     +------ PRSG bit -------> addr_lfsr ----- address ----> code_memory <------+   |      |
                                                               | read word          |      |
                                                               +-------> code_decoder <----+
                                                                          dec_bit/valid/err/reject
```

* **`prsg`** is a 16-bit maximal-length Fibonacci LFSR (x^16+x^14+x^13+x^11+1,
  seed `16'hACE1`). Its output bit is the data that gets encoded.
* **`bit_sequencer`** runs on the bit clock. It frames the data in words of 9
  bit slots:
  * Slot 0 carries a start bit of 0.
  * Slots 1–7 carry seven PRSG bits.
  * Slot 8 is idle. The encoder is held in reset during this slot.

  The mode is sampled at the start of each word. Because of the reset and the
  start bit, the first symbol (A of slot 0) of every word is 1 in both codes.
  That is what makes the "decode only if MSB = 1" rule meaningful: a location
  that never received a word from the encoder is recognised and skipped.
* **`symbol_packer`** samples the line once per system clock, which is twice
  per bit. It builds the 16-bit word (A0 B0 A1 B1 … B7, with A0 as the MSB) and
  raises a strobe.
* **`recollection_ctrl`** divides the system clock by two to make the bit
  clock. For each word it steps through write, read-back of the same address,
  decoder load and address step.
* **`addr_lfsr`** is a 4-bit LFSR (x^4+x^3+1). The current PRSG bit is XORed
  into its feedback. It addresses **`code_memory`**, a 16 × 16-bit RAM with one
  port and a one-cycle read.
* **`code_decoder`** first checks the word's MSB. If the MSB is 0 it pulses
  `reject`. Otherwise it walks the word two symbols per clock:
  * FM0: the bit is `A xnor B`.
  * Manchester: the bit is `B`.

  It reports a code error when there is no boundary transition in FM0, when
  A = B in Manchester, or when the start bit is not 0. It outputs the seven
  payload bits serially.

### Clocking and timing

There are two clocks: the system clock `clk` and the bit clock `bclk`. The
bit clock is a register on the system clock, and the encoder needs it as data.
Signals cross between the two domains only where they are stable:

* Bit-clock registers change right after a system-clock edge and are read at
  the next one.
* Control signals into the bit-clock side come from bit-clock registers.

The bit clock runs freely, including during reset. Hold `rst` for at least 4
system clocks so that the synchronous resets on the bit-clock side take
effect.

Per word (18 system clocks = 9 bit clocks):

Cycle 0 is the system-clock cycle that begins with the edge at which the
last B symbol is sampled (the bit clock rises into the idle slot at that edge):

| cycle | event |
|---|---|
| 0 | `word_valid` high |
| 1 | `wr_en` high; the word is written at the current address at the end of the cycle |
| 2 | read of the same address |
| 3 | decoder load; the address LFSR steps at the end of the cycle |
| 5 | start-bit result (a wrong start bit shows on `dec_err`) |
| 6–12 | payload bits 1–7 on `dec_bit`/`dec_valid`; `dec_done` with bit 7 |

Throughput is 7 payload bits per 9 bit clocks. An assertion in the controller
checks that a new word never arrives while the previous one is in flight.

## Where this departs from, or goes beyond, the scheme it implements

* A(t) = ~B(t-1). The inversion is required by the state codes and the
  transitions of the FM0 state machine.
* XNOR instead of XOR. The encoder uses an XNOR fed by the inverted MUX_2
  output, which matches the parts list MUX_1, MUX_2 and XNOR. A schematic of
  the same encoder using an XOR would be equivalent in function.
* Hardware use. The scheme claims 100% hardware use in both modes. In this
  encoder the flip-flop idles in Manchester mode.
* Transistor-level ideas are not modelled. This includes transmission-gate
  muxes and XNOR, and transistor-count reduction by retiming. The RTL is
  gate-level in function only.
* Design choices with no stated source:
  * word framing (start bit, idle slot);
  * the 16-word memory depth and the 4-bit address LFSR;
  * the polynomials and seeds;
  * how the PRSG bit enters the address LFSR;
  * the controller sequence;
  * the twice-bit-rate system clock;
  * the decoder's error checks;
  * all handshakes.
* Loop-back means no rejects at the top. Each word is read back right after
  it is written, so `dec_reject` never fires in normal operation of the full
  system. The MSB rule is exercised by the decoder's own testbench.
* Only the codec is built. The surrounding DSRC transceiver (RF front-end,
  microprocessor) is not part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/codec_pkg.sv` | mode enum, word width, slot constants |
| `rtl/fm0_manchester_encoder.sv` | shared FM0/Manchester encoder |
| `rtl/prsg.sv` | data LFSR |
| `rtl/addr_lfsr.sv` | address LFSR with serial input |
| `rtl/bit_sequencer.sv` | word framing on the bit clock |
| `rtl/symbol_packer.sv` | line → 16-bit words |
| `rtl/code_memory.sv` | 16 × 16 RAM |
| `rtl/code_decoder.sv` | word → bits, MSB rule, error checks |
| `rtl/recollection_ctrl.sv` | bit clock, write/read/decode sequencing |
| `rtl/manchester_mem_top.sv` | whole system (`ADDR_W` parameter, default 4) |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog catches hangs. For example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/codec_pkg.sv \
        tb/tb_manchester_mem_top.sv --top tb_manchester_mem_top -Mdir obj
    ./obj/Vtb_manchester_mem_top

Replace the top module's name to run another testbench. The testbenches check
the following:

* **Encoder:** both codes half-bit by half-bit against a model. All eight
  transitions of the FM0 state machine must occur.
* **Full system:** runs at default parameters. It builds 300 words and checks
  every written word, every address and the 18-clock word period against
  independent models of the PRSG, the encoders and the address LFSR. The
  decoded bit stream must equal the PRSG stream. The mode changes at random
  between words. The testbench counts FM0 words, Manchester words, mode
  switches and address reuse, and fails if any of them never happens.
* **Decoder:** covers clean words, corrupted symbols, a wrong start bit and
  MSB-0 rejects.
* **FM0 stream run (`tb_fm0_stream_run`):** drives the encoder for 1000 ns of
  FM0 with alternating data, then held ones. It checks the line only against
  the three FM0 rules, by counting transitions, and uses no model of the
  encoder's insides.
