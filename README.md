# Garbled-circuit evaluation coprocessor

Two parties can compute a function of their private inputs with Yao's
garbled circuits. One party, the garbler, encrypts every gate of a Boolean
circuit. The other party, the evaluator, then walks through the encrypted
circuit and learns only the final result. Garbling is done once per gate,
but the evaluator has to do one AES computation per AND gate and keep a
128-bit *wire label* for every wire. On a phone that work is slow.

This RTL is a small coprocessor that does the evaluator's work. The host
(the phone-side evaluator software) keeps the circuit description and
streams one instruction per gate over SPI. The coprocessor keeps all wire
labels in on-chip RAM, evaluates each gate where the labels are, and
returns only the output labels. It targets a small low-power FPGA (the
iCE40 UP5K: four 16K x 16 SPRAM blocks, a 30 MHz core clock) and follows
that device's limits: half an AES round per lookup, and a label memory
only 64 bits wide.

```
 host --SPI--> spi_slave --bytes--> instr_decoder --field strobes--> gate_engine
                  ^                       |                        |    |     |
                  +------ tx_byte --------+                        |    |  pp_select
                                                         label_mem |  aes_hash
                                                    (4 x spram_16kx16) (aes_ttable_rom)
                                    perf_counters <--- start / end / done events
```

## What the evaluator computes

Each wire `w` has two labels, random-looking 128-bit values: one stands
for 0 and one for 1. The evaluator only ever holds one of them, the
*active* label, and cannot tell which truth value it stands for. Three
standard optimisations shape the hardware:

* **Free XOR.** The garbler picks one secret `delta` and makes every
  wire's 1-label equal to its 0-label XOR `delta`. The output label of an
  XOR gate is then just `A ^ B`. XOR gates need no cryptography and no
  data from the garbler.
* **Point and permute.** The least significant bit of a label is its
  *color bit*, and the two labels of a wire always have opposite colors
  (`delta[0] = 1`). The garbler sorts the four rows of each AND gate's
  table by the input colors. So the evaluator reads the row number
  `{color(A), color(B)}` straight off its two labels and decrypts only that
  row.
* **Row reduction.** The garbler chooses the output labels so that row 0
  is always all zeros. It sends only rows 1 to 3: 3 x 128 bits per AND
  gate.

Decrypting a row: `out = H(A, B) ^ row[{color(A), color(B)}]`, where
`row[0] = 0`. In this design the hash `H(A, B)` is AES-128 with label A
as the key and label B as the plaintext. A garbler that works with this
hardware must use the same `H` and the same color rule. The testbench
package `tb/gc_model_pkg.sv` is such a garbler.

BUF gates copy a label.

## Instruction stream

The link carries no framing: each instruction has a fixed field order.
Multi-byte fields are sent most significant byte first. Wire IDs are 2
bytes; labels and ciphertexts are 16 bytes.

| opcode | instruction | bytes after the opcode | effect |
|---|---|---|---|
| `0x01` | SETADDR | ID | head := ID |
| `0x02` | WRITE | label | mem[head] := label; head++ |
| `0x03` | READ | 19 filler bytes | the label at mem[head] comes back on MISO in the last 16 of the 19 filler slots; head++ |
| `0x04` | AND | idA idB ct1 ct2 ct3 gid | mem[gid] := AES_{mem[idA]}(mem[idB]) ^ ct[ptr] |
| `0x05` | XOR | idA idB gid | mem[gid] := mem[idA] ^ mem[idB] |
| `0x06` | BUF | idA gid | mem[gid] := mem[idA] |

Any other byte in opcode position is skipped, so `0x00` can be used as
filler. An AND instruction is 55 bytes long, an XOR 7 bytes and a BUF 5
bytes. A session writes the garbled inputs (SETADDR, then one WRITE per
input), streams the gates in circuit order, and reads the outputs
(SETADDR, then one READ per output). The host decodes the output labels
with the garbler's output hashes, as usual.

## How one gate runs

The coprocessor has no instruction register and no central sequencer.
`instr_decoder` raises one strobe as each field finishes arriving. In
`gate_engine`, each strobe and each "done" signal starts the next action,
depending on the gate type:

1. **idA arrives**: the engine fetches label A. For BUF, A is the result.
2. **idB arrives**: the engine fetches label B. For XOR, `A ^ B` is the
   result. For AND, the engine starts `aes_hash(key A, data B)` and gives
   the two color bits to `pp_select`.
3. **ct1..ct3 arrive**: `pp_select` keeps the ciphertext whose row number
   matches the pointer. Row 0 needs no ciphertext.
4. **The hash is done**: `pp_select` forms `hash ^ ciphertext`.
5. **gid arrives**: the result is stored at `gid` as soon as it exists.
   If the hash is still running, the store waits for it.

The label fetch takes 4 cycles and the hash takes 30. The first
ciphertext alone takes 16 byte times to arrive, so the hash always
finishes while it is still arriving. The store begins one cycle after the
gate ID, or one cycle after the result if the result comes later. The
store takes three cycles. So the cost of a gate is set almost entirely by
how long its bytes take to arrive on the link.

`gate_engine` keeps a one-entry queue in front of the label memory.
Because fields arrive at least one byte time apart, that entry is always
free when a new request comes. If it is not, the sticky `overrun` output
is set.

## AES hash (`aes_hash`, `aes_ttable_rom`)

The round function uses T-tables. One table,
`T0[x] = {2*S(x), S(x), S(x), 3*S(x)}`, is stored once. The other three
tables are byte rotations of it, and the plain S-box value is byte 2 of
the word. The table is computed when the memory is initialised, from the
S-box definition (multiplicative inverse in GF(2^8) modulo
x^8+x^4+x^3+x+1, then the affine transform with 0x63). The memory has
twelve registered read ports:

* eight ports for **half the state** (two output columns) per access;
* four ports for `SubWord(RotWord(w3))` of the key schedule.

A round takes three cycles:

1. Look up columns 0 and 1, and the key-schedule bytes.
2. Look up columns 2 and 3. Keep the results for columns 0 and 1.
3. Combine the results, expand the next round key, and XOR it in. This
   cycle is a bubble for the lookup memory: the next round needs every
   byte of the new state.

Ten rounds take 30 cycles. The last round uses the S-box bytes and skips
MixColumns. The key changes with every gate, so round keys are expanded
on the fly, never stored.

## Label store (`label_mem`, `spram_16kx16`)

Four 16K x 16 SPRAM blocks side by side form one 64-bit word. A label
takes two words: the low half sits at word `2*slot` and the high half at
`2*slot+1`. Every access is therefore two memory operations on
consecutive cycles. A read returns `done` four cycles after the request;
a write returns it after three.

The store has 8192 slots, and `slot = wire ID mod 8192`. It works as a
direct-mapped cache with nothing behind it. If a gate reads a wire that
was written more than about 8192 wire IDs earlier, a newer wire may have
overwritten that label. The hardware does not detect this. The host must
check the circuit before sending it, for example by making sure no input
is older than 8192 IDs. Wire IDs are 16 bits, so one circuit may use
65,536 IDs. Set `ID_BYTES` in `gc_pkg` to 3 for larger circuits.

`spram_16kx16` is a plain array with the UP5K SPRAM pin set: nibble write
mask, standby, sleep and power-off. A synthesis tool for that device maps
it onto one SPRAM block. The coprocessor keeps the blocks awake.

## Serial link and clocks (`spi_slave`)

The link is SPI mode 0: MSB first, MOSI sampled on the rising edge of
SCK, chip select active low. The shift registers run on SCK. Each finished
byte goes into one of two holding registers, alternating, and a toggle
flips. The core clock synchronises the toggle through two flip-flops.
The flip marks the byte as valid, and the core reads it straight from its
holding register. That register is not written again for two more byte
times, so the core reads a stable value.

A byte slot must last more than about three core cycles. SCK may
therefore run at up to **twice the core clock**; 5/3 has been simulated.
Reply bytes are sampled at the end of each byte slot. A reply to the
byte in slot k therefore goes out in slot k+2. READ has three turnaround
filler bytes (`RD_GAP` in `gc_pkg`) before the 16 label bytes. They give
the label store time to answer even at the fastest SCK. The first byte of every
chip-select frame returns 0x00. Instructions may span frames, or several
may share one.

## Performance counters (`perf_counters`)

An instruction starts at its opcode. It ends when its last byte has
arrived *and* its last action is done. The counters record:

* the idle cycles between one instruction's end and the next start (time
  spent waiting on the host);
* for each gate type, how many gates completed and their total cycles.

With SCK at 5/3 of the core clock, close to the link's limit, the
end-to-end testbench measures about **265 cycles per AND gate and 30
per XOR gate**. Almost all of that is the time the 55 or 7 bytes take to
arrive, at 4.8 core cycles per byte. With a slower SCK the counts grow
in proportion to the byte time. The original coprocessor reported 247
and 26 cycles, which fits a byte time of about 4.5 core cycles.

With a fast link, the next opcode can arrive while the previous gate's
store is still in flight. The counters then close the previous
instruction at the new opcode and ignore its late done pulse.

## Where this RTL departs from, or adds to, the original design

Each item is this design's own choice. The original design does not
specify it, or specifies it differently:

* Opcode values, 2-byte wire IDs, MSB-first field order, DMA instruction
  formats, and the three READ turnaround bytes.
* The hash: AES-128 with key = label A and plaintext = label B. The color
  bit is the label's LSB, and the pointer is `{color(A), color(B)}`.
* Each READ and WRITE advances the head by one.
* One shared T-table with 12 ports, including 4 for on-the-fly key
  expansion, giving three cycles per round.
* The SPI mode and the toggle-based crossing with two holding registers.
  SCK may be at most about twice the core clock.
* Counter widths, per-type totals instead of averages, and a `clear`
  input. The counters and `overrun` are top-level outputs; no
  instruction reads them.
* No clock generation: `clk` is an input and should be 30 MHz on the
  target device. Reset is active low and asynchronous.

## Files

`rtl/` (one module or package per file):

* `gc_pkg.sv` — shared widths, the label type and the opcode enum.
* `gc_coproc_top.sv` — the top level.
* `spi_slave.sv`, `instr_decoder.sv`, `gate_engine.sv`, `pp_select.sv`,
  `aes_hash.sv`, `aes_ttable_rom.sv`, `label_mem.sv`,
  `spram_16kx16.sv`, `perf_counters.sv`.

`tb/`:

* `aes_ref_pkg.sv` — a plain textbook AES-128 model.
* `gc_model_pkg.sv` — a garbler that uses the conventions above.
* `tb_<module>.sv` — one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_gc_coproc_top` runs the whole coprocessor at its default parameters.
It loads 16 garbled inputs over SPI, streams 120 random XOR, BUF and AND
gates, reads all 136 labels back and compares them with the garbler
model. The wire IDs cross the 8192 boundary. The test also confirms that
each mechanism happened at least once: every pointer row including
row 0, slot wrap-around, the hash finishing before the first ciphertext,
idle time, and multiple frames.

`tb_divide_workload` runs a 64-bit unsigned division as a garbled
circuit. This is the benchmark size the original coprocessor was
measured with. The circuit is a restoring divider built in the
testbench, with 8320 AND gates, 20864 XOR gates, and about 300 BUF
gates. The BUF gates copy the divisor, dividend and constant wires to
fresh wire IDs before the 8192-slot store wraps over them. This is the
host-side discipline that the direct-mapped store requires. Each
quotient bit is read back as soon as it exists. At SCK = 5/3 of the core
clock the counters report 264 cycles per AND gate and 33 per XOR gate.
The run takes a few seconds.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/gc_pkg.sv tb/aes_ref_pkg.sv tb/gc_model_pkg.sv tb/tb_gc_coproc_top.sv \
  --top-module tb_gc_coproc_top -Mdir obj_top
./obj_top/Vtb_gc_coproc_top
```

The SCK-domain registers of `spi_slave` are reset asynchronously by
`rst_n` and by chip select; they see no SCK edge during reset. A
two-state simulator only acts on edges, so a testbench should give
`rst_n` a falling edge while chip select is low, as `tb_gc_coproc_top`
does.

Any other testbench builds the same way: swap in its file and top
module. `-Irtl` lets Verilator find each module by its file name. The
full-size run takes well under a second.

## How far it has been checked

Every module has passed its own testbench. Each testbench was also run
against a deliberately broken copy of its module and caught the fault.
The AES unit matches the FIPS-197 example vectors and the reference
model on random keys. Gate results match an independent garbler model,
end to end, over SPI.

Not checked:

* Interoperability with the original host software. Its hash and opcode
  conventions may differ.
* Timing on the FPGA.
* SCK faster than 5/3 of the core clock.
