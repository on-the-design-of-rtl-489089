# KDC-I: a decimal serial-parallel computer in SystemVerilog

The KDC-I (Kyoto University Digital Computer I, 1960) is a decimal machine. Every
number is a string of binary-coded decimal (BCD) digits. The four bits of a digit
move in parallel, and the digits of a number go through one decimal adder one
after another. The machine has:

- a 23-digit double-length accumulator;
- one-and-a-half-address instructions, meaning one memory address plus an implied
  register operand;
- three index registers;
- a 4,000-word magnetic drum with 200 quick-access words on the same drum;
- a 50-word core memory that also buffers four magnetic tape units;
- paper tape and typewriter I/O.

Tape and output run concurrently with computation.

This repository holds synthesizable RTL for the logical part of the machine: the
processor with its arithmetic, logic, shift and index units, the store, the tape
control unit and the I/O control. The electromechanical devices (tape transports,
paper tape readers, typewriter, console) are outside the RTL. Their signals are
ports of the top module, and the testbenches provide models for them. The RTL
follows the published description of the machine's instruction set and
organisation. Where that description is silent, such as the bit-level word layout,
handshakes or timing, the RTL makes its own choice. The sections below flag each
such choice.

## Numbers, words and the accumulator

`rtl/kdc_pkg.sv` defines the shared types.

| type | contents |
|------|----------|
| `digit_t` | one BCD digit, 4 bits |
| `word_t` | sign bit (1 = minus) and 12 digits `d[11:0]`. `d[11]` is the *overflow digit* and `d[10]` the most significant digit *m*. A fixed-point number is a fraction with `d[11]` as its units digit, so storage words normally hold values below 2 in magnitude. |
| `acc_t` | the accumulator AC: one sign and 23 digits. `d[22]` is the UA overflow digit *v*, `d[21:11]` the upper accumulator UA, `d[10:0]` the lower accumulator LA. |
| `mword_t` | a word plus its stored parity bit |

The upper half of the AC, with *v* as its overflow digit, lines up with a storage
word. So `STO` stores `{sign, d[22:11]}`, and `ADD` aligns the operand the same
way. `ADL` and the other LA operations align the operand with the low 12 digits
of the AC.

**Instruction word** (this design's layout): `d[10:8]` hold the three-digit
operation code, `d[7]` the index digit I, `d[6]` the index digit J, and `d[3:0]` the
address A. Use `make_instr(op, i, j, a)` to build one. The operation codes are the
machine's, kept as BCD in `opcode_t`. An odd code is the even code plus "clear the
AC first".

**Effective address.** E = c(I) + c(J) + A, modulo 10,000, in decimal. Index digits
1–3 name IR1–IR3, 4 names the location counter LC, and other digits add nothing.
Some instructions use their first digit to name a register, tape unit or switch
(written H, M, N, Q, S in the instruction list). Only J modifies their address.

## Processor: `kdc_cpu`

Each instruction runs this sequence:

1. **Fetch:** c(LC) goes to the order register OR.
2. **Decode:** an odd code clears the AC, and E is formed.
3. **Operand:** c(E) is read if the instruction uses it.
4. **Execute:** the instruction runs.
5. **Next:** LC steps by one, or takes a jump target, or skips.

### Units

- The arithmetic unit `kdc_arith` does all fixed-point work.
- `kdc_fpu` does the floating-point work.
- `kdc_logic_unit` and `kdc_shifter` are combinational.
- `kdc_index_unit` holds IR1–IR3 and forms E.

### P-indicator

`PSX`, `SCT` and `TLU` leave a four-digit number in the address part of OR and turn
on the P-indicator. When the P-indicator is on, the *next* instruction adds that
number to its effective address as well. Decoding that instruction turns the
P-indicator off again. This is how the machine does indirect indexing, table
look-up and normalisation counts.

- `PSX`: the address part of c(E) goes to OR.
- `SCT`: shifts the AC left until UA*m* is non-zero and sends the count (22 for
  zero).
- `TLU`: scans the rest of a 200-word drum band for the first |entry| ≥ |MD| and
  sends its address. If no entry qualifies, it jumps to c(IR M).

### Other instructions

- `CMP` compares MD with c(E). It continues with the next instruction if MD is
  greater, skips one if they are equal, and skips two if MD is smaller.
- `JSX` links subroutines. It puts c(LC) in an index register and jumps.
- `LDQ`, `STQ`, `DMB` and `BDM` move a group of words between the drum's normal
  tracks and a quick-access band or the core. The group runs from E to the end of
  its 50-word group, at the same offsets in the target (this design's reading of
  "fifty words or less").
- `DVJ` and `DRJ` jump to E when the division is impossible, that is when
  |v,UA| ≥ |MD|.

### Stops and retirement

A read check, an access to a register that does not exist, or an operation code this
machine does not have stops the machine with `alarm` set. `retire` pulses once per
finished instruction.

## Serial decimal arithmetic: `kdc_serial_adder`, `kdc_arith`

This is the part of the design that needs the most care.

### The adder and one pass

`kdc_serial_adder` adds one BCD digit per clock. It uses a carry flip-flop and the
usual +6 correction. For subtraction it complements the b digit to its nines
complement and starts with a carry of one, which gives the tens complement. A
**pass** sends all 23 AC digit positions through it, least significant first, so a
pass takes 23 clocks. `kdc_arith` keeps the magnitude of the AC (`x`), a hidden
product or partial remainder (`p`), the multiplier/quotient register MQ, and MD.

### Operations

**Add / subtract**

- With like signs, one pass adds the magnitudes.
- With unlike signs, the pass adds the tens complement. If no carry comes out of
  the top digit, the result changed sign. A second *recomplement* pass then forms
  0 − x and the sign is flipped.

**Multiply** (`MPA`, `MPS`)

- For each multiplier digit, units first, MD shifted by that digit's place is added
  to `p` once per unit of the digit. Each multiplier digit costs one clock to
  examine.
- A final pass adds the signed product to the AC, recomplementing if needed.
- Time: 24 × (sum of multiplier digits) + 12 + one or two passes. That averages
  about 1,250 clocks.

**Divide** (`DVJ`, `DRJ`)

Division is non-restoring. For each of the 11 quotient digits, most significant
first:

- The shifted divisor is subtracted until the partial remainder goes negative.
  The digit is then the number of subtractions minus one.
- At the next digit the divisor is added until the remainder is positive again.
  The digit is then ten minus the number of additions.
- A final pass restores a negative remainder.
- UA gets the quotient and LA the remainder. The remainder keeps the dividend's
  sign in a remainder indicator, which `SLA` uses.
- `DRJ` then doubles the remainder, compares it with the divisor, rounds the
  quotient, and clears LA.
- Division is impossible when the top 12 AC digits are not below MD (MD's overflow
  digit is ignored). The AC is then left as it was.

**Round** (`RND`): one pass adds 5 in the top LA digit, then LA is cleared.

### Handshake

Pulse `start` while `busy` is low. `done` pulses for one clock, with `ac_out`
valid. The testbench checks the cycle counts exactly.

## Floating point: `kdc_fpu`

The machine keeps a floating-point number as a characteristic followed by a
mantissa. The RTL uses this layout:

| where | contents |
|-------|----------|
| storage word | `d[11]` = 0, `d[10:9]` the characteristic *c* (exponent *c* − 50), `d[8:0]` a nine-digit mantissa 0.d8…d0, normalised so that `d[8]` ≠ 0 unless the number is zero |
| AC | *v* = `d[22]`, `d[21:20]` the characteristic, `d[19:0]` a 20-digit double-length mantissa |

So the UA holds an ordinary floating word, which `STO` stores directly, and the LA
holds the low half of the mantissa. Because the characteristic comes first,
normalised numbers of the same sign compare like fixed-point numbers.

| operation | what the unit does | clocks |
|-----------|--------------------|--------|
| `FAD` `FAA` `FSB` `FSA` `FAM` `FSM` | align the operand with the smaller exponent (digits shifted out are lost), add or subtract the magnitudes, normalise | 3 |
| `FMP` `FMC` | MD × c(E), adding the shifted multiplicand once per unit of each multiplier digit | digit sum of the multiplier + 12 |
| `FDJ` | AC / MD by restoring division. UA gets nine quotient digits; LA gets the first eleven digits of the remainder, placed so that, read as a fraction, it is below the divisor's mantissa | digit sum of the quotient + 12 |
| `FDR` | as `FDJ` with a tenth digit that rounds the ninth; LA cleared | digit sum + 13 |
| `FAV` | floating add of c(E), then `FDR` | as `FDR` |
| `FRD` | round the 20-digit mantissa to nine digits | 3 |
| `FFL`, `FFX` | fixed (AC as a 23-digit number with *v* as its units digit) to floating and back. `FFX` jumps if the value is 10 or more | 3 |
| `FSL` | store the LA half of the mantissa as a floating word with characteristic *c* − 9 | store only |

The clock counts are from `start` to `done` and exclude the operand access.

**Exceptions**

- An exponent above 99 sets *v* = 2, which `JEO` tests.
- An exponent below 0 gives zero.
- A divisor whose first mantissa digit is 0 (zero or unnormalised) cannot divide.
  `FDJ` and `FDR` then jump to E with the AC unchanged. `FAV` keeps the sum in the
  AC and halts after the instruction.
- `FDJ` sets the remainder indicator, so `SLA` stores the LA with the dividend's
  sign.

## The store: `kdc_memory`, `kdc_drum`, `kdc_core_mem`, `kdc_check`

Addresses are four decimal digits:

| addresses | storage | access |
|-----------|---------|--------|
| 0000–3999 | drum, normal tracks | wait for the word to come under the heads: 200 words per revolution, half a revolution on average |
| 4000–4199 | drum, four quick-access bands of 50 words | each band is repeated four times around the drum, so the average wait is 1/8 revolution |
| 4200–4249 | core memory (also the tape buffer) | fixed `CORE_ACCESS` clocks |
| 4250–9999 | none | ends at once with `err` |

The drum model has no rotating data. A word-position counter `angle` advances every
`WORD_TIME` clocks, and a request is served in the clock where its word passes.
With the defaults (`WORD_TIME` = 12, one clock per digit time of the original
230 kHz clock) a revolution is 2,400 clocks. That is close to the 10 ms of the
original 6,000 rpm drum, so the average waits come out near the original 5 ms
(normal) and 1.25 ms (quick access). A request with `imm` set is served at once.
The console uses it to load programs.

Every stored word carries an even parity bit. `kdc_memory` generates it on writes.
On reads, `kdc_check` checks the parity and that every digit is a valid BCD digit.

Handshake: hold `req` (with `we`, `addr`, `wdata`) until `ack`. `rdata` and `err`
are valid only in the `ack` clock. The core has a second port for the tape control,
which has priority.

## Magnetic tape control: `kdc_mt_control`

The tape control runs the commands `BTP`, `TPB`, `BLS`, `RWD`, `BST`, `TTP` and
`ETP` while the processor continues. The processor waits only when:

- it issues a tape command while the unit is busy, or
- it needs the result: `TPB`, `BLS`, `BST` and `TTP` hold it until the command
  ends, so that the skip or check indicator is known.

A block on tape is a header word holding the block number, the 50 words of the
core buffer, and a check word. The check word is the XOR of all the words, so every
bit column has even parity. Every word carries its parity bit. Reading clears the
tape-check indicator TC, and it is set by:

- a parity error,
- a check-word mismatch,
- a read or search that finds no block before the end of the recording.

The handler reports the end of the recording on `h_tape_end`, which sets the TE
indicators tested by `JTE`.

- `TPB` reads the next block into the core and skips one instruction if its number
  matches the address.
- `BLS` reads blocks until the number matches.

The interface to the handlers is a word-level valid/ready bus (`h_*`). The
character-serial recording format of the original is not modelled.

## Paper tape and typewriter: `kdc_io_control`

Characters are 8-bit codes; a digit *d* is code 16 + *d*.

| instruction | effect |
|-------------|--------|
| `SEL` | chooses the components; the units digit of the address is a mask: 1 reader 1, 2 reader 2, 4 typewriter, 8 punch |
| `RIN` | reads (n) characters and shifts each digit into the bottom of the UA |
| `WRT` | copies the UA into the output buffer BR and sends (n) digits, most significant first, in the background |
| `WSP` | sends one special character (n) times |
| `FWR` | the processor reorders the UA to mantissa then characteristic and issues it as an 11-digit `WRT` |

Only these numeric modes are built.

## What is not built, and other departures

- **Floating-point.** The number format is this design's (see above). The
  floating unit uses parallel mantissa adders rather than the serial adder, so
  floating operations take tens of clocks, not hundreds. `FWR` prints or punches
  the nine mantissa digits followed by the two characteristic digits. That printed
  form is this design's choice.
- **I/O modes.** The alphanumeric mode, the mode digit of `RIN`/`WRT`, and the tape
  control codes are not built.
- **Timing.** Instruction times are the sum of the store waits and the unit cycles
  above, not the original execution-time table. The fixed-point times are of the
  same order: about 1,250 clocks on average for multiply and about 1,400 for divide,
  against 5.8 ms and 6.0 ms (1,330 and 1,380 digit times). Addition takes 24–47
  clocks.
- **Shifter.** The shifter is a one-cycle barrel shifter, so `SCT` takes one clock.
- **Index digits.** Index digits 5–9 and 0 add nothing to the address.
- **Reset.** Reset clears all registers and the index registers. The machine
  starts halted with LC = 0000.
- **`JXU`.** When c(H) ≠ c(IR1) it jumps, and c(H) is raised by one in either case.

## Top level: `kdc_top`

`kdc_top` wires the processor, the store, the tape control and the I/O control
together. It brings out as ports:

- the console: `start`, `switches`, `halted`, `alarm`, `p_lamp`, `lc`, `ac`, `md`,
  `retire`;
- a console store port `con_*`, which reads or writes any register immediately
  while the processor is halted;
- the tape handler bus `h_*`;
- the paper tape readers `rd_*`;
- the typewriter/punch `wr_*`.

Parameters: `WORD_TIME` (12) and `CORE_ACCESS` (12).

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Verilator finds the modules through `-I`; the
package must come first:

    verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/kdc_pkg.sv tb/tb_kdc_top.sv \
        --top-module tb_kdc_top -Mdir obj_top
    obj_top/Vtb_kdc_top

| testbench | what it checks |
|-----------|----------------|
| `tb_kdc_serial_adder` | digit sums and differences against integer arithmetic |
| `tb_kdc_arith` | random add/multiply/divide/round against a wide-integer reference, and the cycle counts |
| `tb_kdc_logic_unit`, `tb_kdc_shifter`, `tb_kdc_index_unit`, `tb_kdc_check` | exhaustive or random checks against reference functions |
| `tb_kdc_drum`, `tb_kdc_core_mem`, `tb_kdc_memory` | data, waits against the rotational position, parity and validity errors, nonexistent addresses |
| `tb_kdc_fpu` | random floating add, multiply and divide against a wide-integer reference, the cycle counts, rounding, conversions, exponent overflow, division jumps |
| `tb_kdc_cpu` | three small programs on a simple store model, with tape and I/O stand-ins |
| `tb_kdc_mt_control` | write, read, search, backspace, test, erase and rewind against a tape handler model, a corrupted word, and tape end |
| `tb_kdc_io_control` | selection, reading from both readers, background output, special characters |
| `tb_kdc_top` | the whole machine at its default timing (about 8 s of simulation) |

`tb_kdc_top` loads programs through the console port and runs them. They exercise:

- arithmetic with recomplementing, division-impossible and overflow jumps;
- floating multiply, add-divide-round, a division jump and an exponent overflow;
- an index loop, `PSX`, `TLU` and `SCT`;
- a subroutine call;
- block transfers;
- a tape write that overlaps with processing, then a read with block-number match
  and a failed search;
- typewriter output overlapping processing;
- paper tape input, a jump switch, a floating write, and both alarm causes.

The testbench counts each of these mechanisms and fails if one never happened. It
also measures the average store waits: about 1,680 clocks for the normal tracks,
590 for the quick bands and 12 for the core in that program.

`tb/kdc_tape_model.sv` is a behavioural model of four tape transports, used by the
tape and top testbenches. It is not synthesizable.
