# Gen2 RFID tag baseband processor

This is the digital baseband of a passive UHF RFID sensor tag that speaks the EPC Class-1
Generation-2 (Gen2) air interface. A passive tag lives on the few microwatts it rectifies from the
reader's carrier, so the processor is organised around one idea: **nothing runs unless the command
being handled needs it**. A single 1.92 MHz master clock drives everything, and a timing unit
decides, cycle by cycle, which blocks may act. Blocks that only need to act once per received bit
get a one-cycle trigger pulse per bit instead of the full clock. Blocks that are not needed for the
current phase or command get no enable at all.

The architecture follows the paper "Baseband-Processor for a Passive UHF RFID Transponder". That
paper gives the block structure, the signal names, the trigger scheme and the sensor path. It
leaves out most protocol internals, and those are filled in here from the Gen2 standard. The
section "How far this follows the published design" lists what was taken from where.

## The three phases

The timing unit (`timing_unit`) keeps the processor in one of three phases. Each phase enables a
different part of the chip.

| phase | enabled | ends when |
|-------|---------|-----------|
| RX    | PIE decoder (`clk_pie_en`) and the bit-rate trigger pulses | the receive FSM raises `stack_ready` (or an unknown command code is seen: restart) |
| CORE  | protocol core (`clk_core_en`) | the core issues a non-zero `order_out` (to TX), or raises `end_core` (back to RX) |
| TX    | transmit controller and encoder (`clk_tx_en`) | the transmit controller raises `end_transfer` (back to CORE) |

A command with a reply therefore goes RX → CORE → TX → CORE → RX. The second CORE visit is a
short check before the core hands control back. A command without a reply goes RX → CORE → RX.
The receive and transmit sections are never enabled together, and the end-to-end testbench
checks this on every cycle.

Clock gating is written as clock enables on the one master clock, not as gated clock nets. The
enables are the points where a clock-gating cell would be inserted. This keeps the RTL
single-clock and easy to simulate.

### The trigger-pulse train

During RX, each decoded bit starts a chain of single-cycle pulses, one master cycle apart:

```
cycle   t           t+1             t+2            t+3
        rising edge bit_strobe      en_pulse_shift en_pulse_cmd   en_pulse_rx
        of data_in  (PIE decoder)   (shift reg.)   (cmd decoder)  en_pulse_5 / en_pulse_16 (CRC units)
```

Each stage reads what the previous one produced one cycle earlier. Spreading the pulses out also
spreads the current peaks over time. The shift register, command decoder, receive FSM, Stack and
CRC units only act on these pulses. Between bits, which are at least 12 master cycles apart, they
do nothing.

Both CRC units start with the first data bit of a frame. Once the command decoder names the
command, the timing unit stops the unit the command does not use:

- CRC-5 stays on only for Query.
- CRC-16 stays on for Select, Req_RN, Read, Write, Kill, Lock and Access.
- Neither stays on for QueryRep, ACK, QueryAdjust and NAK.

## Receiving: from pulse intervals to command fields

**Synchronisation.** `sync_ff` samples the demodulated input `data_dem` on the *falling* clock
edge. The rest of the logic, which runs on the rising edge, then sees a value that has had half a
period to settle. A second flip-flop of the same kind synchronises the reset.

**PIE decoding** (`pie_decoder`). In pulse-interval encoding every symbol is a high interval closed
by a short low pulse. A symbol therefore ends at a rising edge of the signal, and its length is the
number of master cycles between two rising edges. A frame starts with:

- a low delimiter;
- a data-0;
- RTcal, whose length is data-0 plus data-1;
- for a Query only, TRcal.

The decoder stores RTcal and sets `pivot = RTcal/2`. After that, a symbol shorter than the pivot is
a 0 and any other symbol is a 1. The symbol after RTcal is TRcal if it is longer than RTcal.
Otherwise it is already the first data bit, as in a frame-sync. At the fastest forward link
(Tari = 6.25 µs) the numbers are: data-0 = 12 cycles, RTcal = 30, pivot = 15, TRcal = 64.
`end_prea` rises once the preamble is known. TRcal is kept after the Query, because later
replies still use the backward rate it set.

**Command identification** (`shift_register`, `command_decoder`). Bits enter a 16-bit shift
register, newest bit in bit 0. Gen2 command codes are prefix-free, so the decoder looks at the
first 2, 4 and 8 bits:

| code | command | cmd_ID | CRC |
|------|---------|--------|-----|
| 00 | QueryRep | 1 | none |
| 01 | ACK | 2 | none |
| 1000 | Query | 3 | CRC-5 |
| 1001 | QueryAdjust | 4 | none |
| 1010 | Select | 5 | CRC-16 |
| 11000000 | NAK | 6 | none |
| 11000001 | Req_RN | 7 | CRC-16 |
| 11000010 | Read | 8 | CRC-16 |
| 11000011 | Write | 9 | CRC-16 |
| 11000100 | Kill | 10 | CRC-16 |
| 11000101 | Lock | 11 | CRC-16 |
| 11000110 | Access | 12 | CRC-16 |

Any other code gives cmd_ID 15, and the receiver restarts and waits for the next delimiter.

**Field capture** (`fsm_rx`, `stack`). The receive FSM holds one field table per command: for each
field after the code it gives the width. It counts bits. When a field is complete, it writes the
low bits of the shift register into the next Stack register, so field *i* of the command ends up
in Stack register *i*. After the last field (the CRC counts as a field), `stack_ready` rises and
the RX phase ends. Select is the only command with a variable length: its 8-bit Length field sets
how many mask bits follow, and the mask is stored in 16-bit pieces for as long as registers
remain. EBV address fields are taken as one byte, which covers word addresses up to 127.

**CRC** (`crc5`, `crc16`, `crc_buffer`, `crc_check`). Both CRCs run bit-serially over every bit of
the command, from the first code bit to the last CRC bit. The buffer stores both results when
`stack_ready` rises. The check then needs:

- a CRC-5 register of 0 for a Query;
- the residue 16'h1D0F for the CRC-16 commands;
- nothing for the unprotected commands.

A command that fails the check is ignored.

## Processing: the protocol core

`fsm_core` first copies the command's fields out of the Stack, one per cycle for eleven cycles. It
then applies the Gen2 tag state machine in a single evaluation cycle. The states are Ready,
Arbitrate, Reply, Acknowledged, Open, Secured and Killed.

- **Query** stores DR, M, the session and Q. If Sel and Target match the SL flag and the session's
  inventoried flag, it loads the slot counter from the random number generator, masked to Q bits.
  Slot 0 means Reply, plus an RN16 to send.
- **QueryRep** counts the slot down. **QueryAdjust** changes Q (110 adds 1, 011 subtracts 1) and
  draws a new slot. A tag in Acknowledged, Open or Secured that sees either command flips its
  inventoried flag and returns to Ready.
- **ACK** with the right RN16 leads to Acknowledged and the EPC reply. **NAK** leads to Arbitrate.
- **Req_RN** in Acknowledged gives a new handle. The core has the 32-bit access password compared
  with zero, and the handle reply is sent either way. A zero password leads to Secured; any other
  password leads to Open. In Open or Secured, Req_RN gives a fresh RN16, which later serves as the
  cover code for Write data and password halves.
- **Read** and **Write** need the handle. Addresses outside the bank give an error reply (code 03).
  A Write to the User bank starts a sensor acquisition instead of storing the reader's data.
- **Select** sends the tag back to Ready and asks the transmit side to compare the mask with
  memory (order MATCH, no reply). When the result comes back, the core applies the Gen2 action
  table: each of the eight actions asserts, deasserts, negates or keeps the target flag, with
  one rule for a matching tag and another for a non-matching tag. The target is SL or a session's
  inventoried flag. The mask is read from the six Stack registers after Length, so at most 96
  mask bits (one full EPC) are compared. Truncate is ignored.
- **Access** and **Kill** need the handle and come in two halves. Each half carries 16 bits of
  the 32-bit password, XOR-covered with the RN16 from the latest Req_RN. The core orders a compare
  of the decovered half with its word in the Reserved bank: the kill password is words 0–1 and the
  access password is words 2–3. The transmit side replies with the handle only if the half
  matches. A wrong half sends the tag to Arbitrate with no reply.
  - The second Access half leads to Secured.
  - The second Kill half leads to Killed, with a reply of header 0, handle and CRC-16.
  - A kill password of all zeros is refused with error code 00.
  - Any command other than Req_RN or the same command drops a half-done sequence.
- **Lock** works only in Secured with the handle. There are ten lock bits: for each of the kill
  password, access password, EPC, TID and User fields, a pwd-write bit (pwd-read/write for the
  passwords) and a permalock bit. The bits are updated where the Lock mask is set, and the reply
  is header 0, handle and CRC-16. A Lock that would change a permalocked field is refused with
  error 04.
- A Write to a locked field, or a Read of a locked password, gives error 04. The exception is a
  tag in Secured whose field is not permalocked.

The RN16 and handle come from `rng`, a free-running 16-bit maximal-length LFSR.

The core hands work to the transmit side with a five-bit `order_out` and a record of parameters
(`tx_params_t`). The core is disabled while the transmit side works. When `end_transfer` comes
back, the core withdraws the order and checks whether the result changes its state. Select,
Req_RN, Access and Kill use this step. It then raises `end_core`.

## Encoding: seven actions, two compares, and the backscatter encoder

`fsm_tx` carries out one of seven actions, plus two memory compares:

| order | action | reply |
|-------|--------|-------|
| A1 | RN16 | preamble, RN16 |
| A2 | EPC | preamble, PC word, EPC words (count from the PC), CRC-16 |
| A3 | handle | preamble, RN16 or handle, CRC-16 |
| A4 | read | preamble, header 0, memory words, handle, CRC-16 |
| A5 | write | EEPROM write, then preamble, header 0, handle, CRC-16 |
| A6 | sensor | five ADC conversions, their mean written to the EEPROM, then as A5 |
| A7 | error | preamble, header 1, error code, handle, CRC-16 |
| MATCH | Select compare | none; compares mask bits with memory one bit per cycle and reports `match` |
| AUTH | password compare | the same compare on password bits; on a match, preamble, handle, CRC-16 (header 0 first for the last Kill half). Two variants: it can always reply (the Req_RN probe), or run an empty compare and reply header 0 (Lock) |

The compare starts at the Select pointer, which is a bit address in the chosen bank. It reads a
new word at each word boundary. It stops at the first differing bit, or at the first bit past the
end of the bank, which counts as a mismatch. An empty mask matches. The compare sits in `fsm_tx`
because that block is the one wired to the EEPROM.

Every reply ends with a dummy 1. The reply CRC-16 is computed on the fly by an instance of the
same `crc16` block and sent complemented.

`tx` is the encoder. The backward link period is

    N_BLF = round(TRcal / DR)   master cycles,   DR = 8 or 64/3 (chosen by the Query)

TRcal is already a whole number of cycles, so the rounding is exact integer arithmetic:
`(TRcal+4)>>3` or `(3*TRcal+32)>>6`. At TRcal = 64 and DR = 64/3 this gives N_BLF = 3, which is
640 kHz from the 1.92 MHz clock.

- **FM0**: a symbol lasts N_BLF cycles. The level inverts at every symbol boundary, and also in the
  middle of a 0. The preamble is 1 0 1 0 v 1, where v is a 0 without its boundary inversion.
- **Miller (M = 2, 4, 8)**: a symbol lasts M·N_BLF cycles. The baseband inverts in the middle of a 1
  and between two 0s, and is multiplied by a square-wave subcarrier of period N_BLF. The preamble
  is four pilot zeros, then 0 1 0 1 1 1.

When N_BLF is odd, a half period is floor(N_BLF/2) cycles followed by the rest. Symbols arrive
through a valid/ready handshake with a one-symbol buffer. This gives the controller a whole symbol
time to fetch the next EEPROM word.

**Sensor path.** `clk_adc` is the master clock divided by 64, and it runs only while the ADC is
powered. The ADC halves it again, and a conversion takes 12 of those periods:
12 × 2 × 64 = 1536 master cycles, or 0.8 ms. The transmit controller powers the ADC up, sums five
conversions, powers it down, divides the sum by five and writes the result to the EEPROM.

## Blocks and files

| file | block |
|------|-------|
| `rtl/rfid_pkg.sv` | shared types: cmd_ID, orders, tag states, encoder symbols, reply parameters |
| `rtl/rfid_top.sv` | the complete processor |
| `rtl/sync_ff.sv` | falling-edge synchroniser (input and reset) |
| `rtl/timing_unit.sv` | phases, trigger pulses, enables, `clk_adc` |
| `rtl/pie_decoder.sv` | preamble measurement and PIE bit decisions |
| `rtl/shift_register.sv` | 16-bit received-bit register |
| `rtl/command_decoder.sv` | command identification |
| `rtl/crc5.sv`, `rtl/crc16.sv` | serial CRCs |
| `rtl/crc_buffer.sv`, `rtl/crc_check.sv` | CRC result store and validity decision |
| `rtl/fsm_rx.sv` | per-command field capture into the Stack |
| `rtl/stack.sv` | 16 × 16-bit parameter registers |
| `rtl/fsm_core.sv` | Gen2 tag state machine |
| `rtl/rng.sv` | 16-bit LFSR random numbers |
| `rtl/fsm_tx.sv` | the seven transmit actions and the two compares |
| `rtl/tx.sv` | FM0 / Miller encoder |
| `rtl/eeprom.sv` | behavioural model of the non-volatile memory |
| `rtl/sar_adc.sv` | behavioural model of the 10-bit SAR ADC |

Top-level ports of `rfid_top`:

- `clk_master`, `rst_async` (active high, synchronised inside).
- `data_dem` (demodulated reader signal) and `data_out` (backscatter modulation, 0 when idle).
- `sensor_code`: the conditioned sensor voltage, given as a 10-bit full-scale code. It stands in
  for the analog sensor and its signal conditioning.
- Observation outputs: `tag_state`, the last sensor `average`, `rtcal`, `trcal`, `pivot`, `n_blf`
  and `clk_adc`.

Parameters of `rfid_top`: `WORDS_PER_BANK` (16), `ADC_DIV` (64), `ADC_SAMPLES` (5) and
`EE_WRITE_CYCLES` (32). The EEPROM holds four banks of `WORDS_PER_BANK` words. Its model starts
with zero passwords, PC = 3000h, a 96-bit EPC starting 3034 1F2E …, TID words E200 1234, and an
empty User bank.

## How far this follows the published design

Taken from the paper:

- the block set and connections;
- the signal names `data_in`, `en_pulse_shift/cmd/rx/5/16`, `end_prea`, `end_cmd`, `cmd_ID` (4 bits),
  `stack_ready`, `order_out` (5 bits), `end_transfer`, `end_core`, `CRC_valid` and `clk_adc`;
- the falling-edge input synchroniser and the reset synchroniser;
- the 16-bit shift register;
- measuring symbols between rising edges, the pivot rule and the N_BLF formula;
- CRC-5 for Query, CRC-16 for Select and the access commands, and gating off the unused CRC;
- the delayed pulse chain;
- twelve command machines and seven action types;
- the 1.92 MHz master clock;
- the 10-bit ADC clocked at master/128 with 12 cycles per conversion, and five conversions averaged
  and stored after a Write.

The paper's measured example (RTcal 30, TRcal 64, pivot 15) gives pivot = RTcal/2, and this
design uses that. One sentence of the paper derives the pivot from TRcal instead; that reading
is not used.

Taken from the Gen2 standard, because the paper does not describe it:

- command codes and field layouts;
- CRC polynomials, presets and residues;
- tag states and transitions;
- reply formats, FM0/Miller symbol shapes and preambles.

This design's own choices:

- one table-driven field sequencer in place of twelve separate receive machines, and one sequencer
  for the seven actions;
- the numeric values of cmd_ID and `order_out`;
- which action belongs to which command, including "a Write to the User bank triggers the sensor
  acquisition";
- the MATCH and AUTH orders that give Select, Req_RN, Access and Kill their memory compares, and
  the 96-bit mask limit;
- lock bits held in core registers;
- the one-cycle pulse spacing;
- clock enables in place of gated clocks;
- Stack size (16 × 16), EEPROM size, write time and power-on time (the model ignores requests in
  its first four clock edges), and the LFSR random number generator.

Not built, or only in part:

- The lock bits live in core registers, not in the EEPROM, so a reset clears them.
- Inventoried flags and SL have no persistence timers.
- Select masks longer than 96 bits are compared only on their first 96 bits, and Truncate has no
  effect.
- Reply timing (the Gen2 T1/T2 intervals) is not enforced.
- The sensor, the signal conditioning, the supply capacitors and the analog front end have no
  logic. The EEPROM and the ADC are behavioural models with the real blocks' interfaces.
- Power figures cannot be reproduced from RTL.

## Simulating

Every testbench in `tb/` checks itself. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rfid_pkg.sv tb/tb_rfid_top.sv --top-module tb_rfid_top -o sim
./obj_dir/sim
```

- `tb_rfid_top` runs the whole processor at its default parameters, driven by a reader model. The
  model builds PIE frames with their CRCs and decodes FM0 and Miller replies by the line-code
  rules. The session covers:
  - Query, ACK, Req_RN and Read;
  - Write and read-back;
  - a sensor Write with five conversions;
  - an out-of-range Read;
  - a corrupted CRC and an unknown code;
  - QueryRep and a non-matching Query;
  - a Miller reply at DR = 8;
  - slot counting with QueryRep and QueryAdjust, and NAK;
  - four Selects: against the TID word (matching, then not matching), against a 24-bit mask
    across two EPC-bank words, and against the whole 96-bit EPC. Each is followed by a Query that
    must or must not answer, according to the flag the Select set;
  - Access in two halves;
  - Lock of the User bank, then a nonzero access password. Req_RN then leads to Open, where a
    Write to the locked bank is refused with error 04. Access with the new password then leads to
    Secured;
  - a Write of the kill password, a wrong Kill half (tag goes to Arbitrate), and a full Kill, after
    which the tag no longer answers.

  It counts each of these mechanisms and fails if one never happened.
- `tb_link_range` runs the slowest link settings: Tari 25 µs forward, and Miller-8 at a 40 kHz link
  frequency (5 kbit/s) backward.
- `tb_<block>` tests each block on its own against values worked out independently.

All testbenches finish in well under a minute.

## Changing it

- The decoder's counters are `CNT_W` = 10 bits (`rfid_pkg`). That holds symbols of up to 1023
  master cycles, which covers the slowest Gen2 timing at 1.92 MHz (TRcal ≤ 432 cycles). Widen it
  for a faster master clock.
- To add a command: give it a code in `command_decoder`, a field table in `fsm_rx`, its CRC class
  in `crc_check` and `timing_unit`, and its transitions in `fsm_core`.
- To add an action: give it an `order_e` value and a path in `fsm_tx`.
