# Microprogrammed IEEE 1149.1 test coprocessor

A CPU that has to run boundary-scan tests on its own board (online, in the field) should not
bit-bang TMS, TCK and TDI in software. This design is a small coprocessor that sits beside a
32-bit CPU and does that work for it. The CPU writes compact test commands, modelled on the
SVF commands `STATE`, `SDR`/`SIR` and `RUNTEST`, into a FIFO. The coprocessor turns them into
TAP pin activity (`b_TMS`, `b_TCK`, `b_TDI`) and checks the responses on `b_TDO` against
expected values under a mask.

The main idea is the control path. It is not a hand-written state machine. Each command is an
ASMD chart (an algorithmic state machine with a data path), written as a Moore machine. Each
chart state is one word of a horizontal microprogram memory. To add or change a command you
edit the memory contents, not the logic. Commands are placed back to back in that memory, and
each command's words are addressed relative to its own base address. A short command such as
TMS1 (2 words) therefore does not take as much memory as the longest one, SHFCP (15 words).

## Command set and command stream

Each item below is one 32-bit word written to the FIFO. The opcode sits in bits 2:0 of the
first word.

| opcode | command | words | effect on the board TAP |
|---|---|---|---|
| 0 | RESET | `RESET` | 32 TCK pulses with TMS=1. Any TAP reaches Test-Logic-Reset. Also clears `cmp_fail`. |
| 1 | TMS0 | `TMS0` | TMS=0 and one TCK pulse |
| 2 | TMS1 | `TMS1` | TMS=1 and one TCK pulse |
| 3 | MTCK | `MTCK, N` | TMS=0 and N TCK pulses (N ≥ 1), e.g. for Run-Test/Idle BIST |
| 4 | SHF | `SHF, N, X0, X1, …` | shifts N bits (N ≥ 1) in, LSB of X0 first. TMS=1 on the last bit, so the TAP goes from Shift-xR to Exit1-xR. |
| 5 | SHFCP | `SHFCP, N, X0, Y0, Z0, X1, Y1, Z1, …` | as SHF. Each bit read on TDO is compared with Y where the mask Z is 1. A mismatch sets the sticky `cmp_fail`. |

Other opcode values are read and ignored. The CPU moves the TAP between stable states with
TMS0/TMS1, in the same way SVF `STATE` paths are written out. An SVF scan such as
`SDR 16 TDI(0800) TDO(0010) MASK(0090)` becomes `TMS1 TMS0 TMS0` (Run-Test/Idle to Shift-DR),
then `SHFCP 16 0x0800 0x0010 0x0090`, then `TMS1 TMS0` (Update-DR, then Run-Test/Idle).

A command can be written before the previous one has finished. The FIFO holds 5 words, and the
coprocessor waits whenever it needs a word that has not arrived yet.

## Top level

```
 CPU ──fsl_m_data/write──► fsl_fifo (5 x 32) ──s_data/s_exists──► control_path ──ctrl──► data_path ──► b_TDI
        ◄──fsl_m_full──                       ◄──────s_read────── (sequencer,         ◄── conditions
                                                                   microcode,           ◄── b_TDO
                                                                   encoder) ──► b_TMS, b_TCK
```

`test_coprocessor` has these ports: `clk` and `rst` (synchronous reset, active high); the CPU
side `fsl_m_data`, `fsl_m_write` and `fsl_m_full`; the board side `b_tms`, `b_tck`, `b_tdi` and
`b_tdo`; and the status outputs `cmp_fail`, `busy`, `stall` and `uaddr`. The last two only let
you watch the sequencer. There is one parameter, `FIFO_DEPTH = 5`. Word width and microcode
sizes are constants in `tc_pkg`.

## The microprogrammed control path (the part to understand)

### Addressing: bank + offset

```
            opcode ──► cmd_base() ──► Bank_reg ─────────────┐
                                                              ▼
   ASMD_State_reg ◄── +1 ◄──┬── Mux ◄─ 0: ASMD_State_reg    Adder ──► microprogram memory ──► word
   (offset + 1)             │      ◄─ 1: word.new_addr       ▲          (registered read)
                            └────────────────────────────────┘
   Mux select "Load", Bank_reg Load/Reset, FSL_S_Read, stall  ◄── Encoder ◄── word.uop, conditions, FSL_S_Exists
```

- `Bank_reg` holds the base address of the running command. Base 0 is the common code, IDLE
  and DISPATCH.
- `ASMD_State_reg` holds the offset after the current one. The Mux picks that offset, which
  means "continue", or the word's own *new address*, which means "jump".
- The Adder forms `base + offset`. All addresses written in the microcode are offsets inside
  their own command, so a command can be moved in memory without editing it.
- The memory has a synchronous read, like an FPGA block RAM. Its output register is the
  microinstruction register. This register breaks what would otherwise be a combinational loop
  (memory → Encoder → Mux → Adder → memory). It also makes every control output a Moore
  output that changes only on the rising edge.
- The Adder uses the value `Bank_reg` is *about to* take. On DISPATCH the first word of the new
  command is therefore fetched in the same cycle, and on END the address goes straight back to
  0.

One microprogram word executes per clock, so a command takes one cycle per chart state it
passes through.

### Microword format

`uword_t` = { new address (4) | micro-operation (8, one-hot) | control bits (15) } = 27 bits.

- **New address.** 4 bits, enough for the longest command (15 states).
- **Micro-operation.** One-hot:

  | micro-op | what it does |
  |---|---|
  | CONT | continue to the next word |
  | JUMP | go to the new address |
  | BIF /EXISTS | branch if the FIFO is empty |
  | BIF LASTW | branch if this is the last word of the bit stream |
  | BIF RB0 | branch if `rbits_latch` = 0 |
  | BIF /CB1 | branch if `cbits_cntr` ≠ 1 |
  | DISPATCH | load `Bank_reg` from the opcode, then jump |
  | END | reset `Bank_reg`, then jump |

  A "branch if" that is not taken continues to the next word.
- **Control bits.** One bit per data path strobe, plus the two TAP pin levels: `iwL iwD rbL
  cbL cbD cbM sL sS bTMS bTCK cbR eL mL cC fC`. Their meanings are listed under *Data path*.

### Waiting for the CPU (stall)

The FIFO-consuming bits are `iwL rbL cbL sL eL mL`, plus DISPATCH. If a word has one of them
and the FIFO is empty, the Encoder raises `stall`. While it is raised:

- the memory output register, `Bank_reg` and `ASMD_State_reg` hold their values;
- every data path strobe is forced to 0;
- `b_TMS` and `b_TCK` keep their levels.

When the data arrives, the word executes normally and pops the FIFO. A slow CPU therefore
only stretches the TCK low time. It never corrupts a scan.

### Microcode

This listing is the contents of `tc_pkg::microcode()`. Offsets are relative to each command's
base address. The ASMD state numbers of the SHF chart are given in brackets.

| addr | cmd / offset | new addr | micro-op | control bits | meaning |
|---|---|---|---|---|---|
| 0 | IDLE | 0 | BIF /EXISTS | – | wait for a command |
| 1 | DISPATCH | 0 | DISPATCH | – | read opcode, go to the command's offset 0 |
| 2 | RESET 0 | – | CONT | cbM fC bTMS | count = 32, clear `cmp_fail` |
| 3 | RESET 1 | 3 | BIF /CB1 | bTMS | |
| 4 | RESET 2 | 4 | JUMP | bTMS bTCK | last pulse |
| 5 | RESET 3 | 1 | JUMP | cbD bTMS bTCK | pulse, count − 1 |
| 6 | RESET 4 | 0 | END | bTMS | |
| 7 | TMS0 0 | – | CONT | – | TMS set up while TCK is low |
| 8 | TMS0 1 | 0 | END | bTCK | |
| 9 | TMS1 0 | – | CONT | bTMS | |
| 10 | TMS1 1 | 0 | END | bTMS bTCK | |
| 11 | MTCK 0 | – | CONT | cbL | count = N |
| 12 | MTCK 1 | 3 | BIF /CB1 | – | |
| 13 | MTCK 2 | 4 | JUMP | bTCK | last pulse |
| 14 | MTCK 3 | 1 | JUMP | cbD bTCK | pulse, count − 1 |
| 15 | MTCK 4 | 0 | END | – | |
| 16 | SHF 0 | – | CONT | iwL rbL | N → word count and remainder |
| 17 | SHF 1 [2] | 6 | BIF LASTW | sL | load X, is it the last word? |
| 18 | SHF 2 [10] | – | CONT | iwD cbM | not last: 32 bits to go |
| 19 | SHF 3 | 5 | BIF /CB1 | – | |
| 20 | SHF 4 | 1 | JUMP | sS bTCK | 32nd bit of the word, TMS stays 0, next word |
| 21 | SHF 5 | 3 | JUMP | cbD sS bTCK | one more bit |
| 22 | SHF 6 [3] | 8 | BIF RB0 | – | last word full? |
| 23 | SHF 7 [4] | 9 | JUMP | cbR | count = remainder |
| 24 | SHF 8 [8] | – | CONT | cbM | count = 32 |
| 25 | SHF 9 [5] | 12 | BIF /CB1 | – | last bit? |
| 26 | SHF 10 [6] | – | CONT | bTMS | TMS set up |
| 27 | SHF 11 [7] | 0 | END | bTMS bTCK | last bit, leave Shift-xR |
| 28 | SHF 12 [9] | 9 | JUMP | cbD sS bTCK | one more bit |
| 29–43 | SHFCP 0–14 | | | | as SHF, with the Y and Z loads (eL, mL) after the X load, and `cC` on every word that has `bTCK` |

That is 44 of the 64 positions. The MTCK words (11–14) follow the published MTCK template
exactly.

### Adding a command

1. Draw its ASMD chart.
2. Split any state that has conditional outputs, or more than one decision, so that the chart
   is a Moore machine with at most one decision per state.
3. Write one word per state into `tc_pkg::microcode()`, with offsets relative to a new base.
   Then add the opcode to `opcode_e` and `cmd_base()`.

A new kind of decision needs a new one-hot micro-op bit (the Encoder gains one AND term). A new
data path operation needs a new control bit.

## Data path

`data_path` has no sequencing of its own. Every register is driven by a control bit.

| element | loaded / changed by | purpose |
|---|---|---|
| `iword_cntr` (27 b) | `iwL`: N / 32; `iwD`: −1 | number of full 32-bit words left |
| `rbits_latch` (5 b) | `rbL`: N mod 32 | bits in a final partial word |
| `cbits_cntr` (32 b) | `cbL`: FIFO word; `cbM`: 32; `cbR`: `rbits_latch`; `cbD`: −1 | bits or pulses left |
| TDI serializer | `sL` load X, `sS` shift | `b_tdi` = bit 0 |
| expected serializer | `eL` load Y, `sS` shift | |
| mask serializer | `mL` load Z, `sS` shift | |
| comparator | `cC` compare, `fC` clear | sets `cmp_fail` if mask = 1 and TDO ≠ expected |

The conditions it returns are:

- `cb1`: `cbits_cntr` = 1.
- `rb0`: `rbits_latch` = 0.
- `lastw`: (`iword_cntr` = 1 and `rbits_latch` = 0) or `iword_cntr` = 0. This means the word
  just loaded is the last one of the bit stream.

## TAP pin timing

Each TCK pulse is high for one system clock cycle, then low for at least one. TMS is set one
cycle before the TCK rising edge it is meant for. TDI changes when TCK falls. `b_tdo` is sampled
at the end of the cycle in which TCK is high, so the device has driven it since the previous
falling edge. At 100 MHz, a scan therefore runs at 50 MHz TCK (two states per bit). There is
one extra state per 32-bit word for the next FIFO word, and three more states at the start of
the last word. An N-bit SHF on a single word takes 2N + 6 cycles from DISPATCH to the return to
IDLE.

## How far this follows the source design, and where it departs

These parts follow the published architecture:

- the FIFO / control path / data path structure;
- Bank_reg + ASMD_State_reg + incrementer + Mux + Adder addressing;
- the three-field horizontal microword, with a one-hot micro-op field of CONTINUE, JUMP and one
  bit per "branch if";
- the control bit names and the MTCK microcode;
- the data path elements and conditions of the SHF and MTCK charts;
- one clock cycle per chart state;
- the 5-word 32-bit FIFO.

These parts are this implementation's own choices:

- **Opcodes, command word format, opcode-to-base table.** The published design does not give
  them.
- **DISPATCH and END micro-ops.** They drive Bank_reg's Load and Reset. IDLE and DISPATCH are
  the two words shared by all commands.
- **Registered (block-RAM style) memory read, and the Adder fed from Bank_reg's next value.**
- **Stall on an empty FIFO.** The published design only shows FSL_S_Exists entering the
  Encoder.
- **SHF details not shown in the published charts.** These are: loading N, the loop for words
  other than the last, and where the word counter is decremented.
- **SHFCP.** It is built as SHF with interleaved X, Y, Z words, a mask bit of 1 meaning
  "compare", and a sticky result flag that RESET clears. Nothing returns results to the CPU
  over a FIFO: the CPU reads `cmp_fail`.
- **RESET.** It is built as MTCK with TMS=1 and a fixed count of 32. Five pulses would be
  enough.
- **Extra control bits `cbR`, `eL`, `mL`, `cC`, `fC`.**
- **Memory size.** The complete command set uses 44 microprogram words here. The published
  implementation reports 52. The per-command counts match for TMS1 (2 + 2) and MTCK (2 + 5),
  but SHF uses 13 words here against 14, and SHFCP 15 against 21, because those charts are
  not published in full.

These are not included:

- the FSL control bit that travels with each word;
- a return FIFO to the CPU;
- any FPGA timing figure;
- the alternative Mealy control paths, which the source design only compares against.

## Files

`rtl/` contains one unit per file:

- `tc_pkg` holds the types, constants and microcode.
- The modules are `serializer`, `fsl_fifo`, `data_path`, `uop_encoder`,
  `microprogram_memory`, `control_path` and `test_coprocessor` (the top).

`tb/` contains one self-checking testbench per module, `tb_<module>.sv`, and
`jtag_device_model.sv`. The model is a behavioural IEEE 1149.1 device: a TAP controller, a
4-bit IR, EXTEST on an 8-bit boundary register, and BYPASS.

### Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tc_pkg.sv tb/tb_test_coprocessor.sv --top-module tb_test_coprocessor -o sim
./obj_dir/sim
```

Swap in any other `tb_*` module the same way. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the design hangs.

`tb_test_coprocessor` runs the whole design at its default size against two devices in one
chain. It covers these cases:

- the short-circuit test of two interconnects, with EXTEST, 16-bit scans and compare under
  mask: it passes with a good board and reports the short with a faulty one;
- MTCK in Run-Test/Idle;
- RESET from an arbitrary TAP state;
- SHF of 8 to 70 bits;
- SHFCP of 40, 64 and 70 bits, with and without a flipped expected bit.

It counts each mechanism (stall, FIFO full, every opcode, not-last-word loop, full and partial
last words, compare pass and fail) and fails if any of them never occurs.

`tb_control_path` checks the sequencer's address trace against the MTCK chart
(11, 12, 14, 12, 14, …, 12, 13, 15) and the SHF last-word path (states
2-3-4-5-9-5-9-5-9-5-9-5-6-7, one cycle each).
