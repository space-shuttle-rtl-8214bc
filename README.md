# Space Shuttle: a register file for measuring upsets in SkyWater 130 nm

This design is a small test chip for radiation testing. It holds 32 words of 32 bits in plain
flip-flops and can store each word under one of five storage mechanisms: no protection, SECDED
ECC, triple redundancy, a shadow copy, or a shadow copy protected by ECC. Every access and every
detected or corrected error is counted per register, by a monitor that is itself duplicated.
Under irradiation, the counters and the flags on each read show how often the flip-flops of this
process upset, and how well each mechanism copes. The words and the verification flags of each
read are also driven onto GPIO pins, so they can be watched from outside the chip.

The design stays deliberately simple, so that every flip-flop can be reached. Any physical
register can be written or read directly, bypassing the protection. This is how individual copies
are inspected, and how errors are injected on the bench.

## Registers, banks and where the copies live

The 32 registers form 8 banks of 4 (`rf_bank`, `regfile`). Each bank has its own write port and
read port. Register address `r` maps to:

- bank `r[2:0]`
- row `r[4:3]`

So the 8 registers of a row sit in 8 different banks. A register's redundant copies and its check
bits go into the registers that follow it in the same row. The bank numbers wrap from 7 to 0.
Because these are different banks, a protected write stores all its copies in one cycle, and a
protected read sees them all at once.

| mechanism (`prot_mode_e`) | bank b = r[2:0] | bank b+1 | bank b+2 | on read |
|---|---|---|---|---|
| `MODE_NONE` | data | – | – | returned as stored, never flagged |
| `MODE_ECC` | data | 7 check bits | – | SECDED decode: 1 bit corrected, 2 bits detected |
| `MODE_TMR` | data | data | data | bitwise 2-of-3 vote; any disagreement is detected and corrected |
| `MODE_SHADOW` | data | data | – | compare; a difference is detected but cannot be resolved, so the primary copy is returned |
| `MODE_ECC_SHADOW` | data | shadow copy | check bits of the shadow | see below |

For the ECC shadow register, the shadow copy is decoded and acts as the reference:

- If the shadow decodes cleanly, or with one corrected bit, the read returns the decoded shadow.
  The read counts as *corrected* if either the shadow had a flipped bit or the primary differs
  from it.
- If the shadow holds a double error, the read returns the primary, flagged *uncorrectable*.

Each register remembers the mechanism it was last written with (`prot_ctrl`, 3 bits per
register, cleared to `MODE_NONE` at reset). So all five mechanisms can be in use at once, in
different registers. The user chooses where protected words go. A `MODE_TMR` word at register
`r` also occupies physical registers `r+1` and `r+2` of the same row. Writing those registers
afterwards overwrites the copies, and the next read of `r` then reports an error. This is the
intended way to inject errors.

Reads do not write corrected data back. An injected or real upset stays until the register is
written again, and it is reported on every read.

### The ECC code

`secded_enc` and `secded_dec` use an extended Hamming (39,32) code:

- The 32 data bits sit at codeword positions 3, 5–7, 9–15, 17–31 and 33–38.
- Check bit k (k = 0..5) is the parity of the data bits whose position has bit k set.
- Check bit 6 is the parity of all 32 data bits and the 6 Hamming bits.

The syndrome names the position of a single flipped bit. The overall parity separates one error
(odd) from two (even, with a non-zero syndrome). A flipped check bit is reported as a corrected
single error. The data is unchanged in that case. With odd parity, a syndrome beyond position 38
cannot come from one flip, so it is reported as a double error. The check bits use the low 7 bits
of their register, and the upper 25 bits are written as zero and ignored.

Zero data has zero check bits. So after reset, every register reads clean in every mode.

## Commands and timing

`space_shuttle` takes one command per cycle on `cmd_valid_i` / `cmd_i` (`ss_pkg::cmd_t`):

| `op` | what it does | response |
|---|---|---|
| `OP_WRITE` | protected write of `wdata` to `addr` using `mode`; records the mode | none |
| `OP_READ` | protected read of `addr`: check, correct, count | data and error flags |
| `OP_RAW_WRITE` | writes `wdata` into physical register `addr` only | none |
| `OP_RAW_READ` | reads physical register `addr` unchecked | data |
| `OP_CNT_READ` | reads RMU counter `cnt_sel` of register `addr` | counter, `rmu_mismatch` |

The response (`rsp_o`, `ss_pkg::rsp_t`) is registered. It appears for exactly one cycle, one cycle
after the read command. The flags are:

- `detected`: the stored copies were inconsistent.
- `corrected`: the returned word was repaired.
- `uncorrectable`: the word could not be repaired.
- `rmu_mismatch`: the two monitor copies disagreed.

Raw commands are not counted, and they never change a register's recorded mode. On the
fabricated chip, the shuttle harness drives this command path from its logic-analyzer probes. Here
it is a plain port, and the harness is not part of the RTL.

## Reliability Monitoring Unit

`rmu` keeps four 32-bit counters for each of the 32 register addresses: protected writes,
protected reads, detected errors and corrected errors. That is 4096 flip-flops. A counter
increments at the clock edge that ends the command's cycle. The read-out is combinational, so
even the very next command already sees the new value. The counters wrap at 2^32 and are cleared
only by reset.

`rmu_dup` holds two identical copies (8192 flip-flops in total) that receive the same events. A
read returns copy A and raises `rmu_mismatch` if copy B differs. An upset inside the monitor
therefore shows up on read-out instead of passing for a real count.

## GPIO pins

`gpio_map` registers the last response onto 38 pins and holds it until the next one:

| pins | meaning |
|---|---|
| `[31:0]` | data word |
| 32 | detected |
| 33 | corrected |
| 34 | uncorrectable |
| 35 | RMU mismatch |
| 36 | response-valid pulse |
| 37 | toggles on each response, for a slow external sampler |

`gpio_oeb_o` is the active-low output enable of the pins, controlled by `gpio_oe_i`. The pins
therefore lag `rsp_o` by one cycle.

## Modules

| file | role |
|---|---|
| `rtl/ss_pkg.sv` | sizes, encodings, command/response/event structs, ECC position function |
| `rtl/space_shuttle.sv` | top: wires the controller, the register file, the duplicated RMU and the GPIO |
| `rtl/prot_ctrl.sv` | mode table, write fan-out, read checking, raw access, events, response register |
| `rtl/regfile.sv`, `rtl/rf_bank.sv` | 8 banks × 4 × 32-bit flip-flop registers, async active-low reset to 0 |
| `rtl/secded_enc.sv`, `rtl/secded_dec.sv` | extended Hamming (39,32) encoder and decoder |
| `rtl/tmr_voter.sv` | bitwise majority vote with a disagreement flag |
| `rtl/rmu.sv`, `rtl/rmu_dup.sv` | event counters, and the duplicated pair |
| `rtl/gpio_map.sv` | response-to-pin mapping |

The whole design synthesises to about 9.4 k flip-flop bits: 1024 of storage, 8192 of monitor
counters, and the rest for modes, the response and the pins. All logic is on one clock. Every
register has an asynchronous active-low reset.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog. `tb/tb_ref_pkg.sv` holds the reference
functions they share. The ECC reference builds the codeword explicitly, independently of the RTL.
For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ss_pkg.sv tb/tb_ref_pkg.sv tb/tb_space_shuttle.sv --top-module tb_space_shuttle
./obj_dir/Vtb_space_shuttle
```

`tb_space_shuttle` runs the full-size design end to end:

- It takes every register through two rounds of the five mechanisms. Each round writes, reads
  clean, injects each mechanism's characteristic errors and checks the flags.
- It checks the GPIO pins after every response.
- It reads back all 128 counters against a model.

It counts each mechanism it exercises and fails if one never occurred. The mechanisms are:

- each storage mode
- ECC single and double errors
- TMR correction
- shadow detection
- each ECC-shadow case
- bank wrap-around
- three-bank parallel writes
- raw inspection and injection
- counter reads and GPIO updates

It takes well under a second. `prot_ctrl` carries two assertions: the opcode must be defined, and
a response must follow every read command. Run with `--assert` to enable them.

## What follows the original design and what does not

These points follow the chip this RTL describes:

- 32 × 32-bit flip-flop registers in 8 banks that can be used in parallel
- direct set and inspect access to each register
- the four protection mechanisms plus unprotected storage
- SECDED (1-bit correction, 2-bit detection) for both ECC variants
- a duplicated monitor with 32-bit per-register counters of writes, reads, detected and corrected
  errors
- memory output and verification result on GPIO

The following are choices of this RTL:

- the address-to-bank mapping and the placement of copies and check bits
- the particular ECC code
- the read decision rules for the shadow and ECC-shadow mechanisms
- no write-back of corrected data
- not counting raw accesses
- counter wrap-around
- comparing the monitor copies on read-out
- the command set and its one-cycle response
- the GPIO pin assignment
- the reset values

**Not built:**

- **Stacked mechanisms.** The original allows mechanisms to be combined with one another "with few
  limitations". Here, each register carries exactly one mechanism. Stacking two mechanisms on the
  same word (for example ECC on each triplicated copy) is not implemented, because its layout and
  checking rules are unknown.
- **The harness and physical parts.** The shuttle harness (management core, logic analyzer, GPIO
  configuration shift register) and the pads are outside this RTL.
- **Timing and voltage.** The physical implementation targeted 100 MHz. Nothing here was
  timing-checked, and the hold-time issues and the reduced 1.60 V supply of the fabricated parts
  are properties of that implementation, not of this RTL.
