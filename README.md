# Fault-tolerant FPGA building blocks: a self-checking AES core and a configuration scrubber

This RTL covers two separate ways of keeping an SRAM-based FPGA system
trustworthy while radiation flips bits in it.

1. **Detect errors in a running circuit.** A compact AES-128 core with a 32-bit
   datapath carries a parity bit on every byte through the whole datapath. A
   flipped bit in the S-box ROM, a register or the key store raises an error
   flag in the same cycle it is used. A built-in self-test (BIST) chains
   encryptions, decryptions and key expansions on the core. This makes sure
   rarely used parts of the ROM are exercised as well.
2. **Repair the configuration memory.** A small state machine reads back the
   FPGA configuration one frame at a time through the internal configuration
   port (ICAP). The frame ECC syndrome locates a single flipped bit, which is
   corrected by rewriting that one frame. The scrubber is triplicated with a
   voter in front of the ICAP. A watchdog asks for a full reload from a golden
   image when the scrubber finds a double error or stops working.

The two designs share nothing but a clock and reset. `ft_system_top` places
them side by side.

## Files

| file | role |
|---|---|
| `rtl/aes_pkg.sv` | parity-byte types, GF(2^8) helpers, S-box tables computed at elaboration, CT-box word format |
| `rtl/ctbox_rom.sv` | 512 x 36 dual-port CT-box ROM (encryption and decryption tables with parity) |
| `rtl/aes32_oed.sv` | 32-bit AES-128 core with on-line parity checking (encrypt, decrypt, key expansion) |
| `rtl/aes_bist.sv` | BIST wrapper: 4-word FIFO, two multiplexers, iteration control |
| `rtl/scrub_pkg.sv` | frame geometry, ICAP packet words, frame address type, syndrome status |
| `rtl/ecc_bram.sv` | 512 x 64 RAM with (72,64) SEC-DED; holds the command sequences and the frame buffer |
| `rtl/frame_addr_counter.sv` | top / row / major / minor counters forming the frame address |
| `rtl/scrub_err_locate.sv` | syndrome to {status, word, bit mask} |
| `rtl/scrub_ctrl.sv` | the scrubber state machine |
| `rtl/tmr_voter.sv` | bitwise 2-of-3 voter |
| `rtl/scrub_tmr.sv` | three scrubber copies, with voters on the ICAP inputs and on the status outputs |
| `rtl/watchdog_timer.sv` | requests a reconfiguration on a timeout or on a double error |
| `rtl/ft_system_top.sv` | both halves side by side |
| `tb/aes_ref_pkg.sv` | independent reference AES, used by the testbenches |
| `tb/cfg_mem_model.sv` | behavioural ICAP + frame ECC + configuration memory (not synthesizable) |
| `tb/tb_*.sv` | one self-checking testbench per block, and `tb_ft_system_top` end to end |

## The AES core (`aes32_oed`)

### Datapath

One AES round is split into four quarter-rounds of one 32-bit column each. A
round therefore takes 4 cycles and a block takes 44: 4 load cycles plus 10
rounds. The round is reordered to ShiftRows, then SubBytes and MixColumns
merged into one table look-up, then AddRoundKey. This is legal because
SubBytes works byte by byte.

* **ShiftRows** is not wiring here. Each state row is an 8-deep byte shift
  register that takes one new byte per cycle. The byte that ShiftRows needs
  for row r of output column c sits at depth `3 - srcol + qc`. Here `qc` is
  the quarter (0..3), and `srcol = qc + r` for encryption or `qc - r` for
  decryption. Both are taken mod 4, and the depth is kept within 0..7. The
  state of the previous round is still in the lower half of the register
  while the new round is shifted in on top of it.
* **CT-box.** A 36-bit word `CT0(s)` holds four bytes with their parity bits.
  The encryption half (address bit 8 = 0) holds `{2*SB, SB, ISB, 3*SB}`. The
  decryption half holds `{E*ISB, 9*ISB, D*ISB, B*ISB}`. The four T-tables of
  one round are byte rotations of `CT0`, so only `CT0` is stored. The second
  `SB` byte of a T-table word is a copy, so that slot holds `ISB`, which the
  key schedule needs.
* **Two ROMs against fault masking.** A dual-port ROM serves two look-ups per
  cycle, so two ROMs serve the four bytes of a column. In MixColumns, the
  `SB` byte enters an output byte from two consecutive tables. If those two
  tables were read from the same ROM, one bad cell would be XORed in twice
  and cancel out in the parity. So ROM A serves tables 0 and 2 and ROM B
  serves tables 1 and 3. A single bad cell then corrupts exactly one term.
* **Key schedule** (`mode = KEY`, 132 cycles). The 44 forward round-key words
  are made first, one per cycle. SubWord uses the `SB` bytes of the CT-box,
  and the round constant comes from an xtime LFSR. The inverse cipher uses
  the equivalent inverse cipher. It needs `InvMixColumns(k)` for round keys
  1 to 9, and that is computed with the ROM itself, two cycles per word:
  first `SB(k)`, then `XOR_r IT_r(SB(k_r))`, which equals `InvMixColumns(k)`.
  Round keys 0 and 10 only pass through `ISB(SB(k))`. All 88 words are kept
  with their parity bits: 44 forward and 44 inverse, 3168 bits.

### Error detection

Parity is even, one bit per byte. It is made at the data and key inputs. The
shift registers move it along with its byte. The CT-box stores pre-computed
parity bits. Parity is XORed through AddRoundKey and the round constant. The
constant's parity follows `p' = p xor a7`, where a7 is its top bit before
xtime. The parity is checked on the four CT-box input bytes in every cycle of
every process, and on the output words. `err_now` is the check in the current
cycle. `error` is a sticky copy that `err_clr` clears. The checking adds no
cycles.

### Interface and timing

Pulse `start` with `mode` (0 encrypt, 1 decrypt, 2 key expansion) while
`busy` is low. `din` is taken in the four cycles where `din_req` is high,
column 0 first, with row 0 in bits 31:24 as in FIPS-197. An encryption or a
decryption drives four result words in its last four busy cycles, with
`dout_valid` high. `done` marks the last cycle. Run a key expansion before
the first block and after every key change.

## The BIST (`aes_bist`)

One iteration is KEY, ENC, KEY, DEC, KEY, DEC. Each process takes the output
of the previous one as its input. A key expansion produces no output, so its
input is kept for the process that follows. The extra decryption and key
expansion are there because the `ISB` part of the ROM is read far less often
than the rest.

The control starts from an all-zero input (MUX1 = *Init*). A 4-word FIFO
holds the last output. During key expansion the FIFO feeds itself back
(MUX2). The run stops with `bist_fail` on the first parity error, or with
`bist_pass` after `MAX_ITER` = 100 iterations. An iteration takes 534 cycles
(132+44 three times, plus one start cycle per process), so a full run takes
53,400 cycles. `signature` is the FIFO content. Between runs the user ports
reach the core directly.

## The scrubber (`scrub_ctrl`)

### Frames, addresses and the syndrome

A Virtex-5 configuration frame is 41 words of 32 bits: 1300 data bits plus
12 ECC bits. The frame address (FAR) is {block type, top/bottom, row, major
column, minor frame}. `frame_addr_counter` counts minor fastest, then major,
row and top. It wraps to the first frame after the last. The default
geometry (2 x 2 x 38 x 36 = 5472 frames) is uniform. Real devices have
column-dependent minor counts.

The frame ECC primitive delivers a 12-bit syndrome with the last word of each
frame:

| S[11] | S[10:0] | meaning |
|---|---|---|
| 0 | 0 | no error |
| 1 | not 0 | single error at code S[10:0] |
| 1 | 0 | single error in the overall parity bit |
| 0 | not 0 | double error |

The mapping from a code to a frame bit is a choice of this design, defined in
`scrub_pkg`. The 12 ECC bits sit in word 20, bits 11:0. Check bit k has code
2^k, and bit 11 is the overall parity. Data bit d gets the d-th integer of 3
or more that is not a power of two. `scrub_err_locate` inverts this:
`d = h - 2 - floor(log2 h)`. It gives a word index and a 32-bit mask. The
real device uses its own mapping. To use one, change `scrub_err_locate` and
the model in `tb/cfg_mem_model.sv`.

### Operation

The scrubber has no processor. Its command words (sync, FAR write, read or
write commands, word counts, desync) are preloaded into the ECC RAM. A small
sequencer sends them to the ICAP, and table flags mark where the frame
address and the word count go. The state machine works as follows:

1. **Initiate readback** from the current frame to the end of the device. The
   word count is `remaining frames x 41`.
2. **Check frame.** Each frame streams through at one word per cycle, so a
   frame is checked every 41 cycles. Each `syndrome_valid` pulse advances the
   frame counter.
3. **Single error.** Stop the readback, then read the bad frame into the RAM
   frame buffer. Correct the bad word there with the mask. Write the frame
   back through FDRI. Then read it again to check it. If it is clean,
   `corrected` pulses and the readback starts again at the next frame.
4. **Double error, or a frame that is still bad after repair.** Go to Stop.
   `double_err` stays high and `err_far` holds the frame address.
5. After the last frame, `cycle_done` pulses and the readback starts again
   from the first frame.

Measured times: a full pass takes 224,369 cycles for 5472 frames (41 per
frame plus 17 of commands). A correction takes 175 cycles, from the bad
syndrome to the clean recheck.

The RAM corrects its own single-bit upsets on read but does not write them
back, like the block RAM ECC option. Its status outputs are `bram_sbiterr`
and `bram_dbiterr`.

## Triple modular redundancy and the watchdog

`scrub_tmr` instantiates three complete copies, each with its own RAM and its
own clock and reset inputs. The three clocks must be synchronous. A bitwise
majority voter drives the single ICAP. The ICAP read data and the syndrome
go back to all three copies. The status outputs are voted too, so an
outside monitor sees the majority. `copy_disagree` shows that one copy has
diverged.

A diverged copy stays wrong until reset, because nothing resynchronises it.
Two broken copies outvote the good one and the scrubber stops. This is what
`watchdog_timer` is for. `cycle_done` is its kick. If no kick arrives within
`TIMEOUT` = 2^18 cycles (a full pass at the default size is 224,369), or if
`double_err` rises, it pulses `reconfig` for one cycle. An outside circuit
must then reload the device from the golden image. In `ft_system_top` the
watchdog sits next to the scrubber. In a real system it belongs outside the
FPGA, and the three copies would get separate clock nets.

## Where this RTL departs from the original design, and what to trust

* **Memories are arrays with combinational read** (CT-box ROM, key RAM). The
  original uses synchronous FPGA block RAMs. A registered read would need
  another pipeline stage and a new schedule to keep 4 cycles per round.
* **Frame ECC bit layout, ICAP command sequences and FAR layout** come from
  this design or from the public Virtex-5 packet format. They were checked
  only against the behavioural model in `tb/cfg_mem_model.sv`, not against
  silicon. No pad frames are read.
* **Device size.** The reference figure for an XC5VLX30 is 226,115 cycles,
  which is 5515 frames. The uniform geometry cannot reproduce 5515 exactly,
  so the default is 5472 frames.
* **Correction time** is 175 cycles here against 210 in the reference
  figures. The difference comes from the command sequences.
* After a repair, the readback continues at the next frame, not at the first.
  A failed recheck counts as a double error.
* The inverse key expansion method and the 132-cycle key process, the
  user-port multiplexer of the BIST, the voted status outputs and
  `copy_disagree` are additions of this design.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. For example:

```
verilator --binary --timing -Mdir obj -y rtl -y tb \
    rtl/aes_pkg.sv rtl/scrub_pkg.sv tb/aes_ref_pkg.sv \
    tb/tb_ft_system_top.sv --top-module tb_ft_system_top
obj/Vtb_ft_system_top
```

The other testbenches build the same way, with their own top module. The
packages must come first on the command line.

* `tb_aes32_oed`: FIPS-197 known-answer tests, random keys and blocks against
  the reference model, cycle counts 132/44/44, and parity errors from a flipped
  key bit and from flipped ROM cells in both halves.
* `tb_aes_bist`: the 100-iteration signature against the reference loop, 534
  cycles per iteration, and a ROM cell upset caught by the BIST.
* `tb_bist_coverage`: the fault-coverage experiment. Each of the 36,864
  CT-box ROM cells is flipped in turn and a full BIST is run. All faults are
  caught: 50 % in the first iteration, 96.6 % within 10, and the last one in
  iteration 31. Every one of the 3,168 key-store cells, flipped after the key
  expansion that wrote it, is caught in the first iteration. The run takes
  about 30 s. Faults in the combinational logic are not
  covered: on an FPGA they are bit flips in look-up tables, whose list depends
  on the technology mapping.
* `tb_scrub_ctrl` (16 frames): 41-cycle frame checks, the pass length, 12
  single-upset repairs, a command RAM upset, a double upset and its frame
  address.
* `tb_scrub_tmr`: one copy forced into Stop is outvoted and repairs go on;
  two broken copies stop the scrubber.
* `tb_ft_system_top` (all defaults: 5472 frames, 100 BIST iterations,
  2^18-cycle watchdog, about 1.7 million cycles, a few seconds): every
  mechanism is made to happen and counted. These are the BIST pass and fail,
  an on-line parity error, single repairs, a command RAM correction, TMR
  masking, a double error, reconfiguration on a double error and on a
  timeout, and recovery after each reconfiguration.

Not built: the ICAP and frame ECC primitives (FPGA hard blocks; a
behavioural model is in `tb/`), the software recovery for multiprocessor
systems, and the fault-emulation tool.
