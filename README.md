# Programmable MBIST for NoC router FIFOs

In a network-on-chip, much of each router is taken up by its FIFO buffers. Faults in those
buffers are a large share of the faults that appear in the field. This design puts a small
memory BIST (built-in self-test) next to a router FIFO. It can be reprogrammed after fabrication
through an IEEE 1500 style serial wrapper.

The test is not hard-wired. A 24-bit instruction word chooses what the BIST does: one or two
fill-and-read-back passes over the FIFO, the data background of each pass, and their order. The
word is shifted in on one serial pin (WSI). The BIST then reports "done" and "pass/fail" in the
same register, and that result can be shifted back out on WSO. A different test needs only a
different word, not different hardware.

## Structure

```
             WSI                                                      WSO
              |                                                        ^
              +--> WIR (3 bit: 000 BYPASS, 001 EXTEST) ----------------+
              +--> WBYR (1 bit bypass) --------------------------------+
              +--> WBR (24 boundary cells) ----------------------------+
                    | parallel out (update stage)     ^ parallel in (capture)
                    v  load on TRANSFER_DR            |
        +-----------------------------------------------------------+
        | mbist_dut                                                 |
        |  instruction_register (24 bit) ---> bist_controller       |
        |        ^  test_started / test_done / result    |  |       |
        |        +---------------------------------------+  |       |
        |                                 write/read/data   v       |
        |  functional port (f_*) --mux--> mbist_fifo --> comparator |
        |                                  data_out   ^ expected    |
        +-----------------------------------------------------------+
```

| module | role |
|---|---|
| `mbist_pkg` | `instr_t` (the instruction word as a packed struct), wrapper instruction codes, widths |
| `wbr_cell` | one boundary cell. Shift: Reg←SI. Capture: Reg←PI. Update: PO←Reg. SO = Reg |
| `wbr` | 24 `wbr_cell`s in a chain. Carries the instruction in and the status out |
| `wir` | wrapper instruction register, with shift and update stages. Decodes EXTEST |
| `wbyr` | one-bit bypass register |
| `mbist_fifo` | the buffer under test: 16 × 16 bit synchronous FIFO with full and empty flags |
| `comparator` | registered compare of the FIFO output against the expected word |
| `instruction_register` | holds the instruction word. The BIST writes its status bits |
| `bist_controller` | state machine that runs the programmed test |
| `mbist_dut` | the core: the four blocks above plus the FIFO ownership multiplexer |
| `mbist_top` | wrapper (WIR, WBR, WBYR, WSO multiplexer) around `mbist_dut` |

## The instruction word

| bits | field | meaning in this design |
|---|---|---|
| 23 | `op1` | background of operation slot 1: 0 = `data`, 1 = `~data` |
| 22 | `pri1` | priority of slot 1 |
| 21 | `op0` | background of operation slot 0 |
| 20 | `pri0` | priority of slot 0 |
| 19 | `num_ops` | 0: run slot 0 only. 1: run both slots |
| 18:3 | `data` | 16-bit data background |
| 2 | `test_enable` | start a run. Cleared by the hardware when the run starts |
| 1 | `test_done` | set by the BIST when a run completes |
| 0 | `test_result` | 1 = PASS, 0 = FAIL. Valid when `test_done` is 1 |

The field positions are fixed by the architecture. How the operation and priority bits are
interpreted is this implementation's choice:

* **Operation slot.** Each slot is one pass over the FIFO. A pass writes the background until
  `FIFO_FULL`, then reads until `FIFO_EMPTY`, and compares every word it reads.
* **Order.** With two slots, the slot whose priority bit is 1 runs first. If the priorities are
  equal, slot 0 runs first.
* **Complementary passes.** A program with `num_ops = 1`, `op0 = 0` and `op1 = 1` writes and reads
  every bit of every FIFO word as both 0 and 1. This program detects any stuck-at fault on the
  data path.

Example: `37ffff` gives `op1=0 pri1=0 op0=1 pri0=1 num_ops=0 data=ffff test_enable=1`. That is one
pass with background `~ffff = 0000`. The `test_done` and `test_result` bits in the loaded word are
cleared when the run starts, so their loaded values have no effect.

## How a run proceeds

`bist_controller` starts when test mode (`tm`) and `test_enable` are both 1. On that cycle it
pulses `test_started`, and `instruction_register` clears `test_enable`, `test_done` and
`test_result`. The controller then goes through these states:

1. **FLUSH.** Reads the FIFO until it is empty, without comparing. Words left behind by router
   traffic are discarded, so they cannot disturb the test.
2. **WRITE.** Writes the pass's background on every cycle until `fifo_full`.
3. **READ.** Reads on every cycle until `fifo_empty`. The FIFO output is registered, so each
   read is followed one cycle later by a `compare` strobe. The comparator's `error` is sampled
   one cycle after that, and any error sets a sticky fail flag.
4. **DRAIN.** One cycle, so the last compare result can arrive.
5. WRITE, READ and DRAIN run again for the second slot, if there is one.
6. **DONE.** `test_done` pulses for one cycle with `test_result = !fail`. The instruction
   register stores both.

**Timing.** Take an empty FIFO of depth D, with no hold. `test_done` comes 2D+5 cycles after
`test_started`. A second operation adds 2D+3 cycles, and each leftover word adds one flush
cycle. The status bits appear in the instruction register one cycle later. At the default
D = 16, a one-operation run takes 37 cycles and a two-operation run takes 72.

**Hold.** `hold = 1` freezes the controller: it issues no read or write and keeps its state.
Compares already in flight still finish. A run is lengthened by exactly the number of held
cycles. This follows the architecture's requirement that an external signal can suspend the
BIST session.

**Abort.** If `tm` drops during a run, the controller returns to idle without `test_done`.

**Sharing the FIFO.** In normal mode the FIFO belongs to the functional (router) port `f_*`.
While the BIST is busy, functional requests are ignored. The router side then sees the FIFO as
both full and empty, so it neither pushes nor pops.

## Driving it through the wrapper

Everything runs on `wrck`. `wrstn` is an active-low reset. It clears the wrapper registers
asynchronously and drives the core's synchronous reset. All registers are shifted LSB first.

1. **Select EXTEST.** Set `select_wir=1`. Shift `001` (bit 0 first) with `shift_wr=1`, then pulse
   `update_wr`. The core is now in test mode: `tm` is 1 exactly while EXTEST is the active
   wrapper instruction.
2. **Load the instruction.** Set `select_wir=0`. Shift the 24-bit word with `shift_wr=1`, then
   pulse `update_wr` to move it to the WBR's parallel outputs. Then pulse `transfer_dr` to load
   it into the instruction register. The run starts on the next cycle.
3. **Read the result.** Wait for the `test_done` pin, or allow about 2D+10 cycles per pass.
   Then pulse `capture_wr` and shift 24 bits out of `wso`. Bit 0 comes out first and is
   `test_result`. Bit 1 is `test_done`, and bit 2 (`test_enable`) reads back as 0.
4. **Return to normal mode.** Load `000` (BYPASS) into the WIR. WSI then reaches WSO through
   the one-bit bypass register, and the FIFO returns to the router port.

`wso` shows the WIR while `select_wir` is 1. Otherwise it shows the WBR under EXTEST, and the
bypass register under BYPASS.

## Parameters

| parameter | default | where |
|---|---|---|
| instruction width | 24 | fixed by the architecture (`INSTR_W`) |
| data width | 16 | fixed by the architecture (`IR_DATA_W`). `DATA_W` in `mbist_fifo` and `comparator` |
| WIR width | 3 | fixed by the architecture |
| FIFO depth `DEPTH` | 16 | this design's choice. Parameter of `mbist_fifo`, `mbist_dut` and `mbist_top` |

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mbist_top \
  -y rtl -y tb -Irtl rtl/mbist_pkg.sv tb/tb_mbist_top.sv -o sim
./obj_dir/sim
```

Replace `tb_mbist_top` with any other testbench name. The testbenches are:

* `tb_wbr_cell`, `tb_wbr`, `tb_wir`, `tb_wbyr`, `tb_mbist_fifo`, `tb_comparator` and
  `tb_instruction_register` compare each block against a reference model. They use random
  stimulus from `$urandom`.
* `tb_bist_controller` uses its own FIFO and comparator models. It covers all 32 settings of the
  op, pri and num_ops bits. It checks the background and order of every written word, the
  number of reads and compares, the exact cycle count, PASS on a good FIFO and FAIL with an
  injected bit error. It also covers flush, hold and abort.
* `tb_mbist_dut` checks the assembled core: functional traffic, the `37ffff` example, two-pass
  programs, the lockout of the functional port, hold, and a FAIL caused by changing the
  background between fill and read-back.
* `tb_mbist_top` works end to end at the default size, through the wrapper pins only. It covers
  the bypass path, EXTEST, shifting in and transferring `37ffff`, reading back `37fffb` (done,
  pass), two operations, hold, a forced mismatch reported as FAIL, abort by switching to BYPASS,
  and normal traffic before and after. It counts each of these mechanisms and fails if one never
  occurs.
* `tb_mbist_stuck_faults` forces each of the 16 FIFO output bits stuck at 0 and at 1. It runs the
  complementary two-pass program through the wrapper each time, and checks that all 32 faults are
  reported as FAIL and that a fault-free FIFO passes.

## Departures and limits

* **Instruction semantics.** The meanings of the operation, priority and "number of operations"
  fields (see above) are this design's interpretation. Only their positions come from the
  architecture.
* **Comparator inputs.** The comparator checks the FIFO's read data against the data the BIST
  wrote. It does not compare instruction-register data with boundary-register data.
* **Patterns.** Each pass writes one constant background word. There are no address-dependent
  patterns or March elements. Every FIFO cell is still written and read in every pass.
* **Transparent testing is not built.** The FIFO contents are not preserved: leftover words are
  flushed and the buffer is empty after a run. Router traffic is held off for the whole run.
* **Wrapper simplifications.** `WSO` is not retimed on the falling edge of WRCK. Only the BYPASS
  and EXTEST wrapper instructions exist; other WIR codes act as BYPASS. `TRANSFER_DR` is used as
  the strobe that loads the WBR's parallel output into the instruction register.
* **One clock.** The wrapper and the core share one clock.
* **Beyond this RTL.** The router that owns the FIFO is not part of this RTL. Its side of the
  FIFO is the `f_*` port of `mbist_top`.
